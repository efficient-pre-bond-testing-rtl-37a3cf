// Self-checking testbench of wir, the wrapper instruction register.
// Shifts every 3-bit code into the WIR (LSB first), updates it and checks
// the decoded mode, VTE and WBR select against a table written out here;
// checks that the shift register appears on WSO, that nothing changes
// without UpdateWR or with SelectWIR low, and that reset selects WS_BYPASS.
module wir_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic wrck = 1'b0, wrstn = 1'b0, wsi = 1'b0, select_wir = 1'b0;
  logic shift_wr = 1'b0, update_wr = 1'b0, wso, mode, vte, wbr_sel;
  wir_opcode_e instr;
  int checks = 0, failures = 0;

  wir dut (.*);

  always #5000 wrck = ~wrck;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dec(logic [2:0] code, string what);
    logic em, ev, es;
    case (code)
      3'b001:  begin em = 1; ev = 0; es = 1; end   // WS_EXTEST
      3'b010:  begin em = 1; ev = 1; es = 1; end   // TSV_TEST
      default: begin em = 0; ev = 0; es = 0; end   // WS_BYPASS and unused codes
    endcase
    checks++;
    if ({mode, vte, wbr_sel} !== {em, ev, es}) begin
      failures++;
      $display("%s code %b: mode/vte/wbr_sel=%b%b%b exp %b%b%b", what, code,
               mode, vte, wbr_sel, em, ev, es);
    end
  endtask

  task automatic load(logic [2:0] code, logic do_update);
    @(negedge wrck);
    select_wir = 1'b1; shift_wr = 1'b1;
    for (int i = 0; i < 3; i++) begin
      wsi = code[i];
      @(negedge wrck);
    end
    shift_wr = 1'b0;
    checks++;
    if (wso !== code[0]) begin failures++; $display("wso after shift"); end
    update_wr = do_update;
    @(negedge wrck);
    update_wr = 1'b0; select_wir = 1'b0;
  endtask

  initial begin
    logic [2:0] cur;
    repeat (2) @(negedge wrck);
    wrstn = 1'b1;
    expect_dec(3'b000, "reset");
    checks++;
    if (instr !== WS_BYPASS) failures++;
    cur = 3'b000;
    for (int c = 0; c < 8; c++) begin
      load(3'(c), 1'b1);
      cur = 3'(c);
      expect_dec(cur, "update");
      load(3'(~c), 1'b0);                  // no update: instruction holds
      expect_dec(cur, "no update");
    end
    // UpdateWR with SelectWIR low does nothing.
    @(negedge wrck); update_wr = 1'b1; @(negedge wrck); update_wr = 1'b0;
    expect_dec(cur, "unselected update");
    // Reset returns to WS_BYPASS.
    load(3'b010, 1'b1);
    expect_dec(3'b010, "tsv_test");
    wrstn = 1'b0; #1;
    expect_dec(3'b000, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
