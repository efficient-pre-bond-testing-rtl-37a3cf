// Self-checking testbench of wc_sd1_cii, the standard basic wrapper cell.
// Random shift/capture/mode controls and random CTI/CFI for 2000 WRCK
// cycles; a reference model of SC predicts CTO and CFO, which are compared
// after every edge and after every input change.
module wc_sd1_cii_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic wrck = 1'b0, wrstn = 1'b0, cti = 1'b0, cfi = 1'b0, cto, cfo;
  cell_ctrl_t ctrl = '0;
  logic sc_ref = 1'b0;
  int checks = 0, failures = 0;

  wc_sd1_cii dut (.*);

  always #5000 wrck = ~wrck;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    logic exp_cfo;
    exp_cfo = ctrl.mode ? sc_ref : cfi;
    checks += 2;
    if (cto !== sc_ref) begin failures++; $display("%s: cto=%b exp %b", what, cto, sc_ref); end
    if (cfo !== exp_cfo) begin failures++; $display("%s: cfo=%b exp %b", what, cfo, exp_cfo); end
  endtask

  initial begin
    int n_shift = 0, n_capture = 0;
    repeat (2) @(negedge wrck);
    wrstn = 1'b1;
    check("reset");
    repeat (2000) begin
      @(negedge wrck);
      ctrl.shift   = $urandom_range(0, 1);
      ctrl.capture = ctrl.shift ? 1'b0 : 1'($urandom_range(0, 1));
      ctrl.update  = $urandom_range(0, 1);
      ctrl.mode    = $urandom_range(0, 1);
      ctrl.vte     = $urandom_range(0, 1);
      cti = $urandom_range(0, 1);
      cfi = $urandom_range(0, 1);
      #1;
      check("comb");
      @(posedge wrck);
      if (ctrl.shift)        begin sc_ref = cti; n_shift++;   end
      else if (ctrl.capture) begin sc_ref = cfi; n_capture++; end
      #1;
      check("edge");
    end
    checks++;
    if (n_shift == 0 || n_capture == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
