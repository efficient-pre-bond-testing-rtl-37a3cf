// Full-size testbench: prebond_die with every parameter at its default
// (2 standard cells, 4 + 4 basic TSV cells, 2 + 2 two-storage TSV cells,
// all TSVs the nominal fault-free 50.9 fF via, x2 test drive).
// Runs the complete pre-bond TSV test: load TSV_TEST, charging pattern,
// two fast WRCK edges at 1.14 GHz, unload while loading the discharging
// pattern, two fast edges, unload. Every TSV must pass. The same sequence
// at tL = 700 ps must see no TSV pass (a fault-free via needs about 833 ps).
// Also checks the shift-chain length through WSO and counts WRCK cycles
// of one complete test against the number worked out from the chain length.
module prebond_die_full_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NC = 2 + 4 + 4 + 2 + 2;
  localparam int unsigned NT = NC - 2;

  logic wrck = 0, wrstn = 0, select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0;
  logic wsi = 0, wso, vte;
  logic [1:0] std_cfi = 2'b10, std_cfo;
  logic [3:0] rx_cfo;
  logic [3:0] tx_cfi = '0;
  logic [1:0] rx2_cfo;
  logic [1:0] tx2_cfi = '0;
  int checks = 0, failures = 0;
  int unsigned edges = 0;

  prebond_die dut (.*);

  always @(posedge wrck) edges++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk();
    #10000 wrck = 1'b1;
    #10000 wrck = 1'b0;
  endtask

  task automatic load_instr(logic [2:0] code);
    select_wir = 1'b1; shift_wr = 1'b1;
    for (int i = 0; i < 3; i++) begin wsi = code[i]; clk(); end
    shift_wr = 1'b0; update_wr = 1'b1; clk();
    update_wr = 1'b0; select_wir = 1'b0;
  endtask

  task automatic shift_wbr(input logic [NC-1:0] din, output logic [NC-1:0] dout);
    shift_wr = 1'b1;
    for (int k = NC - 1; k >= 0; k--) begin
      wsi = din[k];
      #1 dout[k] = wso;
      clk();
    end
    shift_wr = 1'b0;
  endtask

  task automatic load_pattern(logic p, output logic [NC-1:0] unloaded);
    logic [NC-1:0] dummy;
    shift_wbr({NC{~p}}, unloaded);
    update_wr = 1'b1; clk(); update_wr = 1'b0;
    shift_wbr({NC{p}}, dummy);
    #20000;
  endtask

  task automatic capture_fast(int unsigned period);
    capture_wr = 1'b1; update_wr = 1'b1;
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
    capture_wr = 1'b0; update_wr = 1'b0;
  endtask

  initial begin
    logic [NC-1:0] res, dummy;
    logic [NT-1:0] pass_chg, pass_dis;
    int unsigned e0;
    repeat (2) clk();
    wrstn = 1'b1;
    load_instr(3'b010);
    chk(vte, "TSV_TEST sets VTE");
    for (int w = 0; w < 2; w++) begin
      int unsigned per;
      per = (w == 0) ? 877 : 700;
      e0 = edges;
      load_pattern(1'b1, dummy);
      capture_fast(per);
      load_pattern(1'b0, res);
      pass_chg = res[NC-1:2];
      chk(res[1:0] == std_cfi, "standard cells capture CFI");
      capture_fast(per);
      shift_wbr('0, res);
      pass_dis = ~res[NC-1:2];
      // Per pattern: 2 x NC shift edges, 1 update, 2 fast edges; the last
      // unload is NC edges: 5 * NC + 6 in all.
      chk(edges - e0 == 2 * (2 * NC + 1 + 2) + NC, "WRCK edges of one test");
      if (w == 0) begin
        chk(pass_chg == '1, "all TSVs pass charging at 1.14 GHz");
        chk(pass_dis == '1, "all TSVs pass discharging at 1.14 GHz");
      end else begin
        chk(pass_chg == '0, "no TSV passes charging at tL");
        chk(pass_dis == '0, "no TSV passes discharging at tL");
      end
      $display("period %0d ps: pass charging %b discharging %b", per, pass_chg, pass_dis);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
