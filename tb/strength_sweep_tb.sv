// Drive-strength sweep: five dies whose TSV test drivers have strength x1,
// x2, x4, x8 and x16. Each die has one standard cell, two basic rx-TSVs and
// two basic tx-TSVs (50.9 fF and 55 fF each) and one two-storage rx- and
// tx-TSV (50.9 fF). All dies share the wrapper serial port input and are
// tested together, once at each strength's test clock (400, 1140, 1850,
// 2650 and 3250 MHz, periods 2500, 877, 541, 377 and 308 ps). At its own
// clock each die must pass every 50.9 fF TSV and catch both 55 fF TSVs;
// the x1 die must also fail its nominal TSVs at the x2 clock (1.14 GHz),
// which shows that a weaker driver needs a slower test clock.
module strength_sweep_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NS = 5;
  localparam int unsigned STRENGTH [NS] = '{1, 2, 4, 8, 16};
  localparam int unsigned PERIOD   [NS] = '{2500, 877, 541, 377, 308};
  localparam int unsigned NC = 1 + 2 + 2 + 1 + 1;

  logic wrck = 0, wrstn = 0, select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0;
  logic wsi = 0;
  logic [NS-1:0] wso, vte;
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_die
    logic       std_cfo;
    logic [1:0] rx_cfo;
    logic       rx2_cfo;
    prebond_die #(
      .N_STD(1), .N_RX(2), .N_TX(2), .N_RX2(1), .N_TX2(1),
      .TX_WEAK_X(STRENGTH[s]), .RX_TEST_X(STRENGTH[s]),
      .RX_CAP_DFF({16'd550, 16'd509}), .TX_CAP_DFF({16'd550, 16'd509})
    ) dut (
      .wrck, .wrstn, .select_wir, .shift_wr, .capture_wr, .update_wr,
      .wsi, .wso(wso[s]), .vte(vte[s]),
      .std_cfi(1'b0), .std_cfo, .rx_cfo, .tx_cfi(2'b00), .rx2_cfo, .tx2_cfi(1'b0)
    );
  end

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

  task automatic shift_wbr(input logic [NC-1:0] din, output logic [NC-1:0] dout [NS]);
    shift_wr = 1'b1;
    for (int k = NC - 1; k >= 0; k--) begin
      wsi = din[k];
      #1;
      for (int s = 0; s < NS; s++) dout[s][k] = wso[s];
      clk();
    end
    shift_wr = 1'b0;
  endtask

  // Charging test at one period; returns the pass vector of each die
  // (TSV cells only, chain order rx0 rx1 tx0 tx1 rx2 tx2).
  task automatic charge_test(int unsigned period, output logic [NC-2:0] pass [NS]);
    logic [NC-1:0] res [NS];
    shift_wbr('0, res);
    update_wr = 1'b1; clk(); update_wr = 1'b0;
    shift_wbr('1, res);
    #20000;
    capture_wr = 1'b1; update_wr = 1'b1;
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
    capture_wr = 1'b0; update_wr = 1'b0;
    shift_wbr('0, res);
    for (int s = 0; s < NS; s++) pass[s] = res[s][NC-1:1];
  endtask

  initial begin
    logic [NC-2:0] pass [NS];
    repeat (2) clk();
    wrstn = 1'b1;
    load_instr(3'b010);
    chk(vte == '1, "VTE in all dies");
    for (int p = 0; p < NS; p++) begin
      charge_test(PERIOD[p], pass);
      // Expected at its own clock: rx0 pass, rx1 fail, tx0 pass, tx1 fail,
      // rx2 pass, tx2 pass (bit 0 = rx0).
      chk(pass[p] == 6'b110101, $sformatf("x%0d at %0d ps", STRENGTH[p], PERIOD[p]));
      $display("x%-2d die at %4d ps: pass %b", STRENGTH[p], PERIOD[p], pass[p]);
      if (p == 1) chk(pass[0] == '0, "x1 die fails every TSV at 1.14 GHz");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
