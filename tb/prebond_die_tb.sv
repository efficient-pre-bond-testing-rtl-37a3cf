// End-to-end testbench of prebond_die: a die with chosen TSV faults goes
// through the pre-bond TSV test as a tester would run it.
//
// Die: 1 standard cell, 4 rx-TSVs (fault-free, pin-hole, void, open),
// 5 tx-TSVs of 50, 55, 60, 65 and 70 fF (the capacitance sweep at
// 1.14 GHz), 2 two-storage rx-TSVs (fault-free, pin-hole) and 2 two-storage
// tx-TSVs (fault-free, void). Sequence: load TSV_TEST; load the charging
// pattern (all ones); two fast WRCK edges; unload the results while loading
// the discharging pattern (all zeros); two fast edges; unload. This runs at
// the upper window limit tH = 877 ps (1.14 GHz), where every fault-free TSV
// must pass, and at a lower limit tL = 700 ps, where none may pass, so a
// TSV that passes there switches too fast. Two-storage cells get the
// complement of each pattern loaded and updated first. The expected
// verdicts are written out from the fault table (pin-hole: slower charge,
// faster discharge; void and open: both faster) and from the capacitance
// sweep (only 50 fF is captured at 1.14 GHz). Also checked: functional
// pass-through and the bypass bit under WS_BYPASS, the strong driver in
// functional use, EXTEST drive and capture. Each mechanism is counted; one
// that never happened is a failure.
module prebond_die_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_STD = 1, N_RX = 4, N_TX = 5, N_RX2 = 2, N_TX2 = 2;
  localparam int unsigned NC = N_STD + N_RX + N_TX + N_RX2 + N_TX2;
  localparam int unsigned NT = NC - N_STD;          // TSV cells
  localparam int unsigned T_H = 877, T_L = 700;

  logic wrck = 0, wrstn = 0, select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0;
  logic wsi = 0, wso, vte;
  logic [N_STD-1:0] std_cfi = '0, std_cfo;
  logic [N_RX-1:0]  rx_cfo;
  logic [N_TX-1:0]  tx_cfi = '0;
  logic [N_RX2-1:0] rx2_cfo;
  logic [N_TX2-1:0] tx2_cfi = '0;
  int checks = 0, failures = 0;

  prebond_die #(
    .N_STD(N_STD), .N_RX(N_RX), .N_TX(N_TX), .N_RX2(N_RX2), .N_TX2(N_TX2),
    // element 0 rightmost
    .RX_DEFECT  ({TSV_OPEN, TSV_VOID, TSV_PINHOLE, TSV_OK}),
    .TX_CAP_DFF ({16'd700, 16'd650, 16'd600, 16'd550, 16'd500}),
    .RX2_DEFECT ({TSV_PINHOLE, TSV_OK}),
    .TX2_DEFECT ({TSV_VOID, TSV_OK})
  ) dut (.*);

  // Expected pass (pattern returned) per TSV cell, index 0 = first rx cell,
  // in chain order rx[0..3], tx[0..4], rx2[0..1], tx2[0..1].
  //                                 rx      tx          rx2  tx2
  localparam logic [NT-1:0] EXP_H_CHG = {2'b11, 2'b01, 5'b00001, 4'b1101};
  localparam logic [NT-1:0] EXP_H_DIS = {2'b11, 2'b11, 5'b00001, 4'b1111};
  localparam logic [NT-1:0] EXP_L_CHG = {2'b10, 2'b00, 5'b00000, 4'b1100};
  localparam logic [NT-1:0] EXP_L_DIS = {2'b10, 2'b10, 5'b00000, 4'b1110};

  int n_charge = 0, n_discharge = 0, n_slow = 0, n_fast = 0, n_good = 0;
  int n_update_launch = 0, n_bypass = 0, n_extest = 0, n_strong = 0;

  initial begin
    #200_000_000;
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

  task automatic fast2(int unsigned period);
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
    #(period / 2)          wrck = 1'b1;
    #(period - period / 2) wrck = 1'b0;
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

  // Load pattern p into every cell (complement first, updated into F1 of
  // the two-storage cells); returns what was unloaded on the way.
  task automatic load_pattern(logic p, output logic [NC-1:0] unloaded);
    logic [NC-1:0] dummy;
    shift_wbr({NC{~p}}, unloaded);
    update_wr = 1'b1; clk(); update_wr = 1'b0;
    n_update_launch++;
    shift_wbr({NC{p}}, dummy);
    #20000;                                     // TSVs settle at slow speed
  endtask

  task automatic capture_fast(int unsigned period);
    capture_wr = 1'b1; update_wr = 1'b1;
    fast2(period);
    capture_wr = 1'b0; update_wr = 1'b0;
  endtask

  function automatic logic [NT-1:0] passed(logic [NC-1:0] r, logic p);
    return p ? r[NC-1:N_STD] : ~r[NC-1:N_STD];
  endfunction

  initial begin
    logic [NC-1:0] res, dummy;
    logic [NT-1:0] h_chg, h_dis, l_chg, l_dis, slow, fast;
    logic [15:0] stream;
    repeat (2) clk();
    wrstn = 1'b1;

    // Functional use (WS_BYPASS): data through the TSVs' cells, bypass bit.
    repeat (8) begin
      std_cfi = 1'($urandom); tx_cfi = 5'($urandom); tx2_cfi = 2'($urandom);
      #5000;
      chk(std_cfo == std_cfi, "functional std");
      for (int i = 0; i < N_TX; i++)
        chk(dut.tx_node[i] == ~tx_cfi[i], "functional tx TSV carries inverted data");
      chk(dut.tx2_node == tx2_cfi, "functional tx2 TSV");
      n_bypass++;
    end
    stream = 16'($urandom);
    shift_wr = 1'b1;
    for (int k = 0; k < 16; k++) begin
      wsi = stream[k]; clk();
      #1 chk(wso == stream[k], "bypass bit");
    end
    shift_wr = 1'b0;

    // Strong drive in functional use: the 60 fF TSV swings in
    // 0.95 * 541 ps * 60/50.9 = 605 ps, faster than the 877 ps test period.
    tx_cfi[2] = 1'b0; #5000;
    tx_cfi[2] = 1'b1; #620;
    chk(dut.tx_node[2] == 1'b0, "strong drive swings 60 fF within 620 ps");
    if (dut.tx_node[2] == 1'b0) n_strong++;
    #5000;

    // EXTEST: boundary cells drive the TSVs and the standard terminal.
    load_instr(3'b001);
    chk(!vte, "extest: vte off");
    load_pattern(1'b1, dummy);
    update_wr = 1'b1; clk(); update_wr = 1'b0;  // F1 of two-storage cells = 1
    #20000;
    chk(std_cfo == 1'b1, "extest std_cfo");
    chk(dut.tx_node == '0, "extest tx TSVs driven low by inverting drivers");
    chk(dut.tx2_node == '1, "extest tx2 TSVs driven high");
    std_cfi = 1'b0;
    capture_wr = 1'b1; clk(); capture_wr = 1'b0;
    shift_wbr('0, res);
    chk(res[0] == 1'b0, "extest capture std");
    n_extest++;

    // TSV_TEST at tH and tL.
    load_instr(3'b010);
    chk(vte, "tsv_test: vte on");
    for (int w = 0; w < 2; w++) begin
      int unsigned per;
      per = (w == 0) ? T_H : T_L;
      load_pattern(1'b1, dummy);                // charging sequence
      capture_fast(per);
      n_charge++;
      load_pattern(1'b0, res);                  // unload + discharging sequence
      if (w == 0) h_chg = passed(res, 1'b1); else l_chg = passed(res, 1'b1);
      capture_fast(per);
      n_discharge++;
      shift_wbr('0, res);                       // unload
      if (w == 0) h_dis = passed(res, 1'b0); else l_dis = passed(res, 1'b0);
    end
    chk(h_chg == EXP_H_CHG, "charging at 1.14 GHz");
    chk(h_dis == EXP_H_DIS, "discharging at 1.14 GHz");
    chk(l_chg == EXP_L_CHG, "charging at tL");
    chk(l_dis == EXP_L_DIS, "discharging at tL");
    $display("pass at tH charge %b discharge %b, at tL charge %b discharge %b",
             h_chg, h_dis, l_chg, l_dis);

    // Diagnosis: slow = missed at tH; fast = caught at tL.
    slow = ~(h_chg & h_dis);
    fast = l_chg | l_dis;
    for (int i = 0; i < NT; i++) begin
      if (slow[i]) n_slow++;
      if (fast[i]) n_fast++;
      if (!slow[i] && !fast[i]) n_good++;
    end
    // Fault-free: rx[0], tx[0] (50 fF), rx2[0], tx2[0].
    chk((~slow & ~fast) == NT'({4'b0101, 5'b00001, 4'b0001}), "diagnosis of fault-free TSVs");
    chk(slow[1] && fast[1], "pin-hole: slow charge, fast discharge");
    chk(!slow[2] && fast[2] && !slow[3] && fast[3], "void and open: fast");
    chk(slow[8:5] == 4'b1111, "55..70 fF detected as slow");

    chk(n_charge > 0,        "mechanism: charging test");
    chk(n_discharge > 0,     "mechanism: discharging test");
    chk(n_slow > 0,          "mechanism: slow TSV detected");
    chk(n_fast > 0,          "mechanism: fast TSV detected");
    chk(n_good > 0,          "mechanism: fault-free TSV passed");
    chk(n_update_launch > 0, "mechanism: two-storage launch by update");
    chk(n_bypass > 0,        "mechanism: functional mode");
    chk(n_extest > 0,        "mechanism: EXTEST");
    chk(n_strong > 0,        "mechanism: strong functional drive");
    $display("charge %0d discharge %0d slow %0d fast %0d good %0d update %0d bypass %0d extest %0d strong %0d",
             n_charge, n_discharge, n_slow, n_fast, n_good, n_update_launch, n_bypass,
             n_extest, n_strong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
