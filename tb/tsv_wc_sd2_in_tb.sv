// Self-checking testbench of tsv_wc_sd2_in, the two-storage rx-TSV cell.
// Part 1: random controls with the TSV node driven by the testbench; a
// reference model of F0 (shift/capture) and F1 (update) checks every output.
// Part 2: the TSV node follows the driver after a chosen delay. The test
// loads the complement of the pattern and updates it into F1, loads the
// pattern, then gives two fast WRCK edges with capture and update enabled:
// F0 must hold the pattern for a fast node and its complement for a slow one.
module tsv_wc_sd2_in_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic wrck = 1'b0, wrstn = 1'b0, cti = 1'b0, cto, tsv_in, tsv_drv;
  logic cfo, tsv_drv_en;
  logic tb_node = 1'b0;
  logic loop_mode = 1'b0;
  int   loop_delay = 500;
  logic loop_node = 1'b0;
  cell_ctrl_t ctrl = '0;
  logic f0_ref = 1'b0, f1_ref = 1'b0;
  int checks = 0, failures = 0;

  tsv_wc_sd2_in dut (.*);

  assign tsv_in = loop_mode ? loop_node : tb_node;

  int unsigned seq = 0;
  always @(tsv_drv or ctrl) begin
    seq++;
    if (tsv_drv_en)
    fork
      begin
        automatic int unsigned s = seq;
        automatic logic v = tsv_drv;
        #(loop_delay);
        if (s == seq) loop_node = v;
      end
    join_none
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks += 4;
    if (cto !== f0_ref) begin failures++; $display("%s: cto", what); end
    if (tsv_drv !== f1_ref) begin failures++; $display("%s: tsv_drv", what); end
    if (tsv_drv_en !== ctrl.vte) begin failures++; $display("%s: tsv_drv_en", what); end
    if (cfo !== (ctrl.mode ? f1_ref : tsv_in)) begin failures++; $display("%s: cfo", what); end
  endtask

  task automatic clk(int unsigned period);
    #(period / 2) wrck = 1'b1;
    #(period / 2) wrck = 1'b0;
  endtask

  task automatic tsv_test(logic pattern, int unsigned delay, int unsigned period,
                          output logic result);
    loop_delay = delay;
    ctrl = '0; ctrl.mode = 1'b1; ctrl.vte = 1'b1;
    ctrl.shift = 1'b1; cti = ~pattern; clk(20000);        // load complement
    ctrl.shift = 1'b0; ctrl.update = 1'b1; clk(20000);    // F1 = ~pattern
    ctrl.update = 1'b0; ctrl.shift = 1'b1; cti = pattern; clk(20000);
    ctrl.shift = 1'b0;
    #20000;
    ctrl.capture = 1'b1; ctrl.update = 1'b1;
    #(period / 2) wrck = 1'b1;        // launch from F1
    #(period / 2) wrck = 1'b0;
    #(period / 2) wrck = 1'b1;        // capture into F0
    #(period / 2) wrck = 1'b0;
    ctrl.capture = 1'b0; ctrl.update = 1'b0;
    result = cto;
  endtask

  initial begin
    logic r;
    repeat (2) clk(10000);
    wrstn = 1'b1;
    #1 check("reset");
    repeat (2000) begin
      ctrl.shift   = $urandom_range(0, 1);
      ctrl.capture = ctrl.shift ? 1'b0 : 1'($urandom_range(0, 1));
      ctrl.update  = $urandom_range(0, 1);
      ctrl.mode    = $urandom_range(0, 1);
      ctrl.vte     = $urandom_range(0, 1);
      cti     = $urandom_range(0, 1);

      tb_node = $urandom_range(0, 1);
      #1 check("comb");
      #4999 wrck = 1'b1;
      if (ctrl.update) f1_ref = f0_ref;
      if (ctrl.shift) f0_ref = cti; else if (ctrl.capture) f0_ref = tb_node;
      #1 check("edge");
      #4999 wrck = 1'b0;
    end
    loop_mode = 1'b1;
    for (int p = 0; p < 2; p++) begin
      tsv_test(1'(p), 600, 877, r);
      checks++;
      if (r !== 1'(p)) begin failures++; $display("fast node, pattern %0d: got %b", p, r); end
      tsv_test(1'(p), 1100, 877, r);
      checks++;
      if (r !== ~1'(p)) begin failures++; $display("slow node, pattern %0d: got %b", p, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
