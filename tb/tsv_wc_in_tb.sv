// Self-checking testbench of tsv_wc_in, the rx-TSV basic cell.
// Part 1: random controls with the TSV node driven by the testbench; a
// reference model of SC checks CTO, CFO (inverting receiver), the test
// driver value (~SC) and its enable (VTE).
// Part 2: the TSV node is made to follow the test driver after a chosen
// delay, and the two-fast-edge test is run for patterns 1 and 0 with a node
// faster and slower than the fast clock period: the cell must return the
// pattern for the fast node and its complement for the slow one.
module tsv_wc_in_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic wrck = 1'b0, wrstn = 1'b0, cti = 1'b0, cto, cfo;
  logic tsv_in, tsv_drv, tsv_drv_en;
  logic tb_node = 1'b0;
  logic loop_mode = 1'b0;   // 1: node follows the driver with loop_delay
  int   loop_delay = 500;
  logic loop_node = 1'b0;
  cell_ctrl_t ctrl = '0;
  logic sc_ref = 1'b0;
  int checks = 0, failures = 0;

  tsv_wc_in dut (.*);

  assign tsv_in = loop_mode ? loop_node : tb_node;

  // Ideal TSV with inertial delay loop_delay.
  int unsigned seq = 0;
  always @(tsv_drv or tsv_drv_en) begin
    seq++;
    if (tsv_drv_en) begin
      fork
        begin
          automatic int unsigned s = seq;
          automatic logic v = tsv_drv;
          #(loop_delay);
          if (s == seq) loop_node = v;
        end
      join_none
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks += 4;
    if (cto !== sc_ref) begin failures++; $display("%s: cto=%b exp %b", what, cto, sc_ref); end
    if (cfo !== (ctrl.mode ? sc_ref : ~tsv_in)) begin failures++; $display("%s: cfo", what); end
    if (tsv_drv !== ~sc_ref) begin failures++; $display("%s: tsv_drv", what); end
    if (tsv_drv_en !== ctrl.vte) begin failures++; $display("%s: tsv_drv_en", what); end
  endtask

  task automatic clk(int unsigned period);
    #(period / 2) wrck = 1'b1;
    #(period / 2) wrck = 1'b0;
  endtask

  // Two-fast-edge TSV test of one pattern; returns the captured SC.
  task automatic tsv_test(logic pattern, int unsigned delay, int unsigned period,
                          output logic result);
    loop_delay = delay;
    ctrl = '0; ctrl.mode = 1'b1; ctrl.vte = 1'b1; ctrl.shift = 1'b1;
    cti = pattern;
    clk(20000);
    ctrl.shift = 1'b0;
    #20000;                           // node settles to ~pattern
    ctrl.capture = 1'b1;
    #(period / 2) wrck = 1'b1;        // launch edge
    #(period / 2) wrck = 1'b0;
    #(period / 2) wrck = 1'b1;        // capture edge, one period later
    #(period / 2) wrck = 1'b0;
    ctrl.capture = 1'b0;
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
      if (ctrl.shift) sc_ref = cti; else if (ctrl.capture) sc_ref = tb_node;
      #1 check("edge");
      #4999 wrck = 1'b0;
    end
    // Part 2: delay test through the feedback ring.
    loop_mode = 1'b1;
    for (int p = 0; p < 2; p++) begin
      tsv_test(1'(p), 600, 877, r);   // fast node: pattern returns
      checks++;
      if (r !== 1'(p)) begin failures++; $display("fast node, pattern %0d: got %b", p, r); end
      tsv_test(1'(p), 1100, 877, r);  // slow node: complement returns
      checks++;
      if (r !== ~1'(p)) begin failures++; $display("slow node, pattern %0d: got %b", p, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
