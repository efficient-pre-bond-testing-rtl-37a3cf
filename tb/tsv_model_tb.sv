// Self-checking testbench of tsv_model, the behavioural TSV and driver.
// Instantiates TSVs of 50.9, 50, 55 and 70 fF and the three defect classes,
// all driven by the same signal, and measures each node's rise and fall
// time against numbers worked out here from the test periods per strength
// (x2 weak: 877 ps, x4 strong: 541 ps, times 0.95 and the load over
// 50.9 fF). Also checks that a pulse shorter than the swing time is lost,
// that a disabled driver leaves the node alone, and the 1.14 GHz criterion:
// 50 fF swings within one 877 ps period, 55 fF does not.
module tsv_model_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 7;
  localparam int unsigned CAP [N] = '{509, 500, 550, 700, 509, 509, 509};
  // expected rise / fall time at x2 (weak): floor(877*95*cap/50900), defects scaled
  localparam int unsigned RISE [N] = '{833, 818, 900, 1145, 1249, 555, 277};
  localparam int unsigned FALL [N] = '{833, 818, 900, 1145,  416, 555, 277};

  logic drv = 1'b0, drv_en = 1'b1, weak_sel = 1'b1;
  logic [N-1:0] node;
  int checks = 0, failures = 0;

  tsv_model #(.CAP_DFF(CAP[0]))                       u0 (.drv, .drv_en, .weak_sel, .node(node[0]));
  tsv_model #(.CAP_DFF(CAP[1]))                       u1 (.drv, .drv_en, .weak_sel, .node(node[1]));
  tsv_model #(.CAP_DFF(CAP[2]))                       u2 (.drv, .drv_en, .weak_sel, .node(node[2]));
  tsv_model #(.CAP_DFF(CAP[3]))                       u3 (.drv, .drv_en, .weak_sel, .node(node[3]));
  tsv_model #(.CAP_DFF(CAP[4]), .DEFECT(TSV_PINHOLE)) u4 (.drv, .drv_en, .weak_sel, .node(node[4]));
  tsv_model #(.CAP_DFF(CAP[5]), .DEFECT(TSV_VOID))    u5 (.drv, .drv_en, .weak_sel, .node(node[5]));
  tsv_model #(.CAP_DFF(CAP[6]), .DEFECT(TSV_OPEN))    u6 (.drv, .drv_en, .weak_sel, .node(node[6]));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(logic value, int unsigned exp_ps [N], string what);
    time t0;
    logic [N-1:0] done;
    int unsigned took [N];
    t0 = $time;
    drv = value;
    done = '0;
    while (done != '1 && $time - t0 < 5000) begin
      #1;
      for (int i = 0; i < N; i++)
        if (!done[i] && node[i] == value) begin done[i] = 1'b1; took[i] = int'($time - t0); end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (!done[i] || took[i] != exp_ps[i]) begin
        failures++;
        $display("%s tsv %0d: took %0d ps, exp %0d", what, i, took[i], exp_ps[i]);
      end
    end
  endtask

  initial begin
    #10000;
    measure(1'b1, RISE, "rise");
    #10000;
    measure(1'b0, FALL, "fall");
    #10000;
    // 1.14 GHz criterion at x2.
    drv = 1'b1; #877;
    checks += 2;
    if (node[1] !== 1'b1) begin failures++; $display("50 fF not swung in 877 ps"); end
    if (node[2] !== 1'b0) begin failures++; $display("55 fF swung in 877 ps"); end
    drv = 1'b0; #10000;
    // A short pulse is lost on every TSV.
    drv = 1'b1; #200; drv = 1'b0; #5000;
    checks++;
    if (node !== '0) begin failures++; $display("short pulse reached node"); end
    // Strong drive (x4): nominal TSV swings in floor(541*95*509/50900) = 513 ps.
    weak_sel = 1'b0; #10000;
    drv = 1'b1; #512;
    checks++;
    if (node[0] !== 1'b0) begin failures++; $display("strong: too early"); end
    #2;
    checks++;
    if (node[0] !== 1'b1) begin failures++; $display("strong: too late"); end
    // Disabled driver: node keeps its charge.
    drv_en = 1'b0; #10; drv = 1'b0; #5000;
    checks++;
    if (node[0] !== 1'b1) begin failures++; $display("floating node changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
