// Two-storage wrapper cell for a receive TSV (rx-TSV), augmented for
// pre-bond TSV delay test.
//
// F0 is the shift/capture element on the CTI-CTO path, F1 the update element
// that drives CFO in test mode. With VTE set, F1 drives the TSV node through
// a test-dedicated tri-state buffer and F0 captures that node, so the two
// storage elements form a launch/capture pair: F1 launches on an update edge,
// F0 captures on the next capture edge.
//   F0 <= SHIFT ? CTI : CFI        (CFI is the TSV node)
//   TSV driven with F1 while VTE
//   CFO  = mode ? F1 : CFI
// Test use: shift the complement of the pattern, update (F1 and the TSV
// settle to it), shift the pattern, then give two fast WRCK edges with both
// capture and update enabled. Edge 1 launches the pattern from F1, edge 2
// captures the TSV in F0: F0 holds the pattern for a fault-free TSV and its
// complement for a slow one.
//
// The F0/F1 equations follow the source paper's guideline for cells with more
// than one storage element. The non-inverting test buffer, the rising-edge
// update and the reset are this design's choices. Ports as in tsv_wc_in.
module tsv_wc_sd2_in
  import tsv_pkg::*;
(
  input  logic       wrck,
  input  logic       wrstn,
  input  cell_ctrl_t ctrl,
  input  logic       cti,
  output logic       cto,
  output logic       cfo,
  input  logic       tsv_in,
  output logic       tsv_drv,
  output logic       tsv_drv_en
);
  timeunit 1ps;
  timeprecision 1ps;

  logic f0;
  logic f1;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      f0 <= 1'b0;
      f1 <= 1'b0;
    end else begin
      if (ctrl.shift || ctrl.capture) f0 <= ctrl.shift ? cti : tsv_in;
      if (ctrl.update)                f1 <= f0;
    end
  end

  assign tsv_drv    = f1;
  assign tsv_drv_en = ctrl.vte;
  assign cto        = f0;
  assign cfo        = ctrl.mode ? f1 : tsv_in;
endmodule
