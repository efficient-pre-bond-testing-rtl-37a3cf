// Two-storage wrapper cell for a transmit TSV (tx-TSV), augmented for
// pre-bond TSV delay test.
//
// F0 is the shift/capture element on the CTI-CTO path, F1 the update element
// that drives the TSV through the functional tunable buffer in test mode.
// With VTE set the buffer is switched to weak drive and F0 captures the TSV
// node (the CFO side) instead of CFI:
//   F0 <= SHIFT ? CTI : (VTE ? TSV : CFI)
//   TSV  = buffer(mode ? F1 : CFI), weak while VTE, strong otherwise
// The test sequence is the one of tsv_wc_sd2_in: F1 launches on an update
// edge and F0 captures on the following edge.
//
// The equations follow the source paper's guideline for cells with more than one
// storage element. The non-inverting buffer, the rising-edge update and the
// reset are this design's choices. Ports as in tsv_wc_out.
module tsv_wc_sd2_out
  import tsv_pkg::*;
(
  input  logic       wrck,
  input  logic       wrstn,
  input  cell_ctrl_t ctrl,
  input  logic       cti,
  input  logic       cfi,
  output logic       cto,
  output logic       tsv_drv,
  output logic       tsv_weak,
  input  logic       tsv_in
);
  timeunit 1ps;
  timeprecision 1ps;

  logic f0;
  logic f1;
  logic cap_src;

  assign cap_src = ctrl.vte ? tsv_in : cfi;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      f0 <= 1'b0;
      f1 <= 1'b0;
    end else begin
      if (ctrl.shift || ctrl.capture) f0 <= ctrl.shift ? cti : cap_src;
      if (ctrl.update)                f1 <= f0;
    end
  end

  assign tsv_drv  = ctrl.mode ? f1 : cfi;
  assign tsv_weak = ctrl.vte;
  assign cto      = f0;
endmodule
