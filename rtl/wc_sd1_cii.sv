// IEEE 1500 basic wrapper cell WC_SD1_CII (one storage element, unmodified).
//
// The single storage element SC is loaded on a rising WRCK edge while the
// wrapper shifts or captures: mux m0 picks CTI when shifting and CFI when
// capturing. Mux m1 passes CFI to CFO in functional mode and drives the
// value held in SC in test mode. CTO is SC, the next cell's CTI.
//
// The wrapper uses this cell for die terminals that are not TSVs. Structure
// (m0, m1, SC) follows the source paper's schematic of the basic cell; the
// clock enable (shift or capture) and the asynchronous reset are this
// design's choices.
module wc_sd1_cii
  import tsv_pkg::*;
(
  input  logic       wrck,
  input  logic       wrstn,
  input  cell_ctrl_t ctrl,
  input  logic       cti,
  input  logic       cfi,
  output logic       cto,
  output logic       cfo
);
  timeunit 1ps;
  timeprecision 1ps;

  logic sc;
  logic m0;

  assign m0 = ctrl.shift ? cti : cfi;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn)                          sc <= 1'b0;
    else if (ctrl.shift || ctrl.capture) sc <= m0;
  end

  assign cto = sc;
  assign cfo = ctrl.mode ? sc : cfi;
endmodule
