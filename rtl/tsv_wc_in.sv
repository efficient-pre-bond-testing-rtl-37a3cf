// Basic wrapper cell for a receive TSV (rx-TSV), augmented for pre-bond
// TSV delay test.
//
// A WC_SD1_CII cell whose CFI terminal is the TSV. Added is a test driver,
// an inverter enabled by VTE, that feeds the inverted SC value back onto the
// TSV node. With VTE set, SC -> inverter -> TSV -> m0 -> SC is a ring with
// one inversion: every WRCK edge in capture flips SC, provided the TSV node
// has swung before the edge. Two fast capture edges after the pattern is
// shifted in therefore return the pattern when the TSV is fault-free and its
// complement when the TSV is too slow.
//
// The tri-state TSV node is split into three plain signals: tsv_drv (value
// the test inverter drives), tsv_drv_en (1 while it drives, i.e. VTE) and
// tsv_in (the sensed node). The functional receive path to CFO passes
// through an inverting receiver, as in the source paper's schematic; its
// capture path takes the raw node. Timing: SC is loaded on the rising WRCK
// edge while shifting or capturing; everything else is combinational.
module tsv_wc_in
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

  logic sc;
  logic m0;

  assign m0 = ctrl.shift ? cti : tsv_in;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn)                          sc <= 1'b0;
    else if (ctrl.shift || ctrl.capture) sc <= m0;
  end

  // Test-dedicated inverter, enabled by VTE.
  assign tsv_drv    = ~sc;
  assign tsv_drv_en = ctrl.vte;

  assign cto = sc;
  assign cfo = ctrl.mode ? sc : ~tsv_in;
endmodule
