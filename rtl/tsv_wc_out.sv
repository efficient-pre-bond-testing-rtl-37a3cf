// Basic wrapper cell for a transmit TSV (tx-TSV), augmented for pre-bond
// TSV delay test.
//
// A WC_SD1_CII cell whose CFO terminal drives the TSV through the functional
// inverting driver. Added is a mux, steered by VTE, in front of the capture
// input of m0: with VTE set SC captures the TSV node instead of CFI. The ring
// SC -> m1 -> inverting driver -> TSV -> VTE mux -> m0 -> SC has one
// inversion, so two fast capture edges return the shifted-in pattern for a
// fault-free TSV and its complement for a TSV that swings too slowly. During
// the test (VTE = 1) the tunable driver is switched to its weak setting so a
// slower test clock suffices.
//
// Ports: tsv_drv is the logic value at the driver output (always driven),
// tsv_weak is the driver's strength select S, tsv_in is the sensed TSV node.
// The structure follows the source paper's schematic; the signal that steers m1
// (mode) is this design's name. Timing: SC is loaded on the rising WRCK edge
// while shifting or capturing; the rest is combinational.
module tsv_wc_out
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

  logic sc;
  logic m_vte;
  logic m0;
  logic m1;

  assign m_vte = ctrl.vte ? tsv_in : cfi;
  assign m0    = ctrl.shift ? cti : m_vte;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn)                          sc <= 1'b0;
    else if (ctrl.shift || ctrl.capture) sc <= m0;
  end

  assign m1       = ctrl.mode ? sc : cfi;
  assign tsv_drv  = ~m1;        // functional driver is an inverter
  assign tsv_weak = ctrl.vte;   // weak drive during the TSV test
  assign cto      = sc;
endmodule
