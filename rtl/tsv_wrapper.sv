// IEEE 1500 wrapper of a die with TSV terminals, prepared for pre-bond TSV
// delay test.
//
// Holds the wrapper instruction register (wir), a one-bit bypass register
// (WBY) and the wrapper boundary register (WBR), a scan chain of boundary
// cells in this order from WSI to WSO:
//   N_STD   standard WC_SD1_CII cells for terminals that are not TSVs
//   N_RX    augmented basic cells on receive TSVs        (tsv_wc_in)
//   N_TX    augmented basic cells on transmit TSVs       (tsv_wc_out)
//   N_RX2   augmented two-storage cells on receive TSVs  (tsv_wc_sd2_in)
//   N_TX2   augmented two-storage cells on transmit TSVs (tsv_wc_sd2_out)
// The WSP controls ShiftWR, CaptureWR and UpdateWR reach the cells only while
// SelectWIR is low and the instruction selects the WBR. Loading TSV_TEST sets
// VTE in every cell, so all TSVs are tested at once: shift a pattern in,
// give two fast WRCK edges with CaptureWR (and UpdateWR for two-storage
// cells), shift the results out.
//
// TSV terminals appear as split tri-state signals: *_tsv_drv / *_tsv_drv_en
// or *_tsv_weak out of the die, *_tsv_in back from the TSV node. The cell
// counts are this design's defaults (the source paper fixes none); the
// instruction-gated WSP, the bypass bit and the chain order are this
// design's choices in line with IEEE 1500. All flops are clocked on the
// rising edge of WRCK and reset asynchronously by WRSTN low.
module tsv_wrapper
  import tsv_pkg::*;
#(
  parameter int unsigned N_STD = 2,
  parameter int unsigned N_RX  = 4,
  parameter int unsigned N_TX  = 4,
  parameter int unsigned N_RX2 = 2,
  parameter int unsigned N_TX2 = 2
) (
  // wrapper serial port
  input  logic             wrck,
  input  logic             wrstn,
  input  logic             select_wir,
  input  logic             shift_wr,
  input  logic             capture_wr,
  input  logic             update_wr,
  input  logic             wsi,
  output logic             wso,
  // instruction status
  output logic             vte,
  // non-TSV terminals
  input  logic [N_STD-1:0] std_cfi,
  output logic [N_STD-1:0] std_cfo,
  // receive TSVs, basic cells
  output logic [N_RX-1:0]  rx_cfo,
  input  logic [N_RX-1:0]  rx_tsv_in,
  output logic [N_RX-1:0]  rx_tsv_drv,
  output logic [N_RX-1:0]  rx_tsv_drv_en,
  // transmit TSVs, basic cells
  input  logic [N_TX-1:0]  tx_cfi,
  input  logic [N_TX-1:0]  tx_tsv_in,
  output logic [N_TX-1:0]  tx_tsv_drv,
  output logic [N_TX-1:0]  tx_tsv_weak,
  // receive TSVs, two-storage cells
  output logic [N_RX2-1:0] rx2_cfo,
  input  logic [N_RX2-1:0] rx2_tsv_in,
  output logic [N_RX2-1:0] rx2_tsv_drv,
  output logic [N_RX2-1:0] rx2_tsv_drv_en,
  // transmit TSVs, two-storage cells
  input  logic [N_TX2-1:0] tx2_cfi,
  input  logic [N_TX2-1:0] tx2_tsv_in,
  output logic [N_TX2-1:0] tx2_tsv_drv,
  output logic [N_TX2-1:0] tx2_tsv_weak
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NCELLS = N_STD + N_RX + N_TX + N_RX2 + N_TX2;
  localparam int unsigned B_RX   = N_STD;
  localparam int unsigned B_TX   = B_RX + N_RX;
  localparam int unsigned B_RX2  = B_TX + N_TX;
  localparam int unsigned B_TX2  = B_RX2 + N_RX2;

  wir_opcode_e instr;
  logic        mode;
  logic        wbr_sel;
  logic        wir_wso;
  logic        wby_q;
  cell_ctrl_t  ctrl;
  logic [NCELLS:0] chain;

  wir u_wir (
    .wrck, .wrstn, .wsi, .select_wir, .shift_wr, .update_wr,
    .wso(wir_wso), .instr, .mode, .vte, .wbr_sel
  );

  // Bypass register: shifts whenever the data register path is not the WBR.
  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn)                               wby_q <= 1'b0;
    else if (!select_wir && !wbr_sel && shift_wr) wby_q <= wsi;
  end

  always_comb begin
    ctrl.shift   = shift_wr   && !select_wir && wbr_sel;
    ctrl.capture = capture_wr && !select_wir && wbr_sel;
    ctrl.update  = update_wr  && !select_wir && wbr_sel;
    ctrl.mode    = mode;
    ctrl.vte     = vte;
  end

  assign chain[0] = wsi;

  for (genvar i = 0; i < N_STD; i++) begin : g_std
    wc_sd1_cii u_cell (
      .wrck, .wrstn, .ctrl,
      .cti(chain[i]), .cto(chain[i+1]),
      .cfi(std_cfi[i]), .cfo(std_cfo[i])
    );
  end

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    tsv_wc_in u_cell (
      .wrck, .wrstn, .ctrl,
      .cti(chain[B_RX+i]), .cto(chain[B_RX+i+1]),
      .cfo(rx_cfo[i]),
      .tsv_in(rx_tsv_in[i]), .tsv_drv(rx_tsv_drv[i]), .tsv_drv_en(rx_tsv_drv_en[i])
    );
  end

  for (genvar i = 0; i < N_TX; i++) begin : g_tx
    tsv_wc_out u_cell (
      .wrck, .wrstn, .ctrl,
      .cti(chain[B_TX+i]), .cto(chain[B_TX+i+1]),
      .cfi(tx_cfi[i]),
      .tsv_drv(tx_tsv_drv[i]), .tsv_weak(tx_tsv_weak[i]), .tsv_in(tx_tsv_in[i])
    );
  end

  for (genvar i = 0; i < N_RX2; i++) begin : g_rx2
    tsv_wc_sd2_in u_cell (
      .wrck, .wrstn, .ctrl,
      .cti(chain[B_RX2+i]), .cto(chain[B_RX2+i+1]),
      .cfo(rx2_cfo[i]),
      .tsv_in(rx2_tsv_in[i]), .tsv_drv(rx2_tsv_drv[i]), .tsv_drv_en(rx2_tsv_drv_en[i])
    );
  end

  for (genvar i = 0; i < N_TX2; i++) begin : g_tx2
    tsv_wc_sd2_out u_cell (
      .wrck, .wrstn, .ctrl,
      .cti(chain[B_TX2+i]), .cto(chain[B_TX2+i+1]),
      .cfi(tx2_cfi[i]),
      .tsv_drv(tx2_tsv_drv[i]), .tsv_weak(tx2_tsv_weak[i]), .tsv_in(tx2_tsv_in[i])
    );
  end

  assign wso = select_wir ? wir_wso : (wbr_sel ? chain[NCELLS] : wby_q);

  // WSP rule: a register either shifts or captures on an edge, not both.
  a_shift_xor_capture: assert property (@(posedge wrck) disable iff (!wrstn)
                                        !(shift_wr && capture_wr));
endmodule
