// A die before bonding: its IEEE 1500 wrapper and the TSVs the wrapper
// cells connect to (top of the design).
//
// The synthesizable wrapper (tsv_wrapper) is instantiated together with one
// behavioural tsv_model per TSV terminal, which stands for the driver's
// strength and the via's load. Before bonding the far end of every TSV is
// unreachable, so the top has no TSV ports: a TSV is driven only by its
// wrapper cell (the functional inverter for tx-TSVs, the VTE test driver for
// rx-TSVs) and sensed back by the same cell. Per-TSV packed parameter arrays
// (element i for TSV i) set each via's capacitance (0.1 fF units) and defect
// class, so a testbench can
// build a die with chosen faults; by default every TSV is the nominal
// fault-free 50.9 fF via.
//
// Drive strengths: tx-TSV drivers are tunable, TX_STRONG_X in normal use and
// TX_WEAK_X (x2, the source paper's test setting) while VTE is set; the rx test
// drivers have a fixed strength RX_TEST_X. The wrapper serial port, the
// non-TSV terminals and the core-side terminals of the TSV cells are the
// ports. Everything is clocked by WRCK, which during a TSV test carries two
// pulses of the fast test clock.
module prebond_die
  import tsv_pkg::*;
#(
  parameter int unsigned N_STD       = 2,
  parameter int unsigned N_RX        = 4,
  parameter int unsigned N_TX        = 4,
  parameter int unsigned N_RX2       = 2,
  parameter int unsigned N_TX2       = 2,
  parameter int unsigned TX_STRONG_X = 4,
  parameter int unsigned TX_WEAK_X   = 2,
  parameter int unsigned RX_TEST_X   = 2,
  parameter logic [N_RX-1:0][15:0]  RX_CAP_DFF  = {N_RX{16'(TSV_CAP_NOM_DFF)}},
  parameter logic [N_TX-1:0][15:0]  TX_CAP_DFF  = {N_TX{16'(TSV_CAP_NOM_DFF)}},
  parameter logic [N_RX2-1:0][15:0] RX2_CAP_DFF = {N_RX2{16'(TSV_CAP_NOM_DFF)}},
  parameter logic [N_TX2-1:0][15:0] TX2_CAP_DFF = {N_TX2{16'(TSV_CAP_NOM_DFF)}},
  parameter tsv_defect_e [N_RX-1:0]  RX_DEFECT  = {N_RX{TSV_OK}},
  parameter tsv_defect_e [N_TX-1:0]  TX_DEFECT  = {N_TX{TSV_OK}},
  parameter tsv_defect_e [N_RX2-1:0] RX2_DEFECT = {N_RX2{TSV_OK}},
  parameter tsv_defect_e [N_TX2-1:0] TX2_DEFECT = {N_TX2{TSV_OK}}
) (
  input  logic             wrck,
  input  logic             wrstn,
  input  logic             select_wir,
  input  logic             shift_wr,
  input  logic             capture_wr,
  input  logic             update_wr,
  input  logic             wsi,
  output logic             wso,
  output logic             vte,
  input  logic [N_STD-1:0] std_cfi,
  output logic [N_STD-1:0] std_cfo,
  output logic [N_RX-1:0]  rx_cfo,
  input  logic [N_TX-1:0]  tx_cfi,
  output logic [N_RX2-1:0] rx2_cfo,
  input  logic [N_TX2-1:0] tx2_cfi
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_RX-1:0]  rx_node,  rx_drv,  rx_drv_en;
  logic [N_TX-1:0]  tx_node,  tx_drv,  tx_weak;
  logic [N_RX2-1:0] rx2_node, rx2_drv, rx2_drv_en;
  logic [N_TX2-1:0] tx2_node, tx2_drv, tx2_weak;

  tsv_wrapper #(
    .N_STD(N_STD), .N_RX(N_RX), .N_TX(N_TX), .N_RX2(N_RX2), .N_TX2(N_TX2)
  ) u_wrapper (
    .wrck, .wrstn, .select_wir, .shift_wr, .capture_wr, .update_wr,
    .wsi, .wso, .vte,
    .std_cfi, .std_cfo,
    .rx_cfo,  .rx_tsv_in(rx_node),   .rx_tsv_drv(rx_drv),   .rx_tsv_drv_en(rx_drv_en),
    .tx_cfi,  .tx_tsv_in(tx_node),   .tx_tsv_drv(tx_drv),   .tx_tsv_weak(tx_weak),
    .rx2_cfo, .rx2_tsv_in(rx2_node), .rx2_tsv_drv(rx2_drv), .rx2_tsv_drv_en(rx2_drv_en),
    .tx2_cfi, .tx2_tsv_in(tx2_node), .tx2_tsv_drv(tx2_drv), .tx2_tsv_weak(tx2_weak)
  );

  for (genvar i = 0; i < N_RX; i++) begin : g_rx_tsv
    tsv_model #(
      .CAP_DFF(32'(RX_CAP_DFF[i])), .DEFECT(RX_DEFECT[i]),
      .STRONG_X(RX_TEST_X), .WEAK_X(RX_TEST_X)
    ) u_tsv (
      .drv(rx_drv[i]), .drv_en(rx_drv_en[i]), .weak_sel(1'b1), .node(rx_node[i])
    );
  end

  for (genvar i = 0; i < N_TX; i++) begin : g_tx_tsv
    tsv_model #(
      .CAP_DFF(32'(TX_CAP_DFF[i])), .DEFECT(TX_DEFECT[i]),
      .STRONG_X(TX_STRONG_X), .WEAK_X(TX_WEAK_X)
    ) u_tsv (
      .drv(tx_drv[i]), .drv_en(1'b1), .weak_sel(tx_weak[i]), .node(tx_node[i])
    );
  end

  for (genvar i = 0; i < N_RX2; i++) begin : g_rx2_tsv
    tsv_model #(
      .CAP_DFF(32'(RX2_CAP_DFF[i])), .DEFECT(RX2_DEFECT[i]),
      .STRONG_X(RX_TEST_X), .WEAK_X(RX_TEST_X)
    ) u_tsv (
      .drv(rx2_drv[i]), .drv_en(rx2_drv_en[i]), .weak_sel(1'b1), .node(rx2_node[i])
    );
  end

  for (genvar i = 0; i < N_TX2; i++) begin : g_tx2_tsv
    tsv_model #(
      .CAP_DFF(32'(TX2_CAP_DFF[i])), .DEFECT(TX2_DEFECT[i]),
      .STRONG_X(TX_STRONG_X), .WEAK_X(TX_WEAK_X)
    ) u_tsv (
      .drv(tx2_drv[i]), .drv_en(1'b1), .weak_sel(tx2_weak[i]), .node(tx2_node[i])
    );
  end
endmodule
