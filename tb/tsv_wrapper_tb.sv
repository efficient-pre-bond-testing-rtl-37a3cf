// Self-checking testbench of tsv_wrapper with its default cell counts.
// TSVs are ideal here (no delay; an undriven rx node keeps a value set by
// the testbench), so the test covers the wrapper's logic: functional
// pass-through and the bypass bit under WS_BYPASS, boundary-register drive,
// capture and shift under WS_EXTEST, and a complete TSV_TEST sequence in
// which every TSV cell must return its pattern while the standard cells
// capture their CFI. Chain length and order are checked through WSO.
module tsv_wrapper_tb;
  import tsv_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_STD = 2, N_RX = 4, N_TX = 4, N_RX2 = 2, N_TX2 = 2;
  localparam int unsigned NC = N_STD + N_RX + N_TX + N_RX2 + N_TX2;
  localparam int unsigned B_RX = N_STD, B_TX = B_RX + N_RX, B_RX2 = B_TX + N_TX,
                          B_TX2 = B_RX2 + N_RX2;

  logic wrck = 0, wrstn = 0, select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0;
  logic wsi = 0, wso, vte;
  logic [N_STD-1:0] std_cfi = '0, std_cfo;
  logic [N_RX-1:0]  rx_cfo, rx_tsv_in, rx_tsv_drv, rx_tsv_drv_en;
  logic [N_TX-1:0]  tx_cfi = '0, tx_tsv_in, tx_tsv_drv, tx_tsv_weak;
  logic [N_RX2-1:0] rx2_cfo, rx2_tsv_in, rx2_tsv_drv, rx2_tsv_drv_en;
  logic [N_TX2-1:0] tx2_cfi = '0, tx2_tsv_in, tx2_tsv_drv, tx2_tsv_weak;
  logic [N_RX-1:0]  rx_ext = '0;    // value on an undriven rx TSV
  logic [N_RX2-1:0] rx2_ext = '0;
  int checks = 0, failures = 0;

  tsv_wrapper dut (.*);

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    assign rx_tsv_in[i] = rx_tsv_drv_en[i] ? rx_tsv_drv[i] : rx_ext[i];
  end
  for (genvar i = 0; i < N_RX2; i++) begin : g_rx2
    assign rx2_tsv_in[i] = rx2_tsv_drv_en[i] ? rx2_tsv_drv[i] : rx2_ext[i];
  end
  assign tx_tsv_in  = tx_tsv_drv;
  assign tx2_tsv_in = tx2_tsv_drv;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clk();
    #5000 wrck = 1'b1;
    #5000 wrck = 1'b0;
  endtask

  task automatic load_instr(logic [2:0] code);
    select_wir = 1'b1; shift_wr = 1'b1;
    for (int i = 0; i < 3; i++) begin wsi = code[i]; clk(); end
    shift_wr = 1'b0; update_wr = 1'b1; clk();
    update_wr = 1'b0; select_wir = 1'b0;
  endtask

  // Shift the WBR: cell j receives din[j]; dout[j] is cell j's old value.
  task automatic shift_wbr(input logic [NC-1:0] din, output logic [NC-1:0] dout);
    shift_wr = 1'b1;
    for (int k = NC - 1; k >= 0; k--) begin
      wsi = din[k];
      #1 dout[k] = wso;
      clk();
    end
    shift_wr = 1'b0;
  endtask

  initial begin
    logic [NC-1:0] pat, got, dummy;
    logic [15:0] stream;
    int n_bypass = 0, n_extest = 0, n_tsv = 0;
    repeat (2) clk();
    wrstn = 1'b1;

    // WS_BYPASS: functional paths and the one-bit bypass.
    repeat (20) begin
      std_cfi = 2'($urandom); tx_cfi = 4'($urandom); tx2_cfi = 2'($urandom);
      rx_ext = 4'($urandom); rx2_ext = 2'($urandom);
      #1;
      chk(std_cfo == std_cfi, "bypass std_cfo");
      chk(tx_tsv_drv == ~tx_cfi, "bypass tx drive");
      chk(tx2_tsv_drv == tx2_cfi, "bypass tx2 drive");
      chk(rx_cfo == ~rx_ext, "bypass rx_cfo");
      chk(rx2_cfo == rx2_ext, "bypass rx2_cfo");
      chk(rx_tsv_drv_en == '0 && tx_tsv_weak == '0 && !vte, "bypass vte off");
    end
    stream = 16'($urandom);
    shift_wr = 1'b1;
    for (int k = 0; k < 16; k++) begin
      wsi = stream[k]; clk();
      #1 chk(wso == stream[k], "bypass bit");
    end
    shift_wr = 1'b0;
    n_bypass++;

    // WS_EXTEST: the WBR drives the terminals and captures them.
    load_instr(3'b001);
    chk(!vte, "extest vte off");
    pat = NC'({$urandom, $urandom});
    shift_wbr(pat, dummy);
    update_wr = 1'b1; clk(); update_wr = 1'b0;      // two-storage cells: F1 = F0
    #1;
    chk(std_cfo == pat[B_RX-1:0], "extest std_cfo");
    chk(rx_cfo == pat[B_TX-1:B_RX], "extest rx_cfo");
    chk(tx_tsv_drv == ~pat[B_RX2-1:B_TX], "extest tx drive");
    chk(rx2_cfo == pat[B_TX2-1:B_RX2], "extest rx2_cfo");
    chk(tx2_tsv_drv == pat[NC-1:B_TX2], "extest tx2 drive");
    std_cfi = 2'($urandom); tx_cfi = 4'($urandom); tx2_cfi = 2'($urandom);
    rx_ext = 4'($urandom); rx2_ext = 2'($urandom);
    capture_wr = 1'b1; clk(); capture_wr = 1'b0;
    shift_wbr('0, got);
    chk(got[B_RX-1:0] == std_cfi, "extest capture std");
    chk(got[B_TX-1:B_RX] == rx_ext, "extest capture rx");
    chk(got[B_RX2-1:B_TX] == tx_cfi, "extest capture tx");
    chk(got[B_TX2-1:B_RX2] == rx2_ext, "extest capture rx2");
    chk(got[NC-1:B_TX2] == tx2_cfi, "extest capture tx2");
    n_extest++;

    // TSV_TEST: charging (all ones) then discharging (all zeros) patterns,
    // then a random one.
    load_instr(3'b010);
    chk(vte && rx_tsv_drv_en == '1 && tx_tsv_weak == '1 && tx2_tsv_weak == '1, "vte on");
    for (int r = 0; r < 3; r++) begin
      pat = (r == 0) ? '1 : (r == 1) ? '0 : NC'({$urandom, $urandom});
      std_cfi = 2'($urandom);
      shift_wbr(~pat, dummy);                         // two-storage cells: complement
      update_wr = 1'b1; clk(); update_wr = 1'b0;
      shift_wbr(pat, dummy);
      #20000;
      capture_wr = 1'b1; update_wr = 1'b1;
      #438 wrck = 1'b1; #439 wrck = 1'b0;             // launch (1.14 GHz)
      #438 wrck = 1'b1; #439 wrck = 1'b0;             // capture
      capture_wr = 1'b0; update_wr = 1'b0;
      shift_wbr('0, got);
      chk(got[B_RX-1:0] == std_cfi, "tsv_test std capture");
      chk(got[NC-1:B_RX] == pat[NC-1:B_RX], "tsv_test all TSVs pass");
      n_tsv++;
    end

    chk(n_bypass > 0 && n_extest > 0 && n_tsv > 0, "all modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
