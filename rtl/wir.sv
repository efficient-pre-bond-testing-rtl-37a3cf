// Wrapper instruction register (WIR) with its instruction decoder.
//
// A WIR_WIDTH-bit shift register sits between WSI and WSO while SelectWIR is
// high and shifts on the rising WRCK edge with ShiftWR. UpdateWR (with
// SelectWIR) copies it into the instruction latch, which the decoder turns
// into the wrapper's mode controls:
//   WS_BYPASS  functional mode, WBR idle, WSI-WSO through the bypass bit
//   WS_EXTEST  boundary cells drive and capture the die terminals
//   TSV_TEST   as WS_EXTEST, plus VTE = 1: TSV feedback loops closed and
//              tx drivers weak
// Unknown opcodes decode as WS_BYPASS. Reset (WRSTN low) selects WS_BYPASS.
// The TSV_TEST instruction that raises VTE is the source paper's; the register
// width, the opcodes and the two standard instructions are this design's.
module wir
  import tsv_pkg::*;
(
  input  logic        wrck,
  input  logic        wrstn,
  input  logic        wsi,
  input  logic        select_wir,
  input  logic        shift_wr,
  input  logic        update_wr,
  output logic        wso,
  output wir_opcode_e instr,
  output logic        mode,
  output logic        vte,
  output logic        wbr_sel
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIR_WIDTH-1:0] shift_q;

  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      shift_q <= '0;
      instr   <= WS_BYPASS;
    end else if (select_wir) begin
      if (shift_wr)       shift_q <= {wsi, shift_q[WIR_WIDTH-1:1]};
      else if (update_wr) instr   <= wir_opcode_e'(shift_q);
    end
  end

  assign wso = shift_q[0];

  always_comb begin
    mode    = 1'b0;
    vte     = 1'b0;
    wbr_sel = 1'b0;
    unique case (instr)
      WS_EXTEST: begin
        mode    = 1'b1;
        wbr_sel = 1'b1;
      end
      TSV_TEST: begin
        mode    = 1'b1;
        vte     = 1'b1;
        wbr_sel = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
