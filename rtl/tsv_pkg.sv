// Shared types and constants of the TSV pre-bond test wrapper.
//
// cell_ctrl_t is the bundle of wrapper serial port (WSP) controls that the
// instruction decoder hands to every wrapper boundary cell. The instruction
// opcodes of the wrapper instruction register (WIR) and the drive-strength
// timing used by the behavioural TSV model also live here.
//
// The TSV_TEST instruction and the VTE (via test enable) control follow the
// source paper; the opcode values, the WIR width and the standard instructions
// WS_BYPASS and WS_EXTEST are this design's own choices.
package tsv_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Wrapper instruction register width and opcodes.
  localparam int unsigned WIR_WIDTH = 3;
  typedef enum logic [WIR_WIDTH-1:0] {
    WS_BYPASS = 3'b000,   // functional mode, WSI-WSO through the bypass bit
    WS_EXTEST = 3'b001,   // boundary register drives / captures the terminals
    TSV_TEST  = 3'b010    // pre-bond TSV delay test: asserts VTE
  } wir_opcode_e;

  // Per-cell control bundle produced by the wrapper from the WSP and the WIR.
  typedef struct packed {
    logic shift;    // ShiftWR gated to the boundary register
    logic capture;  // CaptureWR gated to the boundary register
    logic update;   // UpdateWR gated to the boundary register
    logic mode;     // 1: cell value drives CFO (test), 0: CFI passes to CFO
    logic vte;      // via test enable: TSV feedback loop closed
  } cell_ctrl_t;

  // TSV defect classes of the single-terminal fault model.
  typedef enum logic [1:0] {
    TSV_OK      = 2'd0,
    TSV_PINHOLE = 2'd1,   // leakage to substrate: slower charge, faster discharge
    TSV_VOID    = 2'd2,   // partial conductor: both transitions faster
    TSV_OPEN    = 2'd3    // broken conductor: both transitions much faster
  } tsv_defect_e;

  // Nominal TSV (30 um long, 2 um wide, 120 nm oxide): 50.9 fF, in 0.1 fF.
  localparam int unsigned TSV_CAP_NOM_DFF = 509;

  // Clock period (ps) at which a fault-free nominal TSV is just captured,
  // for driver strengths x1..x16 (400, 1140, 1850, 2650, 3250 MHz).
  function automatic int unsigned test_period_ps(int unsigned strength_x);
    case (strength_x)
      1:       return 2500;
      2:       return 877;
      4:       return 541;
      8:       return 377;
      16:      return 308;
      default: return 2500;
    endcase
  endfunction

  // Time (ps) for the driver to swing a fault-free TSV of cap_dff (0.1 fF)
  // past the capture threshold: 95 % of the test period at the nominal load,
  // scaled linearly with the load capacitance.
  function automatic int unsigned charge_time_ps(int unsigned strength_x,
                                                 int unsigned cap_dff);
    return (test_period_ps(strength_x) * 95 * cap_dff) / (100 * TSV_CAP_NOM_DFF);
  endfunction
endpackage
