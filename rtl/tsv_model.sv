// Behavioural model (not synthesizable): one through-silicon via seen from
// its single reachable terminal before bonding, together with the driver
// that swings it.
//
// The driver is an enabled inverter or buffer whose logic value arrives on
// drv; the inversion itself is in the wrapper cell. drv_en = 0 leaves the
// node floating, so it keeps its charge. weak_sel selects the tunable driver's
// strength: WEAK_X while weak_sel is high (VTE during the test), STRONG_X
// otherwise, as multiples of a minimum-size inverter.
//
// The node is a digital value with an inertial delay: after the drive
// changes, node follows only once the transition time has passed without a
// further change; a shorter pulse never reaches the switching threshold and
// is lost. The transition time for a fault-free TSV is charge_time_ps() of
// tsv_pkg: linear in the load capacitance CAP_DFF (0.1 fF) and set so that
// the nominal 50.9 fF TSV is captured at the test clock the source paper gives
// for each strength (x2: 1.14 GHz), while a 55 fF load is not. Defects scale
// it in the directions of the single-terminal fault table: a pin-hole slows
// charging (x3/2) and speeds discharging (x1/2); a void speeds both (x2/3);
// an open speeds both further (x1/3). Those factors are this model's own
// numbers; the source paper gives only the directions.
module tsv_model
  import tsv_pkg::*;
#(
  parameter int unsigned CAP_DFF  = TSV_CAP_NOM_DFF,
  parameter tsv_defect_e DEFECT   = TSV_OK,
  parameter int unsigned STRONG_X = 4,
  parameter int unsigned WEAK_X   = 2
) (
  input  logic drv,
  input  logic drv_en,
  input  logic weak_sel,
  output logic node
);
  timeunit 1ps;
  timeprecision 1ps;

  logic            node_q;
  longint unsigned seq;

  initial begin
    node_q = 1'b0;
    seq    = 0;
  end

  function automatic int unsigned swing_ps(logic rising, logic is_weak);
    int unsigned t;
    t = charge_time_ps(is_weak ? WEAK_X : STRONG_X, CAP_DFF);
    case (DEFECT)
      TSV_PINHOLE: t = rising ? (t * 3) / 2 : t / 2;
      TSV_VOID:    t = (t * 2) / 3;
      TSV_OPEN:    t = t / 3;
      default:     ;
    endcase
    return t;
  endfunction

  always @(drv or drv_en or weak_sel) begin
    seq = seq + 1;
    if (drv_en && drv != node_q) begin
      fork
        begin : settle
          automatic longint unsigned my_seq = seq;
          automatic logic            target = drv;
          #(swing_ps(target, weak_sel));
          if (seq == my_seq) node_q = target;
        end
      join_none
    end
  end

  assign node = node_q;
endmodule
