// Datapath of the low pressurizer pressure trip (LPPT).
//
// Registers: PI holds the pressurizer pressure (loaded when pi_en), PI1 the
// previous pressure used to tell the direction of change (pi1_en), TSP the
// trip setpoint (tsp_en) and PTSP the pretrip setpoint (ptsp_en). TSP is
// loaded through a three-way mux: the floor constant (select 00), the
// ceiling constant (01) or the pressure minus the step (10). PTSP is loaded
// with TSP plus the pretrip offset. A bank of comparators turns the
// registers into the status flags the controller needs; the trip and
// pretrip setpoint outputs add the hysteresis while the controller reports
// a trip or pretrip, so they show the pressure at which the signal resets.
//
// Interface: pi_in is the pressure in psia; ctrl and flags are the control
// and data-status bundles shared with lppt_controller. Timing: every
// register loads on the clock edge at which its enable is high; the flags
// and outputs are combinational from the registers and ctrl.
//
// The register set, the mux and its constants (300, 1700, PI-400), the
// pretrip offset of 100 and the comparator thresholds (2100, 700, 500,
// 400) follow the LPPT datapath and its state diagram. The hysteresis of
// 100 is read from the LPPT simulation result. Hysteresis is added (not
// subtracted) because this channel trips on falling pressure. PI-400 is
// kept at or above the 300 psia floor (the minimum trip setpoint), which
// matters only when the setpoint follows a pressure recovering from a trip.
// That clamp and the comparisons one bit wider than the registers are this
// design's own choices.
module lppt_datapath
  import pps_pkg::*;
#(
  parameter int unsigned FLOOR_SP     = 300,
  parameter int unsigned CEIL_SP      = 1700,
  parameter int unsigned STEP         = 400,
  parameter int unsigned PRETRIP_OFF  = 100,
  parameter int unsigned HYS          = 100,
  parameter int unsigned CEIL_PI      = 2100,
  parameter int unsigned FLOOR_PI     = 700,
  parameter int unsigned OB_REMOVE_PI = 500,
  parameter int unsigned OB_PERMIT_PI = 400
) (
  input  logic        clk,
  input  logic        rst,
  input  pv_t         pi_in,
  input  lppt_ctrl_t  ctrl,
  output lppt_flags_t flags,
  output pv_t         pi_out,
  output pv_t         tsp_out,
  output pv_t         ptsp_out
);

  localparam int unsigned W = PV_W + 1;
  typedef logic [W-1:0] wide_t;

  pv_t pi_q, pi1_q, tsp_q, ptsp_q;
  pv_t pi_minus_step, tsp_mux;
  wide_t tsp_hys, ptsp_hys, ptsp_next;

  always_comb begin
    pi_minus_step = (wide_t'(pi_q) > wide_t'(STEP) + wide_t'(FLOOR_SP)) ? pi_q - pv_t'(STEP)
                                                                   : pv_t'(FLOOR_SP);
    unique case (ctrl.tsp_sel)
      TSP_SEL_FLOOR: tsp_mux = pv_t'(FLOOR_SP);
      TSP_SEL_CEIL:  tsp_mux = pv_t'(CEIL_SP);
      TSP_SEL_STEP:  tsp_mux = pi_minus_step;
      default:       tsp_mux = tsp_q;
    endcase
    ptsp_next = wide_t'(tsp_q) + wide_t'(PRETRIP_OFF);
    tsp_hys   = wide_t'(tsp_q) + wide_t'(HYS);
    ptsp_hys  = wide_t'(ptsp_q) + wide_t'(HYS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pi_q   <= '0;
      pi1_q  <= '0;
      tsp_q  <= pv_t'(CEIL_SP);
      ptsp_q <= pv_t'(CEIL_SP + PRETRIP_OFF);
    end else begin
      if (ctrl.pi_en)   pi_q   <= pi_in;
      if (ctrl.pi1_en)  pi1_q  <= pi_q;
      if (ctrl.tsp_en)  tsp_q  <= tsp_mux;
      if (ctrl.ptsp_en) ptsp_q <= (ptsp_next > wide_t'({PV_W{1'b1}})) ? '1 : ptsp_next[PV_W-1:0];
    end
  end

  always_comb begin
    flags.le_ptsp_hys  = wide_t'(pi_q) <= ptsp_hys;
    flags.le_ptsp      = pi_q <= ptsp_q;
    flags.le_tsp_hys   = wide_t'(pi_q) <= tsp_hys;
    flags.le_tsp       = pi_q <= tsp_q;
    flags.ge_ceil_pi   = pi_q >= pv_t'(CEIL_PI);
    flags.gt_floor_pi  = pi_q >  pv_t'(FLOOR_PI);
    flags.ge_ob_remove = pi_q >= pv_t'(OB_REMOVE_PI);
    flags.le_ob_permit = pi_q <= pv_t'(OB_PERMIT_PI);
    flags.gt_prev      = pi_q >  pi1_q;
    flags.lt_prev      = pi_q <  pi1_q;
    flags.gap_gt_step  = wide_t'(pi_q) > wide_t'(tsp_q) + wide_t'(STEP);
  end

  always_comb begin
    pi_out   = pi_q;
    tsp_out  = ctrl.trip    ? ((tsp_hys  > wide_t'({PV_W{1'b1}})) ? '1 : tsp_hys[PV_W-1:0])  : tsp_q;
    ptsp_out = ctrl.pretrip ? ((ptsp_hys > wide_t'({PV_W{1'b1}})) ? '1 : ptsp_hys[PV_W-1:0]) : ptsp_q;
  end

endmodule
