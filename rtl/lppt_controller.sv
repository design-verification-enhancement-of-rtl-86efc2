// Controller of the low pressurizer pressure trip (LPPT).
//
// Two Moore state machines and two small bistables share the datapath flags.
//
// Rate / bypass-permission FSM: START clears the rising-pressure flag and the
// operating-bypass permission (POB) and loads the previous-pressure register.
// In WAIT it compares the current pressure with the previous one. A rise goes
// through UPD1, which sets the flag; a fall goes through UPD2, which clears
// it. Both reload the previous pressure. With the pressure unchanged, a
// pressure at or above 500 psia passes through REMOVE, which clears POB, and
// one at or below 400 passes through ALLOW, which sets it. The new pressure is
// loaded into the datapath only in START and WAIT, so each comparison sees a
// stable pair.
//
// Setpoint / trip FSM: FOLLOW keeps the trip setpoint at pressure - 400
// while the pressure rises. At 2100 psia and above it moves to CEILING
// (setpoint 1700). When the pressure stops rising, HOLD keeps the setpoint.
// A valid operator reset in HOLD lowers the setpoint: the reset input must
// be held for MRST_CYCLES clocks, and the gap between pressure and setpoint
// must be at most 400. Above 700 psia the reset goes through STEP, which
// sets pressure - 400. At or below 700 it goes to FLOOR (setpoint 300). A
// pressure at or below the setpoint trips (TRIP). From FLOOR the trip is
// suppressed while an operating bypass is both permitted and requested. TRIP
// holds until the pressure exceeds setpoint + hysteresis; UNTRIP then
// returns to FOLLOW. The pretrip is a bistable on the pretrip setpoint with
// the same hysteresis. Each held reset is used for one setpoint step only.
//
// Interface: flags and ctrl are the bundles shared with lppt_datapath; mrst
// is the operator (manual) reset, sob the operating-bypass request. Outputs:
// trip, pretrip, pob (bypass permitted) and ob_active (bypass permitted and
// requested). Timing: all outputs are registered states or decoded from
// them, so every decision takes effect one clock after the flags show it.
//
// States, transitions and output assignments follow the two LPPT state
// diagrams. These choices are this design's own, where the diagrams are
// silent or ambiguous:
//   - the CEILING -> FOLLOW exit (pressure below 2100 and still rising);
//   - a fall seen by the comparator overriding the lagging rate flag, and
//     FOLLOW loading the setpoint only while the pressure is rising;
//   - transition priorities;
//   - which FSM drives the register enables;
//   - one step per reset press;
//   - the pretrip bistable;
//   - the ob_active output;
//   - the pretrip-setpoint load one clock after a trip-setpoint load.
module lppt_controller
  import pps_pkg::*;
#(
  // 10 s operator-reset hold time at the 50 MHz board clock.
  parameter int unsigned MRST_CYCLES = 500_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  lppt_flags_t flags,
  input  logic        mrst,
  input  logic        sob,
  output lppt_ctrl_t  ctrl,
  output logic        trip,
  output logic        pretrip,
  output logic        pob,
  output logic        ob_active,
  output logic        rate_up,
  output lppt_rate_state_e rate_state,
  output lppt_sp_state_e   sp_state
);

  localparam int unsigned CW = $clog2(MRST_CYCLES + 1);
  typedef logic [CW-1:0] cnt_t;

  lppt_rate_state_e rs_q, rs_d;
  lppt_sp_state_e   ss_q, ss_d;
  logic             rate_up_q, pob_q, pretrip_q, tsp_en_q;
  cnt_t             mrst_cnt;
  logic             mrst_used;
  logic             mrst_valid;
  logic             reset_taken;
  logic             rising;

  // The rate flag lags a fall by two clocks (WAIT -> UPD2 -> flag). A fall
  // the comparator already shows counts at once, so FOLLOW never loads a
  // setpoint from a pressure that has started to drop.
  assign rising = rate_up_q && !flags.lt_prev;

  assign mrst_valid  = (mrst_cnt >= cnt_t'(MRST_CYCLES)) && !mrst_used;
  assign reset_taken = (ss_q == SS_HOLD) && (ss_d inside {SS_STEP, SS_FLOOR});

  // ---------------- rate / bypass-permission FSM ----------------
  always_comb begin
    rs_d = rs_q;
    unique case (rs_q)
      RS_START: rs_d = RS_WAIT;
      RS_WAIT: begin
        if      (flags.gt_prev)      rs_d = RS_UPD1;
        else if (flags.lt_prev)      rs_d = RS_UPD2;
        else if (flags.ge_ob_remove) rs_d = RS_REMOVE;
        else if (flags.le_ob_permit) rs_d = RS_ALLOW;
        else                         rs_d = RS_WAIT;
      end
      RS_UPD1, RS_UPD2, RS_REMOVE, RS_ALLOW: rs_d = RS_WAIT;
      default: rs_d = RS_START;
    endcase
  end

  // ---------------- setpoint / trip FSM ----------------
  always_comb begin
    ss_d = ss_q;
    unique case (ss_q)
      SS_FOLLOW: begin
        if      (!rising)          ss_d = SS_HOLD;
        else if (flags.ge_ceil_pi) ss_d = SS_CEILING;
        else                       ss_d = SS_FOLLOW;
      end
      SS_CEILING: begin
        if      (flags.ge_ceil_pi) ss_d = SS_CEILING;
        else if (!rising)          ss_d = SS_HOLD;
        else                       ss_d = SS_FOLLOW;
      end
      SS_HOLD: begin
        if      (flags.le_tsp) ss_d = SS_TRIP;
        else if (rate_up_q)    ss_d = SS_FOLLOW;
        else if (mrst_valid && !flags.gap_gt_step)
          ss_d = flags.gt_floor_pi ? SS_STEP : SS_FLOOR;
        else                   ss_d = SS_HOLD;
      end
      SS_STEP: ss_d = SS_HOLD;
      SS_FLOOR: begin
        if      (flags.le_tsp && !(pob_q && sob))    ss_d = SS_TRIP;
        else if (rate_up_q && flags.gt_floor_pi)     ss_d = SS_FOLLOW;
        else                                         ss_d = SS_FLOOR;
      end
      SS_TRIP:   ss_d = flags.le_tsp_hys ? SS_TRIP : SS_UNTRIP;
      SS_UNTRIP: ss_d = SS_FOLLOW;
      default:   ss_d = SS_FOLLOW;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rs_q      <= RS_START;
      ss_q      <= SS_FOLLOW;
      rate_up_q <= 1'b0;
      pob_q     <= 1'b0;
      pretrip_q <= 1'b0;
      tsp_en_q  <= 1'b0;
      mrst_cnt  <= '0;
      mrst_used <= 1'b0;
    end else begin
      rs_q     <= rs_d;
      ss_q     <= ss_d;
      tsp_en_q <= ctrl.tsp_en;
      unique case (rs_q)
        RS_START:  begin rate_up_q <= 1'b0; pob_q <= 1'b0; end
        RS_UPD1:   rate_up_q <= 1'b1;
        RS_UPD2:   rate_up_q <= 1'b0;
        RS_REMOVE: pob_q <= 1'b0;
        RS_ALLOW:  pob_q <= 1'b1;
        default: ;
      endcase
      pretrip_q <= pretrip_q ? flags.le_ptsp_hys : flags.le_ptsp;
      if (!mrst) begin
        mrst_cnt  <= '0;
        mrst_used <= 1'b0;
      end else begin
        if (mrst_cnt < cnt_t'(MRST_CYCLES)) mrst_cnt <= mrst_cnt + 1'b1;
        if (reset_taken) mrst_used <= 1'b1;
      end
    end
  end

  // ---------------- Moore outputs ----------------
  always_comb begin
    ctrl         = '0;
    ctrl.tsp_sel = TSP_SEL_STEP;
    ctrl.pi_en   = (rs_q == RS_START) || (rs_q == RS_WAIT);
    ctrl.pi1_en  = (rs_q == RS_START) || (rs_q == RS_UPD1) || (rs_q == RS_UPD2);
    unique case (ss_q)
      SS_FOLLOW:          begin ctrl.tsp_en = rising; ctrl.tsp_sel = TSP_SEL_STEP; end
      SS_STEP:            begin ctrl.tsp_en = 1'b1; ctrl.tsp_sel = TSP_SEL_STEP;  end
      SS_CEILING:         begin ctrl.tsp_en = 1'b1; ctrl.tsp_sel = TSP_SEL_CEIL;  end
      SS_FLOOR:           begin ctrl.tsp_en = 1'b1; ctrl.tsp_sel = TSP_SEL_FLOOR; end
      default: ;
    endcase
    ctrl.ptsp_en = tsp_en_q;
    ctrl.trip    = (ss_q == SS_TRIP);
    ctrl.pretrip = pretrip_q;
  end

  // Safety rules: a pressure at or below a held setpoint trips on the next
  // clock, and a trip is never left while the pressure is inside the
  // hysteresis band.
  a_hold_trips: assert property (@(posedge clk) disable iff (rst)
    (ss_q == SS_HOLD && flags.le_tsp) |=> (ss_q == SS_TRIP));
  a_trip_holds: assert property (@(posedge clk) disable iff (rst)
    (ss_q == SS_TRIP && flags.le_tsp_hys) |=> (ss_q == SS_TRIP));

  assign trip       = (ss_q == SS_TRIP);
  assign pretrip    = pretrip_q;
  assign pob        = pob_q;
  assign ob_active  = pob_q && sob;
  assign rate_up    = rate_up_q;
  assign rate_state = rs_q;
  assign sp_state   = ss_q;

endmodule
