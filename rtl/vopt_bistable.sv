// Variable overpower trip (VOPT): a bistable whose setpoint follows reactor
// power with a limited rate of rise, between a floor and a ceiling.
//
// On every new power sample (sample = 1) the trip setpoint is recomputed.
// Its target is the power plus MARGIN. A target below the present setpoint
// is taken at once, so the setpoint follows a falling power down. A target
// above it is approached by at most RATE per sample, so a power rise faster
// than RATE per sample outruns the setpoint. The result is clamped to
// [FLOOR, CEIL]. The pretrip setpoint is the trip setpoint minus
// PRETRIP_OFF. A trip is raised when power reaches the trip setpoint: at the
// ceiling this is the ceiling trip, below it (setpoint held back by the rate
// limit) the rate trip. A tripped or pretripped signal clears when power
// falls HYS below its setpoint; while set, the reported setpoint is lowered
// by HYS.
//
// Interface: pi_in is reactor power in percent, valid when sample is high.
// pi_out is the sampled power, trip_spc/pretrip_spc the setpoints in force.
// Timing: the setpoints and pi_out change one clock after a sample, and
// trip/pretrip one clock after that; between samples all values hold.
// Reset sets the setpoint to the floor and clears both signals.
//
// Floor (20 %), ceiling (110 %), pretrip offset (6 %), the rate figure of
// 11 % and the step-change character of the trip follow the description of
// this channel. The margin of 15 % and the hysteresis of 5 % are read from
// its simulation results. Applying the rate limit once per sample and the
// two-clock pipeline are this design's own choices.
module vopt_bistable
  import pps_pkg::*;
#(
  parameter int unsigned MARGIN      = 15,
  parameter int unsigned RATE        = 11,
  parameter int unsigned FLOOR       = 20,
  parameter int unsigned CEIL        = 110,
  parameter int unsigned PRETRIP_OFF = 6,
  parameter int unsigned HYS         = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic sample,
  input  pv_t  pi_in,
  output logic trip,
  output logic pretrip,
  output logic rate_limited,   // last setpoint update was held back by RATE
  output pv_t  trip_spc,
  output pv_t  pretrip_spc,
  output pv_t  pi_out
);

  localparam int unsigned W = PV_W + 2;
  typedef logic [W-1:0] wide_t;

  pv_t   pi_q;
  pv_t   tsp_q;
  wide_t target, limit, next_tsp;
  logic  limited;

  always_comb begin
    target  = wide_t'(pi_in) + wide_t'(MARGIN);
    limit   = wide_t'(tsp_q) + wide_t'(RATE);
    limited = 1'b0;
    if (target > limit) begin
      next_tsp = limit;
      limited  = 1'b1;
    end else begin
      next_tsp = target;
    end
    if (next_tsp > wide_t'(CEIL)) begin
      next_tsp = wide_t'(CEIL);
      limited  = 1'b0;
    end
    if (next_tsp < wide_t'(FLOOR)) next_tsp = wide_t'(FLOOR);
  end

  // Setpoint and release levels.
  wide_t ptsp_w, trel_w, prel_w;
  always_comb begin
    ptsp_w = (wide_t'(tsp_q) > wide_t'(PRETRIP_OFF)) ? wide_t'(tsp_q) - wide_t'(PRETRIP_OFF) : '0;
    trel_w = (wide_t'(tsp_q) > wide_t'(HYS)) ? wide_t'(tsp_q) - wide_t'(HYS) : '0;
    prel_w = (ptsp_w > wide_t'(HYS)) ? ptsp_w - wide_t'(HYS) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pi_q         <= '0;
      tsp_q        <= pv_t'(FLOOR);
      rate_limited <= 1'b0;
      trip         <= 1'b0;
      pretrip      <= 1'b0;
    end else begin
      if (sample) begin
        pi_q         <= pi_in;
        tsp_q        <= next_tsp[PV_W-1:0];
        rate_limited <= limited;
      end
      trip    <= trip    ? (wide_t'(pi_q) >= trel_w) : (wide_t'(pi_q) >= wide_t'(tsp_q));
      pretrip <= pretrip ? (wide_t'(pi_q) >= prel_w) : (wide_t'(pi_q) >= ptsp_w);
    end
  end

  // The setpoint never leaves [FLOOR, CEIL].
  a_sp_range: assert property (@(posedge clk) disable iff (rst)
    (32'(tsp_q) >= FLOOR) && (32'(tsp_q) <= CEIL));

  always_comb begin
    trip_spc    = trip    ? trel_w[PV_W-1:0] : tsp_q;
    pretrip_spc = pretrip ? prel_w[PV_W-1:0] : ptsp_w[PV_W-1:0];
    pi_out      = pi_q;
  end

endmodule
