// Fixed-setpoint bistable with trip, pretrip and hysteresis.
//
// The process value is registered every clock. A trip is raised when the
// process value reaches the trip setpoint and a pretrip when it reaches the
// (closer to normal) pretrip setpoint. Once raised, each signal stays set
// until the process value has moved back past its setpoint by the
// hysteresis value; while a signal is set, the setpoint it reports is moved
// by the hysteresis value, so the output shows the level at which the
// signal will clear. With TRIP_HIGH = 1 the channel trips on an increasing
// process (high steam-generator water level, high pressure, high power);
// with TRIP_HIGH = 0 it trips on a decreasing one (low level).
//
// Interface: setpoints arrive as inputs (setpoint data); trip_spc and
// pretrip_spc are the setpoints in force; pi_out is the registered process
// value. Timing: pi_out follows pi_in one clock later, and trip/pretrip
// react to a new process value two clocks after it is applied. The
// outputs are held low in reset.
//
// The trip/pretrip rule, the 90/75 setpoints and the hysteresis of 5 follow
// the high steam-generator water level example; the two-clock pipeline,
// saturation of setpoint +/- hysteresis and the synchronous reset are this
// design's own choices.
module fixed_sp_bistable
  import pps_pkg::*;
#(
  parameter int unsigned HYS       = 5,
  parameter bit          TRIP_HIGH = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  pv_t  pi_in,
  input  pv_t  trip_sp,
  input  pv_t  pretrip_sp,
  output logic trip,
  output logic pretrip,
  output pv_t  trip_spc,
  output pv_t  pretrip_spc,
  output pv_t  pi_out
);

  localparam logic [PV_W:0] HYS_W = (PV_W+1)'(HYS);
  localparam logic [PV_W:0] PV_MAX = {1'b0, {PV_W{1'b1}}};

  pv_t pi_q;

  // Level at which an active signal clears: setpoint moved back by HYS,
  // saturated to the value range.
  function automatic pv_t release_level(pv_t sp);
    logic [PV_W:0] wide;
    if (TRIP_HIGH) begin
      wide = ({1'b0, sp} >= HYS_W) ? {1'b0, sp} - HYS_W : '0;
    end else begin
      wide = {1'b0, sp} + HYS_W;
      if (wide > PV_MAX) wide = PV_MAX;
    end
    return wide[PV_W-1:0];
  endfunction

  // Next state of one bistable: set at the setpoint, clear past the
  // release level.
  function automatic logic bistable_next(logic active, pv_t pv, pv_t sp);
    pv_t rel;
    rel = release_level(sp);
    if (TRIP_HIGH) return active ? (pv >= rel) : (pv >= sp);
    else           return active ? (pv <= rel) : (pv <= sp);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      pi_q    <= '0;
      trip    <= 1'b0;
      pretrip <= 1'b0;
    end else begin
      pi_q    <= pi_in;
      trip    <= bistable_next(trip, pi_q, trip_sp);
      pretrip <= bistable_next(pretrip, pi_q, pretrip_sp);
    end
  end

  always_comb begin
    trip_spc    = trip    ? release_level(trip_sp)    : trip_sp;
    pretrip_spc = pretrip ? release_level(pretrip_sp) : pretrip_sp;
    pi_out      = pi_q;
  end

endmodule
