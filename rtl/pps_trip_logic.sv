// Plant protection system (PPS) trip logic: the setpoint-algorithm channels
// of one protection division, side by side, with a board display.
//
// Each channel compares one plant parameter with its setpoint and raises
// a pretrip (warning) and a trip signal for the downstream coincidence
// logic.
//   - Five fixed-setpoint channels (fixed_sp_bistable), with setpoints
//     supplied as inputs:
//       [0] high logarithmic power level
//       [1] high pressurizer pressure
//       [2] low steam-generator water level (trips on a falling value)
//       [3] high steam-generator water level
//       [4] high containment pressure
//   - The variable overpower trip (vopt_bistable), whose setpoint follows
//     reactor power with a rate limit, a floor and a ceiling.
//   - The low pressurizer pressure trip (lppt_fsmd), a variable setpoint
//     lowered by the operator, with an operating bypass.
// A seven-segment display driver shows values of one channel, picked by
// disp_chan (0..4 fixed channels, 5 VOPT, 6 LPPT). disp_mode selects what:
// 0 the process value, 1 the trip setpoint, or 2 the board-test layout.
// In the board-test layout the low byte of the process value is on the
// left two digits and the low byte of the trip setpoint on the right two.
// This suits an 8-bit process input set from switches.
//
// Timing: every channel runs on clk and is reset synchronously by rst. The
// VOPT channel takes a power value when pwr_sample is high; the others
// sample their inputs every clock. Latencies are given in each channel.
//
// The list of fixed-setpoint channels and their direction follows the list
// of protection functions. The display split (process input beside trip
// setpoint) follows the board test setup. Using one hysteresis value for
// all five fixed channels, the hexadecimal format and the display selection
// are this design's own choices.
module pps_trip_logic
  import pps_pkg::*;
#(
  parameter int unsigned N_FIXED          = 5,
  parameter logic [N_FIXED-1:0] FIXED_HIGH = 5'b11011,
  parameter int unsigned FIXED_HYS        = 5,
  parameter int unsigned MRST_CYCLES      = 500_000_000,
  parameter int unsigned REFRESH_CYCLES   = 50_000
) (
  input  logic clk,
  input  logic rst,
  // fixed-setpoint channels
  input  pv_t  fix_pi_in      [N_FIXED],
  input  pv_t  fix_trip_sp    [N_FIXED],
  input  pv_t  fix_pretrip_sp [N_FIXED],
  output logic [N_FIXED-1:0] fix_trip,
  output logic [N_FIXED-1:0] fix_pretrip,
  output pv_t  fix_trip_spc    [N_FIXED],
  output pv_t  fix_pretrip_spc [N_FIXED],
  output pv_t  fix_pi_out      [N_FIXED],
  // variable overpower trip
  input  logic pwr_sample,
  input  pv_t  pwr_in,
  output logic vopt_trip,
  output logic vopt_pretrip,
  output logic vopt_rate_limited,
  output pv_t  vopt_trip_spc,
  output pv_t  vopt_pretrip_spc,
  output pv_t  pwr_out,
  // low pressurizer pressure trip
  input  pv_t  pzr_in,
  input  logic mrst,
  input  logic sob,
  output logic lppt_trip,
  output logic lppt_pretrip,
  output logic lppt_pob,
  output logic lppt_ob_active,
  output pv_t  lppt_tsp_out,
  output pv_t  lppt_ptsp_out,
  output pv_t  pzr_out,
  output logic             lppt_rate_up,
  output lppt_rate_state_e lppt_rate_state,
  output lppt_sp_state_e   lppt_sp_state,
  // board display
  input  logic [2:0] disp_chan,
  input  logic [1:0] disp_mode,
  output logic [3:0] an,
  output logic [6:0] seg
);

  for (genvar i = 0; i < N_FIXED; i++) begin : g_fixed
    fixed_sp_bistable #(
      .HYS      (FIXED_HYS),
      .TRIP_HIGH(FIXED_HIGH[i])
    ) u_fix (
      .clk,
      .rst,
      .pi_in      (fix_pi_in[i]),
      .trip_sp    (fix_trip_sp[i]),
      .pretrip_sp (fix_pretrip_sp[i]),
      .trip       (fix_trip[i]),
      .pretrip    (fix_pretrip[i]),
      .trip_spc   (fix_trip_spc[i]),
      .pretrip_spc(fix_pretrip_spc[i]),
      .pi_out     (fix_pi_out[i])
    );
  end

  vopt_bistable u_vopt (
    .clk,
    .rst,
    .sample      (pwr_sample),
    .pi_in       (pwr_in),
    .trip        (vopt_trip),
    .pretrip     (vopt_pretrip),
    .rate_limited(vopt_rate_limited),
    .trip_spc    (vopt_trip_spc),
    .pretrip_spc (vopt_pretrip_spc),
    .pi_out      (pwr_out)
  );

  lppt_fsmd #(.MRST_CYCLES(MRST_CYCLES)) u_lppt (
    .clk,
    .rst,
    .pi_in     (pzr_in),
    .mrst,
    .sob,
    .trip      (lppt_trip),
    .pretrip   (lppt_pretrip),
    .pob       (lppt_pob),
    .ob_active (lppt_ob_active),
    .tsp_out   (lppt_tsp_out),
    .ptsp_out  (lppt_ptsp_out),
    .pi_out    (pzr_out),
    .rate_up   (lppt_rate_up),
    .rate_state(lppt_rate_state),
    .sp_state  (lppt_sp_state)
  );

  pv_t disp_pv, disp_tsp, disp_value;
  always_comb begin
    if (disp_chan == 3'd5) begin
      disp_pv  = pwr_out;
      disp_tsp = vopt_trip_spc;
    end else if (disp_chan == 3'd6) begin
      disp_pv  = pzr_out;
      disp_tsp = lppt_tsp_out;
    end else if (32'(disp_chan) < N_FIXED) begin
      disp_pv  = fix_pi_out[disp_chan];
      disp_tsp = fix_trip_spc[disp_chan];
    end else begin
      disp_pv  = '0;
      disp_tsp = '0;
    end
    unique case (disp_mode)
      2'd0:    disp_value = disp_pv;
      2'd1:    disp_value = disp_tsp;
      default: disp_value = {disp_pv[7:0], disp_tsp[7:0]};
    endcase
  end

  seg7_display #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_disp (
    .clk,
    .rst,
    .value(disp_value),
    .an,
    .seg
  );

endmodule
