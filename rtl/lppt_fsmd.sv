// Low pressurizer pressure trip (LPPT): the complete FSMD.
//
// This channel trips when the pressurizer pressure falls to a variable
// setpoint. While the pressure rises, the setpoint follows 400 psia below
// it, up to a ceiling of 1700 psia. When the pressure falls, the setpoint
// holds. An operator can then lower it step by step: each reset held for
// 10 s sets it 400 psia below the present pressure. Once the pressure is at
// or below 700 psia, a reset drops it to the floor of 300 psia. The pretrip
// setpoint sits 100 psia above the trip setpoint. Below 400 psia an
// operating bypass is permitted, and above 500 psia it is removed. A
// permitted and requested bypass suppresses the trip at the floor.
//
// lppt_datapath holds the registers, setpoint mux and comparators;
// lppt_controller holds the state machines. They talk through the
// lppt_ctrl_t and lppt_flags_t bundles of pps_pkg.
//
// Interface: pi_in is the pressure in psia, mrst the manual reset, sob the
// operating-bypass request. Outputs: trip, pretrip, pob (bypass permitted),
// ob_active (bypass in force), tsp_out/ptsp_out (setpoints in force,
// including the hysteresis while a signal is set), pi_out (registered
// pressure) and, for status reporting, the rising-pressure flag and the
// two state registers. Timing: a new pressure is taken within two clocks; the trip
// follows two to three clocks after the pressure crosses the setpoint. All
// state is cleared by the synchronous reset rst.
module lppt_fsmd
  import pps_pkg::*;
#(
  parameter int unsigned MRST_CYCLES = 500_000_000,
  parameter int unsigned HYS         = 100
) (
  input  logic clk,
  input  logic rst,
  input  pv_t  pi_in,
  input  logic mrst,
  input  logic sob,
  output logic trip,
  output logic pretrip,
  output logic pob,
  output logic ob_active,
  output pv_t  tsp_out,
  output pv_t  ptsp_out,
  output pv_t  pi_out,
  // status for monitoring and test
  output logic             rate_up,
  output lppt_rate_state_e rate_state,
  output lppt_sp_state_e   sp_state
);

  lppt_ctrl_t  ctrl;
  lppt_flags_t flags;

  lppt_datapath #(.HYS(HYS)) u_dp (
    .clk, .rst, .pi_in, .ctrl, .flags,
    .pi_out, .tsp_out, .ptsp_out
  );

  lppt_controller #(.MRST_CYCLES(MRST_CYCLES)) u_ctl (
    .clk, .rst, .flags, .mrst, .sob, .ctrl,
    .trip, .pretrip, .pob, .ob_active,
    .rate_up, .rate_state, .sp_state
  );

endmodule
