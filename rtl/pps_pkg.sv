// Shared types for the plant-protection trip channels.
//
// Every process value and setpoint in the design is a 16-bit unsigned
// engineering value (percent of power, percent of level, or psia), as the
// 16-bit buses of the trip algorithms have it. The LPPT (low pressurizer
// pressure trip) datapath and controller exchange two bundles: the
// comparator flags the datapath reports ("data-status signals") and the
// register enables and mux select the controller drives ("control
// signals"). Their state encodings are this design's own choice.
package pps_pkg;

  localparam int unsigned PV_W = 16;
  typedef logic [PV_W-1:0] pv_t;

  // Source of the LPPT trip setpoint register (mux select codes 00/01/10).
  typedef enum logic [1:0] {
    TSP_SEL_FLOOR = 2'b00,   // minimum trip setpoint
    TSP_SEL_CEIL  = 2'b01,   // maximum trip setpoint
    TSP_SEL_STEP  = 2'b10    // process value minus step
  } tsp_sel_e;

  // Comparator flags from the LPPT datapath to its controller.
  typedef struct packed {
    logic le_ptsp_hys;   // PI <= pretrip setpoint + hysteresis
    logic le_ptsp;       // PI <= pretrip setpoint
    logic le_tsp_hys;    // PI <= trip setpoint + hysteresis
    logic le_tsp;        // PI <= trip setpoint
    logic ge_ceil_pi;    // PI >= 2100 (process level that selects the ceiling)
    logic gt_floor_pi;   // PI >  700  (process level below which reset goes to floor)
    logic ge_ob_remove;  // PI >= 500  (operating bypass removal level)
    logic le_ob_permit;  // PI <= 400  (operating bypass permission level)
    logic gt_prev;       // current PI >  previous PI
    logic lt_prev;       // current PI <  previous PI
    logic gap_gt_step;   // PI - trip setpoint > 400
  } lppt_flags_t;

  // Control signals from the LPPT controller to its datapath.
  typedef struct packed {
    logic     trip;      // selects trip setpoint + hysteresis on the output
    logic     pretrip;   // selects pretrip setpoint + hysteresis on the output
    logic     tsp_en;    // load trip setpoint register
    logic     ptsp_en;   // load pretrip setpoint register
    logic     pi_en;     // load process input register
    logic     pi1_en;    // load previous-process register
    tsp_sel_e tsp_sel;   // trip setpoint mux select
  } lppt_ctrl_t;

  // Rate / operating-bypass permission FSM.
  typedef enum logic [2:0] {
    RS_START, RS_WAIT, RS_UPD1, RS_UPD2, RS_REMOVE, RS_ALLOW
  } lppt_rate_state_e;

  // Setpoint / trip FSM.
  typedef enum logic [2:0] {
    SS_FOLLOW, SS_CEILING, SS_HOLD, SS_STEP, SS_FLOOR, SS_TRIP, SS_UNTRIP
  } lppt_sp_state_e;

endpackage
