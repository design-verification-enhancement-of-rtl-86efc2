// Self-checking testbench for lppt_controller.
//
// The datapath flags are driven directly, so each transition of the two
// LPPT state machines can be forced and checked on the clock it should
// happen. Checked: the rate flag set and cleared through UPD1/UPD2;
// bypass permission set and removed through ALLOW/REMOVE; every setpoint
// state and its mux select; the operator reset (too short, too far from
// the setpoint, valid with STEP above 700 psia and FLOOR below, and one
// step per press); the bypass suppressing a trip at the floor but not
// from HOLD; the trip hysteresis and UNTRIP; the pretrip bistable; and the
// pretrip-setpoint load one clock after a trip-setpoint load. The reset
// hold time is shortened to 20 clocks.
module tb_lppt_controller;
  import pps_pkg::*;

  localparam int unsigned MRST = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  lppt_flags_t      flags;
  logic             mrst, sob;
  lppt_ctrl_t       ctrl;
  logic             trip, pretrip, pob, ob_active, rate_up;
  lppt_rate_state_e rate_state;
  lppt_sp_state_e   sp_state;

  lppt_controller #(.MRST_CYCLES(MRST)) dut (
    .clk, .rst, .flags, .mrst, .sob, .ctrl, .trip, .pretrip, .pob, .ob_active,
    .rate_up, .rate_state, .sp_state
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic expect_sp(string what, lppt_sp_state_e s);
    check({what, " (setpoint state)"}, int'(sp_state), int'(s));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Normal operating pressure, steady: above 700 and 500, not rising.
  task automatic steady_normal();
    flags = '0;
    flags.gt_floor_pi  = 1'b1;
    flags.ge_ob_remove = 1'b1;
    flags.gap_gt_step  = 1'b0;
  endtask

  // One pressure change seen by the rate FSM (WAIT -> UPD -> WAIT).
  task automatic pressure_change(bit rising);
    while (rate_state != RS_WAIT) tick();
    if (rising) flags.gt_prev = 1'b1; else flags.lt_prev = 1'b1;
    tick();
    check("rate FSM in UPD", int'(rate_state), rising ? int'(RS_UPD1) : int'(RS_UPD2));
    check("pi1_en in UPD", int'(ctrl.pi1_en), 1);
    check("pi_en off in UPD", int'(ctrl.pi_en), 0);
    flags.gt_prev = 1'b0; flags.lt_prev = 1'b0;
    tick();
    check("rate flag", int'(rate_up), int'(rising));
  endtask

  initial begin
    steady_normal();
    mrst = 1'b0; sob = 1'b0;
    tick(2);
    rst = 1'b0;
    check("after reset: rate FSM START", int'(rate_state), int'(RS_START));
    expect_sp("after reset", SS_FOLLOW);
    check("START loads PI and PI1", int'(ctrl.pi_en && ctrl.pi1_en), 1);
    check("FOLLOW loads nothing while not rising", int'(ctrl.tsp_en), 0);
    tick();
    check("rate FSM WAIT", int'(rate_state), int'(RS_WAIT));
    expect_sp("not rising: FOLLOW -> HOLD", SS_HOLD);
    check("HOLD keeps setpoint", int'(ctrl.tsp_en), 0);
    tick();
    check("no pretrip setpoint load without trip setpoint load", int'(ctrl.ptsp_en), 0);

    // Bypass permission: steady at or above 500 -> REMOVE.
    check("WAIT -> REMOVE at >= 500", int'(rate_state), int'(RS_REMOVE));
    check("POB off", int'(pob), 0);

    // Rising pressure: HOLD -> FOLLOW -> CEILING -> FOLLOW.
    pressure_change(1);
    tick();
    expect_sp("rising: HOLD -> FOLLOW", SS_FOLLOW);
    check("FOLLOW loads pressure - 400", int'(ctrl.tsp_en && ctrl.tsp_sel == TSP_SEL_STEP), 1);
    flags.lt_prev = 1'b1;
    #1 check("a fall seen by the comparator stops the load", int'(ctrl.tsp_en), 0);
    flags.lt_prev = 1'b0;
    #1;
    flags.ge_ceil_pi = 1'b1;
    tick();
    check("pretrip setpoint loaded one clock after trip setpoint", int'(ctrl.ptsp_en), 1);
    expect_sp("PI >= 2100: CEILING", SS_CEILING);
    check("CEILING selects 1700", int'(ctrl.tsp_en && ctrl.tsp_sel == TSP_SEL_CEIL), 1);
    tick(3);
    expect_sp("stays at CEILING", SS_CEILING);
    flags.ge_ceil_pi = 1'b0;
    tick();
    expect_sp("below 2100 and rising: FOLLOW", SS_FOLLOW);
    flags.ge_ceil_pi = 1'b1;
    tick();
    expect_sp("CEILING again", SS_CEILING);
    pressure_change(0);
    flags.ge_ceil_pi = 1'b0;
    tick();
    expect_sp("falling below 2100: CEILING -> HOLD", SS_HOLD);

    // Operator reset too short.
    mrst = 1'b1;
    tick(MRST - 2);
    expect_sp("reset held too briefly", SS_HOLD);
    mrst = 1'b0;
    tick();
    expect_sp("short reset ignored", SS_HOLD);
    // Valid duration, but setpoint too far below pressure.
    flags.gap_gt_step = 1'b1;
    mrst = 1'b1;
    tick(MRST + 3);
    expect_sp("gap > 400 blocks the step", SS_HOLD);
    // Gap closes: one step.
    flags.gap_gt_step = 1'b0;
    tick();
    expect_sp("valid reset above 700: STEP", SS_STEP);
    check("STEP loads pressure - 400", int'(ctrl.tsp_en && ctrl.tsp_sel == TSP_SEL_STEP), 1);
    tick();
    expect_sp("STEP -> HOLD", SS_HOLD);
    tick(5);
    expect_sp("one step per press", SS_HOLD);
    mrst = 1'b0;
    tick();
    mrst = 1'b1;
    tick(MRST + 1);
    expect_sp("second press: STEP", SS_STEP);
    tick();
    mrst = 1'b0;

    // Pretrip bistable.
    flags.le_ptsp = 1'b1; flags.le_ptsp_hys = 1'b1;
    tick();
    check("pretrip set", int'(pretrip), 1);
    check("pretrip selects hysteresis", int'(ctrl.pretrip), 1);
    flags.le_ptsp = 1'b0;
    tick(2);
    check("pretrip held inside hysteresis", int'(pretrip), 1);
    flags.le_ptsp_hys = 1'b0;
    tick();
    check("pretrip cleared", int'(pretrip), 0);

    // Reset at or below 700: FLOOR.
    flags.gt_floor_pi = 1'b0;
    mrst = 1'b1;
    tick(MRST + 1);
    expect_sp("valid reset at or below 700: FLOOR", SS_FLOOR);
    check("FLOOR selects 300", int'(ctrl.tsp_en && ctrl.tsp_sel == TSP_SEL_FLOOR), 1);
    mrst = 1'b0;

    // Bypass permitted below 400.
    flags.ge_ob_remove = 1'b0; flags.le_ob_permit = 1'b1;
    tick(3);
    check("POB on", int'(pob), 1);
    sob = 1'b1;
    flags.le_tsp = 1'b1; flags.le_tsp_hys = 1'b1;
    tick(3);
    expect_sp("bypass in force: no trip at floor", SS_FLOOR);
    check("trip suppressed", int'(trip), 0);
    check("ob_active", int'(ob_active), 1);
    sob = 1'b0;
    tick();
    expect_sp("bypass withdrawn: TRIP", SS_TRIP);
    check("trip", int'(trip), 1);
    check("trip selects hysteresis", int'(ctrl.trip), 1);
    flags.le_tsp = 1'b0;
    tick(3);
    expect_sp("trip held inside hysteresis", SS_TRIP);
    flags.le_tsp_hys = 1'b0;
    flags.le_ob_permit = 1'b0; flags.ge_ob_remove = 1'b1; flags.gt_floor_pi = 1'b1;
    tick();
    expect_sp("above setpoint + hysteresis: UNTRIP", SS_UNTRIP);
    check("trip cleared", int'(trip), 0);
    tick();
    expect_sp("UNTRIP -> FOLLOW", SS_FOLLOW);
    tick(3);
    check("POB removed at >= 500", int'(pob), 0);
    expect_sp("not rising: HOLD", SS_HOLD);

    // From HOLD the bypass does not suppress the trip.
    sob = 1'b1;
    flags.le_tsp = 1'b1; flags.le_tsp_hys = 1'b1;
    tick();
    expect_sp("HOLD -> TRIP", SS_TRIP);
    flags.le_tsp = 1'b0; flags.le_tsp_hys = 1'b0;
    tick(2);
    sob = 1'b0;

    // FLOOR -> FOLLOW on rising pressure above 700.
    pressure_change(0);
    flags.gt_floor_pi = 1'b0;
    mrst = 1'b1;
    tick(MRST + 2);
    expect_sp("FLOOR again", SS_FLOOR);
    mrst = 1'b0;
    pressure_change(1);
    tick(2);
    expect_sp("rising but below 700: stays at FLOOR", SS_FLOOR);
    flags.gt_floor_pi = 1'b1;
    tick();
    expect_sp("rising above 700: FOLLOW", SS_FOLLOW);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
