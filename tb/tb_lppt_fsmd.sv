// Self-checking testbench for lppt_fsmd, the complete low pressurizer
// pressure trip.
//
// It replays a pressure transient sample by sample. The pressure starts
// above 2100 psia (setpoint at the 1700 ceiling) and falls in 100 psia
// steps. The operator resets the setpoint each time the pretrip comes in:
// four steps of pressure - 400, then the floor. Below 400 psia the
// operating bypass is permitted and requested, so the floor trip is
// suppressed; once the request is withdrawn the channel trips. The pressure
// then recovers through the trip hysteresis and back to the ceiling. A
// second transient drops the pressure onto a held setpoint for a trip
// straight from HOLD. The expected setpoints and signals after each sample
// were worked out by hand (hysteresis 100, pretrip offset 100). The trip is
// also required within four clocks of a crossing. The reset hold time is
// shortened to 4 clocks.
module tb_lppt_fsmd;
  import pps_pkg::*;

  localparam int unsigned MRST = 4;
  localparam int unsigned HOLD_CLKS = 12;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pv_t  pi_in;
  logic mrst, sob;
  logic trip, pretrip, pob, ob_active, rate_up;
  pv_t  tsp_out, ptsp_out, pi_out;
  lppt_rate_state_e rate_state;
  lppt_sp_state_e   sp_state;

  lppt_fsmd #(.MRST_CYCLES(MRST)) dut (
    .clk, .rst, .pi_in, .mrst, .sob, .trip, .pretrip, .pob, .ob_active,
    .tsp_out, .ptsp_out, .pi_out, .rate_up, .rate_state, .sp_state
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One row: pressure, operator reset pressed, bypass requested, then the
  // settled trip setpoint out, pretrip setpoint out, trip, pretrip, POB.
  typedef struct packed {
    logic [15:0] p;
    logic        reset_press;
    logic        sob;
    logic [15:0] tsp;
    logic [15:0] ptsp;
    logic        trip;
    logic        pre;
    logic        pob;
  } row_t;

  localparam int N = 40;
  localparam row_t SEQ[N] = '{
    '{2200, 0, 0, 1700, 1800, 0, 0, 0},
    '{2100, 0, 0, 1700, 1800, 0, 0, 0},
    '{2000, 0, 0, 1700, 1800, 0, 0, 0},
    '{1900, 0, 0, 1700, 1800, 0, 0, 0},
    '{1800, 0, 0, 1700, 1900, 0, 1, 0},   // pretrip
    '{1800, 1, 0, 1400, 1500, 0, 0, 0},   // operator reset: step
    '{1700, 0, 0, 1400, 1500, 0, 0, 0},
    '{1600, 0, 0, 1400, 1500, 0, 0, 0},
    '{1500, 0, 0, 1400, 1600, 0, 1, 0},
    '{1500, 1, 0, 1100, 1200, 0, 0, 0},
    '{1400, 0, 0, 1100, 1200, 0, 0, 0},
    '{1300, 0, 0, 1100, 1200, 0, 0, 0},
    '{1200, 0, 0, 1100, 1300, 0, 1, 0},
    '{1200, 1, 0,  800,  900, 0, 0, 0},
    '{1100, 0, 0,  800,  900, 0, 0, 0},
    '{1000, 0, 0,  800,  900, 0, 0, 0},
    '{ 900, 0, 0,  800, 1000, 0, 1, 0},
    '{ 900, 1, 0,  500,  600, 0, 0, 0},
    '{ 800, 0, 0,  500,  600, 0, 0, 0},
    '{ 700, 0, 0,  500,  600, 0, 0, 0},
    '{ 600, 0, 0,  500,  700, 0, 1, 0},
    '{ 600, 1, 0,  300,  400, 0, 0, 0},   // reset at or below 700: floor
    '{ 500, 0, 0,  300,  400, 0, 0, 0},
    '{ 400, 0, 0,  300,  500, 0, 1, 1},   // bypass permitted
    '{ 300, 0, 1,  300,  500, 0, 1, 1},   // bypass requested: no trip
    '{ 200, 0, 1,  300,  500, 0, 1, 1},
    '{   0, 0, 1,  300,  500, 0, 1, 1},
    '{   0, 0, 0,  400,  500, 1, 1, 1},   // request withdrawn: trip
    '{ 200, 0, 0,  400,  500, 1, 1, 1},
    '{ 400, 0, 0,  400,  500, 1, 1, 1},   // inside trip hysteresis
    '{ 500, 0, 0,  300,  500, 0, 1, 0},   // trip resets; setpoint at floor
    '{ 600, 0, 0,  300,  400, 0, 0, 0},
    '{ 800, 0, 0,  400,  500, 0, 0, 0},
    '{1200, 0, 0,  800,  900, 0, 0, 0},
    '{2200, 0, 0, 1700, 1800, 0, 0, 0},   // ceiling
    '{2000, 0, 0, 1700, 1800, 0, 0, 0},   // held
    '{1700, 0, 0, 1800, 1900, 1, 1, 0},   // onto the held setpoint: trip
    '{1900, 0, 0, 1500, 1600, 0, 0, 0},   // recovers: follows again
    '{2050, 0, 0, 1650, 1750, 0, 0, 0},
    '{2300, 0, 0, 1700, 1800, 0, 0, 0}
  };

  int n_steps, n_floor, n_ceiling, n_bypassed, n_trips;

  always @(posedge clk) begin
    if (!rst) begin
      if (sp_state == SS_STEP)    n_steps++;
      if (sp_state == SS_CEILING) n_ceiling++;
      if (ob_active && sp_state == SS_FLOOR && pi_out <= 300) n_bypassed++;
    end
  end

  initial begin
    pi_in = '0; mrst = 1'b0; sob = 1'b0;
    n_steps = 0; n_floor = 0; n_ceiling = 0; n_bypassed = 0; n_trips = 0;
    repeat (3) @(posedge clk);
    #1 pi_in = pv_t'(SEQ[0].p);
    rst = 1'b0;

    for (int i = 0; i < N; i++) begin
      int lat;
      #1 pi_in = pv_t'(int'(SEQ[i].p)); sob = SEQ[i].sob;
      if (SEQ[i].reset_press) begin
        mrst = 1'b1;
        repeat (MRST + 3) @(posedge clk);
        #1 mrst = 1'b0;
        if (sp_state == SS_FLOOR) n_floor++;
      end
      // Trip latency: when a trip is expected and was not there, it must
      // arrive within four clocks.
      lat = 0;
      if (SEQ[i].trip && !trip) begin
        while (!trip && lat < 10) begin
          @(posedge clk); #1;
          lat++;
        end
        check($sformatf("row %0d trip within 4 clocks", i), int'(lat <= 4), 1);
        n_trips++;
      end
      repeat (HOLD_CLKS) @(posedge clk);
      #1;
      check($sformatf("row %0d p=%0d pi_out", i, int'(SEQ[i].p)), int'(pi_out), int'(SEQ[i].p));
      check($sformatf("row %0d p=%0d trip setpoint", i, int'(SEQ[i].p)), int'(tsp_out), int'(SEQ[i].tsp));
      check($sformatf("row %0d p=%0d pretrip setpoint", i, int'(SEQ[i].p)), int'(ptsp_out), int'(SEQ[i].ptsp));
      check($sformatf("row %0d p=%0d trip", i, int'(SEQ[i].p)), int'(trip), int'(SEQ[i].trip));
      check($sformatf("row %0d p=%0d pretrip", i, int'(SEQ[i].p)), int'(pretrip), int'(SEQ[i].pre));
      check($sformatf("row %0d p=%0d POB", i, int'(SEQ[i].p)), int'(pob), int'(SEQ[i].pob));
      check($sformatf("row %0d ob_active", i), int'(ob_active), int'(SEQ[i].pob && SEQ[i].sob));
    end

    check("setpoint steps seen", int'(n_steps == 4), 1);
    check("floor reset seen", int'(n_floor == 1), 1);
    check("ceiling seen", int'(n_ceiling > 0), 1);
    check("bypassed floor trip seen", int'(n_bypassed > 0), 1);
    check("two trips seen", n_trips, 2);
    $display("steps=%0d floor=%0d ceiling_clks=%0d bypassed_clks=%0d trips=%0d",
             n_steps, n_floor, n_ceiling, n_bypassed, n_trips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
