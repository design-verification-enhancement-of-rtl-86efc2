// Self-checking testbench for vopt_bistable.
//
// Part 1 replays a power ramp up to and past the 110 % ceiling and back
// down to zero. The expected setpoints and signals were worked out by hand
// (margin 15, floor 20, ceiling 110, pretrip offset 6, hysteresis 5). Part 2
// makes a power step larger than the rate limit, which must give a rate
// trip below the ceiling. Part 3 ramps in steps of 20 %, which
// outruns the rate limit on the way up. Part 4 drives random power sequences and
// compares against a reference model written here. The latency is checked
// throughout: setpoints one clock after a sample, trip/pretrip two.
module tb_vopt_bistable;
  import pps_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic sample;
  pv_t  pi_in;
  logic trip, pretrip, rate_limited;
  pv_t  trip_spc, pretrip_spc, pi_out;

  vopt_bistable dut (
    .clk, .rst, .sample, .pi_in, .trip, .pretrip, .rate_limited,
    .trip_spc, .pretrip_spc, .pi_out
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  int  r_tsp;
  bit  r_trip, r_pre, r_lim;

  function automatic int imax(int a, int b); return (a > b) ? a : b; endfunction
  function automatic int imin(int a, int b); return (a < b) ? a : b; endfunction

  task automatic ref_sample(int p);
    int t;
    t = p + 15;
    r_lim = 0;
    if (t > r_tsp + 11) begin t = r_tsp + 11; r_lim = 1; end
    if (t > 110) begin t = 110; r_lim = 0; end
    t = imax(t, 20);
    r_tsp = t;
    r_trip = r_trip ? (p >= r_tsp - 5) : (p >= r_tsp);
    r_pre  = r_pre  ? (p >= r_tsp - 11) : (p >= r_tsp - 6);
  endtask

  // Apply one sample and check outputs after one and after two clocks.
  task automatic apply(int p, bit hold_checks = 1);
    bit old_trip;
    old_trip = trip;
    ref_sample(p);
    #1 sample = 1'b1; pi_in = pv_t'(p);
    @(posedge clk); #1 sample = 1'b0;
    check("pi_out one clock after sample", int'(pi_out), p);
    check("trip not yet updated", int'(trip), int'(old_trip));
    @(posedge clk); #1;
    check($sformatf("trip at %0d", p), int'(trip), int'(r_trip));
    check($sformatf("pretrip at %0d", p), int'(pretrip), int'(r_pre));
    check($sformatf("trip_spc at %0d", p), int'(trip_spc), r_trip ? r_tsp - 5 : r_tsp);
    check($sformatf("pretrip_spc at %0d", p), int'(pretrip_spc), r_pre ? r_tsp - 11 : r_tsp - 6);
    check($sformatf("rate_limited at %0d", p), int'(rate_limited), int'(r_lim));
    if (hold_checks) begin
      repeat (3) @(posedge clk); #1;
      check("trip stable between samples", int'(trip), int'(r_trip));
    end
  endtask

  localparam int N1 = 23;
  localparam int RAMP[N1] = '{0, 10, 20, 30, 40, 50, 60, 70, 80, 90, 95, 100, 106, 110, 120,
                             90, 80, 70, 50, 20, 0, 10, 20};
  localparam int EXP_TSPC[N1] = '{20, 25, 35, 45, 55, 65, 75, 85, 95, 105, 110, 110, 110, 105, 105,
                                 105, 95, 85, 65, 35, 20, 25, 35};
  localparam int EXP_PSPC[N1] = '{14, 19, 29, 39, 49, 59, 69, 79, 89, 99, 104, 104, 99, 99, 99,
                                 99, 89, 79, 59, 29, 14, 19, 29};
  localparam bit EXP_TRIP[N1] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,1,1, 0,0,0,0,0,0,0,0};

  localparam int FAST[17] = '{0, 10, 20, 30, 50, 70, 90, 110, 120, 90, 80, 70, 50, 20, 0, 10, 20};

  int n_rate_trips;

  initial begin
    sample = 1'b0; pi_in = '0;
    r_tsp = 20; r_trip = 0; r_pre = 0; r_lim = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check("reset setpoint is floor", int'(trip_spc), 20);

    // Part 1: ceiling trip.
    for (int i = 0; i < N1; i++) begin
      apply(RAMP[i]);
      check($sformatf("hand trip_spc at step %0d", i), int'(trip_spc), EXP_TSPC[i]);
      check($sformatf("hand pretrip_spc at step %0d", i), int'(pretrip_spc), EXP_PSPC[i]);
      check($sformatf("hand trip at step %0d", i), int'(trip), int'(EXP_TRIP[i]));
    end

    // Part 2: rate trip. Steady at 30 % (setpoint 45), then a step to 70 %.
    apply(30); apply(30);
    apply(70);
    check("rate trip raised", int'(trip), 1);
    check("rate trip below ceiling: setpoint 45+11", int'(trip_spc), 56 - 5);
    check("rate limiter active", int'(rate_limited), 1);
    apply(70);
    check("rate trip holds, setpoint 67", int'(trip_spc), 62);
    apply(70);
    check("rate trip clears at setpoint 78", int'(trip), 0);
    check("setpoint 78", int'(trip_spc), 78);
    apply(70);
    check("setpoint reaches target 85", int'(trip_spc), 85);
    check("limiter released", int'(rate_limited), 0);

    // Part 3: a faster ramp, 0..120 in steps of up to 20 and back, from the
    // floor. Steps of 20 outrun the 11 %-per-sample limit: the setpoint
    // goes 45, 56, 67 while power goes 30, 50, 70, so the trip comes at
    // 70 % (rate trip), below the ceiling.
    apply(0); apply(0);
    check("back at floor", int'(trip_spc), 20);
    foreach (FAST[k]) begin
      apply(FAST[k]);
      if (FAST[k] == 50) check("no trip yet at 50", int'(trip), 0);
      if (k == 5) begin
        check("rate trip at 70", int'(trip), 1);
        check("rate trip setpoint 67 less hysteresis", int'(trip_spc), 62);
      end
    end

    // Part 4: random sequences against the reference.
    n_rate_trips = 0;
    for (int n = 0; n < 3000; n++) begin
      int p;
      if ($urandom_range(0, 3) == 0) p = int'($urandom_range(0, 130));
      else p = imax(0, imin(130, int'(pi_out) + int'($urandom_range(0, 40)) - 15));
      apply(p, 0);
      if (trip && r_tsp < 110) n_rate_trips++;
    end
    check("random run produced rate trips", int'(n_rate_trips > 0), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
