// Self-checking testbench for fixed_sp_bistable.
//
// Part 1 replays the high steam-generator water level case: setpoints
// 90/75 %, hysteresis 5 %, and a level that rises, falls back and rises
// again. The expected trip and pretrip for each level were worked out by
// hand from the set/clear rule. Part 2 drives random values into a
// trip-on-increase and a trip-on-decrease instance and compares both
// against a reference model written here. The two-clock latency from input
// to trip is checked on every step.
module tb_fixed_sp_bistable;
  import pps_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pv_t  pi_in, trip_sp, pretrip_sp;
  logic hi_trip, hi_pretrip, lo_trip, lo_pretrip;
  pv_t  hi_tspc, hi_ptspc, hi_pi_out, lo_tspc, lo_ptspc, lo_pi_out;
  pv_t  lo_trip_sp, lo_pretrip_sp;

  fixed_sp_bistable #(.HYS(5), .TRIP_HIGH(1'b1)) dut_hi (
    .clk, .rst, .pi_in, .trip_sp, .pretrip_sp,
    .trip(hi_trip), .pretrip(hi_pretrip),
    .trip_spc(hi_tspc), .pretrip_spc(hi_ptspc), .pi_out(hi_pi_out)
  );

  fixed_sp_bistable #(.HYS(5), .TRIP_HIGH(1'b0)) dut_lo (
    .clk, .rst, .pi_in, .trip_sp(lo_trip_sp), .pretrip_sp(lo_pretrip_sp),
    .trip(lo_trip), .pretrip(lo_pretrip),
    .trip_spc(lo_tspc), .pretrip_spc(lo_ptspc), .pi_out(lo_pi_out)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Part 1 stimulus and hand-worked expectations (setpoints 90/75, hys 5).
  localparam int LEVELS[15]  = '{0, 20, 60, 80, 85, 70, 60, 75, 80, 90, 95, 80, 90, 75, 40};
  localparam bit EXP_TRIP[15] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 0, 1, 0, 0};
  localparam bit EXP_PRE[15]  = '{0, 0, 0, 1, 1, 1, 0, 1, 1, 1, 1, 1, 1, 1, 0};

  // Reference state for part 2.
  bit ref_ht, ref_hp, ref_lt, ref_lp;

  function automatic bit ref_next(bit act, int pv, int sp, bit high);
    if (high) return act ? (pv >= sp - 5) : (pv >= sp);
    else      return act ? (pv <= sp + 5) : (pv <= sp);
  endfunction

  initial begin
    bit prev_trip;
    pi_in = '0; trip_sp = 16'd90; pretrip_sp = 16'd75;
    lo_trip_sp = 16'd30; lo_pretrip_sp = 16'd40;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);

    // Part 1: high SG water level sequence.
    prev_trip = 0;
    foreach (LEVELS[i]) begin
      #1 pi_in = pv_t'(LEVELS[i]);
      @(posedge clk); #1;
      check("pi_out latency 1", int'(hi_pi_out), LEVELS[i]);
      check("trip unchanged after 1 clock", int'(hi_trip), int'(prev_trip));
      @(posedge clk); #1;
      check($sformatf("trip at level %0d", LEVELS[i]), int'(hi_trip), int'(EXP_TRIP[i]));
      check($sformatf("pretrip at level %0d", LEVELS[i]), int'(hi_pretrip), int'(EXP_PRE[i]));
      check("trip setpoint in force", int'(hi_tspc), EXP_TRIP[i] ? 85 : 90);
      check("pretrip setpoint in force", int'(hi_ptspc), EXP_PRE[i] ? 70 : 75);
      prev_trip = EXP_TRIP[i];
      repeat (3) @(posedge clk);
    end

    // Part 2: random values, both directions, against the reference model.
    #1 rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    ref_ht = 0; ref_hp = 0; ref_lt = 0; ref_lp = 0;
    for (int n = 0; n < 2000; n++) begin
      int v;
      v = 20 + int'($urandom_range(0, 90));
      #1 pi_in = pv_t'(v);
      @(posedge clk); @(posedge clk); #1;
      ref_ht = ref_next(ref_ht, v, 90, 1);
      ref_hp = ref_next(ref_hp, v, 75, 1);
      ref_lt = ref_next(ref_lt, v, 30, 0);
      ref_lp = ref_next(ref_lp, v, 40, 0);
      check("random high trip",    int'(hi_trip),    int'(ref_ht));
      check("random high pretrip", int'(hi_pretrip), int'(ref_hp));
      check("random low trip",     int'(lo_trip),    int'(ref_lt));
      check("random low pretrip",  int'(lo_pretrip), int'(ref_lp));
      check("random low trip spc", int'(lo_tspc),    ref_lt ? 35 : 30);
      check("random low pretrip spc", int'(lo_ptspc), ref_lp ? 45 : 40);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
