// Workload bench for fixed_sp_bistable: a triangular process signal.
//
// The process rises from 0 to 100 and falls back in steps of 5, five times
// over, against setpoints 90 (trip) and 75 (pretrip) with hysteresis 5.
// Per period, expected by hand:
//   - one pretrip pulse, from 75 on the way up to 65 on the way down;
//   - one trip pulse, from 90 up to 80 down;
//   - the trip setpoint in force alternating 90/85, the pretrip 75/70.
// The bench counts the pulses and the cycles spent at each setpoint level.
module tb_fixed_sp_triangle;
  import pps_pkg::*;

  localparam int PERIODS = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pv_t  pi_in, pi_out, trip_spc, pretrip_spc;
  logic trip, pretrip;

  fixed_sp_bistable dut (
    .clk, .rst, .pi_in, .trip_sp(16'd90), .pretrip_sp(16'd75),
    .trip, .pretrip, .trip_spc, .pretrip_spc, .pi_out
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   n_trip_rise = 0;
  int   n_pre_rise = 0;
  logic trip_d = 1'b0;
  logic pre_d = 1'b0;
  always @(posedge clk) begin
    trip_d <= trip;
    pre_d  <= pretrip;
    if (!rst && trip && !trip_d)   n_trip_rise <= n_trip_rise + 1;
    if (!rst && pretrip && !pre_d) n_pre_rise  <= n_pre_rise + 1;
  end

  // Apply a level; check the signals two clocks later.
  task automatic level(int v, bit up);
    bit exp_trip, exp_pre;
    #1 pi_in = pv_t'(v);
    repeat (4) @(posedge clk);
    #1;
    exp_trip = up ? (v >= 90) : (v >= 85);
    exp_pre  = up ? (v >= 75) : (v >= 70);
    check($sformatf("trip at %0d %s", v, up ? "up" : "down"), int'(trip), int'(exp_trip));
    check($sformatf("pretrip at %0d %s", v, up ? "up" : "down"), int'(pretrip), int'(exp_pre));
    check("process output", int'(pi_out), v);
    check("trip setpoint 90/85", int'(trip_spc), exp_trip ? 85 : 90);
    check("pretrip setpoint 75/70", int'(pretrip_spc), exp_pre ? 70 : 75);
  endtask

  initial begin
    pi_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int p = 0; p < PERIODS; p++) begin
      for (int v = 0; v <= 100; v += 5) level(v, 1'b1);
      for (int v = 95; v > 0; v -= 5) level(v, 1'b0);
    end
    check("one trip pulse per period", n_trip_rise, PERIODS);
    check("one pretrip pulse per period", n_pre_rise, PERIODS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
