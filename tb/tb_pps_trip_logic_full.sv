// Full-size testbench for pps_trip_logic: every parameter at its default.
//
// One complete operation at real timing (50 MHz clock): the pressurizer
// pressure falls from above 2100 psia to the pretrip. The operator holds
// the manual reset for the full 10 s (500,000,000 clocks), and the trip
// setpoint must step from the 1700 psia ceiling to pressure - 400. It must
// not step early, even 1000 clocks before the 10 s are up. Meanwhile the
// high steam-generator level channel trips and resets, and the VOPT
// channel trips at its ceiling. At the end the display, at its real refresh
// period, is decoded for the LPPT trip setpoint.
module tb_pps_trip_logic_full;
  import pps_pkg::*;

  localparam int unsigned NF = 5;
  localparam longint unsigned MRST = 64'd500_000_000;
  localparam int unsigned REFRESH = 50_000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;   // 50 MHz

  int checks = 0;
  int failures = 0;

  pv_t  fix_pi_in [NF], fix_trip_sp [NF], fix_pretrip_sp [NF];
  logic [NF-1:0] fix_trip, fix_pretrip;
  pv_t  fix_trip_spc [NF], fix_pretrip_spc [NF], fix_pi_out [NF];
  logic pwr_sample;
  pv_t  pwr_in, vopt_trip_spc, vopt_pretrip_spc, pwr_out;
  logic vopt_trip, vopt_pretrip, vopt_rate_limited;
  pv_t  pzr_in, lppt_tsp_out, lppt_ptsp_out, pzr_out;
  logic mrst, sob, lppt_trip, lppt_pretrip, lppt_pob, lppt_ob_active, lppt_rate_up;
  lppt_rate_state_e lppt_rate_state;
  lppt_sp_state_e   lppt_sp_state;
  logic [2:0] disp_chan;
  logic [1:0] disp_mode;
  logic [3:0] an;
  logic [6:0] seg;

  pps_trip_logic dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (int'(MRST) + 2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int seg_to_hex(logic [6:0] s);
    for (int h = 0; h < 16; h++) begin
      logic [6:0] on;
      case (h)
        0: on = 7'h3F; 1: on = 7'h06; 2: on = 7'h5B; 3: on = 7'h4F;
        4: on = 7'h66; 5: on = 7'h6D; 6: on = 7'h7D; 7: on = 7'h07;
        8: on = 7'h7F; 9: on = 7'h6F; 10: on = 7'h77; 11: on = 7'h7C;
        12: on = 7'h39; 13: on = 7'h5E; 14: on = 7'h79; default: on = 7'h71;
      endcase
      if (~s == on) return h;
    end
    return -1;
  endfunction

  int step_seen_at;
  longint unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    longint unsigned t0;
    int shown;
    fix_trip_sp    = '{16'd100, 16'd2400, 16'd30, 16'd90, 16'd40};
    fix_pretrip_sp = '{16'd95,  16'd2350, 16'd35, 16'd75, 16'd35};
    fix_pi_in      = '{16'd50,  16'd2200, 16'd50, 16'd50, 16'd10};
    pwr_sample = 1'b0; pwr_in = '0; pzr_in = 16'd2300; mrst = 1'b0; sob = 1'b0;
    disp_chan = 3'd6; disp_mode = 2'd1;
    cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20) @(posedge clk);
    #1;
    check("LPPT at ceiling", int'(lppt_tsp_out), 1700);

    // High SG level: trip at 90, held at 87, reset at 80.
    fix_pi_in[3] = 16'd92;  repeat (3) @(posedge clk); #1;
    check("SG level trip", int'(fix_trip[3]), 1);
    fix_pi_in[3] = 16'd87;  repeat (3) @(posedge clk); #1;
    check("SG level trip held inside hysteresis", int'(fix_trip[3]), 1);
    fix_pi_in[3] = 16'd80;  repeat (3) @(posedge clk); #1;
    check("SG level trip reset", int'(fix_trip[3]), 0);
    check("SG level pretrip still set", int'(fix_pretrip[3]), 1);

    // VOPT up to the ceiling.
    for (int p = 0; p <= 110; p += 10) begin
      #1 pwr_sample = 1'b1; pwr_in = pv_t'(p);
      @(posedge clk); #1 pwr_sample = 1'b0;
      repeat (3) @(posedge clk);
    end
    #1;
    check("VOPT ceiling trip", int'(vopt_trip), 1);

    // LPPT falls to the pretrip.
    for (int p = 2200; p >= 1800; p -= 100) begin
      #1 pzr_in = pv_t'(p);
      repeat (12) @(posedge clk);
    end
    #1;
    check("LPPT pretrip at 1800", int'(lppt_pretrip), 1);
    check("LPPT setpoint held", int'(lppt_tsp_out), 1700);

    // Operator reset held for 10 s.
    mrst = 1'b1;
    t0 = cyc;
    repeat (int'(MRST) - 1000) @(posedge clk);
    #1;
    check("no step before 10 s", int'(lppt_tsp_out), 1700);
    while (lppt_sp_state != SS_STEP && cyc - t0 < MRST + 100) @(posedge clk);
    #1;
    check("step taken at 10 s (within 3 clocks)", int'((cyc - t0 >= MRST) && (cyc - t0 <= MRST + 3)), 1);
    repeat (3) @(posedge clk);
    #1 mrst = 1'b0;
    check("setpoint stepped to 1800 - 400", int'(lppt_tsp_out), 1400);
    check("pretrip cleared by the step", int'(lppt_pretrip), 0);

    // Display at real refresh rate.
    shown = 0;
    for (int k = 0; k < 8; k++) begin
      repeat (REFRESH) @(posedge clk);
      #1;
      for (int d = 0; d < 4; d++)
        if (an == 4'(~(4'b0001 << d))) shown = shown | (seg_to_hex(seg) << (4 * d));
    end
    check("display shows LPPT trip setpoint", int'(shown), 1400);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
