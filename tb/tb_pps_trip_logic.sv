// End-to-end testbench for pps_trip_logic, the whole set of trip channels.
//
// All channels run at once, each with its own stimulus, and are checked
// against expectations computed here:
//   - the five fixed-setpoint channels get random values around their
//     setpoints and are compared each sample with a reference bistable
//     (three trip on a rising value, one on a falling value);
//   - the VOPT channel ramps to the 110 % ceiling (ceiling trip), then
//     steps faster than the rate limit (rate trip);
//   - the LPPT channel falls from above 2100 psia with operator resets
//     down to the floor. Below 400 psia the bypass is requested (trip
//     suppressed), then withdrawn (trip), and the pressure recovers through
//     the hysteresis;
//   - the display is switched across channels and modes (process value,
//     trip setpoint, and the split layout), and the value it scans out is
//     decoded and compared.
// Each of these mechanisms is counted, and one that never happened counts
// as a failure. Reduced timing parameters: the operator reset must be
// held 8 clocks and each display digit is lit 4 clocks.
module tb_pps_trip_logic;
  import pps_pkg::*;

  localparam int unsigned NF = 5;
  localparam int unsigned MRST = 8;
  localparam int unsigned REFRESH = 4;
  localparam logic [NF-1:0] HIGH = 5'b11011;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

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

  pps_trip_logic #(.MRST_CYCLES(MRST), .REFRESH_CYCLES(REFRESH)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_fix_trip_high, n_fix_trip_low, n_fix_hys_hold;
  int n_ceiling_trip, n_rate_trip;
  int n_lppt_step, n_lppt_floor, n_lppt_ceiling, n_lppt_bypass, n_lppt_trip, n_lppt_untrip;
  int n_disp_switch;

  lppt_sp_state_e prev_sp;
  always @(posedge clk) begin
    if (!rst) begin
      if (lppt_sp_state == SS_STEP && prev_sp != SS_STEP) n_lppt_step++;
      if (lppt_sp_state == SS_FLOOR && prev_sp == SS_HOLD) n_lppt_floor++;
      if (lppt_sp_state == SS_CEILING && prev_sp != SS_CEILING) n_lppt_ceiling++;
      if (lppt_sp_state == SS_TRIP && prev_sp != SS_TRIP) n_lppt_trip++;
      if (lppt_sp_state == SS_UNTRIP) n_lppt_untrip++;
      if (lppt_ob_active && lppt_sp_state == SS_FLOOR && pzr_out <= 300) n_lppt_bypass++;
      prev_sp <= lppt_sp_state;
    end
  end

  // ---------------- fixed-setpoint channels ----------------
  bit ref_t[NF], ref_p[NF];

  function automatic bit ref_next(bit act, int pv, int sp, bit high);
    if (high) return act ? (pv >= sp - 5) : (pv >= sp);
    else      return act ? (pv <= sp + 5) : (pv <= sp);
  endfunction

  task automatic run_fixed(int n);
    for (int s = 0; s < n; s++) begin
      int v[NF];
      for (int i = 0; i < NF; i++) begin
        v[i] = int'(fix_trip_sp[i]) + int'($urandom_range(0, 40)) - 25;
        fix_pi_in[i] = pv_t'(v[i]);
      end
      repeat (3) @(posedge clk);
      #1;
      for (int i = 0; i < NF; i++) begin
        bit was;
        was = ref_t[i];
        ref_t[i] = ref_next(ref_t[i], v[i], int'(fix_trip_sp[i]), HIGH[i]);
        ref_p[i] = ref_next(ref_p[i], v[i], int'(fix_pretrip_sp[i]), HIGH[i]);
        check($sformatf("fixed %0d trip", i), int'(fix_trip[i]), int'(ref_t[i]));
        check($sformatf("fixed %0d pretrip", i), int'(fix_pretrip[i]), int'(ref_p[i]));
        check($sformatf("fixed %0d pi_out", i), int'(fix_pi_out[i]), v[i]);
        if (ref_t[i] && !was) begin
          if (HIGH[i]) n_fix_trip_high++; else n_fix_trip_low++;
        end
        if (was && ref_t[i] && (HIGH[i] ? v[i] < int'(fix_trip_sp[i]) : v[i] > int'(fix_trip_sp[i])))
          n_fix_hys_hold++;
      end
    end
  endtask

  // ---------------- VOPT channel ----------------
  task automatic vopt_sample(int p);
    @(posedge clk); #1 pwr_sample = 1'b1; pwr_in = pv_t'(p);
    @(posedge clk); #1 pwr_sample = 1'b0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic run_vopt();
    int ramp[] = '{0, 10, 20, 30, 40, 50, 60, 70, 80, 90, 95, 100, 106, 110, 120, 90, 80, 50, 20, 0};
    foreach (ramp[k]) begin
      vopt_sample(ramp[k]);
      if (ramp[k] == 106) check("VOPT pretrip before ceiling trip", int'(vopt_pretrip && !vopt_trip), 1);
      if (ramp[k] >= 110 && ramp[k] <= 120) begin
        check("VOPT ceiling trip", int'(vopt_trip), 1);
        check("VOPT setpoint at ceiling less hysteresis", int'(vopt_trip_spc), 105);
        if (ramp[k] == 110) n_ceiling_trip++;
      end
      if (ramp[k] == 90 && k > 10) check("VOPT trip cleared", int'(vopt_trip), 0);
    end
    check("VOPT back at floor", int'(vopt_trip_spc), 20);
    vopt_sample(30); vopt_sample(30); vopt_sample(30);
    vopt_sample(70);
    check("VOPT rate trip", int'(vopt_trip), 1);
    check("VOPT rate trip below ceiling", int'(vopt_trip_spc < 110), 1);
    check("VOPT rate limiter active", int'(vopt_rate_limited), 1);
    if (vopt_trip && vopt_rate_limited) n_rate_trip++;
    vopt_sample(70); vopt_sample(70);
    check("VOPT rate trip clears", int'(vopt_trip), 0);
  endtask

  // ---------------- LPPT channel ----------------
  task automatic pzr(int p, int settle = 12);
    #1 pzr_in = pv_t'(p);
    repeat (settle) @(posedge clk);
    #1;
  endtask

  task automatic operator_reset();
    #1 mrst = 1'b1;
    repeat (MRST + 3) @(posedge clk);
    #1 mrst = 1'b0;
    repeat (6) @(posedge clk);
    #1;
  endtask

  task automatic run_lppt();
    int exp_tsp;
    pzr(2300);
    check("LPPT ceiling setpoint", int'(lppt_tsp_out), 1700);
    // Fall with a reset at every pretrip: 1400, 1100, 800, 500, then floor.
    exp_tsp = 1700;
    for (int p = 2200; p >= 600; p -= 100) begin
      pzr(p);
      check($sformatf("LPPT setpoint held at %0d", p), lppt_trip ? 0 : int'(lppt_tsp_out), exp_tsp);
      check($sformatf("LPPT no trip at %0d", p), int'(lppt_trip), 0);
      check($sformatf("LPPT pretrip at %0d", p), int'(lppt_pretrip), int'(p <= exp_tsp + 100));
      if (lppt_pretrip) begin
        operator_reset();
        exp_tsp = (p > 700) ? p - 400 : 300;
        check($sformatf("LPPT reset at %0d", p), int'(lppt_tsp_out), exp_tsp);
      end
    end
    check("LPPT at floor", int'(lppt_tsp_out), 300);
    pzr(500);
    check("LPPT bypass not permitted at 500", int'(lppt_pob), 0);
    pzr(400);
    check("LPPT bypass permitted at 400", int'(lppt_pob), 1);
    sob = 1'b1;
    pzr(200);
    check("LPPT bypassed: no trip", int'(lppt_trip), 0);
    check("LPPT bypass in force", int'(lppt_ob_active), 1);
    #1 sob = 1'b0;
    pzr(200, 4);
    check("LPPT trip after bypass withdrawn", int'(lppt_trip), 1);
    check("LPPT trip setpoint shows reset level", int'(lppt_tsp_out), 400);
    pzr(400);
    check("LPPT trip held inside hysteresis", int'(lppt_trip), 1);
    pzr(450);
    check("LPPT trip resets above 400", int'(lppt_trip), 0);
    pzr(1500);
    check("LPPT follows again", int'(lppt_tsp_out), 1100);
  endtask

  // ---------------- display ----------------
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

  task automatic read_display(output int value);
    value = 0;
    for (int k = 0; k < 8; k++) begin
      repeat (REFRESH) @(posedge clk);
      #1;
      for (int d = 0; d < 4; d++)
        if (an == 4'(~(4'b0001 << d))) value = value | (seg_to_hex(seg) << (4 * d));
    end
  endtask

  task automatic run_display();
    int shown;
    for (int c = 0; c < 7; c++) begin
      for (int w = 0; w < 3; w++) begin
        int exp_v, pv, tsp;
        disp_chan = 3'(c); disp_mode = 2'(w);
        repeat (2) @(posedge clk);
        if (c < 5)       begin pv = int'(fix_pi_out[c]); tsp = int'(fix_trip_spc[c]); end
        else if (c == 5) begin pv = int'(pwr_out);       tsp = int'(vopt_trip_spc);   end
        else             begin pv = int'(pzr_out);       tsp = int'(lppt_tsp_out);    end
        case (w)
          0: exp_v = pv;
          1: exp_v = tsp;
          default: exp_v = (pv % 256) * 256 + (tsp % 256);
        endcase
        read_display(shown);
        check($sformatf("display channel %0d mode=%0d", c, w), shown, exp_v);
        n_disp_switch++;
      end
    end
  endtask

  initial begin
    // Setpoints: high log power 100/95 %, high PZR pressure 2400/2350 psia,
    // low SG level 30/35 %, high SG level 90/75 %, high containment
    // pressure 40/35 (test values for this bench).
    fix_trip_sp    = '{16'd100, 16'd2400, 16'd30, 16'd90, 16'd40};
    fix_pretrip_sp = '{16'd95,  16'd2350, 16'd35, 16'd75, 16'd35};
    foreach (fix_pi_in[i]) fix_pi_in[i] = '0;
    pwr_sample = 1'b0; pwr_in = '0; pzr_in = 16'd2300; mrst = 1'b0; sob = 1'b0;
    disp_chan = 3'd0; disp_mode = 2'd0;
    prev_sp = SS_FOLLOW;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (ref_t[i]) begin ref_t[i] = 0; ref_p[i] = 0; end
    // The fixed channels start from 0 after reset: low-trip channel 2 is
    // tripped at once by a zero level, so settle them first.
    repeat (3) @(posedge clk);
    for (int i = 0; i < NF; i++) begin
      ref_t[i] = ref_next(0, 0, int'(fix_trip_sp[i]), HIGH[i]);
      ref_p[i] = ref_next(0, 0, int'(fix_pretrip_sp[i]), HIGH[i]);
    end

    fork
      run_fixed(400);
      run_vopt();
      run_lppt();
    join
    run_display();

    check("fixed high trip happened", int'(n_fix_trip_high > 0), 1);
    check("fixed low trip happened", int'(n_fix_trip_low > 0), 1);
    check("fixed hysteresis hold happened", int'(n_fix_hys_hold > 0), 1);
    check("VOPT ceiling trip happened", int'(n_ceiling_trip > 0), 1);
    check("VOPT rate trip happened", int'(n_rate_trip > 0), 1);
    check("LPPT four steps", n_lppt_step, 4);
    check("LPPT floor reset happened", int'(n_lppt_floor > 0), 1);
    check("LPPT ceiling happened", int'(n_lppt_ceiling > 0), 1);
    check("LPPT bypassed trip happened", int'(n_lppt_bypass > 0), 1);
    check("LPPT trip happened", int'(n_lppt_trip > 0), 1);
    check("LPPT untrip happened", int'(n_lppt_untrip > 0), 1);
    check("display switched", int'(n_disp_switch == 21), 1);
    $display("mechanisms: fix_high=%0d fix_low=%0d fix_hys=%0d ceil_trip=%0d rate_trip=%0d",
             n_fix_trip_high, n_fix_trip_low, n_fix_hys_hold, n_ceiling_trip, n_rate_trip);
    $display("mechanisms: lppt step=%0d floor=%0d ceiling=%0d bypass=%0d trip=%0d untrip=%0d disp=%0d",
             n_lppt_step, n_lppt_floor, n_lppt_ceiling, n_lppt_bypass, n_lppt_trip,
             n_lppt_untrip, n_disp_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
