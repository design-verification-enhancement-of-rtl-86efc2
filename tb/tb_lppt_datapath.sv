// Self-checking testbench for lppt_datapath.
//
// Drives random control words and pressures and keeps its own copy of the
// four registers. Every clock it compares all comparator flags and the
// three outputs with values computed here from that copy. A directed part
// first loads each setpoint mux input once and checks the constants (floor
// 300, ceiling 1700, pressure - 400 but not below the floor, pretrip =
// trip + 100).
module tb_lppt_datapath;
  import pps_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pv_t         pi_in;
  lppt_ctrl_t  ctrl;
  lppt_flags_t flags;
  pv_t         pi_out, tsp_out, ptsp_out;

  lppt_datapath dut (.clk, .rst, .pi_in, .ctrl, .flags, .pi_out, .tsp_out, .ptsp_out);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r_pi, r_pi1, r_tsp, r_ptsp;

  task automatic step(int p, lppt_ctrl_t c);
    int mux;
    #1 pi_in = pv_t'(p); ctrl = c;
    case (c.tsp_sel)
      TSP_SEL_FLOOR: mux = 300;
      TSP_SEL_CEIL:  mux = 1700;
      TSP_SEL_STEP:  mux = (r_pi - 400 > 300) ? r_pi - 400 : 300;
      default:       mux = r_tsp;
    endcase
    @(posedge clk);
    if (c.ptsp_en) r_ptsp = r_tsp + 100;
    if (c.tsp_en)  r_tsp  = mux;
    if (c.pi1_en)  r_pi1  = r_pi;
    if (c.pi_en)   r_pi   = p;
    #1;
    check("pi_out", int'(pi_out), r_pi);
    check("tsp_out", int'(tsp_out), c.trip ? r_tsp + 100 : r_tsp);
    check("ptsp_out", int'(ptsp_out), c.pretrip ? r_ptsp + 100 : r_ptsp);
    check("le_ptsp_hys", int'(flags.le_ptsp_hys), int'(r_pi <= r_ptsp + 100));
    check("le_ptsp", int'(flags.le_ptsp), int'(r_pi <= r_ptsp));
    check("le_tsp_hys", int'(flags.le_tsp_hys), int'(r_pi <= r_tsp + 100));
    check("le_tsp", int'(flags.le_tsp), int'(r_pi <= r_tsp));
    check("ge 2100", int'(flags.ge_ceil_pi), int'(r_pi >= 2100));
    check("gt 700", int'(flags.gt_floor_pi), int'(r_pi > 700));
    check("ge 500", int'(flags.ge_ob_remove), int'(r_pi >= 500));
    check("le 400", int'(flags.le_ob_permit), int'(r_pi <= 400));
    check("gt prev", int'(flags.gt_prev), int'(r_pi > r_pi1));
    check("lt prev", int'(flags.lt_prev), int'(r_pi < r_pi1));
    check("gap > 400", int'(flags.gap_gt_step), int'(r_pi - r_tsp > 400));
  endtask

  function automatic lppt_ctrl_t mk(bit pi_en, bit pi1_en, bit tsp_en, bit ptsp_en,
                                    tsp_sel_e sel, bit tr, bit pt);
    lppt_ctrl_t c;
    c.pi_en = pi_en; c.pi1_en = pi1_en; c.tsp_en = tsp_en; c.ptsp_en = ptsp_en;
    c.tsp_sel = sel; c.trip = tr; c.pretrip = pt;
    return c;
  endfunction

  initial begin
    pi_in = '0; ctrl = '0;
    r_pi = 0; r_pi1 = 0; r_tsp = 1700; r_ptsp = 1800;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // Directed: each mux input, then the pretrip load.
    step(1500, mk(1, 0, 0, 0, TSP_SEL_STEP, 0, 0));
    step(1500, mk(0, 0, 1, 0, TSP_SEL_STEP, 0, 0));
    check("step input = 1500 - 400", int'(tsp_out), 1100);
    step(1500, mk(0, 0, 0, 1, TSP_SEL_STEP, 0, 0));
    check("pretrip = 1100 + 100", int'(ptsp_out), 1200);
    step(1500, mk(0, 0, 1, 0, TSP_SEL_FLOOR, 0, 0));
    check("floor 300", int'(tsp_out), 300);
    step(1500, mk(0, 0, 1, 0, TSP_SEL_CEIL, 1, 0));
    check("ceiling 1700 + hysteresis while tripped", int'(tsp_out), 1800);

    // Random.
    for (int n = 0; n < 20000; n++) begin
      lppt_ctrl_t c;
      int p;
      c = lppt_ctrl_t'($urandom);
      if (c.tsp_sel == 2'b11) c.tsp_sel = TSP_SEL_STEP;
      p = int'($urandom_range(0, 2600));
      step(p, c);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
