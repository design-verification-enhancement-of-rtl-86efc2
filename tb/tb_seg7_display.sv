// Self-checking testbench for seg7_display.
//
// With a refresh period of 3 clocks, it watches the digit enables and
// segments for several full scans of random values. Each lit digit must be
// exactly one enable low, in the order 0,1,2,3. The segments must light
// the hexadecimal digit of the matching nibble. The expected segments come
// from a table of segment letters (a..g) per digit, kept here apart from
// the driver's bit table.
module tb_seg7_display;
  import pps_pkg::*;

  localparam int unsigned REFRESH = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pv_t        value;
  logic [3:0] an;
  logic [6:0] seg;

  seg7_display #(.REFRESH_CYCLES(REFRESH)) dut (.clk, .rst, .value, .an, .seg);

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

  localparam string LIT[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                                "abc", "abcdefg", "abcdfg", "abcefg", "cdefg", "adef",
                                "bcdeg", "adefg", "aefg"};

  // Active-low segment word {g..a} for a hexadecimal digit.
  function automatic logic [6:0] expected_seg(int h);
    logic [6:0] on;
    on = '0;
    for (int k = 0; k < LIT[h].len(); k++) on[3'(LIT[h][k] - "a")] = 1'b1;
    return ~on;
  endfunction

  initial begin
    int d;
    value = 16'h0000;
    repeat (2) @(posedge clk);
    #1;
    check("blank in reset", int'(an), 15);
    rst = 1'b0;
    for (int v = 0; v < 40; v++) begin
      value = (v < 16) ? pv_t'({4{4'(v)}}) : pv_t'($urandom);
      // Two full scans per value; check after each digit has settled.
      for (int scan = 0; scan < 8; scan++) begin
        repeat (REFRESH) @(posedge clk);
        #1;
        d = -1;
        for (int k = 0; k < 4; k++) if (an == ~(4'b0001 << k)) d = k;
        check("exactly one digit lit", int'(d >= 0), 1);
        if (d >= 0) check($sformatf("segments of digit %0d of %h", d, value),
                          int'(seg), int'(expected_seg(int'(value[4*d +: 4]))));
      end
    end
    // Scan order.
    @(posedge clk iff an == 4'b1110);
    #1;
    for (int k = 1; k < 5; k++) begin
      logic [3:0] exp_an;
      exp_an = ~(4'b0001 << (k % 4));
      repeat (REFRESH) @(posedge clk);
      #1 check("scan order", int'(an), int'(exp_an));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
