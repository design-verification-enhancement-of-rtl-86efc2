// Four-digit multiplexed seven-segment display driver for the board test.
//
// On the test board the trip channel's process input and trip setpoint are
// shown on a four-digit seven-segment display. This driver shows a 16-bit
// value as four hexadecimal digits: digit 3 (leftmost) is value[15:12] and
// digit 0 is value[3:0]. The digits share one set of segment lines and are
// lit one at a time. A free-running counter moves to the next digit every
// REFRESH_CYCLES clocks, so at 50 MHz each digit is refreshed at about
// 250 Hz.
//
// Interface: an[3:0] are the digit enables and seg[6:0] the segments
// {g,f,e,d,c,b,a}. Both are active low, as on a common-anode display.
// Timing: an and seg are registered and change together at a digit switch.
//
// Hexadecimal digits, active-low outputs and the refresh rate are this
// design's own choices; the description only says which quantities appear
// on the display.
module seg7_display
  import pps_pkg::*;
#(
  parameter int unsigned REFRESH_CYCLES = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  input  pv_t        value,
  output logic [3:0] an,
  output logic [6:0] seg
);

  localparam int unsigned CW = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;

  logic [CW-1:0] tick_cnt;
  logic [1:0]    digit;
  logic [3:0]    nibble;

  // Segments {g,f,e,d,c,b,a}, active high, for one hexadecimal digit.
  function automatic logic [6:0] hex_segments(logic [3:0] h);
    unique case (h)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;   // F
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      tick_cnt <= '0;
      digit    <= '0;
    end else if (tick_cnt == CW'(REFRESH_CYCLES - 1)) begin
      tick_cnt <= '0;
      digit    <= digit + 1'b1;
    end else begin
      tick_cnt <= tick_cnt + 1'b1;
    end
  end

  assign nibble = value[4*digit +: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      an  <= 4'b1111;
      seg <= 7'b1111111;
    end else begin
      an  <= ~(4'b0001 << digit);
      seg <= ~hex_segments(nibble);
    end
  end

endmodule
