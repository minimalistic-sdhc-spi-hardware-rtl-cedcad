// hex_display: driver for a four-digit, multiplexed seven-segment display
// that shows a 16-bit value as four hexadecimal digits.
//
// One digit is lit at a time. A free-running counter selects the digit and
// moves on every REFRESH_CYCLES clock cycles (default 50000: 1 ms per digit
// at 50 MHz, a 250 Hz refresh of the whole display, fast enough to look
// steady). an[3:0] selects the digit, an[3] being the leftmost (value[15:12]);
// seg[6:0] holds segments g..a. Both are active low, as on common-anode
// boards; dp (the decimal point, active low) is lit on the digits whose bit
// in dots is set. All outputs are registered.
//
// The reference design only says that results are shown in hexadecimal on
// the board's display; the multiplexing, the refresh rate and the
// active-low polarity are this design's choices.
module hex_display #(
  parameter int unsigned REFRESH_CYCLES = 50000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] value,
  input  logic [3:0]  dots,
  output logic [3:0]  an,
  output logic [6:0]  seg,
  output logic        dp
);
  logic [$clog2(REFRESH_CYCLES)-1:0] tick;
  logic [1:0] digit;
  logic [3:0] nib;
  logic [6:0] pattern;               // segments g..a, active high

  always_ff @(posedge clk) begin
    if (rst) begin
      tick  <= '0;
      digit <= '0;
    end else if (32'(tick) == REFRESH_CYCLES - 1) begin
      tick  <= '0;
      digit <= digit + 2'd1;
    end else begin
      tick <= tick + 1'b1;
    end
  end

  assign nib = value[4*digit +: 4];

  always_comb begin
    unique case (nib)
      4'h0: pattern = 7'b0111111;
      4'h1: pattern = 7'b0000110;
      4'h2: pattern = 7'b1011011;
      4'h3: pattern = 7'b1001111;
      4'h4: pattern = 7'b1100110;
      4'h5: pattern = 7'b1101101;
      4'h6: pattern = 7'b1111101;
      4'h7: pattern = 7'b0000111;
      4'h8: pattern = 7'b1111111;
      4'h9: pattern = 7'b1101111;
      4'hA: pattern = 7'b1110111;
      4'hB: pattern = 7'b1111100;
      4'hC: pattern = 7'b0111001;
      4'hD: pattern = 7'b1011110;
      4'hE: pattern = 7'b1111001;
      default: pattern = 7'b1110001;   // F
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      an  <= 4'b1111;
      seg <= 7'b1111111;
      dp  <= 1'b1;
    end else begin
      an  <= ~(4'b0001 << digit);
      seg <= ~pattern;
      dp  <= ~dots[digit];
    end
  end
endmodule
