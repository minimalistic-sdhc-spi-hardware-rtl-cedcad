// sd_test_system: stand-alone board design that exercises the SDHC-SPI
// reader with the three board tests (byte viewer, block checksum, sequence
// checksum; see sd_test_ctrl) and shows the results on a four-digit
// seven-segment display.
//
// The reader (sdhc_spi) and the test controller share reset: when reset
// falls the card is initialised and the test chosen by test[1:0] starts on
// the block set on sw[7:0]. btn steps to the next byte (test 1) or block
// (test 2). The display shows the low byte of the current block number on
// the left two digits and the byte or checksum on the right two; the
// decimal point on the right marks a finished result. led[0] = result
// ready, led[1] = reader error. The SD card connects to miso, mosi, sclk
// and ss (active low); an/seg/dp drive a common-anode display (active low).
//
// From the reference design: the reader, the tests, the switches, the
// button and the hexadecimal display. The pin-level details of the
// display and LEDs are this design's choices. Only the low byte of the
// block number is shown, so its upper 24 bits go unused here.
module sd_test_system #(
  parameter int unsigned INIT_DIV       = 512,
  parameter int unsigned READ_DIV       = 2,
  parameter int unsigned TOKEN_POLLS    = 524288,
  parameter int unsigned SEQ_BLOCKS     = 16,
  parameter int unsigned REFRESH_CYCLES = 50000
) (
  input  logic       clk50m,
  input  logic       reset,
  input  logic [1:0] test,
  input  logic [7:0] sw,
  input  logic       btn,
  // SD card (SPI mode)
  input  logic       miso,
  output logic       mosi,
  output logic       sclk,
  output logic       ss,
  // board display and LEDs
  output logic [3:0] an,
  output logic [6:0] seg,
  output logic       dp,
  output logic [1:0] led
);
  logic        r_block, r_byte, busy, err, done, fail;
  logic [31:0] addr, blk;
  logic [7:0]  dout, value;

  sdhc_spi #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .TOKEN_POLLS(TOKEN_POLLS)
  ) u_reader (
    .clk50m, .reset, .r_block, .r_byte, .addr, .dout, .busy, .err,
    .miso, .mosi, .sclk, .ss
  );

  sd_test_ctrl #(.SEQ_BLOCKS(SEQ_BLOCKS)) u_ctrl (
    .clk(clk50m), .rst(reset), .test, .sw, .btn, .r_block, .r_byte, .addr,
    .dout, .busy, .err, .value, .blk, .done, .fail
  );

  hex_display #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_disp (
    .clk(clk50m), .rst(reset), .value({blk[7:0], value}),
    .dots({3'b000, done}), .an, .seg, .dp
  );

  assign led = {fail, done};
endmodule
