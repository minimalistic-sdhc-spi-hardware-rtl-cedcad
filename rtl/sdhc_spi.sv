// sdhc_spi: SDHC card reader in SPI mode with a byte-stream read interface.
//
// Two operations, both signalled on busy / err:
//  * Initialisation starts when reset (active high, synchronous to clk50m)
//    falls: the card is clocked into SPI mode and taken through CMD0, CMD8
//    and the CMD55 / ACMD41 loop at the slow SPI rate. busy stays high
//    until it is done; then err = 1 means no card or a card that failed.
//  * Single-block read: with busy low and no error, raising r_block
//    captures the 32-bit block address addr (an SDHC block number, 512
//    bytes per block) and sends CMD17. When the card has the block ready,
//    busy falls. Each one-cycle pulse on r_byte then fetches the next data
//    byte straight from the card (there is no block buffer); it is on dout
//    once busy has fallen again. r_block = 0 ends the block at any point
//    (the rest is clocked out and dropped) and busy falls when the reader
//    is ready for another block. A timeout sets err, and further reads need
//    a new reset.
// The SPI clock is clk50m / INIT_DIV during initialisation and
// clk50m / READ_DIV for reads (at 50 MHz: 2 -> 25 MHz, 4 -> 12.5 MHz,
// 64 -> 781 kHz, 512 -> 98 kHz). One data byte takes 8 * READ_DIV + 4
// clock cycles from the r_byte pulse to busy falling.
// Structure: main_fsm (the card algorithm) drives sdcmd_unit (command
// ROM, byte multiplexer, SPI unit with SS glitch filter, output register).
// No CRC is generated or checked: stored CRCs are used for CMD0 and CMD8,
// and the data CRC is dropped, as in the reader this design follows.
module sdhc_spi #(
  parameter int unsigned INIT_DIV     = 512,
  parameter int unsigned READ_DIV     = 2,
  parameter int unsigned SS_MIN_SCLK  = 8,
  parameter int unsigned RESP_POLLS   = 16,
  parameter int unsigned INIT_BYTES   = 10,
  parameter int unsigned ACMD41_TRIES = 1024,
  parameter int unsigned TOKEN_POLLS  = 524288
) (
  input  logic        clk50m,
  input  logic        reset,
  input  logic        r_block,
  input  logic        r_byte,
  input  logic [31:0] addr,
  output logic [7:0]  dout,
  output logic        busy,
  output logic        err,
  input  logic        miso,
  output logic        mosi,
  output logic        sclk,
  output logic        ss
);
  logic        w_cmd, w_addr, w_byte, cs_req, fast, cmd_busy;
  logic [7:0]  din;
  logic [31:0] cmd_addr;

  main_fsm #(
    .INIT_BYTES(INIT_BYTES), .ACMD41_TRIES(ACMD41_TRIES), .TOKEN_POLLS(TOKEN_POLLS)
  ) u_main (
    .clk(clk50m), .rst(reset), .r_block, .r_byte, .addr, .busy, .err,
    .w_cmd, .w_addr, .w_byte, .din, .cmd_addr, .cs_req, .fast,
    .cmd_busy, .cmd_dout(dout)
  );

  sdcmd_unit #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN_SCLK),
    .RESP_POLLS(RESP_POLLS)
  ) u_cmd (
    .clk(clk50m), .rst(reset), .w_cmd, .w_addr, .w_byte, .din,
    .addr(cmd_addr), .cs_req, .fast, .busy(cmd_busy), .dout,
    .sclk, .mosi, .ss, .miso
  );
endmodule
