// sdhc_top: the two board designs built around the SDHC-SPI reader, side by
// side with their own pins. They share nothing but the 50 MHz clock and
// would be loaded into the FPGA one at a time.
//  * bootloader_top: multi-boot loader that copies the program in slot
//    prog[3:0] of the card into the processor's program memory and then
//    releases the processor (pins bl_*; the processor core is outside and
//    connects to bl_p_reset, bl_p_address and bl_p_instruction).
//  * sd_test_system: the reader's board tests with switches, button and a
//    hexadecimal display (pins ts_*).
// Each design has its own reset and its own SD card socket. Timing and
// handshakes are those of the two designs; see their files. The split into
// two designs follows the reference; the combined top is this design's.
module sdhc_top #(
  parameter int unsigned INIT_DIV       = 512,
  parameter int unsigned READ_DIV       = 2,
  parameter int unsigned PROG_WORDS     = 1024,
  parameter int unsigned SEQ_BLOCKS     = 16,
  parameter int unsigned REFRESH_CYCLES = 50000
) (
  input  logic        clk50m,
  // boot loader system
  input  logic        bl_reset,
  input  logic [3:0]  bl_prog,
  input  logic        bl_miso,
  output logic        bl_mosi,
  output logic        bl_sclk,
  output logic        bl_ss,
  output logic        bl_p_reset,
  input  logic [9:0]  bl_p_address,
  output logic [17:0] bl_p_instruction,
  output logic        bl_boot_err,
  // reader test system
  input  logic        ts_reset,
  input  logic [1:0]  ts_test,
  input  logic [7:0]  ts_sw,
  input  logic        ts_btn,
  input  logic        ts_miso,
  output logic        ts_mosi,
  output logic        ts_sclk,
  output logic        ts_ss,
  output logic [3:0]  ts_an,
  output logic [6:0]  ts_seg,
  output logic        ts_dp,
  output logic [1:0]  ts_led
);
  bootloader_top #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .PROG_WORDS(PROG_WORDS)
  ) u_boot (
    .clk50m, .reset(bl_reset), .prog(bl_prog), .miso(bl_miso), .mosi(bl_mosi),
    .sclk(bl_sclk), .ss(bl_ss), .p_reset(bl_p_reset), .p_address(bl_p_address),
    .p_instruction(bl_p_instruction), .boot_err(bl_boot_err)
  );

  sd_test_system #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SEQ_BLOCKS(SEQ_BLOCKS),
    .REFRESH_CYCLES(REFRESH_CYCLES)
  ) u_test (
    .clk50m, .reset(ts_reset), .test(ts_test), .sw(ts_sw), .btn(ts_btn),
    .miso(ts_miso), .mosi(ts_mosi), .sclk(ts_sclk), .ss(ts_ss),
    .an(ts_an), .seg(ts_seg), .dp(ts_dp), .led(ts_led)
  );
endmodule
