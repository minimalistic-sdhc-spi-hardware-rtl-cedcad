// bootloader_top: hardware multi-boot loader for an 8-bit soft-core
// microcontroller with an 18-bit, 1024-word program memory.
//
// After reset the boot loader adapter holds the processor in reset,
// initialises the SD card through the SDHC-SPI reader, reads the program
// selected by the switches prog[3:0] (slot prog, starting at card block
// 8 * prog) and writes it, three card bytes per instruction, into the
// program block RAM. It then releases p_reset and the processor runs from
// that memory. The processor core itself and its peripherals are outside
// this module: they connect to p_reset, p_address (the processor's
// instruction address) and p_instruction (the instruction word, one clock
// after the address). While p_reset is high the memory address comes from
// the loader's word counter; afterwards from p_address. boot_err = 1 (with
// p_reset held high) reports a card that is missing, failed to initialise,
// or timed out.
// The SD card connects to miso, mosi, sclk and ss (active low).
// The parameters set the reader's SPI clock dividers, poll limits and the
// number of words loaded; their defaults give the 50 MHz system's fastest
// read rate (25 MHz) and a full 1024-word program.
module bootloader_top #(
  parameter int unsigned INIT_DIV     = 512,
  parameter int unsigned READ_DIV     = 2,
  parameter int unsigned SS_MIN_SCLK  = 8,
  parameter int unsigned RESP_POLLS   = 16,
  parameter int unsigned INIT_BYTES   = 10,
  parameter int unsigned ACMD41_TRIES = 1024,
  parameter int unsigned TOKEN_POLLS  = 524288,
  parameter int unsigned PROG_WORDS   = 1024
) (
  input  logic        clk50m,
  input  logic        reset,
  input  logic [3:0]  prog,
  // SD card (SPI mode)
  input  logic        miso,
  output logic        mosi,
  output logic        sclk,
  output logic        ss,
  // processor
  output logic        p_reset,
  input  logic [9:0]  p_address,
  output logic [17:0] p_instruction,
  output logic        boot_err
);
  logic        sd_reset, r_block, r_byte, busy, err, w_ram;
  logic [31:0] addr;
  logic [7:0]  dout;
  logic [9:0]  ram_cnt, mem_addr;
  logic [17:0] mdat;

  boot_adapter #(.PROG_WORDS(PROG_WORDS)) u_adapter (
    .clk(clk50m), .reset, .prog, .sd_reset, .r_block, .r_byte, .addr,
    .busy, .err, .dout, .w_ram, .baddr(ram_cnt), .mdat, .p_reset, .boot_err
  );

  sdhc_spi #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN_SCLK),
    .RESP_POLLS(RESP_POLLS), .INIT_BYTES(INIT_BYTES),
    .ACMD41_TRIES(ACMD41_TRIES), .TOKEN_POLLS(TOKEN_POLLS)
  ) u_reader (
    .clk50m, .reset(sd_reset || reset), .r_block, .r_byte, .addr, .dout,
    .busy, .err, .miso, .mosi, .sclk, .ss
  );

  assign mem_addr = p_reset ? ram_cnt : p_address;

  prog_bram #(.DEPTH(1024), .WIDTH(18)) u_bram (
    .clk(clk50m), .we(w_ram), .addr(mem_addr), .wdata(mdat), .rdata(p_instruction)
  );
endmodule
