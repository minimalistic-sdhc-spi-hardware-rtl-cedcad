// sdhc_pkg: constants shared by the SDHC-SPI reader units.
//
// The reader uses only five SD commands in SPI mode: CMD0, CMD8, CMD55 and
// ACMD41 (stored as complete 6-byte frames in the 24-byte command ROM) and
// CMD17 (single-block read, framed from its command byte and the 32-bit
// block address). The ROM start addresses below are the values the main
// controller hands to the command unit to select a stored frame. The token
// and response values are those of the SD physical layer specification
// for SPI mode; the ROM layout and the operation encoding are this design's
// own choices.
package sdhc_pkg;

  // start address of each 6-byte frame inside the command ROM
  localparam logic [4:0] ROM_CMD0   = 5'd0;
  localparam logic [4:0] ROM_CMD8   = 5'd6;
  localparam logic [4:0] ROM_CMD55  = 5'd12;
  localparam logic [4:0] ROM_ACMD41 = 5'd18;
  localparam int unsigned CMD_BYTES = 6;

  // first byte of the CMD17 frame (start bit 0, transmission bit 1, index 17)
  localparam logic [7:0] CMD17_BYTE  = 8'h51;
  // byte sent when only clocks are wanted, and the idle level of MISO
  localparam logic [7:0] IDLE_BYTE   = 8'hFF;
  // R1 values
  localparam logic [7:0] R1_IDLE     = 8'h01;
  localparam logic [7:0] R1_READY    = 8'h00;
  // CMD8 echo-back pattern (last byte of the R7 response)
  localparam logic [7:0] CMD8_ECHO   = 8'hAA;
  // start-block token that precedes the 512 data bytes of CMD17
  localparam logic [7:0] DATA_TOKEN  = 8'hFE;
  localparam int unsigned BLOCK_BYTES = 512;
  localparam int unsigned CRC_BYTES   = 2;

endpackage
