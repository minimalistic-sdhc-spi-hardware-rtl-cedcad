// cmd_rom: the command ROM (CMDROM) of the SDHC-SPI reader.
//
// Holds the four stored SD command frames, 6 bytes each, 24 bytes in all:
//   0..5   CMD0   40 00 00 00 00 95   (GO_IDLE_STATE, valid CRC7)
//   6..11  CMD8   48 00 00 01 AA 87   (SEND_IF_COND, 2.7-3.6 V, check 0xAA, valid CRC7)
//   12..17 CMD55  77 00 00 00 00 01   (APP_CMD)
//   18..23 ACMD41 69 40 00 00 00 01   (SD_SEND_OP_COND with HCS set)
// Only CMD0 and CMD8 need a real CRC7 in SPI mode; the other two carry a
// dummy CRC with the stop bit set. The size (24 bytes, four commands) and
// the CRC rule follow the reader's description; the frame order and the
// argument values are taken from the SD specification for SDHC cards.
// The read is combinational (the ROM maps to LUTs); addresses 24..31
// return 0xFF.
module cmd_rom (
  input  logic [4:0] addr,
  output logic [7:0] data
);
  always_comb begin
    unique case (addr)
      5'd0:  data = 8'h40;
      5'd1:  data = 8'h00;
      5'd2:  data = 8'h00;
      5'd3:  data = 8'h00;
      5'd4:  data = 8'h00;
      5'd5:  data = 8'h95;
      5'd6:  data = 8'h48;
      5'd7:  data = 8'h00;
      5'd8:  data = 8'h00;
      5'd9:  data = 8'h01;
      5'd10: data = 8'hAA;
      5'd11: data = 8'h87;
      5'd12: data = 8'h77;
      5'd13: data = 8'h00;
      5'd14: data = 8'h00;
      5'd15: data = 8'h00;
      5'd16: data = 8'h00;
      5'd17: data = 8'h01;
      5'd18: data = 8'h69;
      5'd19: data = 8'h40;
      5'd20: data = 8'h00;
      5'd21: data = 8'h00;
      5'd22: data = 8'h00;
      5'd23: data = 8'h01;
      default: data = 8'hFF;
    endcase
  end
endmodule
