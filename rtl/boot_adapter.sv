// boot_adapter: boot loader adapter between the SDHC-SPI reader and the
// program memory of an 8-bit soft-core microcontroller with 18-bit
// instructions.
//
// While it works the processor is held in reset (p_reset = 1). After reset
// it pulses sd_reset to (re)initialise the card, waits for the reader, and
// loads the block counter blk_cnt with the first block of the program
// selected by prog: blk_cnt = {25'b0, prog[3:0], 3'b000}, i.e. program n
// starts at block 8n (every program slot is 4096 bytes). It then reads
// block after block through the reader's r_block / r_byte / busy handshake.
// The card holds each instruction as three bytes, most significant group
// first, with the two upper bits of each byte unused:
//   byte 0 = {2'b00, instr[17:12]}, byte 1 = {2'b00, instr[11:6]},
//   byte 2 = {2'b00, instr[5:0]}
// (for example 0x000AA is stored as 0x00 0x02 0x2A). Each byte's low six
// bits enter a shift chain sx0_r -> sx1_r -> sx2_r; after every third byte
// {sx2_r, sx1_r, sx0_r} is written (w_ram) at address ram_cnt, which then
// counts up. Instructions may straddle a block boundary. After PROG_WORDS
// words (1024 = 3072 bytes = 6 blocks) the open block is ended, and when
// the reader is idle again the processor is released (p_reset = 0). A
// failure reported by the reader leaves the processor in reset with
// boot_err = 1 until the next reset.
// Handshake timing: each request (r_block rising, an r_byte pulse) is
// followed by one cycle in which busy is ignored, then the adapter waits
// for busy = 0. The packing, the block counter layout and the reset
// control follow the boot loader description; the exact sequencing is this
// design's own.
module boot_adapter #(
  parameter int unsigned PROG_WORDS = 1024
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  prog,
  // SDHC-SPI reader side
  output logic        sd_reset,
  output logic        r_block,
  output logic        r_byte,
  output logic [31:0] addr,
  input  logic        busy,
  input  logic        err,
  input  logic [7:0]  dout,
  // program memory side
  output logic        w_ram,
  output logic [9:0]  baddr,
  output logic [17:0] mdat,
  // processor side
  output logic        p_reset,
  output logic        boot_err
);
  typedef enum logic [3:0] {
    A_START, A_INIT_W, A_BLOCK, A_BLK_D, A_BLK_W, A_BYTE, A_BYTE_D, A_BYTE_W,
    A_WRITE, A_NEXT, A_EOB_D, A_EOB_W, A_END_D, A_END_W, A_RUN, A_FAIL
  } astate_e;

  astate_e     state;
  logic [31:0] blk_cnt;
  logic [9:0]  ram_cnt;
  logic [9:0]  byte_cnt;   // bytes taken from the current block
  logic [1:0]  part;       // position inside the 3-byte instruction
  logic [5:0]  sx0_r, sx1_r, sx2_r;

  assign addr     = blk_cnt;
  assign baddr    = ram_cnt;
  assign mdat     = {sx2_r, sx1_r, sx0_r};
  assign w_ram    = (state == A_WRITE);
  assign sd_reset = (state == A_START);
  assign p_reset  = (state != A_RUN);
  assign boot_err = (state == A_FAIL);

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= A_START;
      blk_cnt  <= '0;
      ram_cnt  <= '0;
      byte_cnt <= '0;
      part     <= '0;
      sx0_r    <= '0;
      sx1_r    <= '0;
      sx2_r    <= '0;
      r_block  <= 1'b0;
      r_byte   <= 1'b0;
    end else begin
      r_byte <= 1'b0;
      unique case (state)
        A_START:  state <= A_INIT_W;
        A_INIT_W: if (!busy) begin
          if (err) state <= A_FAIL;
          else begin
            blk_cnt <= {25'd0, prog, 3'b000};
            ram_cnt <= '0;
            part    <= '0;
            state   <= A_BLOCK;
          end
        end
        A_BLOCK: begin
          r_block  <= 1'b1;
          byte_cnt <= '0;
          state    <= A_BLK_D;
        end
        A_BLK_D:  state <= A_BLK_W;
        A_BLK_W:  if (!busy) state <= err ? A_FAIL : A_BYTE;
        A_BYTE: begin
          r_byte <= 1'b1;
          state  <= A_BYTE_D;
        end
        A_BYTE_D: state <= A_BYTE_W;
        A_BYTE_W: if (!busy) begin
          if (err) state <= A_FAIL;
          else begin
            sx0_r    <= dout[5:0];
            sx1_r    <= sx0_r;
            sx2_r    <= sx1_r;
            byte_cnt <= byte_cnt + 1'b1;
            if (part == 2'd2) begin
              part  <= '0;
              state <= A_WRITE;
            end else begin
              part  <= part + 1'b1;
              state <= A_NEXT;
            end
          end
        end
        A_WRITE: begin
          ram_cnt <= ram_cnt + 1'b1;
          if (ram_cnt == 10'(PROG_WORDS - 1)) begin
            r_block <= 1'b0;
            state   <= A_END_D;
          end else begin
            state <= A_NEXT;
          end
        end
        A_NEXT: begin
          if (byte_cnt == 10'd512) begin
            r_block <= 1'b0;
            state   <= A_EOB_D;
          end else begin
            state <= A_BYTE;
          end
        end
        A_EOB_D:  state <= A_EOB_W;
        A_EOB_W:  if (!busy) begin
          blk_cnt <= blk_cnt + 1'b1;
          state   <= err ? A_FAIL : A_BLOCK;
        end
        A_END_D:  state <= A_END_W;
        A_END_W:  if (!busy) state <= err ? A_FAIL : A_RUN;
        A_RUN, A_FAIL: ;
        default:  state <= A_FAIL;
      endcase
    end
  end

  a_write_aligned: assert property (@(posedge clk) disable iff (reset)
    w_ram |-> part == 2'd0);
endmodule
