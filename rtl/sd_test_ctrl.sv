// sd_test_ctrl: controller of the reader's board test system. It drives the
// reader's request port and produces a byte to show in hexadecimal.
//
// Three tests, chosen by test[1:0] (sampled while rst is high; 0 acts as 1):
//  1. Byte viewer: open the block whose number is set on the switches sw,
//     read its first byte and show it. Each press of the button (rising
//     edge of btn) reads and shows the next byte; after the 512th byte the
//     block is closed and the following block is opened.
//  2. Block checksum: read the whole block sw and show the xor of its 512
//     bytes. Each press repeats this for the next block.
//  3. Sequence checksum: read SEQ_BLOCKS blocks from sw onwards and show the
//     xor of all their bytes; the test then stops.
// blk is the number of the current block (its low byte is shown beside the
// value), done = 1 once the value shown is a finished result, fail = 1
// after the reader reports an error (then only a reset helps).
//
// Timing: every request to the reader is a registered level (r_block) or a
// one-cycle pulse (r_byte). The reader raises busy on the clock edge that
// takes the request, so the controller lets one cycle pass before it waits
// for busy to fall. btn goes through a two-flop synchroniser and must be
// free of bounce. A test 2 block takes 512 byte reads plus the close.
//
// From the reference design: the three tests, the switch-selected block,
// the button stepping through bytes or blocks, the xor checksum and the
// number of sequential blocks being fixed before synthesis. This design's
// own choices: the test input, the start block of tests 2 and 3 taken from
// the switches, moving on to the next block in test 1, and SEQ_BLOCKS = 16.
module sd_test_ctrl #(
  parameter int unsigned SEQ_BLOCKS = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  test,
  input  logic [7:0]  sw,
  input  logic        btn,
  // reader request port
  output logic        r_block,
  output logic        r_byte,
  output logic [31:0] addr,
  input  logic [7:0]  dout,
  input  logic        busy,
  input  logic        err,
  // results
  output logic [7:0]  value,
  output logic [31:0] blk,
  output logic        done,
  output logic        fail
);
  import sdhc_pkg::*;

  typedef enum logic [3:0] {
    T_INIT, T_INIT_W, T_OPEN, T_OPEN_W, T_BYTE, T_BYTE_W, T_NEXT,
    T_CLOSE, T_CLOSE_W, T_HOLD, T_END, T_FAIL
  } tstate_e;

  tstate_e     state;
  logic [1:0]  mode;
  logic        settle;                  // the cycle after a request
  logic [9:0]  nbyte;                   // bytes read from the current block
  logic [$clog2(SEQ_BLOCKS+1)-1:0] nblk; // blocks finished in test 3
  logic [7:0]  sum;
  logic [2:0]  btn_s;
  logic        press;

  assign press = btn_s[1] && !btn_s[2];
  assign addr  = blk;
  assign fail  = (state == T_FAIL);

  always_ff @(posedge clk) begin
    if (rst) btn_s <= '0;
    else     btn_s <= {btn_s[1:0], btn};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= T_INIT;
      mode    <= (test == 2'd0) ? 2'd1 : test;
      settle  <= 1'b1;
      r_block <= 1'b0;
      r_byte  <= 1'b0;
      blk     <= '0;
      nbyte   <= '0;
      nblk    <= '0;
      sum     <= '0;
      value   <= '0;
      done    <= 1'b0;
    end else begin
      r_byte <= 1'b0;
      settle <= 1'b0;
      unique case (state)
        // reader initialises right after reset
        T_INIT: if (!settle) state <= T_INIT_W;
        T_INIT_W: if (!busy) begin
          blk   <= {24'd0, sw};
          state <= err ? T_FAIL : T_OPEN;
        end
        T_OPEN: begin
          r_block <= 1'b1;
          nbyte   <= '0;
          settle  <= 1'b1;
          state   <= T_OPEN_W;
        end
        T_OPEN_W: if (!settle && !busy) state <= err ? T_FAIL : T_BYTE;
        T_BYTE: begin
          r_byte <= 1'b1;
          settle <= 1'b1;
          state  <= T_BYTE_W;
        end
        T_BYTE_W: if (!r_byte && !settle && !busy) begin
          if (err) state <= T_FAIL;
          else begin
            sum   <= sum ^ dout;
            nbyte <= nbyte + 10'd1;
            if (mode == 2'd1) begin
              value <= dout;
              done  <= 1'b1;
              state <= T_HOLD;
            end else state <= T_NEXT;
          end
        end
        T_NEXT: state <= (nbyte == 10'(BLOCK_BYTES)) ? T_CLOSE : T_BYTE;
        T_CLOSE: begin
          r_block <= 1'b0;
          settle  <= 1'b1;
          state   <= T_CLOSE_W;
        end
        T_CLOSE_W: if (!settle && !busy) begin
          if (err) state <= T_FAIL;
          else begin
            unique case (mode)
              2'd2: begin
                value <= sum;
                done  <= 1'b1;
                state <= T_HOLD;
              end
              2'd3: begin
                nblk <= nblk + 1'b1;
                if (32'(nblk) + 32'd1 == 32'(SEQ_BLOCKS)) begin
                  value <= sum;
                  done  <= 1'b1;
                  state <= T_END;
                end else begin
                  blk   <= blk + 32'd1;
                  state <= T_OPEN;
                end
              end
              default: begin          // test 1 after the last byte
                blk   <= blk + 32'd1;
                state <= T_OPEN;
              end
            endcase
          end
        end
        T_HOLD: if (press) begin
          done <= 1'b0;
          if (mode == 2'd1) begin
            state <= (nbyte == 10'(BLOCK_BYTES)) ? T_CLOSE : T_BYTE;
          end else begin
            sum   <= '0;
            blk   <= blk + 32'd1;
            state <= T_OPEN;
          end
        end
        T_END:  ;
        T_FAIL: ;
        default: state <= T_FAIL;
      endcase
    end
  end

  // requests are only made while the reader is free
  a_request_when_free: assert property (@(posedge clk) disable iff (rst)
    $rose(r_block) || r_byte |-> !busy);
endmodule
