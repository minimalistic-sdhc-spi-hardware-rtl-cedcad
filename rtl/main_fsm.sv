// main_fsm: the Main FSM Unit of the SDHC-SPI reader.
//
// Runs the card algorithm and drives the SDCMD unit through the strobes
// w_cmd / w_addr / w_byte, the argument din and the busy / dout handshake.
//
// Initialisation (after rst falls): INIT sends INIT_BYTES bytes of 0xFF
// with the card deselected (80 clocks at the slow SPI rate); CMD0 must
// answer R1 = 0x01; CMD8 must answer R1 = 0x01 followed by four bytes the
// last of which echoes 0xAA; then the pair CMD55 / ACMD41 is repeated
// while ACMD41 answers 0x01 (card still initialising), at most
// ACMD41_TRIES times, until it answers 0x00. The unit then enters IDLE and
// switches the SPI unit to the fast read rate. Any other answer, or a
// timeout, leads to ERROR.
//
// Block read: in IDLE, r_block = 1 captures addr and sends CMD17 with that
// block address (R1 must be 0x00); the card is then polled with 0xFF until
// the start token 0xFE arrives (at most TOKEN_POLLS bytes; 0xFF means "not
// yet", anything else is an error token). Then busy falls and the unit
// waits in the next-byte state: each cycle with r_byte = 1 reads one data
// byte, which is on dout when busy falls again. r_block = 0 aborts the
// block: the bytes not yet read and the two CRC bytes are clocked out and
// dropped (the CRC is not checked), the card is deselected, and the unit
// returns to IDLE. At most 512 bytes are delivered per block.
//
// Handshake: busy is high from the clock edge that accepts a request
// (reset release, r_block in IDLE, r_byte in the next-byte state) until
// the operation ends; err is valid while busy is low and is high only
// after a failure. ERROR keeps busy low and err high until rst.
// The state sequence follows the reader's state diagram; the response
// checks, the retry and poll limits and the ERROR state are this design's
// choices within that algorithm.
module main_fsm
  import sdhc_pkg::*;
#(
  parameter int unsigned INIT_BYTES   = 10,
  parameter int unsigned ACMD41_TRIES = 1024,
  parameter int unsigned TOKEN_POLLS  = 524288
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        r_block,
  input  logic        r_byte,
  input  logic [31:0] addr,
  output logic        busy,
  output logic        err,
  // towards the SDCMD unit
  output logic        w_cmd,
  output logic        w_addr,
  output logic        w_byte,
  output logic [7:0]  din,
  output logic [31:0] cmd_addr,
  output logic        cs_req,
  output logic        fast,
  input  logic        cmd_busy,
  input  logic [7:0]  cmd_dout
);
  typedef enum logic [3:0] {
    M_INIT, M_CMD0, M_CMD8, M_CMD55, M_ACMD41, M_IDLE,
    M_CMD17, M_READY, M_BYTE, M_ABORT, M_ERROR
  } mstate_e;

  localparam int unsigned CW = $clog2(TOKEN_POLLS > ACMD41_TRIES ? TOKEN_POLLS + 1 : ACMD41_TRIES + 1);

  mstate_e     state;
  logic        pending;     // a request to the SDCMD unit is in flight
  logic [2:0]  step;        // sub-step inside CMD8 / CMD17
  logic [CW-1:0] cnt;       // init bytes, ACMD41 tries, token polls
  logic [9:0]  byte_cnt;    // bytes of the current block already clocked out
  logic [31:0] addr_q;
  logic        issue;

  assign cmd_addr = addr_q;
  assign busy     = !(state inside {M_IDLE, M_READY, M_ERROR});
  assign err      = (state == M_ERROR);
  assign issue    = !pending && (state inside {M_INIT, M_CMD0, M_CMD8, M_CMD55, M_ACMD41,
                                               M_CMD17, M_BYTE, M_ABORT});

  // request decoding: which strobe and which argument the current state sends
  always_comb begin
    w_cmd  = 1'b0;
    w_addr = 1'b0;
    w_byte = 1'b0;
    din    = IDLE_BYTE;
    unique case (state)
      M_CMD0:   begin w_cmd = issue; din = {3'b000, ROM_CMD0};   end
      M_CMD8:   if (step == 3'd0) begin w_cmd = issue; din = {3'b000, ROM_CMD8}; end
                else w_byte = issue;
      M_CMD55:  begin w_cmd = issue; din = {3'b000, ROM_CMD55};  end
      M_ACMD41: begin w_cmd = issue; din = {3'b000, ROM_ACMD41}; end
      M_CMD17:  if (step == 3'd0) begin w_addr = issue; din = CMD17_BYTE; end
                else w_byte = issue;
      M_INIT, M_BYTE, M_ABORT: w_byte = issue;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_INIT;
      pending  <= 1'b0;
      step     <= '0;
      cnt      <= '0;
      byte_cnt <= '0;
      addr_q   <= '0;
      cs_req   <= 1'b0;
      fast     <= 1'b0;
    end else if (issue) begin
      pending <= 1'b1;
      // select the card for every command exchange, not for the power-up clocks
      if (state != M_INIT) cs_req <= 1'b1;
    end else if (pending) begin
      if (!cmd_busy) begin
        pending <= 1'b0;
        unique case (state)
          M_INIT: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(INIT_BYTES - 1)) begin
              cnt   <= '0;
              state <= M_CMD0;
            end
          end
          M_CMD0: begin
            cs_req <= 1'b0;
            state  <= (cmd_dout == R1_IDLE) ? M_CMD8 : M_ERROR;
          end
          M_CMD8: begin
            step <= step + 1'b1;
            if (step == 3'd0) begin
              if (cmd_dout != R1_IDLE) state <= M_ERROR;
            end else if (step == 3'd4) begin
              step   <= '0;
              cs_req <= 1'b0;
              state  <= (cmd_dout == CMD8_ECHO) ? M_CMD55 : M_ERROR;
            end
          end
          M_CMD55: begin
            cs_req <= 1'b0;
            state  <= ((cmd_dout & 8'hFE) == 8'h00) ? M_ACMD41 : M_ERROR;
          end
          M_ACMD41: begin
            cs_req <= 1'b0;
            cnt    <= cnt + 1'b1;
            if (cmd_dout == R1_READY) begin
              cnt   <= '0;
              fast  <= 1'b1;
              state <= M_IDLE;
            end else if (cmd_dout == R1_IDLE && cnt != CW'(ACMD41_TRIES - 1)) begin
              state <= M_CMD55;
            end else begin
              state <= M_ERROR;
            end
          end
          M_CMD17: begin
            if (step == 3'd0) begin
              step <= 3'd1;
              cnt  <= '0;
              if (cmd_dout != R1_READY) state <= M_ERROR;
            end else begin
              cnt <= cnt + 1'b1;
              if (cmd_dout == DATA_TOKEN) begin
                step     <= '0;
                byte_cnt <= '0;
                state    <= M_READY;
              end else if (cmd_dout != IDLE_BYTE || cnt == CW'(TOKEN_POLLS - 1)) begin
                state <= M_ERROR;
              end
            end
          end
          M_BYTE: begin
            byte_cnt <= byte_cnt + 1'b1;
            state    <= M_READY;
          end
          M_ABORT: begin
            byte_cnt <= byte_cnt + 1'b1;
            if (byte_cnt == 10'(BLOCK_BYTES + CRC_BYTES - 1)) begin
              cs_req <= 1'b0;
              state  <= M_IDLE;
            end
          end
          default: ;
        endcase
      end
    end else begin
      unique case (state)
        M_IDLE: if (r_block) begin
          addr_q <= addr;
          step   <= '0;
          state  <= M_CMD17;
        end
        M_READY: begin
          if (!r_block) begin
            state <= M_ABORT;
          end else if (r_byte && byte_cnt < 10'(BLOCK_BYTES)) begin
            state <= M_BYTE;
          end
        end
        M_ERROR: cs_req <= 1'b0;
        default: ;
      endcase
    end
  end

  a_strobes_exclusive: assert property (@(posedge clk) disable iff (rst)
    $onehot0({w_cmd, w_addr, w_byte}));
  // r_byte belongs to an open block: r_block must be held while it is pulsed
  a_byte_in_block: assert property (@(posedge clk) disable iff (rst)
    r_byte |-> r_block);
  a_busy_during_request: assert property (@(posedge clk) disable iff (rst)
    pending |-> busy);
endmodule
