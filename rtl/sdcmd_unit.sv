// sdcmd_unit: the SDCMD Unit of the SDHC-SPI reader.
//
// Carries out one request of the main controller at a time and holds busy
// high until it is finished (busy rises on the clock edge that accepts the
// request). Requests are one-cycle strobes:
//   w_cmd  : send the 6-byte frame stored in the command ROM from address
//            din[4:0], then poll the card with 0xFF bytes until a byte with
//            bit 7 clear arrives (the R1 response) or RESP_POLLS bytes have
//            gone by; the last byte received is left on dout (0xFF on a
//            timeout).
//   w_addr : send the frame {din, addr[31:24], addr[23:16], addr[15:8],
//            addr[7:0], 0xFF}, i.e. a command whose argument is the 32-bit
//            address (used for CMD17), then poll R1 as above.
//   w_byte : exchange one byte: send din, leave the received byte on dout.
// Inside are the CMD FSM, cmd_cnt (the counter that addresses the ROM,
// loaded with the start address and stepped after every byte), the byte
// multiplexer that feeds the SPI unit from the ROM, the address bytes, din
// or the 0xFF idle pattern, and out_reg, which captures the SPI unit's
// received byte and drives dout. cs_req and fast pass straight to the SPI
// unit (chip select request and clock-rate select).
// The unit structure follows the reader's block diagram; the request
// encoding, the framing of the address command and the poll limit are this
// design's choices.
module sdcmd_unit
  import sdhc_pkg::*;
#(
  parameter int unsigned INIT_DIV    = 512,
  parameter int unsigned READ_DIV    = 2,
  parameter int unsigned SS_MIN_SCLK = 8,
  parameter int unsigned RESP_POLLS  = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        w_cmd,
  input  logic        w_addr,
  input  logic        w_byte,
  input  logic [7:0]  din,
  input  logic [31:0] addr,
  input  logic        cs_req,
  input  logic        fast,
  output logic        busy,
  output logic [7:0]  dout,
  output logic        sclk,
  output logic        mosi,
  output logic        ss,
  input  logic        miso
);
  typedef enum logic [2:0] {C_IDLE, C_SEND, C_SEND_W, C_POLL, C_POLL_W, C_BYTE, C_BYTE_W} cstate_e;
  typedef enum logic [1:0] {SRC_ROM, SRC_ADDR, SRC_DIN, SRC_IDLE} src_e;

  cstate_e    state;
  logic [4:0] cmd_cnt;     // ROM address
  logic [2:0] byte_idx;    // position inside the 6-byte frame
  logic       from_rom;    // frame comes from the ROM (w_cmd) or is built (w_addr)
  logic [7:0] din_q;
  logic [$clog2(RESP_POLLS+1)-1:0] poll_cnt;
  logic [7:0] rom_out, spi_in, spi_out;
  logic       spi_start, spi_done, spi_busy;
  src_e       src;

  cmd_rom u_rom (.addr(cmd_cnt), .data(rom_out));

  // byte multiplexer in front of the SPI unit
  always_comb begin
    src = SRC_IDLE;
    unique case (state)
      C_SEND:  src = from_rom ? SRC_ROM : ((byte_idx == 3'd0) ? SRC_DIN :
                                           (byte_idx == 3'd5) ? SRC_IDLE : SRC_ADDR);
      C_BYTE:  src = SRC_DIN;
      default: src = SRC_IDLE;
    endcase
    unique case (src)
      SRC_ROM:  spi_in = rom_out;
      SRC_DIN:  spi_in = din_q;
      SRC_ADDR: spi_in = addr[8*(4 - byte_idx) +: 8];
      default:  spi_in = IDLE_BYTE;
    endcase
  end

  assign spi_start = (state == C_SEND) || (state == C_POLL) || (state == C_BYTE);
  assign busy      = (state != C_IDLE);

  spi_master #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN_SCLK)
  ) u_spi (
    .clk, .rst, .start(spi_start), .tx(spi_in), .cs_req, .fast,
    .rx(spi_out), .done(spi_done), .busy(spi_busy),
    .sclk, .mosi, .ss, .miso
  );

  // CMD FSM with cmd_cnt and out_reg
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= C_IDLE;
      cmd_cnt  <= '0;
      byte_idx <= '0;
      from_rom <= 1'b0;
      din_q    <= IDLE_BYTE;
      poll_cnt <= '0;
      dout     <= IDLE_BYTE;
    end else begin
      unique case (state)
        C_IDLE: begin
          byte_idx <= '0;
          poll_cnt <= '0;
          din_q    <= din;
          if (w_cmd) begin
            cmd_cnt  <= din[4:0];
            from_rom <= 1'b1;
            state    <= C_SEND;
          end else if (w_addr) begin
            from_rom <= 1'b0;
            state    <= C_SEND;
          end else if (w_byte) begin
            state    <= C_BYTE;
          end
        end
        C_SEND:  state <= C_SEND_W;
        C_SEND_W: if (spi_done) begin
          cmd_cnt  <= cmd_cnt + 1'b1;
          byte_idx <= byte_idx + 1'b1;
          state    <= (byte_idx == 3'(CMD_BYTES - 1)) ? C_POLL : C_SEND;
        end
        C_POLL:  state <= C_POLL_W;
        C_POLL_W: if (spi_done) begin
          if (!spi_out[7] || poll_cnt == ($bits(poll_cnt))'(RESP_POLLS - 1)) begin
            dout  <= spi_out;
            state <= C_IDLE;
          end else begin
            poll_cnt <= poll_cnt + 1'b1;
            state    <= C_POLL;
          end
        end
        C_BYTE:  state <= C_BYTE_W;
        C_BYTE_W: if (spi_done) begin
          dout  <= spi_out;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_spi_free: assert property (@(posedge clk) disable iff (rst) spi_start |-> !spi_busy);
  a_one_request: assert property (@(posedge clk) disable iff (rst)
    $onehot0({w_cmd, w_addr, w_byte}));
  a_request_when_idle: assert property (@(posedge clk) disable iff (rst)
    (w_cmd || w_addr || w_byte) |-> !busy);
endmodule
