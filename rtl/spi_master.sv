// spi_master: the custom SPI unit of the SDHC-SPI reader (SPI mode 0).
//
// Exchanges one byte per start request: the byte on tx is shifted out MSB
// first on mosi while miso is sampled on each rising edge of sclk; the
// received byte appears on rx together with a one-cycle done pulse. sclk
// idles low and mosi changes while sclk is low.
//
// Clock rate: sclk = clk / INIT_DIV while fast = 0 and clk / READ_DIV while
// fast = 1. With the 50 MHz system clock the reader offers clk/2, clk/4,
// clk/64 and clk/512; the slow rate is used during card initialisation
// (which must run below 400 kHz) and the fixed fast rate, set here by a
// parameter, for block reads. A byte takes 8 * DIV clock cycles plus one
// cycle to accept the request.
//
// Slave select: ss is active low and follows cs_req (1 = select the card).
// A glitch filter keeps ss high for at least SS_MIN_SCLK sclk periods after
// every release before it may fall again, so that a release followed by a
// new command can never produce a pulse that is only one or two clock
// cycles wide; a transfer that arrives too early waits. With cs_req = 0 a
// transfer still clocks the byte out with ss high (used for the power-up
// clocks). cs_req may change only while busy is low.
//
// The divider choices and the need for an SS glitch filter follow the
// reader's description; the filter's minimum width and the SPI mode are
// this design's choices.
module spi_master #(
  parameter int unsigned INIT_DIV    = 512,  // even, >= 2
  parameter int unsigned READ_DIV    = 2,    // even, >= 2
  parameter int unsigned SS_MIN_SCLK = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] tx,
  input  logic       cs_req,
  input  logic       fast,
  output logic [7:0] rx,
  output logic       done,
  output logic       busy,
  output logic       sclk,
  output logic       mosi,
  output logic       ss,
  input  logic       miso
);
  localparam int unsigned MAXDIV = (INIT_DIV > READ_DIV) ? INIT_DIV : READ_DIV;
  localparam int unsigned DW     = $clog2(MAXDIV / 2 + 1);
  // the first half period after ss rises may be partial, hence the + 1
  localparam int unsigned HW     = $clog2(2 * SS_MIN_SCLK + 2);
  localparam logic [DW-1:0] HALF_SLOW = DW'(INIT_DIV / 2 - 1);
  localparam logic [DW-1:0] HALF_FAST = DW'(READ_DIV / 2 - 1);
  localparam logic [HW-1:0] SS_TICKS  = HW'(2 * SS_MIN_SCLK + 1);

  typedef enum logic [1:0] {S_IDLE, S_SSWAIT, S_LOW, S_HIGH} state_e;
  state_e          state;
  logic [DW-1:0]   div_cnt;
  logic            tick;
  logic [HW-1:0]   hi_cnt;
  logic [7:0]      tx_sh, rx_sh;
  logic [2:0]      bit_cnt;

  assign tick = (div_cnt >= (fast ? HALF_FAST : HALF_SLOW));
  assign busy = (state != S_IDLE);
  assign mosi = tx_sh[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      div_cnt <= '0;
      hi_cnt  <= '0;
      tx_sh   <= 8'hFF;
      rx_sh   <= 8'hFF;
      rx      <= 8'hFF;
      bit_cnt <= '0;
      sclk    <= 1'b0;
      ss      <= 1'b1;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      // glitch filter: count half sclk periods spent with ss high
      if (!ss) hi_cnt <= '0;
      else if (tick && hi_cnt < SS_TICKS) hi_cnt <= hi_cnt + 1'b1;

      unique case (state)
        S_IDLE: begin
          sclk <= 1'b0;
          if (!cs_req) ss <= 1'b1;
          if (start) begin
            tx_sh   <= tx;
            bit_cnt <= '0;
            div_cnt <= '0;
            if (cs_req && ss && hi_cnt < SS_TICKS) begin
              state <= S_SSWAIT;
              div_cnt <= div_cnt + 1'b1;
            end else begin
              if (cs_req) ss <= 1'b0;
              state <= S_LOW;
            end
          end
        end
        S_SSWAIT: begin
          if (hi_cnt >= SS_TICKS) begin
            ss      <= 1'b0;
            div_cnt <= '0;
            state   <= S_LOW;
          end
        end
        S_LOW: begin
          if (tick) begin
            sclk  <= 1'b1;
            rx_sh <= {rx_sh[6:0], miso};
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          if (tick) begin
            sclk    <= 1'b0;
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == 3'd7) begin
              rx    <= rx_sh;
              done  <= 1'b1;
              tx_sh <= 8'hFF;
              state <= S_IDLE;
            end else begin
              tx_sh <= {tx_sh[6:0], 1'b1};
              state <= S_LOW;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a request is only accepted while the unit is idle
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
