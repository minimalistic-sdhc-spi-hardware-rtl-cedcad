// sd_card_model: behavioural model of an SDHC card in SPI mode (mode 0),
// for simulation only.
//
// Implements the part of the card that the reader uses: it counts the
// clocks given with ss high before the first command (at least 74 are
// needed, otherwise CMD0 is ignored), accepts CMD0 (CRC 0x95 checked) to
// enter SPI mode, CMD8 (CRC 0x87 checked, answers R7 with the echo byte),
// CMD55 / ACMD41 (stays in idle for acmd41_busy answers, then ready),
// and CMD17 (answers R1, token_wait 0xFF bytes, the 0xFE token, 512 data
// bytes from sd_image_pkg and two CRC bytes). Any answer comes ncr bytes
// after the command. Raising ss drops what was not yet sent. Other
// commands answer 0x04 (illegal command). With present = 0 the card is
// absent and miso stays high. The run-time variables may be changed by a
// testbench; the counters report what the card saw.
module sd_card_model
  import sd_image_pkg::*;
(
  input  logic sclk,
  input  logic mosi,
  input  logic ss,
  output logic miso
);
  // behaviour knobs
  bit          present     = 1'b1;
  int unsigned acmd41_busy = 3;
  int unsigned token_wait  = 4;
  int unsigned ncr         = 1;
  // observed
  int unsigned init_clks   = 0;
  int unsigned n_cmd0 = 0, n_cmd8 = 0, n_cmd55 = 0, n_acmd41 = 0, n_cmd17 = 0;
  int unsigned n_bad_crc = 0, n_ignored = 0, n_dropped = 0, n_hcs = 0;
  int unsigned last_block = 0;

  bit          spi_mode = 1'b0, idle = 1'b1, app = 1'b0;
  int unsigned acmd41_seen = 0;
  logic [7:0]  rx_sh = 8'hFF, tx_sh = 8'hFF;
  int unsigned rx_bits = 0;
  logic [7:0]  cmd [6];
  int unsigned cmd_len = 0;
  logic [7:0]  q [$];

  initial miso = 1'b1;

  function automatic void push_ff(int unsigned n);
    repeat (n) q.push_back(8'hFF);
  endfunction

  function automatic void execute();
    logic [31:0] arg;
    arg = {cmd[1], cmd[2], cmd[3], cmd[4]};
    if (!spi_mode) begin
      if (cmd[0] == 8'h40 && cmd[5] == 8'h95 && init_clks >= 74) begin
        spi_mode = 1'b1;
      end else begin
        n_ignored++;
        return;
      end
    end
    push_ff(ncr);
    case (cmd[0][5:0])
      6'd0: begin
        n_cmd0++;
        if (cmd[5] != 8'h95) begin n_bad_crc++; q.push_back(8'h09); end
        else begin idle = 1'b1; acmd41_seen = 0; q.push_back(8'h01); end
        app = 1'b0;
      end
      6'd8: begin
        n_cmd8++;
        if (cmd[5] != 8'h87) begin n_bad_crc++; q.push_back(8'h09); end
        else begin
          q.push_back(8'h01); q.push_back(8'h00); q.push_back(8'h00);
          q.push_back({4'h0, arg[11:8]}); q.push_back(arg[7:0]);
        end
        app = 1'b0;
      end
      6'd55: begin
        n_cmd55++;
        app = 1'b1;
        q.push_back(idle ? 8'h01 : 8'h00);
      end
      6'd41: begin
        if (app) begin
          n_acmd41++;
          if (arg[30]) n_hcs++;
          acmd41_seen++;
          if (acmd41_seen > acmd41_busy) idle = 1'b0;
          q.push_back(idle ? 8'h01 : 8'h00);
        end else q.push_back(8'h04);
        app = 1'b0;
      end
      6'd17: begin
        n_cmd17++;
        app = 1'b0;
        if (idle) q.push_back(8'h04);
        else begin
          last_block = arg;
          q.push_back(8'h00);
          push_ff(token_wait);
          q.push_back(8'hFE);
          for (int unsigned i = 0; i < 512; i++) q.push_back(sd_byte(arg, i));
          q.push_back(8'hA5); q.push_back(8'h5A);
        end
      end
      default: begin
        app = 1'b0;
        q.push_back(8'h04);
      end
    endcase
  endfunction

  function automatic void load_next();
    tx_sh = (q.size() > 0) ? q.pop_front() : 8'hFF;
  endfunction

  always @(negedge ss) begin
    rx_bits = 0;
    load_next();
    miso = present ? tx_sh[7] : 1'b1;
  end

  always @(posedge ss) begin
    if (q.size() > 0) n_dropped++;
    q.delete();
    cmd_len = 0;
    rx_bits = 0;
    miso    = 1'b1;
  end

  always @(posedge sclk) begin
    if (present) begin
      if (ss) begin
        if (!spi_mode) init_clks++;
      end else begin
        rx_sh = {rx_sh[6:0], mosi};
        rx_bits++;
        if (rx_bits == 8) begin
          rx_bits = 0;
          if (cmd_len > 0 || rx_sh[7:6] == 2'b01) begin
            cmd[cmd_len] = rx_sh;
            cmd_len++;
            if (cmd_len == 6) begin
              cmd_len = 0;
              execute();
            end
          end
        end
      end
    end
  end

  always @(negedge sclk) begin
    if (present && !ss) begin
      if (rx_bits == 0) load_next();
      miso = tx_sh[7 - rx_bits];
    end
  end
endmodule
