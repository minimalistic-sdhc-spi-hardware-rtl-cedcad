// tb_sdhc_spi: self-checking test of the SDHC-SPI reader against the
// behavioural SD card model.
//
// Scaled timing (INIT_DIV = 16, READ_DIV = 4) keeps the run short. Checks:
// initialisation with a card that answers "idle" to the first three
// ACMD41s (command counts, HCS bit, busy / err), a full 512-byte block
// read (every byte against the card image, the per-byte latency of
// 8 * READ_DIV + 4 cycles), a partial read aborted after three bytes
// followed by another full read, the minimum width of every ss-high pulse
// (glitch filter), a token timeout (err, reads refused), recovery by a new
// reset, and initialisation without a card (err).
module tb_sdhc_spi;
  import sd_image_pkg::*;

  localparam int unsigned INIT_DIV = 16, READ_DIV = 4, SS_MIN = 8;
  localparam int unsigned TOKEN_POLLS = 64;

  logic clk = 1'b0, reset = 1'b1, r_block = 1'b0, r_byte = 1'b0;
  logic [31:0] addr = '0;
  logic [7:0]  dout;
  logic busy, err, miso, mosi, sclk, ss;
  int unsigned checks = 0, failures = 0;
  int unsigned ss_pulses = 0, ss_short = 0, ss_hi = 0;
  bit          ss_seen_low = 1'b0;
  longint unsigned cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  sdhc_spi #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN),
    .ACMD41_TRIES(8), .TOKEN_POLLS(TOKEN_POLLS)
  ) dut (
    .clk50m(clk), .reset, .r_block, .r_byte, .addr, .dout, .busy, .err,
    .miso, .mosi, .sclk, .ss
  );

  sd_card_model card (.sclk, .mosi, .ss, .miso);

  // width of every ss-high pulse between two selections, in clock cycles
  always @(posedge clk) begin
    if (!ss) begin
      if (ss_seen_low && ss_hi > 0) begin
        ss_pulses++;
        if (ss_hi < SS_MIN * READ_DIV) ss_short++;
      end
      ss_seen_low = 1'b1;
      ss_hi = 0;
    end else ss_hi++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // inputs change and outputs are sampled on falling edges
  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1;
    repeat (3) @(negedge clk);
    check(busy == 1'b1, "busy high during reset");
    reset = 1'b0;
    wait_idle();
  endtask

  task automatic start_block(input logic [31:0] a);
    @(negedge clk);
    addr    = a;
    r_block = 1'b1;
    wait_idle();
  endtask

  // r_byte is driven and busy sampled on falling edges; lat counts the
  // rising edges after the one that takes r_byte until busy is low
  task automatic read_byte(output logic [7:0] d, output int unsigned lat);
    @(negedge clk);
    r_byte = 1'b1;
    @(negedge clk);
    r_byte = 1'b0;
    lat = 0;
    while (busy) begin
      @(negedge clk);
      lat++;
    end
    d = dout;
  endtask

  task automatic end_block();
    @(negedge clk);
    r_block = 1'b0;
    wait_idle();
  endtask

  task automatic read_full(input logic [31:0] a);
    logic [7:0] d;
    int unsigned lat, bad = 0, badlat = 0;
    start_block(a);
    check(!err, $sformatf("block %0d ready without error", a));
    for (int unsigned i = 0; i < 512; i++) begin
      read_byte(d, lat);
      if (d !== sd_byte(a, i)) bad++;
      if (lat != 8 * READ_DIV + 4) badlat++;
    end
    check(bad == 0, $sformatf("block %0d: %0d wrong bytes", a, bad));
    check(badlat == 0, $sformatf("block %0d: %0d bytes with wrong latency", a, badlat));
    end_block();
    check(!err && !busy, "block ended cleanly");
  endtask

  initial begin
    logic [7:0] d;
    int unsigned lat;
    repeat (2) @(posedge clk);
    do_reset();
    check(!err, "initialisation succeeds");
    check(card.n_cmd0 == 1 && card.n_cmd8 == 1, "one CMD0 and one CMD8");
    check(card.n_acmd41 == 4 && card.n_cmd55 == 4, "CMD55/ACMD41 loop ran 4 times");
    check(card.n_hcs == 4, "ACMD41 carries HCS");
    check(card.n_bad_crc == 0 && card.n_ignored == 0, "CMD0/CMD8 CRC accepted");
    check(card.init_clks >= 74, "at least 74 power-up clocks");

    read_full(32'h0000_0005);
    check(card.last_block == 5, "CMD17 carries the block address");

    // partial read: three bytes, then abort
    start_block(32'h0000_AABB);
    for (int unsigned i = 0; i < 3; i++) begin
      read_byte(d, lat);
      check(d == sd_byte(32'h0000_AABB, i), $sformatf("partial byte %0d: %h lat %0d", i, d, lat));
    end
    end_block();
    check(!err, "abort leaves no error");
    read_full(32'h0123_4567);

    check(ss_pulses > 5, "ss released between commands");
    check(ss_short == 0, $sformatf("%0d ss pulses narrower than the filter minimum", ss_short));

    // token timeout
    card.token_wait = TOKEN_POLLS + 10;
    start_block(32'd3);
    check(err == 1'b1, "token timeout sets err");
    r_block = 1'b0;
    repeat (5) @(posedge clk);
    r_block = 1'b1;
    repeat (5) @(posedge clk);
    check(!busy && err, "no read after an error");
    r_block = 1'b0;
    // recovery
    card.token_wait = 2;
    do_reset();
    check(!err, "re-initialisation after error");
    read_full(32'd40);

    // no card
    card.present = 1'b0;
    do_reset();
    check(err == 1'b1, "missing card reported");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
