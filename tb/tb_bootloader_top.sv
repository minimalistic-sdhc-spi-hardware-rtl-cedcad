// tb_bootloader_top: end-to-end test of the boot loader system with every
// parameter at its default (50 MHz clock, card initialised at clk/512,
// program read at clk/2, 1024-word programs), against the behavioural SD
// card model holding 16 programs.
//
// Boot 1 loads program 3 from a card that stays busy for three ACMD41
// rounds; boot 2 loads program 12 after a new reset; after each boot the
// processor side reads all 1024 words through p_address and compares them
// with the program image. Boot 3 runs without a card and must end with
// boot_err and the processor in reset.
// Each mechanism of the design is counted and must occur: power-up clocks,
// the CMD55 / ACMD41 retry loop, the slow and the fast SPI clock (sclk
// period measured), chip-select releases held to the glitch filter's
// minimum width, block reads (6 per program), instructions split across a
// block boundary, CRC bytes drained at the end of each block, processor
// release, and the error path. The load time (reset release to p_reset
// falling) is printed and checked against bounds worked out from the byte
// counts.
module tb_bootloader_top;
  import sd_image_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic [3:0] prog = '0;
  logic miso, mosi, sclk, ss, p_reset, boot_err;
  logic [9:0]  p_address = '0;
  logic [17:0] p_instruction;
  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0, last_rise = 0;
  int unsigned n_slow = 0, n_fast = 0, n_other_period = 0;
  int unsigned ss_pulses = 0, ss_short = 0, ss_hi = 0;
  bit          ss_seen_low = 1'b0;
  int unsigned n_split_seen = 0;

  // a word is split over two blocks when it is written after only one or
  // two bytes of the current block
  always @(posedge clk)
    if (dut.w_ram && dut.u_adapter.byte_cnt < 3) n_split_seen++;

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  bootloader_top dut (
    .clk50m(clk), .reset, .prog, .miso, .mosi, .sclk, .ss,
    .p_reset, .p_address, .p_instruction, .boot_err
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);

  // sclk period in clock cycles, between consecutive rising edges of a byte
  always @(posedge sclk) begin
    if (cyc - last_rise == 512) n_slow++;
    else if (cyc - last_rise == 2) n_fast++;
    else if (cyc - last_rise < 2) n_other_period++;
    last_rise = cyc;
  end

  // ss-high pulses between two selections (filter minimum: 8 sclk periods)
  always @(posedge clk) begin
    if (!ss) begin
      if (ss_seen_low && ss_hi > 0) begin
        ss_pulses++;
        if (ss_hi < 8 * 2) ss_short++;
      end
      ss_seen_low = 1'b1;
      ss_hi = 0;
    end else ss_hi++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic boot(input logic [3:0] p, output longint unsigned t);
    longint unsigned t0;
    @(negedge clk);
    reset = 1'b1; prog = p;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    t0 = cyc;
    while (p_reset && !boot_err) @(negedge clk);
    t = cyc - t0;
  endtask

  task automatic verify(input logic [3:0] p);
    int unsigned bad = 0;
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk);
      p_address = 10'(k);
      @(negedge clk);
      if (p_instruction != prog_word(p, k)) bad++;
    end
    check(bad == 0, $sformatf("program %0d: %0d wrong words", p, bad));
  endtask

  initial begin
    longint unsigned t, lo, hi;
    int unsigned n_split, n_blocks, n_drained, n_release, n_error, n_retry;
    card.acmd41_busy = 3;
    boot(4'd3, t);
    check(!boot_err && !p_reset, "boot 1 released the processor");
    // lower bound: 80 power-up clocks and 4 x 6-byte commands at clk/512,
    // then 3072 data bytes at 16 cycles each; upper bound: twice that plus
    // the four extra CMD55/ACMD41 rounds and polls
    lo = 64'(80 + 4 * 48) * 512 + 64'(3072) * 16;
    hi = 2 * lo + 64'(8 * 16 * 8) * 512;
    $display("load time: %0d cycles = %0.3f ms at 50 MHz", t, real'(t) / 50000.0);
    check(t >= lo && t <= hi, $sformatf("load time %0d outside [%0d, %0d]", t, lo, hi));
    verify(4'd3);
    check(card.last_block == 8 * 3 + 5, "last block of program 3 read");
    n_retry   = card.n_acmd41;
    n_blocks  = card.n_cmd17;
    n_drained = (card.n_dropped == 0) ? n_blocks : 0;
    check(card.init_clks >= 74, "power-up clocks given");
    check(n_retry == 4, $sformatf("ACMD41 rounds: %0d", n_retry));
    check(n_blocks == 6, $sformatf("blocks read: %0d", n_blocks));
    check(n_drained == 6, "every block drained before deselecting");
    n_release = 1;

    card.acmd41_busy = 0;
    boot(4'd12, t);
    check(!boot_err && !p_reset, "boot 2 released the processor");
    verify(4'd12);
    check(card.last_block == 8 * 12 + 5 && card.n_cmd17 == 12, "program 12 read");
    check(card.n_dropped == 0, "no data dropped");
    n_release++;

    card.present = 1'b0;
    boot(4'd1, t);
    check(boot_err && p_reset, "no card: boot_err and processor held");
    n_error = boot_err ? 1 : 0;

    n_split = n_split_seen;
    // boundaries at 512 k bytes, k = 1..5; a word is split unless 3 divides 512 k
    check(n_split == 2 * 4, "4 words per program split over a block boundary");
    $display("mechanisms: power-up clocks %0d, ACMD41 rounds %0d, slow sclk %0d, fast sclk %0d, ss releases %0d, blocks %0d, split words %0d, drained blocks %0d, releases %0d, errors %0d",
             card.init_clks, n_retry, n_slow, n_fast, ss_pulses, card.n_cmd17, n_split,
             n_drained, n_release, n_error);
    check(n_retry > 1, "retry loop happened");
    check(n_slow > 0 && n_fast > 0 && n_other_period == 0, "both SPI rates used, none faster");
    check(ss_pulses > 0 && ss_short == 0, $sformatf("%0d ss releases, %0d too short", ss_pulses, ss_short));
    check(n_error == 1 && n_release == 2, "error path and releases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
