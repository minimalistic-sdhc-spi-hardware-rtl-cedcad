// tb_sd_test_ctrl: checks the board-test controller driving a real reader
// (fast initialisation clock, 25 MHz reads) and the SD card model.
//   * test 1: the first byte of the switch-selected block, every further
//     byte of it one button press at a time, then the move to the next
//     block; test 0 behaves as test 1.
//   * test 2: the xor checksum of the selected block and, after a press, of
//     the next one; the time per block is checked against the reader's
//     byte time (512 bytes at 8 * READ_DIV + 4 cycles each, plus a few
//     controller cycles per byte).
//   * test 3: the xor checksum of SEQ blocks from the selected one; a later
//     press changes nothing.
//   * no card: the error is reported and no result appears.
// Expected bytes come from the card image formula, not from the design.
module tb_sd_test_ctrl;
  import sd_image_pkg::*;
  localparam int unsigned INIT_DIV = 16;
  localparam int unsigned READ_DIV = 2;
  localparam int unsigned SEQ      = 3;

  logic clk = 1'b0, rst = 1'b1, btn = 1'b0;
  logic [1:0]  test = 2'd1;
  logic [7:0]  sw = 8'd0;
  logic        r_block, r_byte, busy, err, done, fail, miso, mosi, sclk, ss;
  logic [31:0] addr, blk;
  logic [7:0]  dout, value;
  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  sd_test_ctrl #(.SEQ_BLOCKS(SEQ)) dut (
    .clk, .rst, .test, .sw, .btn, .r_block, .r_byte, .addr, .dout, .busy,
    .err, .value, .blk, .done, .fail
  );
  sdhc_spi #(
    .INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .ACMD41_TRIES(8), .TOKEN_POLLS(2000)
  ) u_reader (
    .clk50m(clk), .reset(rst), .r_block, .r_byte, .addr, .dout, .busy, .err,
    .miso, .mosi, .sclk, .ss
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic start(input logic [1:0] t, input logic [7:0] s);
    @(negedge clk);
    rst = 1'b1; test = t; sw = s;
    repeat (4) @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic wait_done();
    @(negedge clk);
    while (!done && !fail) @(negedge clk);
  endtask

  // one clean button press; returns once the next result is shown
  task automatic press();
    @(negedge clk);
    btn = 1'b1;
    while (done) @(negedge clk);
    repeat (2) @(negedge clk);
    btn = 1'b0;
    wait_done();
  endtask

  function automatic logic [7:0] block_xor(int unsigned first, int unsigned n);
    logic [7:0] s;
    s = 8'h00;
    for (int unsigned b = first; b < first + n; b++)
      for (int unsigned i = 0; i < 512; i++) s ^= sd_byte(b, i);
    return s;
  endfunction

  initial begin
    int unsigned bad;
    longint unsigned t0, t;

    // test 1: byte viewer
    start(2'd1, 8'd5);
    wait_done();
    check(!fail && value == sd_byte(5, 0) && blk == 32'd5,
          $sformatf("test 1 first byte %02h (expected %02h)", value, sd_byte(5, 0)));
    bad = 0;
    for (int unsigned i = 1; i < 512; i++) begin
      press();
      if (value !== sd_byte(5, i) || blk != 32'd5) bad++;
    end
    check(bad == 0, $sformatf("test 1 bytes 1..511 of block 5: %0d wrong", bad));
    press();
    check(blk == 32'd6 && value == sd_byte(6, 0), "test 1 moves on to block 6");

    // test 0 acts as test 1
    start(2'd0, 8'd77);
    wait_done();
    check(value == sd_byte(77, 0), "test 0 shows the first byte");
    press();
    check(value == sd_byte(77, 1) && blk == 32'd77, "test 0 steps one byte");

    // test 2: block checksum
    start(2'd2, 8'd9);
    wait_done();
    check(value == block_xor(9, 1) && blk == 32'd9,
          $sformatf("test 2 checksum block 9: %02h (expected %02h)", value, block_xor(9, 1)));
    @(negedge clk);
    btn = 1'b1;
    while (done) @(negedge clk);
    t0 = cyc;
    btn = 1'b0;
    wait_done();
    t = cyc - t0;
    check(value == block_xor(10, 1) && blk == 32'd10, "test 2 checksum block 10 after a press");
    check(t >= 512 * (8 * READ_DIV + 4) && t <= 512 * (8 * READ_DIV + 4 + 8) + 4000,
          $sformatf("test 2 block time %0d cycles", t));
    $display("test 2: one block in %0d cycles (reader alone: %0d)", t, 512 * (8 * READ_DIV + 4));

    // test 3: sequence checksum
    start(2'd3, 8'd20);
    wait_done();
    check(value == block_xor(20, SEQ) && blk == 32'd20 + SEQ - 1,
          $sformatf("test 3 checksum of %0d blocks: %02h (expected %02h)",
                    SEQ, value, block_xor(20, SEQ)));
    @(negedge clk);
    btn = 1'b1;
    repeat (20) @(negedge clk);
    btn = 1'b0;
    repeat (200) @(negedge clk);
    check(done && value == block_xor(20, SEQ) && !r_block, "test 3 stops after the sequence");

    // no card
    card.present = 1'b0;
    start(2'd2, 8'd1);
    wait_done();
    check(fail && !done, "missing card reported as failure");
    card.present = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
