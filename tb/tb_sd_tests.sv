// tb_sd_tests: the reader's three board-level tests, run on the reader at
// its default parameters against the SD card model.
//   Test 1: initialise, read the first byte of a block chosen by eight
//           switches, then further bytes one request at a time, and
//           abandon the block.
//   Test 2: read one whole 512-byte block and form the xor checksum of
//           its bytes; repeat for the next block, as a button would.
//   Test 3: read N_SEQ sequential blocks and form the xor checksum of all
//           their bytes.
// Every checksum is compared with the one computed from the card image.
module tb_sd_tests;
  import sd_image_pkg::*;
  localparam int unsigned N_SEQ = 16;

  logic clk = 1'b0, reset = 1'b1, r_block = 1'b0, r_byte = 1'b0;
  logic [31:0] addr = '0;
  logic [7:0]  dout;
  logic busy, err, miso, mosi, sclk, ss;
  int unsigned checks = 0, failures = 0;

  always #10 clk = ~clk;

  sdhc_spi dut (
    .clk50m(clk), .reset, .r_block, .r_byte, .addr, .dout, .busy, .err,
    .miso, .mosi, .sclk, .ss
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic open_block(input logic [31:0] a);
    @(negedge clk);
    addr = a; r_block = 1'b1;
    wait_idle();
    check(!err, $sformatf("block %0d opened", a));
  endtask

  task automatic get_byte(output logic [7:0] d);
    @(negedge clk);
    r_byte = 1'b1;
    @(negedge clk);
    r_byte = 1'b0;
    while (busy) @(negedge clk);
    d = dout;
  endtask

  task automatic close_block();
    @(negedge clk);
    r_block = 1'b0;
    wait_idle();
  endtask

  // xor of one whole block read through the reader
  task automatic block_xor(input logic [31:0] a, inout logic [7:0] x);
    logic [7:0] d;
    open_block(a);
    for (int i = 0; i < 512; i++) begin get_byte(d); x ^= d; end
    close_block();
  endtask

  function automatic logic [7:0] image_xor(int unsigned first, int unsigned n);
    logic [7:0] x = '0;
    for (int unsigned b = first; b < first + n; b++)
      for (int unsigned i = 0; i < 512; i++) x ^= sd_byte(b, i);
    return x;
  endfunction

  initial begin
    logic [7:0] d, x;
    logic [7:0] switches = 8'hA7;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    wait_idle();
    check(!err, "card initialised");
    // Test 1
    open_block({24'd0, switches});
    for (int i = 0; i < 4; i++) begin
      get_byte(d);
      check(d == sd_byte(switches, i), $sformatf("test 1 byte %0d = %h", i, d));
    end
    close_block();
    // Test 2, two blocks
    for (int unsigned b = 200; b < 202; b++) begin
      x = '0;
      block_xor(b, x);
      check(x == image_xor(b, 1), $sformatf("test 2 block %0d checksum %h", b, x));
    end
    // Test 3
    x = '0;
    for (int unsigned b = 1000; b < 1000 + N_SEQ; b++) block_xor(b, x);
    check(x == image_xor(1000, N_SEQ), $sformatf("test 3 checksum of %0d blocks %h", N_SEQ, x));
    check(!err && card.n_cmd17 == 3 + N_SEQ, "all reads issued");
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
