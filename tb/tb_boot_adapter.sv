// tb_boot_adapter: checks the boot loader adapter against a stand-in for
// the SDHC-SPI reader written in this testbench (same busy / err / r_block
// / r_byte handshake, data from the card image, random values in the two
// unused upper bits of every byte). Checks, for programs 0, 5 and 15: the
// blocks requested (8p .. 8p+5, in order), 512 bytes read from each, every
// program word written exactly once with the right 18-bit value, p_reset
// held until the last block is closed, then released; and a reader error
// keeping the processor in reset with boot_err set.
module tb_boot_adapter;
  import sd_image_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic [3:0] prog = '0;
  logic sd_reset, r_block, r_byte, w_ram, p_reset, boot_err;
  logic [31:0] addr;
  logic busy = 1'b1, err = 1'b0;
  logic [7:0] dout = '0;
  logic [9:0] baddr;
  logic [17:0] mdat;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  boot_adapter dut (
    .clk, .reset, .prog, .sd_reset, .r_block, .r_byte, .addr, .busy, .err, .dout,
    .w_ram, .baddr, .mdat, .p_reset, .boot_err
  );

  // reader stand-in
  bit          fail_init = 1'b0;
  int          busy_left = 0;
  bit          in_block = 1'b0, r_block_d = 1'b0;
  logic [31:0] blk = '0;
  int unsigned idx = 0, n_blocks = 0, bad_blocks = 0, short_blocks = 0;
  int unsigned first_blk = 0;
  // memory log
  int unsigned wr_count [1024];
  logic [17:0] wr_data [1024];
  int unsigned n_writes = 0, early_release = 0;

  always @(posedge clk) begin
    r_block_d <= r_block;
    if (reset || sd_reset) begin
      busy <= 1'b1; err <= 1'b0; busy_left = 20; in_block = 1'b0;
    end else if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) begin
        busy <= 1'b0;
        if (!in_block && fail_init) err <= 1'b1;
      end
    end else if (!err) begin
      if (r_block && !in_block && !r_block_d) begin
        if (n_blocks == 0) first_blk = addr;
        else if (addr != blk + 1) bad_blocks++;
        blk = addr; idx = 0; in_block = 1'b1; n_blocks++;
        busy <= 1'b1; busy_left = 7;
      end else if (in_block && !r_block) begin
        if (idx != 512) short_blocks++;
        in_block = 1'b0;
        busy <= 1'b1; busy_left = 5;
      end else if (in_block && r_byte) begin
        dout <= sd_byte(blk, idx) | {2'($urandom), 6'b0};
        idx++;
        busy <= 1'b1; busy_left = 3;
      end
    end
    if (w_ram) begin
      wr_count[baddr]++;
      wr_data[baddr] = mdat;
      n_writes++;
      if (!p_reset) early_release++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic boot(input logic [3:0] p);
    int unsigned bad = 0, multi = 0;
    foreach (wr_count[i]) wr_count[i] = 0;
    n_writes = 0; n_blocks = 0; bad_blocks = 0; short_blocks = 0;
    @(negedge clk);
    reset = 1'b1; prog = p;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);
    check(p_reset, "processor held in reset while loading");
    while (p_reset && !boot_err) @(negedge clk);
    check(!boot_err, "boot succeeds");
    check(n_blocks == 6 && first_blk == 8 * p && bad_blocks == 0,
          $sformatf("prog %0d: %0d blocks from %0d", p, n_blocks, first_blk));
    check(short_blocks == 0 && !in_block, "every block read to its end and closed");
    for (int k = 0; k < 1024; k++) begin
      if (wr_count[k] != 1) multi++;
      else if (wr_data[k] != prog_word(p, k)) bad++;
    end
    check(multi == 0 && n_writes == 1024, $sformatf("%0d words not written once", multi));
    check(bad == 0, $sformatf("prog %0d: %0d wrong words", p, bad));
    check(early_release == 0, "no write after release");
  endtask

  initial begin
    boot(4'd0);
    boot(4'd5);
    boot(4'd15);
    fail_init = 1'b1;
    @(negedge clk);
    reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (100) @(negedge clk);
    check(boot_err && p_reset && !r_block, "reader error keeps processor in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
