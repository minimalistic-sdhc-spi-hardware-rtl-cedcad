// tb_prog_bram: writes every word of the 1024 x 18 program memory with a
// pseudo-random pattern, reads all of it back (data one cycle after the
// address), and checks read-first behaviour on a write.
module tb_prog_bram;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0]  addr = '0;
  logic [17:0] wdata = '0, rdata;
  logic [17:0] ref_mem [1024];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  prog_bram dut (.clk, .we, .addr, .wdata, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      ref_mem[i] = 18'($urandom);
      @(negedge clk);
      we = 1'b1; addr = 10'(i); wdata = ref_mem[i];
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      int j;
      j = (i * 37) % 1024;
      addr = 10'(j);
      @(negedge clk);
      check(rdata == ref_mem[j], $sformatf("word %0d", j));
    end
    // read-first: a write returns the previous word
    addr = 10'd77; we = 1'b1; wdata = ~ref_mem[77];
    @(negedge clk);
    check(rdata == ref_mem[77], "read-first on write");
    we = 1'b0;
    @(negedge clk);
    check(rdata == ~ref_mem[77], "written word visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
