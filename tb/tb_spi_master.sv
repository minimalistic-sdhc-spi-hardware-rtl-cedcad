// tb_spi_master: checks the SPI unit against a small SPI slave written in
// the testbench (mode 0: mosi sampled on rising sclk, miso changed on
// falling sclk). Checks: transmitted and received bytes, the sclk period
// at both rates (INIT_DIV and READ_DIV), the byte time of 8 * DIV cycles
// after the accepting edge, ss high during deselected transfers, and the glitch filter:
// after a release ss stays high for at least SS_MIN_SCLK sclk periods
// before a new selection, even when the next transfer is requested at
// once.
module tb_spi_master;
  localparam int unsigned INIT_DIV = 16, READ_DIV = 4, SS_MIN = 8;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, cs_req = 1'b0, fast = 1'b0;
  logic [7:0] tx = '0, rx;
  logic done, busy, sclk, mosi, ss, miso;
  int unsigned checks = 0, failures = 0;
  logic [7:0] slave_rx, slave_tx = 8'h00, slave_tx_sh;
  int unsigned slave_bits = 0;
  longint unsigned cyc = 0, last_rise = 0, period = 0, ss_rise = 0, ss_fall = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  spi_master #(.INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN)) dut (
    .clk, .rst, .start, .tx, .cs_req, .fast, .rx, .done, .busy, .sclk, .mosi, .ss, .miso
  );

  // slave: shifts in mosi, shifts out slave_tx
  assign miso = slave_tx_sh[7];
  always @(posedge sclk) begin
    slave_rx = {slave_rx[6:0], mosi};
    period = cyc - last_rise;
    last_rise = cyc;
  end
  always @(negedge sclk) begin
    slave_bits++;
    if (slave_bits == 8) begin slave_bits = 0; slave_tx_sh = slave_tx; end
    else slave_tx_sh = {slave_tx_sh[6:0], 1'b1};
  end
  always @(posedge ss) ss_rise = cyc;
  always @(negedge ss) ss_fall = cyc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one transfer; returns the cycles from the accepting edge to done
  task automatic xfer(input logic [7:0] b, input logic sel, output int unsigned t);
    longint unsigned t0;
    @(negedge clk);
    tx = b; cs_req = sel; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    t = int'(cyc - t0);
  endtask

  initial begin
    int unsigned t;
    slave_tx_sh = 8'h00;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // deselected transfer at the slow rate
    slave_bits = 0; slave_tx_sh = 8'hC3; slave_tx = 8'h00;
    xfer(8'hFF, 1'b0, t);
    check(ss == 1'b1, "ss high in a deselected transfer");
    check(slave_rx == 8'hFF && rx == 8'hC3, $sformatf("slow byte tx %h rx %h", slave_rx, rx));
    check(period == INIT_DIV, $sformatf("slow sclk period %0d", period));
    check(t == 8 * INIT_DIV, $sformatf("slow byte time %0d", t));
    // selected transfers at the fast rate
    fast = 1'b1;
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom);
      b = 8'($urandom);
      slave_bits = 0; slave_tx_sh = b;
      xfer(a, 1'b1, t);
      check(slave_rx == a && rx == b, $sformatf("fast byte %0d tx %h/%h rx %h/%h", i, a, slave_rx, b, rx));
      check(ss == 1'b0, "ss low while selected");
      if (i > 0) check(t == 8 * READ_DIV, $sformatf("fast byte time %0d", t));
    end
    check(period == READ_DIV, $sformatf("fast sclk period %0d", period));
    // release and reselect at once: the filter must hold ss high
    @(negedge clk);
    cs_req = 1'b0;
    @(negedge clk);
    check(ss == 1'b1, "ss released");
    slave_bits = 0; slave_tx_sh = 8'h5A;
    xfer(8'h3C, 1'b1, t);
    check(ss_fall > ss_rise && ss_fall - ss_rise >= SS_MIN * READ_DIV,
          $sformatf("ss high for %0d cycles", ss_fall - ss_rise));
    check(slave_rx == 8'h3C && rx == 8'h5A, "byte after reselection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
