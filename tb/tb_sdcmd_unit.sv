// tb_sdcmd_unit: drives the SDCMD unit the way the main controller does,
// against the behavioural SD card model. Checks: power-up clocks with the
// card deselected, CMD0 and CMD8 frames taken from the ROM (the card
// checks their CRC and answers), the R7 bytes read with single-byte
// transfers, the CMD55 / ACMD41 loop until the card is ready, a CMD17
// frame built from din and the 32-bit address (the card sees the
// address), the start token and the first data bytes, and the response
// poll limit when no card answers (dout = 0xFF after 6 + RESP_POLLS
// bytes).
module tb_sdcmd_unit;
  import sd_image_pkg::*;
  localparam int unsigned INIT_DIV = 8, READ_DIV = 2, SS_MIN = 8, RESP_POLLS = 16;

  logic clk = 1'b0, rst = 1'b1, w_cmd = 1'b0, w_addr = 1'b0, w_byte = 1'b0;
  logic cs_req = 1'b0, fast = 1'b0;
  logic [7:0] din = 8'hFF, dout;
  logic [31:0] addr = '0;
  logic busy, sclk, mosi, ss, miso;
  int unsigned checks = 0, failures = 0;
  bit ss_fell = 1'b0;

  always #5 clk = ~clk;

  sdcmd_unit #(.INIT_DIV(INIT_DIV), .READ_DIV(READ_DIV), .SS_MIN_SCLK(SS_MIN),
               .RESP_POLLS(RESP_POLLS)) dut (
    .clk, .rst, .w_cmd, .w_addr, .w_byte, .din, .addr, .cs_req, .fast, .busy, .dout,
    .sclk, .mosi, .ss, .miso
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);

  always @(negedge ss) ss_fell = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // op: 1 = w_cmd, 2 = w_addr, 3 = w_byte; returns the busy time in cycles
  task automatic op(input int k, input logic [7:0] d, output int unsigned t);
    @(negedge clk);
    din = d;
    w_cmd = (k == 1); w_addr = (k == 2); w_byte = (k == 3);
    @(negedge clk);
    w_cmd = 1'b0; w_addr = 1'b0; w_byte = 1'b0;
    t = 1;
    while (busy) begin @(negedge clk); t++; end
  endtask

  task automatic release_cs();
    @(negedge clk);
    cs_req = 1'b0;
    @(negedge clk);
    cs_req = 1'b1;
  endtask

  initial begin
    int unsigned t, n;
    logic [7:0] r [4];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (10) op(3, 8'hFF, t);
    check(!ss_fell, "ss stays high during power-up clocks");
    check(card.init_clks == 80, $sformatf("%0d power-up clocks", card.init_clks));
    cs_req = 1'b1;
    op(1, 8'd0, t);
    check(dout == 8'h01 && card.n_cmd0 == 1, $sformatf("CMD0 answer %h", dout));
    release_cs();
    op(1, 8'd6, t);
    check(dout == 8'h01 && card.n_cmd8 == 1, $sformatf("CMD8 answer %h", dout));
    for (int i = 0; i < 4; i++) begin op(3, 8'hFF, t); r[i] = dout; end
    check(r[2] == 8'h01 && r[3] == 8'hAA, $sformatf("R7 %h %h %h %h", r[0], r[1], r[2], r[3]));
    check(card.n_bad_crc == 0, "ROM CRCs accepted");
    n = 0;
    do begin
      release_cs();
      op(1, 8'd12, t);
      check(dout == 8'h01, $sformatf("CMD55 answer %h", dout));
      release_cs();
      op(1, 8'd18, t);
      n++;
    end while (dout == 8'h01 && n < 10);
    check(dout == 8'h00 && n == 4 && card.n_acmd41 == 4, $sformatf("ACMD41 ready after %0d", n));
    release_cs();
    fast = 1'b1;
    addr = 32'h1234_5678;
    op(2, 8'h51, t);
    check(dout == 8'h00 && card.n_cmd17 == 1, $sformatf("CMD17 answer %h", dout));
    check(card.last_block == 32'h1234_5678, $sformatf("CMD17 address %h", card.last_block));
    n = 0;
    do begin op(3, 8'hFF, t); n++; end while (dout == 8'hFF && n < 20);
    check(dout == 8'hFE, "start token");
    for (int i = 0; i < 8; i++) begin
      op(3, 8'hFF, t);
      check(dout == sd_byte(32'h1234_5678, i), $sformatf("data byte %0d", i));
      check(t == 8 * READ_DIV + 3, $sformatf("byte transfer time %0d", t));
    end
    // no answer: the poll limit ends the command with 0xFF
    release_cs();
    card.present = 1'b0;
    op(1, 8'd0, t);
    check(dout == 8'hFF, "timeout leaves 0xFF");
    check(t >= (6 + RESP_POLLS) * 8 * READ_DIV &&
          t <= (6 + RESP_POLLS) * (8 * READ_DIV + 4) + (SS_MIN + 1) * READ_DIV,
          $sformatf("timeout after %0d cycles", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
