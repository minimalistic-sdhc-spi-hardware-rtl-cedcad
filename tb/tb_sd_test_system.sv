// tb_sd_test_system: runs the reader test system at its default parameters
// (98 kHz initialisation, 25 MHz reads, 1 ms per display digit) against
// the SD card model and reads every result off the seven-segment pins, as a
// person looking at the board would: a whole refresh round is decoded
// digit by digit into the block number (left) and the value (right).
//   * test 2 on block 3, then block 4 after a button press;
//   * test 1 on block 0xA5: first byte, then the second after a press;
//   * no card: the error LED lights and no result is shown.
module tb_sd_test_system;
  import sd_image_pkg::*;
  localparam int unsigned REFRESH = 50000;

  logic clk = 1'b0, reset = 1'b1, btn = 1'b0;
  logic [1:0] test = 2'd2;
  logic [7:0] sw = 8'd3;
  logic       miso, mosi, sclk, ss, dp;
  logic [3:0] an;
  logic [6:0] seg;
  logic [1:0] led;
  int unsigned checks = 0, failures = 0;

  // segments g..a, active high, per hex digit
  localparam logic [6:0] FONT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71
  };

  always #10 clk = ~clk;

  sd_test_system dut (
    .clk50m(clk), .reset, .test, .sw, .btn, .miso, .mosi, .sclk, .ss,
    .an, .seg, .dp, .led
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic start(input logic [1:0] t, input logic [7:0] s);
    @(negedge clk);
    reset = 1'b1; test = t; sw = s;
    repeat (4) @(negedge clk);
    reset = 1'b0;
  endtask

  task automatic wait_result();
    @(negedge clk);
    while (led == 2'b00) @(negedge clk);
  endtask

  // decode one full refresh round; ok = 0 if a pattern is not a hex digit
  task automatic read_display(output logic [15:0] v, output logic [3:0] dots, output bit ok);
    bit [3:0] seen;
    v = '0; dots = '0; seen = '0; ok = 1'b1;
    for (int unsigned c = 0; c < 4 * REFRESH + 8; c++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (an == ~(4'b0001 << k)) begin
          int n;
          n = -1;
          for (int f = 0; f < 16; f++) if (~seg == FONT[f]) n = f;
          if (n < 0) ok = 1'b0;
          else v[4*k +: 4] = 4'(n);
          dots[k] = !dp;
          seen[k] = 1'b1;
        end
      end
    end
    if (seen != 4'b1111) ok = 1'b0;
  endtask

  task automatic push();
    @(negedge clk);
    btn = 1'b1;
    while (led[0]) @(negedge clk);
    btn = 1'b0;
  endtask

  function automatic logic [7:0] block_xor(int unsigned b);
    logic [7:0] s;
    s = 8'h00;
    for (int unsigned i = 0; i < 512; i++) s ^= sd_byte(b, i);
    return s;
  endfunction

  initial begin
    logic [15:0] v;
    logic [3:0]  d;
    bit          ok;

    start(2'd2, 8'd3);
    wait_result();
    read_display(v, d, ok);
    check(ok && v == {8'd3, block_xor(3)} && d == 4'b0001 && led == 2'b01,
          $sformatf("test 2 block 3 shows %04h dots %b (expected %02h%02h)", v, d, 8'd3, block_xor(3)));
    push();
    wait_result();
    read_display(v, d, ok);
    check(ok && v == {8'd4, block_xor(4)}, $sformatf("test 2 block 4 shows %04h", v));

    start(2'd1, 8'hA5);
    wait_result();
    read_display(v, d, ok);
    check(ok && v == {8'hA5, sd_byte(32'hA5, 0)}, $sformatf("test 1 first byte shows %04h", v));
    push();
    wait_result();
    read_display(v, d, ok);
    check(ok && v == {8'hA5, sd_byte(32'hA5, 1)}, $sformatf("test 1 second byte shows %04h", v));

    card.present = 1'b0;
    start(2'd2, 8'd3);
    wait_result();
    read_display(v, d, ok);
    check(led == 2'b10 && d == 4'b0000, "missing card: error LED, no result mark");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
