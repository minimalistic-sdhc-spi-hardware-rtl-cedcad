// tb_hex_display: checks the four-digit display driver with a short refresh
// period. For a set of values (every hex digit in every position and random
// ones) it watches a full refresh round and decodes what is lit: exactly one
// anode low at a time, the segments of that digit matching a reference
// font, and the decimal point following dots. It also checks that each
// digit stays lit for REFRESH cycles and that the digits take turns from
// right to left.
module tb_hex_display;
  localparam int unsigned REFRESH = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] value = '0;
  logic [3:0]  dots = '0;
  logic [3:0]  an;
  logic [6:0]  seg;
  logic        dp;
  int unsigned checks = 0, failures = 0;

  // reference font, segments written in a..g order (bit 6 = a)
  localparam logic [6:0] FONT_AG [16] = '{
    7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001,
    7'b0110011, 7'b1011011, 7'b1011111, 7'b1110000,
    7'b1111111, 7'b1111011, 7'b1110111, 7'b0011111,
    7'b1001110, 7'b0111101, 7'b1001111, 7'b1000111
  };

  always #10 clk = ~clk;

  hex_display #(.REFRESH_CYCLES(REFRESH)) dut (.clk, .rst, .value, .dots, .an, .seg, .dp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [6:0] lit_ag(logic [6:0] s);  // g..a active low -> a..g
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[6 - i] = !s[i];
    return r;
  endfunction

  // watch two whole rounds and check every cycle
  task automatic show(input logic [15:0] v, input logic [3:0] d);
    int unsigned bad, run, runs_bad;
    int          cur, prev;
    @(negedge clk);
    value = v; dots = d;
    repeat (REFRESH + 2) @(negedge clk);   // let the new value reach the pins
    bad = 0; run = 0; runs_bad = 0; prev = -1;
    for (int unsigned c = 0; c < 8 * REFRESH; c++) begin
      cur = -1;
      for (int k = 0; k < 4; k++) if (an == ~(4'b0001 << k)) cur = k;
      if (cur < 0) bad++;
      else begin
        if (lit_ag(seg) != FONT_AG[v[4*cur +: 4]]) bad++;
        if (dp != !d[cur]) bad++;
        if (cur != prev) begin
          if (prev >= 0 && cur != ((prev + 1) % 4)) runs_bad++;
          if (prev >= 0 && run != REFRESH && c > REFRESH) runs_bad++;
          run = 0;
        end
        run++;
      end
      prev = cur;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("value %04h dots %b: %0d wrong cycles", v, d, bad));
    check(runs_bad == 0, $sformatf("value %04h: digit order or dwell time wrong", v));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(an == 4'b1111 && seg == 7'b1111111 && dp, "display dark in reset");
    rst = 1'b0;
    for (int n = 0; n < 16; n++) show({4{4'(n)}}, 4'(n));
    show(16'h0123, 4'b0001);
    show(16'h4567, 4'b0010);
    show(16'h89AB, 4'b0100);
    show(16'hCDEF, 4'b1000);
    for (int n = 0; n < 8; n++) show(16'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
