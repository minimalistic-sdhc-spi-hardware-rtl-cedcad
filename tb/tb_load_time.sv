// tb_load_time: program load time of the boot loader system for the four
// read rates available from a 50 MHz clock (READ_DIV = 2, 4, 64, 512, i.e.
// 25 MHz, 12.5 MHz, 781 kHz and 97.7 kHz), all other parameters at their
// defaults. Four systems boot side by side, each with its own card model
// (ready at the second ACMD41). For each the load time from reset release
// to processor release is printed in ms and checked against bounds built
// from the byte counts: at least 3072 bytes of 8 * READ_DIV cycles, at most
// that plus 12 cycles of handshake per byte, about 30 bytes of command and
// CRC overhead per block, and one million cycles of initialisation. The
// loaded program is read back from each system's memory.
module tb_load_time;
  import sd_image_pkg::*;
  localparam int unsigned NSYS = 4;
  localparam int unsigned DIVS [NSYS] = '{2, 4, 64, 512};

  logic clk = 1'b0, reset = 1'b1;
  logic [NSYS-1:0] miso, mosi, sclk, ss, p_reset, boot_err;
  logic [9:0]  p_address = '0;
  logic [17:0] p_instruction [NSYS];
  longint unsigned cyc = 0, t_done [NSYS];
  int unsigned checks = 0, failures = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  for (genvar s = 0; s < NSYS; s++) begin : g_sys
    bootloader_top #(.READ_DIV(DIVS[s])) dut (
      .clk50m(clk), .reset, .prog(4'(s + 7)), .miso(miso[s]), .mosi(mosi[s]),
      .sclk(sclk[s]), .ss(ss[s]), .p_reset(p_reset[s]), .p_address,
      .p_instruction(p_instruction[s]), .boot_err(boot_err[s])
    );
    sd_card_model card (.sclk(sclk[s]), .mosi(mosi[s]), .ss(ss[s]), .miso(miso[s]));
    initial card.acmd41_busy = 1;
    initial t_done[s] = 0;
    always @(posedge clk) if (!reset && !p_reset[s] && t_done[s] == 0) t_done[s] = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned t0, lo, hi;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    t0 = cyc;
    while (p_reset != '0 && boot_err == '0) @(negedge clk);
    repeat (2) @(negedge clk);   // let the release monitors record the last one
    check(boot_err == '0, "all systems booted");
    for (int s = 0; s < NSYS; s++) begin
      longint unsigned t;
      t  = t_done[s] - t0;
      lo = 64'(3072) * 8 * DIVS[s];
      hi = 64'(3072) * (8 * DIVS[s] + 12) + 64'(6 * 30) * (8 * DIVS[s] + 8) + 1_000_000;
      $display("READ_DIV %0d (%0.1f kHz): load time %0d cycles = %0.2f ms",
               DIVS[s], 50000.0 / DIVS[s], t, real'(t) / 50000.0);
      check(t >= lo && t <= hi, $sformatf("READ_DIV %0d: load time %0d outside [%0d, %0d]", DIVS[s], t, lo, hi));
      if (s > 0) check(t_done[s] > t_done[s-1], "slower clock, longer load");
    end
    for (int k = 0; k < 1024; k += 7) begin
      @(negedge clk);
      p_address = 10'(k);
      @(negedge clk);
      for (int s = 0; s < NSYS; s++)
        check(p_instruction[s] == prog_word(s + 7, k), $sformatf("system %0d word %0d", s, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
