// tb_program_run: boots the three-instruction test program
//   0: load s0, AA    1: output s0, 04    2: jump 0
// (stored on the card as 00 02 2A / 2C 00 04 / 34 00 00 in program slot
// 15) into the boot loader system at default parameters, lets a
// behavioural model of the microcontroller run it from the loaded memory,
// and checks that it writes 0xAA to port 0x04 once every loop of three
// instructions (six clock cycles), and nothing else.
module tb_program_run;
  logic clk = 1'b0, reset = 1'b1;
  logic miso, mosi, sclk, ss, p_reset, boot_err, write_strobe;
  logic [9:0]  p_address;
  logic [17:0] p_instruction;
  logic [7:0]  port_id, out_port;
  int unsigned checks = 0, failures = 0, n_good = 0, n_bad = 0;
  localparam int unsigned RUN = 600;

  always #10 clk = ~clk;

  bootloader_top dut (
    .clk50m(clk), .reset, .prog(4'd15), .miso, .mosi, .sclk, .ss,
    .p_reset, .p_address, .p_instruction, .boot_err
  );
  sd_card_model card (.sclk, .mosi, .ss, .miso);
  mcu_model mcu (
    .clk, .reset(p_reset), .address(p_address), .instruction(p_instruction),
    .port_id, .out_port, .write_strobe
  );

  always @(posedge clk)
    if (write_strobe) begin
      if (port_id == 8'h04 && out_port == 8'hAA) n_good++;
      else n_bad++;
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 1'b0;
    while (p_reset && !boot_err) @(negedge clk);
    check(!boot_err, "program loaded");
    check(n_good == 0 && mcu.n_executed == 0, "processor idle while loading");
    repeat (RUN) @(negedge clk);
    check(n_bad == 0 && mcu.n_unknown == 0, "only the expected output");
    check(n_good >= RUN / 6 - 1 && n_good <= RUN / 6 + 1,
          $sformatf("%0d writes of AA to port 04 in %0d cycles", n_good, RUN));
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
