// tb_sdhc_top: end-to-end test of both board designs at their default
// parameters, running at the same time, each with its own SD card model.
//  Boot loader system:
//    * boots program 3 and reads all 1024 words back through the processor
//      port, comparing them with the card image;
//    * boots program 15 (the three-instruction test program) and runs it on
//      the behavioural processor model, which must write 0xAA to port 0x04
//      again and again.
//  Reader test system:
//    * test 3 over the 16 blocks from block 40, result read off the display;
//    * test 2 on block 7 and, after a button press, on block 8.
// Each mechanism is counted (boots, words checked, processor writes, blocks
// read by the test system (block reads seen by its card), results shown, display digits decoded)
// and a count that stays at zero is a failure.
module tb_sdhc_top;
  import sd_image_pkg::*;
  localparam int unsigned REFRESH = 50000;
  localparam int unsigned SEQ     = 16;

  logic clk = 1'b0;
  // boot loader side
  logic        bl_reset = 1'b1, use_mcu = 1'b0;
  logic [3:0]  bl_prog = 4'd3;
  logic [9:0]  tb_addr = '0, mcu_addr, bl_p_address;
  logic [17:0] bl_p_instruction;
  logic        bl_miso, bl_mosi, bl_sclk, bl_ss, bl_p_reset, bl_boot_err;
  logic [7:0]  port_id, out_port;
  logic        write_strobe;
  // test system side
  logic        ts_reset = 1'b1, ts_btn = 1'b0;
  logic [1:0]  ts_test = 2'd3;
  logic [7:0]  ts_sw = 8'd40;
  logic        ts_miso, ts_mosi, ts_sclk, ts_ss, ts_dp;
  logic [3:0]  ts_an;
  logic [6:0]  ts_seg;
  logic [1:0]  ts_led;

  int unsigned checks = 0, failures = 0;
  int unsigned n_boots = 0, n_words = 0, n_writes = 0, n_opened = 0;
  int unsigned n_results = 0, n_digits = 0;

  localparam logic [6:0] FONT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71
  };

  always #10 clk = ~clk;

  assign bl_p_address = use_mcu ? mcu_addr : tb_addr;

  sdhc_top dut (
    .clk50m(clk),
    .bl_reset, .bl_prog, .bl_miso, .bl_mosi, .bl_sclk, .bl_ss, .bl_p_reset,
    .bl_p_address, .bl_p_instruction, .bl_boot_err,
    .ts_reset, .ts_test, .ts_sw, .ts_btn, .ts_miso, .ts_mosi, .ts_sclk, .ts_ss,
    .ts_an, .ts_seg, .ts_dp, .ts_led
  );
  sd_card_model bl_card (.sclk(bl_sclk), .mosi(bl_mosi), .ss(bl_ss), .miso(bl_miso));
  sd_card_model ts_card (.sclk(ts_sclk), .mosi(ts_mosi), .ss(ts_ss), .miso(ts_miso));
  mcu_model mcu (
    .clk, .reset(bl_p_reset), .address(mcu_addr), .instruction(bl_p_instruction),
    .port_id, .out_port, .write_strobe
  );

  always @(posedge clk) begin
    if (write_strobe && port_id == 8'h04 && out_port == 8'hAA) n_writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] seq_xor(int unsigned first, int unsigned n);
    logic [7:0] s;
    s = 8'h00;
    for (int unsigned b = first; b < first + n; b++)
      for (int unsigned i = 0; i < 512; i++) s ^= sd_byte(b, i);
    return s;
  endfunction

  task automatic boot(input logic [3:0] p);
    @(negedge clk);
    bl_reset = 1'b1; bl_prog = p;
    repeat (4) @(negedge clk);
    bl_reset = 1'b0;
    repeat (4) @(negedge clk);
    while (bl_p_reset && !bl_boot_err) @(negedge clk);
    check(!bl_boot_err, $sformatf("program %0d booted", p));
    if (!bl_boot_err) n_boots++;
  endtask

  task automatic read_display(output logic [15:0] v, output bit ok);
    bit [3:0] seen;
    v = '0; seen = '0; ok = 1'b1;
    for (int unsigned c = 0; c < 4 * REFRESH + 8; c++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (ts_an == ~(4'b0001 << k)) begin
          int n;
          n = -1;
          for (int f = 0; f < 16; f++) if (~ts_seg == FONT[f]) n = f;
          if (n < 0) ok = 1'b0;
          else begin
            v[4*k +: 4] = 4'(n);
            if (!seen[k]) n_digits++;
          end
          seen[k] = 1'b1;
        end
      end
    end
    if (seen != 4'b1111) ok = 1'b0;
  endtask

  task automatic wait_result();
    @(negedge clk);
    while (ts_led == 2'b00) @(negedge clk);
    if (ts_led == 2'b01) n_results++;
  endtask

  initial begin
    fork
      begin : boot_side
        int unsigned bad;
        boot(4'd3);
        bad = 0;
        for (int unsigned k = 0; k < 1024; k++) begin
          @(negedge clk);
          tb_addr = 10'(k);
          @(negedge clk);
          if (bl_p_instruction != prog_word(3, k)) bad++;
          n_words++;
        end
        check(bad == 0, $sformatf("program 3 read back: %0d wrong words", bad));
        use_mcu = 1'b1;
        boot(4'd15);
        n_writes = 0;
        repeat (300) @(negedge clk);
        check(n_writes >= 40 && n_writes <= 52,
              $sformatf("program 15 wrote 0xAA to port 4 %0d times in 300 cycles", n_writes));
      end
      begin : test_side
        logic [15:0] v;
        bit          ok;
        @(negedge clk);
        ts_reset = 1'b0;
        wait_result();
        read_display(v, ok);
        check(ok && v == {8'(40 + SEQ - 1), seq_xor(40, SEQ)},
              $sformatf("test 3 display %04h (expected %02h%02h)",
                        v, 8'(40 + SEQ - 1), seq_xor(40, SEQ)));
        @(negedge clk);
        ts_reset = 1'b1; ts_test = 2'd2; ts_sw = 8'd7;
        repeat (4) @(negedge clk);
        ts_reset = 1'b0;
        wait_result();
        read_display(v, ok);
        check(ok && v == {8'd7, seq_xor(7, 1)}, $sformatf("test 2 block 7 display %04h", v));
        @(negedge clk);
        ts_btn = 1'b1;
        while (ts_led[0]) @(negedge clk);
        ts_btn = 1'b0;
        wait_result();
        read_display(v, ok);
        check(ok && v == {8'd8, seq_xor(8, 1)}, $sformatf("test 2 block 8 display %04h", v));
      end
    join

    n_opened = ts_card.n_cmd17;
    $display("mechanisms: boots=%0d words_checked=%0d processor_writes=%0d blocks_opened=%0d results_shown=%0d digits_decoded=%0d",
             n_boots, n_words, n_writes, n_opened, n_results, n_digits);
    check(n_boots == 2, "two boots");
    check(n_words == 1024, "all words read back");
    check(n_writes > 0, "loaded program ran");
    check(n_opened == SEQ + 2, $sformatf("test controller opened %0d blocks", n_opened));
    check(n_results == 3, "three results shown");
    check(n_digits == 12, "every display digit decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
