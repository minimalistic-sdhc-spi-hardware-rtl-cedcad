// tb_main_fsm: checks the main controller against a scripted stand-in for
// the SDCMD unit written in this testbench. The stand-in answers each
// request after a few busy cycles with the reply a card would give, and
// logs every request, so the exact command sequence can be checked.
// Checks: the initialisation sequence (10 deselected 0xFF bytes, CMD0,
// CMD8 and its four R7 bytes, CMD55 / ACMD41 repeated until ready, the
// switch to the fast rate), a block read (CMD17 with the captured address,
// token polling, data bytes on dout), the abort that drains the rest of
// the block and the CRC (exact byte count), the 512-byte cap, and every
// failure path: no CMD0 answer, wrong CMD8 echo, ACMD41 never ready
// (exact try count), CMD17 rejected, data error token, token timeout
// (exact poll count), each ending with busy low and err high.
module tb_main_fsm;
  import sd_image_pkg::*;
  localparam int unsigned ACMD41_TRIES = 5, TOKEN_POLLS = 40;

  logic clk = 1'b0, rst = 1'b1, r_block = 1'b0, r_byte = 1'b0;
  logic [31:0] addr = '0, cmd_addr;
  logic busy, err, w_cmd, w_addr, w_byte, cs_req, fast;
  logic [7:0] din;
  logic cmd_busy = 1'b0;
  logic [7:0] cmd_dout = 8'hFF;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  main_fsm #(.INIT_BYTES(10), .ACMD41_TRIES(ACMD41_TRIES), .TOKEN_POLLS(TOKEN_POLLS)) dut (
    .clk, .rst, .r_block, .r_byte, .addr, .busy, .err, .w_cmd, .w_addr, .w_byte,
    .din, .cmd_addr, .cs_req, .fast, .cmd_busy, .cmd_dout
  );

  // script of the stand-in card
  logic [7:0]  cmd0_r1 = 8'h01, cmd8_echo = 8'hAA, cmd17_r1 = 8'h00, token = 8'hFE;
  int unsigned acmd41_busy = 2, token_delay = 3;
  // state and log of the stand-in
  int unsigned phase = 0;      // 0 none, 8 after CMD8, 17 after CMD17
  int unsigned sub = 0, n_acmd41 = 0, data_i = 0;
  int unsigned n_init_ff = 0, n_cmd0 = 0, n_cmd8 = 0, n_cmd55 = 0, n_cmd17 = 0;
  int unsigned n_polls = 0, n_data = 0, n_sel_bytes = 0;
  logic [31:0] seen_addr = '0;
  int          busy_left = 0;
  bit          cur_cmd = 1'b0;

  always @(posedge clk) begin
    if (busy_left > 0) begin
      // a command exchange must have the card selected while it runs
      if (cur_cmd && !cs_req) n_sel_bytes++;
      busy_left--;
      if (busy_left == 0) cmd_busy <= 1'b0;
    end else if (w_cmd || w_addr || w_byte) begin
      cmd_busy  <= 1'b1;
      busy_left = 3;
      cur_cmd   = w_cmd || w_addr;
      if (w_cmd) begin
        case (din)
          8'd0:  begin n_cmd0++; cmd_dout <= cmd0_r1; phase = 0; end
          8'd6:  begin n_cmd8++; cmd_dout <= 8'h01; phase = 8; sub = 0; end
          8'd12: begin n_cmd55++; cmd_dout <= 8'h01; phase = 0; end
          8'd18: begin n_acmd41++; cmd_dout <= (n_acmd41 > acmd41_busy) ? 8'h00 : 8'h01; end
          default: cmd_dout <= 8'h04;
        endcase
      end else if (w_addr) begin
        n_cmd17++;
        seen_addr = cmd_addr;
        cmd_dout <= (din == 8'h51) ? cmd17_r1 : 8'h04;
        phase = 17; sub = 0; data_i = 0;
      end else begin
        if (!cs_req) n_init_ff++;
        if (phase == 8) begin
          sub++;
          cmd_dout <= (sub == 4) ? cmd8_echo : ((sub == 3) ? 8'h01 : 8'h00);
        end else if (phase == 17) begin
          if (sub < token_delay) begin sub++; n_polls++; cmd_dout <= 8'hFF; end
          else if (sub == token_delay) begin sub++; n_polls++; cmd_dout <= token; end
          else begin
            cmd_dout <= sd_byte(seen_addr, data_i);
            data_i++;
            n_data++;
          end
        end else cmd_dout <= 8'hFF;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic clear_log();
    n_init_ff = 0; n_cmd0 = 0; n_cmd8 = 0; n_cmd55 = 0; n_acmd41 = 0; n_cmd17 = 0;
    n_polls = 0; n_data = 0; phase = 0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1; r_block = 1'b0;
    clear_log();
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait_idle();
  endtask

  task automatic pulse_byte();
    @(negedge clk);
    r_byte = 1'b1;
    @(negedge clk);
    r_byte = 1'b0;
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    // normal initialisation
    do_reset();
    check(!err, "initialisation succeeds");
    check(n_init_ff == 10 && n_cmd0 == 1 && n_cmd8 == 1, "INIT bytes, CMD0, CMD8");
    check(n_cmd55 == 3 && n_acmd41 == 3, $sformatf("CMD55/ACMD41 x%0d", n_acmd41));
    check(fast && !cs_req && n_sel_bytes == 0, "fast rate, card deselected in IDLE");
    // block read, 10 bytes, abort
    @(negedge clk);
    addr = 32'h00C0_FFEE; r_block = 1'b1;
    @(negedge clk);
    addr = 32'h0;
    wait_idle();
    check(!err && seen_addr == 32'h00C0_FFEE && n_cmd17 == 1, "CMD17 with captured address");
    check(n_polls == token_delay + 1, $sformatf("%0d token polls", n_polls));
    for (int i = 0; i < 10; i++) begin
      pulse_byte();
      check(cmd_dout == sd_byte(32'h00C0_FFEE, i) && !err, $sformatf("data byte %0d", i));
    end
    @(negedge clk);
    r_block = 1'b0;
    wait_idle();
    check(n_data == 512 + 2, $sformatf("abort drained to %0d bytes", n_data));
    check(!cs_req && !err, "deselected after abort");
    // full block, extra pulses ignored
    clear_log();
    @(negedge clk);
    addr = 32'd9; r_block = 1'b1;
    wait_idle();
    for (int i = 0; i < 514; i++) pulse_byte();
    check(n_data == 512, $sformatf("%0d bytes delivered (cap)", n_data));
    @(negedge clk);
    r_block = 1'b0;
    wait_idle();
    check(n_data == 514 && !err, "CRC bytes drained");
    // failures
    cmd0_r1 = 8'hFF;
    do_reset();
    check(err && n_cmd8 == 0, "no CMD0 answer");
    cmd0_r1 = 8'h01; cmd8_echo = 8'h55;
    do_reset();
    check(err && n_cmd55 == 0, "wrong CMD8 echo");
    cmd8_echo = 8'hAA; acmd41_busy = 100;
    do_reset();
    check(err && n_acmd41 == ACMD41_TRIES, $sformatf("ACMD41 gave up after %0d", n_acmd41));
    acmd41_busy = 0;
    do_reset();
    check(!err, "re-initialised");
    // reads after errors
    cmd17_r1 = 8'h04;
    @(negedge clk); r_block = 1'b1;
    wait_idle();
    check(err, "CMD17 rejected");
    @(negedge clk); r_block = 1'b0;
    repeat (3) @(negedge clk);
    @(negedge clk); r_block = 1'b1;
    repeat (3) @(negedge clk);
    check(!busy && err && n_cmd17 == 1, "no read accepted in error");
    cmd17_r1 = 8'h00; token = 8'h05;
    do_reset();
    @(negedge clk); r_block = 1'b1;
    wait_idle();
    check(err, "data error token");
    token = 8'hFE; token_delay = 1000;
    @(negedge clk); r_block = 1'b0;
    do_reset();
    @(negedge clk); r_block = 1'b1;
    wait_idle();
    check(err && n_polls == TOKEN_POLLS, $sformatf("token timeout after %0d polls", n_polls));
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
