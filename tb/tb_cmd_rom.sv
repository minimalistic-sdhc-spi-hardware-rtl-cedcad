// tb_cmd_rom: checks all 32 addresses of the command ROM against the SD
// command frames written out here byte by byte (CMD0, CMD8, CMD55, ACMD41;
// unused addresses read 0xFF), plus the frame structure: start bits 01,
// stop bit 1 in the last byte, and the CRC7 of CMD0 and CMD8 recomputed
// here with the polynomial x^7 + x^3 + 1.
module tb_cmd_rom;
  logic [4:0] addr;
  logic [7:0] data;
  int unsigned checks = 0, failures = 0;
  logic [7:0] exp_rom [32];
  logic [7:0] frame [6];

  cmd_rom dut (.addr, .data);

  function automatic logic [6:0] crc7(input logic [7:0] b [6]);
    logic [6:0] c = '0;
    for (int i = 0; i < 5; i++)
      for (int j = 7; j >= 0; j--) begin
        logic fb = c[6] ^ b[i][j];
        c = {c[5:0], 1'b0};
        if (fb) c = c ^ 7'h09;
      end
    return c;
  endfunction

  initial begin
    foreach (exp_rom[i]) exp_rom[i] = 8'hFF;
    {exp_rom[0], exp_rom[1], exp_rom[2], exp_rom[3], exp_rom[4], exp_rom[5]}       = 48'h40_00_00_00_00_95;
    {exp_rom[6], exp_rom[7], exp_rom[8], exp_rom[9], exp_rom[10], exp_rom[11]}     = 48'h48_00_00_01_AA_87;
    {exp_rom[12], exp_rom[13], exp_rom[14], exp_rom[15], exp_rom[16], exp_rom[17]} = 48'h77_00_00_00_00_01;
    {exp_rom[18], exp_rom[19], exp_rom[20], exp_rom[21], exp_rom[22], exp_rom[23]} = 48'h69_40_00_00_00_01;
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a);
      #1;
      checks++;
      if (data !== exp_rom[a]) begin
        failures++;
        $display("FAIL: addr %0d: %h expected %h", a, data, exp_rom[a]);
      end
    end
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < 6; i++) begin
        addr = 5'(6 * c + i);
        #1;
        frame[i] = data;
      end
      checks++;
      if (frame[0][7:6] != 2'b01 || frame[5][0] != 1'b1) begin
        failures++;
        $display("FAIL: frame %0d badly formed", c);
      end
      if (c < 2) begin
        checks++;
        if (frame[5][7:1] != crc7(frame)) begin
          failures++;
          $display("FAIL: frame %0d CRC7 %h expected %h", c, frame[5][7:1], crc7(frame));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
