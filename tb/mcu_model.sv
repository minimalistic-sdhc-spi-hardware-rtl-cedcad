// mcu_model: behavioural model of the 8-bit soft-core microcontroller that
// the boot loader serves, for simulation only. It models just the program
// side that a boot test needs: a 10-bit program counter, 16 registers, two
// clock cycles per instruction (address out in the first, instruction from
// the synchronous program memory in the second) and three instructions,
// with the microcontroller's encoding:
//   LOAD   sX, kk   18'b000000_xxxx_kkkkkkkk
//   OUTPUT sX, pp   18'b101100_xxxx_pppppppp   (write_strobe for one cycle)
//   JUMP   aaa      18'b110100_00_aaaaaaaaaa
// Any other word counts as unknown and is skipped. reset holds the model
// at address 0.
module mcu_model (
  input  logic        clk,
  input  logic        reset,
  output logic [9:0]  address,
  input  logic [17:0] instruction,
  output logic [7:0]  port_id,
  output logic [7:0]  out_port,
  output logic        write_strobe
);
  logic [7:0]  regs [16];
  logic        phase;
  int unsigned n_executed = 0, n_unknown = 0;

  initial begin
    address = '0; phase = 1'b0; port_id = '0; out_port = '0; write_strobe = 1'b0;
    foreach (regs[i]) regs[i] = '0;
  end

  always @(posedge clk) begin
    write_strobe <= 1'b0;
    if (reset) begin
      address <= '0;
      phase   <= 1'b0;
    end else if (!phase) begin
      phase <= 1'b1;
    end else begin
      phase <= 1'b0;
      n_executed++;
      case (instruction[17:12])
        6'b000000: begin
          regs[instruction[11:8]] = instruction[7:0];
          address <= address + 1'b1;
        end
        6'b101100: begin
          port_id      <= instruction[7:0];
          out_port     <= regs[instruction[11:8]];
          write_strobe <= 1'b1;
          address      <= address + 1'b1;
        end
        6'b110100: address <= instruction[9:0];
        default: begin
          n_unknown++;
          address <= address + 1'b1;
        end
      endcase
    end
  end
endmodule
