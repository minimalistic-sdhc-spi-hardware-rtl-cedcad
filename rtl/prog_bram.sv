// prog_bram: program memory of the microcontroller, written by the boot loader.
//
// A single-port synchronous block RAM of DEPTH words of WIDTH bits (1024 x
// 18 for the 8-bit soft-core microcontroller, whose instructions are 18
// bits wide). A write (we = 1) stores wdata at addr on the rising clock
// edge; the read data of addr appears on rdata one cycle after the address
// (read-first: a write returns the old word). In the boot loader system the
// address is taken from the loader's word counter while the processor is
// held in reset and from the processor's program counter afterwards.
// Size and word width follow the processor's program memory; the read-first
// behaviour is this design's choice.
module prog_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 18
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
