// program_memory: 512 x 36-bit program memory of the simulator.
//
// A block RAM with one synchronous read port addressed by the program
// counter. It is initialised with the simulation program of
// dtpim_program_pkg (the machine model loop), the way an FPGA block RAM
// is initialised by the bitstream; the design does not write it at run
// time. Size follows the published design.
// Timing: addr sampled at a clock edge, instr valid after that edge.
module program_memory
  import dtpim_pkg::*;
#(
  parameter int unsigned DEPTH_P = 512,
  parameter int unsigned WIDTH   = 36
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH_P)-1:0] addr,
  output logic [WIDTH-1:0]           instr
);
  logic [WIDTH-1:0] mem [DEPTH_P];

  initial begin
    dtpim_program_pkg::prog_image_t img;
    img = dtpim_program_pkg::program_image();
    for (int i = 0; i < int'(DEPTH_P); i++)
      mem[i] = (i < int'(DEPTH)) ? WIDTH'(img[i]) : '0;
  end

  always_ff @(posedge clk) begin
    instr <= mem[addr];
  end
endmodule
