// data_memory: 512 x 32-bit data memory of the simulator.
//
// Two synchronous read ports let the control unit fetch both operands of an
// instruction in one clock cycle; one synchronous write port stores results
// of the processing unit and inputs. Size and the simultaneous two-operand
// read follow the published design; the read-during-write behaviour (old
// data is read) is this design's choice. At start-up the memory holds the
// model constants of dtpim_program_pkg (INIT_MODEL = 1) or zeros; the
// constants depend on the simulation step STEP_S (seconds).
// Timing: addresses sampled at a clock edge, data valid after that edge.
module data_memory
  import dtpim_pkg::*;
#(
  parameter int unsigned DEPTH_W = 512,
  parameter int unsigned WIDTH   = 32,
  parameter bit          INIT_MODEL = 1'b1,
  parameter real         STEP_S     = 40.96e-6
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH_W)-1:0] ra_addr,
  output logic [WIDTH-1:0]           ra_data,
  input  logic [$clog2(DEPTH_W)-1:0] rb_addr,
  output logic [WIDTH-1:0]           rb_data,
  input  logic                       we,
  input  logic [$clog2(DEPTH_W)-1:0] wa,
  input  logic [WIDTH-1:0]           wd
);
  logic [WIDTH-1:0] mem [DEPTH_W];

  initial begin
    for (int i = 0; i < int'(DEPTH_W); i++)
      mem[i] = INIT_MODEL ? WIDTH'(dtpim_program_pkg::data_init(i, STEP_S)) : '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
    ra_data <= mem[ra_addr];
    rb_data <= mem[rb_addr];
  end
endmodule
