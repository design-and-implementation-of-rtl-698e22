// program_counter: nine-bit synchronous up-counter with parallel load.
//
// Addresses the 512 words of the program memory. inc advances the count by
// one, load replaces it with load_value (branches); load wins over inc.
// Reset clears it to 0, the first instruction. Width and the load function
// follow the published design; the priority and reset value are this
// design's choice. Timing: pc changes on the clock edge after inc/load.
module program_counter #(
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              inc,
  input  logic              load,
  input  logic [ADDR_W-1:0] load_value,
  output logic [ADDR_W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= load_value;
    else if (inc)  pc <= pc + 1'b1;
  end
endmodule
