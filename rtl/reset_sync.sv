// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain. rst_n low resets at once; rst goes low two clock edges after
// rst_n rises. A standard helper, not part of the published design.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1  <= 1'b1;
      rst <= 1'b1;
    end else begin
      r1  <= 1'b0;
      rst <= r1;
    end
  end
endmodule
