// output_module: sends the simulator's results towards the Gigabit
// Ethernet MAC.
//
// The control unit pushes 32-bit words (state vector, speed, torque and
// phase voltages) in the 50 MHz simulator domain; last marks the final word
// of a step's record. A dual-clock FIFO carries them to the 125 MHz (8 ns)
// output clock domain, where each word leaves as four bytes, most
// significant first, on an AXI-Stream style byte interface of the kind an
// Ethernet MAC client port takes; tlast marks the last byte of a record.
// The published design names the MAC and the two clocks; the FIFO, the byte
// order and the record framing are this design's own. The Ethernet header
// and frame check sequence are left to the MAC side.
// Timing: full is high when a push would be lost; the control unit then
// stalls. A byte moves when tvalid and tready are both high.
module output_module
  import dtpim_pkg::*;
#(
  parameter int unsigned FIFO_AW = 4
) (
  input  logic       clk_sim,
  input  logic       rst_sim,
  input  logic       wr_valid,
  input  word_t      wr_data,
  input  logic       wr_last,
  output logic       wr_full,
  input  logic       clk_eth,
  input  logic       rst_eth,
  output logic [7:0] m_axis_tdata,
  output logic       m_axis_tvalid,
  output logic       m_axis_tlast,
  input  logic       m_axis_tready
);
  logic [32:0] fifo_q;
  logic        fifo_empty, pop;
  logic        have;
  logic [32:0] word_q;
  logic [1:0]  idx;

  async_fifo #(.WIDTH(33), .AW(FIFO_AW)) u_fifo (
    .wclk(clk_sim), .wrst(rst_sim), .wr(wr_valid), .wdata({wr_last, wr_data}),
    .full(wr_full),
    .rclk(clk_eth), .rrst(rst_eth), .rd(pop), .rdata(fifo_q), .empty(fifo_empty)
  );

  logic byte_done;
  assign byte_done = have && m_axis_tready;
  // take the next word when idle or when the last byte of the current one leaves
  assign pop = !fifo_empty && (!have || (byte_done && idx == 2'd3));

  always_ff @(posedge clk_eth) begin
    if (rst_eth) begin
      have   <= 1'b0;
      word_q <= '0;
      idx    <= '0;
    end else begin
      if (pop) begin
        have   <= 1'b1;
        word_q <= fifo_q;
        idx    <= '0;
      end else if (byte_done) begin
        idx <= idx + 1'b1;
        if (idx == 2'd3) have <= 1'b0;
      end
    end
  end

  assign m_axis_tvalid = have;
  assign m_axis_tdata  = word_q[31 - 8*idx -: 8];
  assign m_axis_tlast  = have && word_q[32] && (idx == 2'd3);
endmodule
