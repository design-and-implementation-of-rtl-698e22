// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Write side in wclk, read side in rclk. Each pointer is one bit wider than
// the address; its Gray code crosses to the other domain through two flops.
// full and empty are therefore pessimistic by the crossing delay, never
// wrong. rdata shows the oldest word whenever empty is low (show-ahead);
// rd pops it. A standard helper of the output module.
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned AW    = 4     // 2^AW words
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2, rgray_w1, rgray_w2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wbin_n = wbin + (AW+1)'(wr && !full);
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  assign rbin_n = rbin + (AW+1)'(rd && !empty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
