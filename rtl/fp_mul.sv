// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// Used by the processing unit in place of a vendor floating-point operator.
// The 24 x 24-bit significand product is normalised by at most one place
// and rounded to nearest, ties to even. Subnormals are flushed to zero, an
// exponent overflow gives an infinity, NaN/infinity inputs are not treated
// specially; these simplifications are this design's own choice.
// Interface: y = a * b, no clock, no latency.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, rnd;
  logic [24:0] mr;
  int          e;

  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rnd = g & (st | m[0]);
    mr  = {1'b0, m} + 25'(rnd);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || e <= 0) y = {s, 31'd0};
    else if (e >= 255)                                  y = {s, 8'hff, 23'd0};
    else                                                y = {s, e[7:0], mr[22:0]};
  end
endmodule
