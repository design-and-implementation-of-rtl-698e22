// fp_add: combinational IEEE-754 single-precision adder/subtractor.
//
// Used by the processing unit in place of a vendor floating-point operator.
// The operand with the larger magnitude is kept, the other is shifted right
// with three extra bits (guard, round, sticky); the sum is renormalised with
// a leading-zero count and rounded to nearest, ties to even. Subnormal
// operands and results are flushed to zero, an exponent overflow gives an
// infinity; NaN and infinity inputs are not treated specially (the
// simulator's data never hold them). These simplifications are this
// design's own choice.
// Interface: a, b, sub (1: a - b); y = a +/- b, no clock, no latency.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic [7:0]  d;
  logic [26:0] xl, xs;
  logic [27:0] s;
  logic [26:0] n;
  logic [4:0]  lz;
  logic [24:0] mr;
  logic        rnd;
  int          e;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    // order by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sl = sa; el = ea; ml = ma; ss = sb; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; ss = sa; es = ea; ms = ma;
    end
    d  = el - es;
    xl = {ml, 3'b000};
    if (d >= 8'd27) begin
      xs = {26'd0, |ms};
    end else begin
      xs = {ms, 3'b000} >> d;
      // sticky: any bit shifted out
      if (({ms, 3'b000} & ~(27'h7ffffff << d)) != 27'd0) xs[0] = 1'b1;
    end
    if (sl == ss) s = {1'b0, xl} + {1'b0, xs};
    else          s = {1'b0, xl} - {1'b0, xs};

    e  = int'(el);
    lz = 5'd0;
    n  = s[26:0];
    if (s[27]) begin
      n = {s[27:2], s[1] | s[0]};
      e = e + 1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      n = s[26:0] << lz;
      e = e - int'(lz);
    end
    rnd = n[2] & ((|n[1:0]) | n[3]);
    mr  = {1'b0, n[26:3]} + 25'(rnd);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end

    if (ml == 24'd0)      y = 32'd0;                    // both zero
    else if (ms == 24'd0) y = {sl, el, ml[22:0]};       // other passes
    else if (s == 28'd0)  y = 32'd0;                    // exact cancellation
    else if (e <= 0)      y = {sl, 31'd0};
    else if (e >= 255)    y = {sl, 8'hff, 23'd0};
    else                  y = {sl, e[7:0], mr[22:0]};
  end
endmodule
