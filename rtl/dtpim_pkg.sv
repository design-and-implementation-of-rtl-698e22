// dtpim_pkg: types and constants shared by the blocks of the dual three-phase
// induction machine (DTPIM) real-time simulator.
//
// The simulator is a small Harvard processor: a 512 x 36-bit program memory,
// a 512 x 32-bit data memory holding IEEE-754 single-precision words, a
// nine-bit program counter and a floating-point processing unit. The memory
// sizes and the nine-bit counter follow the published design; the
// instruction format below is this design's own choice, since no encoding
// was published. A 36-bit instruction is
//
//   [35:31] spare (zero)   [30:27] opcode
//   [26:18] dst            [17:9]  src_a        [8:0] src_b
//
// dst/src_a/src_b are data-memory addresses. JMP takes its target in dst,
// IN takes its input channel in src_a, OUT/OUTL send the word at src_a.
//
// The package also holds conversion helpers between `real` and the 32-bit
// single-precision format. They are used only at elaboration/initialisation
// (memory images) and by testbenches, never in clocked logic.
package dtpim_pkg;

  localparam int unsigned DATA_W  = 32;   // data word: IEEE-754 single
  localparam int unsigned INSTR_W = 36;   // program word
  localparam int unsigned ADDR_W  = 9;    // both memories hold 512 words
  localparam int unsigned DEPTH   = 512;

  // Input module channels read by the IN instruction: 0..5 duty of legs
  // a..f, 6 load torque.
  localparam logic [ADDR_W-1:0] IN_CH_TL = 9'd6;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // no operation
    OP_ADD  = 4'd1,   // D[dst] = D[a] + D[b]
    OP_SUB  = 4'd2,   // D[dst] = D[a] - D[b]
    OP_MUL  = 4'd3,   // D[dst] = D[a] * D[b]
    OP_MOV  = 4'd4,   // D[dst] = D[a]
    OP_IN   = 4'd5,   // D[dst] = input channel src_a
    OP_OUT  = 4'd6,   // push D[a] to the output module
    OP_OUTL = 4'd7,   // push D[a] and close the record
    OP_JMP  = 4'd8,   // PC = dst
    OP_WAIT = 4'd9    // wait for the next sampling instant
  } opcode_t;

  typedef struct packed {
    logic [4:0] spare;
    opcode_t    op;
    addr_t      dst;
    addr_t      src_a;
    addr_t      src_b;
  } instr_t;

  // Operation of the processing unit.
  typedef enum logic [1:0] {
    PU_ADD  = 2'd0,
    PU_SUB  = 2'd1,
    PU_MUL  = 2'd2,
    PU_PASS = 2'd3
  } pu_op_t;

  function automatic instr_t mk_instr(opcode_t op, int dst, int a, int b);
    instr_t i;
    i.spare = '0;
    i.op    = op;
    i.dst   = addr_t'(dst);
    i.src_a = addr_t'(a);
    i.src_b = addr_t'(b);
    return i;
  endfunction

  // Unsigned integer v (v < 2^24) scaled by 2^-frac_bits, to single
  // precision. Exact; synthesizable (leading-one search and a shift).
  function automatic word_t uint_to_f32(logic [23:0] v, int frac_bits);
    int msb;
    logic [23:0] m;
    msb = -1;
    for (int i = 0; i < 24; i++) if (v[i]) msb = i;
    if (msb < 0) return '0;
    m = v << (23 - msb);
    return {1'b0, 8'(127 + msb - frac_bits), m[22:0]};
  endfunction

  // real -> single precision, round to nearest even, subnormals flushed to 0.
  function automatic word_t real_to_f32(real r);
    logic [63:0] d;
    logic [52:0] m;      // 1.52
    logic [24:0] mr;     // rounded 1.23 plus carry
    int          e;
    logic        rnd;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    rnd = m[28] & ((|m[27:0]) | m[29]);
    mr  = {1'b0, m[52:29]} + 25'(rnd);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], mr[22:0]};
  endfunction

  // single precision -> real (exact).
  function automatic real f32_to_real(word_t f);
    logic [63:0] d;
    int          e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127 + 1023;
    d = {f[31], 11'(e), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

endpackage
