// fp_add: IEEE-754 double-precision adder and comparator with a fixed
// pipeline depth.
//
// The Math Unit's adder performs either a sum or a comparison each cycle and
// is pipelined over 9 stages (the document's number).  Here the arithmetic is
// done in one combinational step at the input (align, add or subtract,
// normalise, round to nearest even) and the result then travels through
// STAGES registers; a synthesis tool with register retiming spreads the logic
// over those stages.  The split of work between stages is this design's
// choice, since the document gives only the depth.
//
// Interface: when `adv` is high the pipeline moves one step and takes a new
// operand pair (a, b) and a compare tag.  `sum` and `lt` (a < b) are the
// results of the pair that entered STAGES advances earlier; `cmp_out` is that
// pair's compare tag.  Nothing moves while `adv` is low, so latency is counted
// in advances, not clock cycles.
//
// Numeric scope: normal numbers and zeros are exact with round-to-nearest-even.
// Subnormal inputs are read as zero and subnormal results flushed to zero;
// infinities propagate, NaN or inf - inf give the default NaN.  The document
// does not discuss these cases.
module fp_add
  import mc_pkg::*;
#(
  parameter int unsigned STAGES = 9
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  fp64_t a,
  input  fp64_t b,
  input  logic  cmp_in,
  output fp64_t sum,
  output logic  lt,
  output logic  cmp_out
);

  localparam fp64_t FP_NAN = 64'h7FF8_0000_0000_0000;

  // ---------------------------------------------------------------- compare
  function automatic logic fp_lt(fp64_t x, fp64_t y);
    logic xz, yz;
    xz = (x[62:52] == 11'd0);
    yz = (y[62:52] == 11'd0);
    if (xz && yz)             return 1'b0;
    if (xz)                   return !y[63];               // 0 < y iff y positive
    if (yz)                   return x[63];                // x < 0 iff x negative
    if (x[63] != y[63])       return x[63];
    if (!x[63])               return x[62:0] < y[62:0];
    return x[62:0] > y[62:0];
  endfunction

  // ---------------------------------------------------------------- add
  function automatic fp64_t fp_sum(fp64_t x, fp64_t y);
    logic        sx, sy, sr;
    logic [10:0] ex, ey;
    logic [52:0] mx, my;
    logic [55:0] ax, ay, sh;          // mantissa with guard, round, sticky
    logic [56:0] s;
    logic [11:0] d;
    logic [12:0] e;                   // signed working exponent
    logic [52:0] m;
    logic        g, r, st, up;
    logic [53:0] mr;
    int          lz;
    fp64_t       t;

    // Special values
    if (x[62:52] == 11'h7FF || y[62:52] == 11'h7FF) begin
      if (x[62:52] == 11'h7FF && x[51:0] != 0) return FP_NAN;
      if (y[62:52] == 11'h7FF && y[51:0] != 0) return FP_NAN;
      if (x[62:52] == 11'h7FF && y[62:52] == 11'h7FF)
        return (x[63] == y[63]) ? x : FP_NAN;
      return (x[62:52] == 11'h7FF) ? x : y;
    end
    if (x[62:52] == 11'd0 && y[62:52] == 11'd0) return {x[63] & y[63], 63'd0};
    if (x[62:52] == 11'd0) return y;
    if (y[62:52] == 11'd0) return x;

    // Order so that |x| >= |y|
    if (x[62:0] < y[62:0]) begin
      t = x; x = y; y = t;
    end
    sx = x[63]; sy = y[63];
    ex = x[62:52]; ey = y[62:52];
    mx = {1'b1, x[51:0]};
    my = {1'b1, y[51:0]};
    d  = {1'b0, ex} - {1'b0, ey};
    ax = {mx, 3'b000};
    ay = {my, 3'b000};
    if (d >= 12'd56) begin
      sh = {55'd0, 1'b1};                       // y only contributes sticky
    end else begin
      sh = ay >> d;
      if ((ay & ((56'd1 << d) - 56'd1)) != 56'd0) sh[0] = 1'b1;
    end

    e  = {2'b00, ex};
    sr = sx;
    if (sx == sy) begin
      s = {1'b0, ax} + {1'b0, sh};
      if (s[56]) begin
        s = {1'b0, s[56:2], s[1] | s[0]};
        e = e + 13'd1;
      end
    end else begin
      s = {1'b0, ax} - {1'b0, sh};
      if (s == 57'd0) return FP_ZERO;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - 13'(lz);
    end

    // s[55] is the hidden bit; round to nearest even
    m  = s[55:3];
    g  = s[2];
    r  = s[1];
    st = s[0];
    up = g & (r | st | m[0]);
    mr = {1'b0, m} + {53'd0, up};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 13'd1;
    end
    if ($signed(e) <= 0)      return {sr, 63'd0};
    if ($signed(e) >= 2047)   return {sr, 11'h7FF, 52'd0};
    return {sr, e[10:0], mr[51:0]};
  endfunction

  // ---------------------------------------------------------------- pipeline
  typedef struct packed {
    fp64_t v;
    logic  lt;
    logic  cmp;
  } stage_t;

  stage_t pipe [STAGES];
  stage_t head;

  always_comb begin
    head.v   = fp_sum(a, b);
    head.lt  = fp_lt(a, b);
    head.cmp = cmp_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else if (adv) begin
      pipe[0] <= head;
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign sum     = pipe[STAGES-1].v;
  assign lt      = pipe[STAGES-1].lt;
  assign cmp_out = pipe[STAGES-1].cmp;

endmodule
