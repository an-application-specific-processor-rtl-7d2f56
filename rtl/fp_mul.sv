// fp_mul: IEEE-754 double-precision multiplier with a fixed pipeline depth.
//
// The Math Unit's multiplier works in parallel with the adder and is
// pipelined over 15 stages (the document's number).  The product is formed in
// one combinational step at the input (53x53-bit mantissa product, normalise,
// round to nearest even) and then passes through STAGES registers, which a
// retiming synthesis tool can spread the multiplier array over.  The internal
// stage split is this design's own choice.
//
// Interface: when `adv` is high the pipeline advances and takes the pair
// (a, b); `prod` is the product of the pair that entered STAGES advances
// earlier.  Nothing moves while `adv` is low.
//
// Numeric scope: normal numbers and zeros are exact with round-to-nearest-even;
// subnormal inputs count as zero and subnormal results are flushed to zero;
// overflow gives infinity; NaN, or zero times infinity, gives the default NaN.
module fp_mul
  import mc_pkg::*;
#(
  parameter int unsigned STAGES = 15
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t prod
);

  localparam fp64_t FP_NAN = 64'h7FF8_0000_0000_0000;

  function automatic fp64_t fp_prod(fp64_t x, fp64_t y);
    logic         s;
    logic         xz, yz, xi, yi;
    logic [105:0] p;
    logic [52:0]  m;
    logic         g, st, up;
    logic [53:0]  mr;
    logic [12:0]  e;

    s  = x[63] ^ y[63];
    xz = (x[62:52] == 11'd0);
    yz = (y[62:52] == 11'd0);
    xi = (x[62:52] == 11'h7FF);
    yi = (y[62:52] == 11'h7FF);
    if ((xi && x[51:0] != 0) || (yi && y[51:0] != 0)) return FP_NAN;
    if ((xi && yz) || (yi && xz))                     return FP_NAN;
    if (xi || yi)                                     return {s, 11'h7FF, 52'd0};
    if (xz || yz)                                     return {s, 63'd0};

    p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
    e = {2'b00, x[62:52]} + {2'b00, y[62:52]} - 13'd1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = |p[51:0];
      e  = e + 13'd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = |p[50:0];
    end
    up = g & (st | m[0]);
    mr = {1'b0, m} + {53'd0, up};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 13'd1;
    end
    if ($signed(e) <= 0)    return {s, 63'd0};
    if ($signed(e) >= 2047) return {s, 11'h7FF, 52'd0};
    return {s, e[10:0], mr[51:0]};
  endfunction

  fp64_t pipe [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else if (adv) begin
      pipe[0] <= fp_prod(a, b);
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign prod = pipe[STAGES-1];

endmodule
