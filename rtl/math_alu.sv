// math_alu: double-precision ALU datapath of the Math Unit.
//
// One 37-bit microword per cycle drives, all at once: a sum or a comparison
// on the adder, a product on the multiplier, a data fetch from the input FIFO
// into the input register bank, writes of the adder and multiplier pipeline
// outputs into their own register banks, and the output of one register to
// the arithmetic output FIFO.  The three banks hold four doubles each (input,
// adder results, multiplier results).  Adder operand A may be scaled by
// -2, -1 or 2, operand B by -1, -0.5 or 0.5, and the product by 2, 0.5 or -1,
// at no cost in cycles: these are sign and exponent edits.  The product
// scale is applied to multiplier operand A when the microword issues, which
// gives the same result as scaling the product.  All of this is the
// document's description; the field layout is in mc_pkg::alu_uop_t.
//
// Timing model (this design's choice; the document leaves the latency to the
// programmer): the adder and multiplier pipelines advance only when a
// microword executes.  The adder result of microword i is at the adder output,
// and can be written by `wa`, when microword i+9 executes; the product of
// microword i when microword i+15 executes.  A comparison (a < b) travels down
// the adder pipeline the same way and its flag is pushed into the logical
// output FIFO as microword i+9 executes.  Register reads see the values from
// before the current microword's writes.
//
// Stalls: a microword waits (uop_ready low, nothing changes) while it must
// fetch from an empty input FIFO, output into a full arithmetic FIFO, or while
// a comparison flag is due and the logical FIFO is full.
//
// Interface: `in_push`/`in_data` fill the input FIFO (`in_free` is its room);
// `ar_pop`/`ar_data`/`ar_empty` drain the arithmetic FIFO; `lg_pop`/`lg_data`
// /`lg_empty` drain the logical FIFO.  The FIFO depths are assumed.
module math_alu
  import mc_pkg::*;
#(
  parameter int unsigned ADD_STAGES = 9,
  parameter int unsigned MUL_STAGES = 15,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // microword stream
  input  alu_uop_t    uop,
  input  logic        uop_valid,
  output logic        uop_ready,
  // input FIFO (written by the Memory Manager's reads)
  input  logic        in_push,
  input  fp64_t       in_data,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] in_free,
  // arithmetic output FIFO (drained by the Memory Manager's writes)
  input  logic        ar_pop,
  output fp64_t       ar_data,
  output logic        ar_empty,
  // logical output FIFO (drained by the Control Unit)
  input  logic        lg_pop,
  output logic        lg_data,
  output logic        lg_empty,
  // status
  output logic        stall,
  output logic        cmp_push
);

  fp64_t ibank [4];
  fp64_t abank [4];
  fp64_t mbank [4];

  fp64_t in_head, add_a, add_b, mul_a, mul_b, sum, prod, out_val;
  logic  in_empty, ar_full, lg_full;
  logic  lt, cmp_out, adv;

  function automatic fp64_t src(logic [3:0] code, fp64_t ib [4], fp64_t ab [4], fp64_t mb [4]);
    unique case (code[3:2])
      2'd0:    return ib[code[1:0]];
      2'd1:    return ab[code[1:0]];
      2'd2:    return mb[code[1:0]];
      default: return code[0] ? FP_ONE : FP_ZERO;
    endcase
  endfunction

  // ------------------------------------------------------------ FIFOs
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push(in_push), .wdata(in_data),
    .pop(adv && uop.fetch), .rdata(in_head),
    .full(), .empty(in_empty), .count(), .free(in_free)
  );

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_ar_fifo (
    .clk, .rst_n,
    .push(adv && uop.out), .wdata(out_val),
    .pop(ar_pop), .rdata(ar_data),
    .full(ar_full), .empty(ar_empty), .count(), .free()
  );

  sync_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_lg_fifo (
    .clk, .rst_n,
    .push(cmp_push), .wdata(lt),
    .pop(lg_pop), .rdata(lg_data),
    .full(lg_full), .empty(lg_empty), .count(), .free()
  );

  // ------------------------------------------------------------ control
  assign stall     = uop_valid && ((uop.fetch && in_empty) ||
                                   (uop.out && ar_full)    ||
                                   (cmp_out && lg_full));
  assign adv       = uop_valid && !stall;
  assign uop_ready = !stall;
  assign cmp_push  = adv && cmp_out;

  // ------------------------------------------------------------ operands
  always_comb begin
    add_a   = scale_add_a(src(uop.add_a, ibank, abank, mbank), uop.add_a_k);
    add_b   = scale_add_b(src(uop.add_b, ibank, abank, mbank), uop.add_b_k);
    mul_a   = scale_mul(src(uop.mul_a, ibank, abank, mbank), uop.mul_k);
    mul_b   = src(uop.mul_b, ibank, abank, mbank);
    out_val = src(uop.out_sel, ibank, abank, mbank);
  end

  fp_add #(.STAGES(ADD_STAGES)) u_add (
    .clk, .rst_n, .adv,
    .a(add_a), .b(add_b), .cmp_in(uop.cmp),
    .sum, .lt, .cmp_out
  );

  fp_mul #(.STAGES(MUL_STAGES)) u_mul (
    .clk, .rst_n, .adv,
    .a(mul_a), .b(mul_b),
    .prod
  );

  // ------------------------------------------------------------ register banks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        ibank[i] <= FP_ZERO;
        abank[i] <= FP_ZERO;
        mbank[i] <= FP_ZERO;
      end
    end else if (adv) begin
      if (uop.fetch) ibank[uop.fetch_idx] <= in_head;
      if (uop.wa)    abank[uop.wa_idx]    <= sum;
      if (uop.wm)    mbank[uop.wm_idx]    <= prod;
    end
  end

endmodule
