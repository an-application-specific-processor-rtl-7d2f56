// mc_pkg: types and constants shared by the Monte Carlo energy accelerator.
//
// The accelerator runs microcoded sequences on two kinds of units: the Math
// Unit (a double-precision add/multiply ALU) and the Memory Manager (an address
// generator for cyclic three-dimensional matrices).  Both receive 6-bit opcodes
// that a microcode sequencer expands into microwords.  This package holds the
// layouts of those microwords, the Control Unit instruction set, and the small
// floating-point helpers used for the fixed operand scale factors.
//
// The ALU microword is 37 bits wide and the stored word 38 bits (37 plus the
// end-of-sequence flag), as the document states.  The field layout inside the
// 37 bits, the Memory Manager microword layout and the Control Unit
// instruction encoding are this design's own choices; the document names the
// operations but not their bit encodings.
package mc_pkg;

  typedef logic [63:0] fp64_t;

  localparam int unsigned OPCODE_W   = 6;    // opcode width (document)
  localparam int unsigned UPC_W      = 10;   // microcode address width (document)
  localparam int unsigned ALU_UOP_W  = 37;   // ALU microword width (document)
  localparam int unsigned MM_UOP_W   = 34;   // Memory Manager microword width (own choice)
  localparam int unsigned VADDR_W    = 15;   // accelerator cache address width (document)
  localparam int unsigned HADDR_W    = 16;   // host cache address width (document)
  localparam int unsigned COORD_W    = 6;    // lattice coordinate width, side up to 63

  localparam fp64_t FP_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;

  // ---------------------------------------------------------------- ALU
  // Source selector codes for adder, multiplier and output operands.
  //   0..3   input bank  I0..I3
  //   4..7   adder bank  A0..A3
  //   8..11  multiplier bank M0..M3
  //   12,14  constant 0.0 ; 13,15 constant 1.0
  typedef enum logic [1:0] {KA_ONE = 2'd0, KA_M2 = 2'd1, KA_M1 = 2'd2, KA_P2 = 2'd3} add_a_k_e;
  typedef enum logic [1:0] {KB_ONE = 2'd0, KB_M1 = 2'd1, KB_MH = 2'd2, KB_PH = 2'd3} add_b_k_e;
  typedef enum logic [1:0] {KM_ONE = 2'd0, KM_P2 = 2'd1, KM_PH = 2'd2, KM_M1 = 2'd3} mul_k_e;

  typedef struct packed {
    logic        cmp;        // adder compares (a < b) instead of adding
    logic [3:0]  add_a;      // adder operand A source
    add_a_k_e    add_a_k;    // scale of A: 1, -2, -1, 2
    logic [3:0]  add_b;      // adder operand B source
    add_b_k_e    add_b_k;    // scale of B: 1, -1, -0.5, 0.5
    logic [3:0]  mul_a;      // multiplier operand A source
    logic [3:0]  mul_b;      // multiplier operand B source
    mul_k_e      mul_k;      // scale of the product: 1, 2, 0.5, -1
    logic        fetch;      // pop the input FIFO into input bank
    logic [1:0]  fetch_idx;
    logic        wa;         // write adder pipeline output into adder bank
    logic [1:0]  wa_idx;
    logic        wm;         // write multiplier pipeline output into multiplier bank
    logic [1:0]  wm_idx;
    logic        out;        // push a register into the arithmetic output FIFO
    logic [3:0]  out_sel;
  } alu_uop_t;

  // ---------------------------------------------------------------- Memory Manager
  typedef enum logic [1:0] {MM_NOP = 2'd0, MM_RD = 2'd1, MM_WR = 2'd2, MM_CTL = 2'd3} mm_op_e;

  // R/W form.  The pointer-modification field works in parallel with R/W.
  typedef struct packed {
    mm_op_e      op;         // [33:32]
    logic [1:0]  ptr;        // [31:30] pointer the address is relative to
    logic [1:0]  dx;         // [29:28] signed offsets, -2..+1, cyclic
    logic [1:0]  dy;         // [27:26]
    logic [1:0]  dz;         // [25:24]
    logic        mat;        // [23]    matrix 0 or 1
    logic [1:0]  comp;       // [22:21] word within a lattice site
    logic        pm_en;      // [20]    pointer modification enable
    logic [1:0]  pm_ptr;     // [19:18]
    logic [3*COORD_W-1:0] pm_val; // [17:0] new {x, y, z}
  } mm_uop_t;

  // CTL form: bit 31 selects GVC (1) or INIT (0); INIT takes {X,Y,Z} from
  // bits [17:0], GVC takes its 16-bit word from bits [15:0].
  localparam int unsigned MM_CTL_GVC_BIT = 31;

  // GVC word fields
  localparam int unsigned GVC_MAP_LO   = 0;   // [7:0] virtual bank i -> physical bank map[2i+1:2i]
  localparam int unsigned GVC_LOAD_MAP = 8;   // load the bank map
  localparam int unsigned GVC_SIGNAL   = 9;   // raise the step-done flag to the host
  localparam int unsigned GVC_WAIT     = 10;  // wait until the host grants the next step

  // ---------------------------------------------------------------- Control Unit
  typedef enum logic [3:0] {
    CU_NOP  = 4'h0,
    CU_IST  = 4'h1,  // [27:0] = {MM2, ALU2, MM1, ALU1}, 7 bits each {valid, opcode}
    CU_JMP  = 4'h2,  // [7:0] target
    CU_LDC  = 4'h3,  // [25:24] counter, [15:0] value
    CU_DJNZ = 4'h4,  // [25:24] counter, [7:0] target: decrement, jump if not zero
    CU_JCMP = 4'h5,  // [24] ALU, [7:0] target: pop a comparison result, jump if true
    CU_WAIT = 4'h6,  // [3:0] unit mask {MM2, ALU2, MM1, ALU1}: wait until idle
    CU_HALT = 4'h7,  // stop and raise the done interrupt
    CU_PCNT = 4'h8   // [0] run performance counter, [1] clear it
  } cu_op_e;

  // ---------------------------------------------------------------- helpers
  // Multiply a double by a power of two (or negate) by editing sign and
  // exponent.  Zero stays zero; results that would leave the normal range are
  // not handled (operands in this application stay far from it).
  function automatic fp64_t fp_neg(fp64_t v);
    return {~v[63], v[62:0]};
  endfunction

  function automatic fp64_t fp_pow2(fp64_t v, logic up);
    fp64_t r;
    r = v;
    if (v[62:52] != 11'd0 && v[62:52] != 11'h7FF)
      r[62:52] = up ? v[62:52] + 11'd1 : v[62:52] - 11'd1;
    return r;
  endfunction

  function automatic fp64_t scale_add_a(fp64_t v, add_a_k_e k);
    unique case (k)
      KA_ONE: return v;
      KA_M2:  return fp_neg(fp_pow2(v, 1'b1));
      KA_M1:  return fp_neg(v);
      default: return fp_pow2(v, 1'b1);
    endcase
  endfunction

  function automatic fp64_t scale_add_b(fp64_t v, add_b_k_e k);
    unique case (k)
      KB_ONE: return v;
      KB_M1:  return fp_neg(v);
      KB_MH:  return fp_neg(fp_pow2(v, 1'b0));
      default: return fp_pow2(v, 1'b0);
    endcase
  endfunction

  function automatic fp64_t scale_mul(fp64_t v, mul_k_e k);
    unique case (k)
      KM_ONE: return v;
      KM_P2:  return fp_pow2(v, 1'b1);
      KM_PH:  return fp_pow2(v, 1'b0);
      default: return fp_neg(v);
    endcase
  endfunction

endpackage
