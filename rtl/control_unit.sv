// control_unit: program-controlled dispatcher of the two accelerators.
//
// The microcoded units have no flow control of their own; the Control Unit
// supplies it.  It runs a short program from its own RAM (loaded over the
// supervisor bus) and, with the Execute instruction IST, queues one 6-bit
// opcode into any of the four sequencers (ALU1, MM1, ALU2, MM2) at once, each
// selected by the valid bit of its 7-bit field, as the document describes.
// Loops use four 16-bit counters (LDC, DJNZ); JCMP pops a comparison result
// from an ALU's logical FIFO and branches on it; WAIT holds until the chosen
// units are idle; PCNT runs or clears the cycle counter used to time the
// computation; HALT stops and raises the interrupt.  The instruction encoding
// (mc_pkg::cu_op_e) and the program memory depth are this design's choices.
//
// Unit index in all 4-bit vectors: 0 = ALU1, 1 = MM1, 2 = ALU2, 3 = MM2, the
// order of the IST fields from least significant up.
//
// Timing: one instruction per cycle.  IST waits while any selected opcode
// FIFO is full and then pushes all selected opcodes in the same cycle.  `irq`
// is a one-cycle pulse on HALT; `done` stays high until the next `start`.
module control_unit
  import mc_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program loading and start
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  logic [31:0]                   prog_wdata,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  output logic                          irq,
  // sequencer opcode queues
  output logic [3:0]                    u_push,
  output logic [3:0][OPCODE_W-1:0]      u_op,
  input  logic [3:0]                    u_full,
  input  logic [3:0]                    u_idle,
  // ALU comparison results, index 0 = ALU1
  input  logic [1:0]                    lg_empty,
  input  logic [1:0]                    lg_data,
  output logic [1:0]                    lg_pop,
  // performance counter and status
  output logic [31:0]                   cycles,
  output logic [$clog2(PROG_DEPTH)-1:0] pc
);

  localparam int unsigned PW = $clog2(PROG_DEPTH);

  logic [31:0]     prog [PROG_DEPTH];
  logic [31:0]     ins;
  cu_op_e          op;
  logic [3:0][15:0] cnt;
  logic            pcnt_run;
  logic            go;          // instruction completes this cycle
  logic            jump;
  logic [PW-1:0]   target;
  logic [3:0]      sel;
  logic [1:0]      csel;

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end

  assign ins    = prog[pc];
  assign op     = cu_op_e'(ins[31:28]);
  assign target = ins[PW-1:0];
  assign csel   = ins[25:24];
  assign irq    = running && op == CU_HALT;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      sel[j]  = ins[7*j + 6];
      u_op[j] = ins[7*j +: 6];
    end
  end

  always_comb begin
    go     = 1'b0;
    jump   = 1'b0;
    u_push = '0;
    lg_pop = '0;
    if (running) begin
      unique case (op)
        CU_IST: begin
          go = (sel & u_full) == 4'b0000;
          if (go) u_push = sel;
        end
        CU_JMP:  begin go = 1'b1; jump = 1'b1; end
        CU_DJNZ: begin go = 1'b1; jump = (cnt[csel] != 16'd1); end
        CU_JCMP: begin
          go   = !lg_empty[ins[24]];
          jump = go && lg_data[ins[24]];
          lg_pop[ins[24]] = go;
        end
        CU_WAIT: go = (ins[3:0] & ~u_idle) == 4'b0000;
        default: go = 1'b1;   // NOP, LDC, PCNT, HALT
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      running  <= 1'b0;
      done     <= 1'b0;
      cnt      <= '0;
      pcnt_run <= 1'b0;
      cycles   <= '0;
    end else begin
      if (pcnt_run) cycles <= cycles + 1'b1;
      if (start && !running) begin
        running <= 1'b1;
        done    <= 1'b0;
        pc      <= '0;
      end else if (go) begin
        pc <= jump ? target : pc + 1'b1;
        unique case (op)
          CU_LDC:  cnt[csel] <= ins[15:0];
          CU_DJNZ: cnt[csel] <= cnt[csel] - 1'b1;
          CU_PCNT: begin
            pcnt_run <= ins[0];
            if (ins[1]) cycles <= '0;
          end
          CU_HALT: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
