// Controller (CTL0, CTL1): program counters and next-PC logic, stages 6 and 7.
//
// Holds one PC per thread. The thread entering stage 0 reads its PC here to
// fetch its instruction. Eight cycles later, when that instruction reaches
// stage 6, the controller decides the thread's next PC and writes it at the
// end of stage 7, just in time for the thread's next turn at stage 0.
//
// Next-PC priority (this design's order; the published material lists the
// inputs but not how they combine):
//   1. instruction annulled for I/O (IOR low): same PC, the instruction is retried
//   2. a folded branch fired by the BTM (J): the BTM destination BD
//   3. the instruction's own jump, unless it was cancelled:
//        JMP always; JZE if A = 0; JNZ if A != 0; JPO if A >= 0; JNE if A < 0;
//      target is the D field
//   4. otherwise PC + 1
// Stage 6 (CTL0) registers the decision inputs and evaluates the jump
// condition on the A operand; stage 7 (CTL1) selects and writes the PC.
// Slots marked invalid (pipeline filling after reset or while stopped) do
// not change any PC. Every PC resets to 0.
module controller
  import octavo_pkg::*;
#(
  parameter int unsigned N_THREADS = THREADS,
  parameter int unsigned PCW       = PC_W,
  localparam int unsigned TW       = $clog2(N_THREADS)
) (
  input  logic              clk,
  input  logic              rst,
  // stage 0 fetch
  input  logic [TW-1:0]     tid0_i,
  output logic [PCW-1:0]    pc0_o,
  // stage 6 decision inputs
  input  logic              valid_i,
  input  logic [TW-1:0]     tid_i,
  input  logic [PCW-1:0]    pc_i,
  input  logic [OP_W-1:0]   op_i,
  input  logic [PCW-1:0]    target_i,
  input  logic [WORD_W-1:0] a_i,
  input  logic              ior_i,
  input  logic              cancel_i,
  input  logic              btm_j_i,
  input  logic [PCW-1:0]    btm_bd_i
);
  logic [PCW-1:0] pcs [N_THREADS];

  typedef struct packed {
    logic           valid;
    logic [TW-1:0]  tid;
    logic [PCW-1:0] pc;
    logic [PCW-1:0] target;
    logic           ior;
    logic           own_jump;
    logic           btm_j;
    logic [PCW-1:0] btm_bd;
  } ctl0_t;

  ctl0_t s6_q;
  logic  cond;
  logic [PCW-1:0] next_pc;

  assign pc0_o = pcs[tid0_i];

  // CTL0: jump condition on A
  always_comb begin
    unique case (op_i)
      OP_JMP:  cond = 1'b1;
      OP_JZE:  cond = (a_i == '0);
      OP_JNZ:  cond = (a_i != '0);
      OP_JPO:  cond = ~a_i[WORD_W-1];
      OP_JNE:  cond = a_i[WORD_W-1];
      default: cond = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) s6_q <= '0;
    else s6_q <= '{valid: valid_i, tid: tid_i, pc: pc_i, target: target_i, ior: ior_i,
                   own_jump: cond && !cancel_i, btm_j: btm_j_i, btm_bd: btm_bd_i};
  end

  // CTL1: next PC
  always_comb begin
    if (!s6_q.ior)          next_pc = s6_q.pc;
    else if (s6_q.btm_j)    next_pc = s6_q.btm_bd;
    else if (s6_q.own_jump) next_pc = s6_q.target;
    else                    next_pc = s6_q.pc + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(N_THREADS); t++) pcs[t] <= '0;
    end else if (s6_q.valid) begin
      pcs[s6_q.tid] <= next_pc;
    end
  end
endmodule
