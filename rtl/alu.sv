// Octavo ALU: four pipeline stages (ALU0..ALU3), stages 6 to 9.
//
// Computes the logic-unit and multiplier operations of the Octavo
// instruction set on the A and B operand words: XOR, AND, OR, SUB, ADD, and
// the high signed, low signed and high unsigned words of the full product
// (opcodes as published). Right shifts are obtained as the high word of a
// product by a power of two (MHU by 2**35 shifts right by one).
// The result R and its destination D travel together and leave after
// exactly four cycles, to be written to all memories.
//
// Interface: op_i, a_i, b_i, d_i, wr_i enter in stage 6; r_o, d_o, wr_o
// leave four clock edges later. wr_i is the caller's decision that the
// instruction writes (not annulled, not cancelled, a result-producing
// opcode); wr_o is forced low for the unused opcodes and controller opcodes.
// How the work is spread over the four stages is this design's choice:
// stage 0 registers the inputs, stage 1 computes, stage 2 carries the
// product, stage 3 selects the result.
// Lint note: the low half of the unsigned product is unused (no opcode
// returns it; MLS gives the same low bits from the signed product).
module alu
  import octavo_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W,
  parameter int unsigned DW    = D_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OP_W-1:0]  op_i,
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  input  logic [DW-1:0]    d_i,
  input  logic             wr_i,
  output logic [WIDTH-1:0] r_o,
  output logic [DW-1:0]    d_o,
  output logic             wr_o
);
  typedef struct packed {
    logic [OP_W-1:0] op;
    logic [DW-1:0]   d;
    logic            wr;
  } ctl_t;

  ctl_t               c0, c1, c2;
  logic [WIDTH-1:0]   a0, b0, logic1, logic2;
  logic [2*WIDTH-1:0] ps1, pu1, ps2, pu2;

  // ALU0: operand registers
  always_ff @(posedge clk) begin
    if (rst) c0 <= '0;
    else     c0 <= '{op: op_i, d: d_i, wr: wr_i && is_alu_op(op_i)};
    a0 <= a_i;
    b0 <= b_i;
  end

  // ALU1: logic unit and multiplier
  always_ff @(posedge clk) begin
    if (rst) c1 <= '0;
    else     c1 <= c0;
    unique case (c0.op)
      OP_XOR:  logic1 <= a0 ^ b0;
      OP_AND:  logic1 <= a0 & b0;
      OP_OR:   logic1 <= a0 | b0;
      OP_SUB:  logic1 <= a0 - b0;
      default: logic1 <= a0 + b0;
    endcase
    ps1 <= {{WIDTH{a0[WIDTH-1]}}, a0} * {{WIDTH{b0[WIDTH-1]}}, b0};
    pu1 <= {{WIDTH{1'b0}}, a0} * {{WIDTH{1'b0}}, b0};
  end

  // ALU2: product pipeline register
  always_ff @(posedge clk) begin
    if (rst) c2 <= '0;
    else     c2 <= c1;
    logic2 <= logic1;
    ps2    <= ps1;
    pu2    <= pu1;
  end

  // ALU3: result select
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_o <= 1'b0;
      d_o  <= '0;
      r_o  <= '0;
    end else begin
      wr_o <= c2.wr;
      d_o  <= c2.d;
      unique case (c2.op)
        OP_MHS:  r_o <= ps2[2*WIDTH-1:WIDTH];
        OP_MLS:  r_o <= ps2[WIDTH-1:0];
        OP_MHU:  r_o <= pu2[2*WIDTH-1:WIDTH];
        default: r_o <= logic2;
      endcase
    end
  end
endmodule
