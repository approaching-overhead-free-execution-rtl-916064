// Fixed-latency register pipeline: the "empty" stages of the Octavo pipeline.
//
// The instruction read from instruction memory passes through empty stages
// while the operand addresses are being offset and the data memories are
// read, so that opcode and destination arrive at the ALU and controller in
// the same cycle as the operands. Having no logic between registers, these
// stages also keep the pipeline at high clock rates.
//
// Interface: d_i enters, q_o leaves DEPTH clock cycles later (DEPTH >= 1).
// Reset clears every stage, so a zero word (which the surrounding logic
// treats as idle) is seen until the pipeline fills.
module pipe_delay #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);
  logic [WIDTH-1:0] stage_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= d_i;
      for (int i = 1; i < int'(DEPTH); i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign q_o = stage_q[DEPTH-1];
endmodule
