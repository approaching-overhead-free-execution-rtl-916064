// I/O ready predictor (PRD0, PRD1), pipeline stages 2 and 3.
//
// Before an instruction touches the memory-mapped I/O ports, the predictor
// decides whether it can complete: every input port it reads (through its A
// or B operand) must hold data, and the output port it writes (through D)
// must have room. If not, the I/O-ready signal IOR is low: the instruction is
// annulled (no read, no write, no branch) and its thread re-issues the same
// instruction on its next turn, which stalls only that thread.
//
// Interface: the raw (un-offset) D, A and B fields and the port flags enter
// in stage 2. in_empty_i has one bit per input port, the IO_PORTS ports of
// memory A first, then those of B; out_full_i likewise for the output ports
// reached through D regions A and B. ior_s3_o is registered at the end of
// stage 2 (PRD0), ior_s4_o one cycle later (PRD1).
// The flag names follow the E/Fr, E/Fw inputs of the published pipeline;
// which ports exist and how they are numbered is this design's choice.
module io_predictor
  import octavo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [D_W-1:0]        d_i,
  input  logic [MEM_AW-1:0]     a_i,
  input  logic [MEM_AW-1:0]     b_i,
  input  logic [2*IO_PORTS-1:0] in_empty_i,
  input  logic [2*IO_PORTS-1:0] out_full_i,
  output logic                  ior_s3_o,
  output logic                  ior_s4_o
);
  localparam int unsigned PW = (IO_PORTS > 1) ? $clog2(IO_PORTS) : 1;

  logic          a_blocked, b_blocked, d_blocked;
  logic [PW-1:0] a_port, b_port, d_port;
  logic [MEM_AW-1:0] d_off;

  always_comb begin
    d_off  = d_i[MEM_AW-1:0];
    a_port = PW'(a_i - MEM_AW'(IO_BASE));
    b_port = PW'(b_i - MEM_AW'(IO_BASE));
    d_port = PW'(d_off - MEM_AW'(IO_BASE));
    a_blocked = is_io_addr(a_i) && in_empty_i[int'(a_port)];
    b_blocked = is_io_addr(b_i) && in_empty_i[int'(IO_PORTS) + int'(b_port)];
    d_blocked = is_io_addr(d_off) && (d_i[D_W-1:MEM_AW] <= 2'(REG_B)) &&
                out_full_i[(d_i[MEM_AW] ? int'(IO_PORTS) : 0) + int'(d_port)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ior_s3_o <= 1'b1;
      ior_s4_o <= 1'b1;
    end else begin
      ior_s3_o <= !(a_blocked || b_blocked || d_blocked);
      ior_s4_o <= ior_s3_o;
    end
  end
endmodule
