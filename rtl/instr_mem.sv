// Instruction memory (I): one word per instruction, shared by all threads.
//
// A simple dual-port block RAM: the read port is addressed by the PC of the
// thread in stage 0 and returns the instruction one cycle later (registered
// read, as in an FPGA block RAM). The write port takes the ALU result R at
// the destination D, so programs can rewrite code; a write reaches the same
// thread's instruction after next, the one-cycle read-after-write hazard of
// the Octavo pipeline. A read of the address being written returns the old
// word (read-before-write), a choice of this design.
//
// Interface: rd_addr_i -> rd_data_o after 1 cycle; wr_en_i/wr_addr_i/
// wr_data_i write at the clock edge.
module instr_mem #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr_i,
  output logic [WIDTH-1:0] rd_data_o,
  input  logic             wr_en_i,
  input  logic [AW-1:0]    wr_addr_i,
  input  logic [WIDTH-1:0] wr_data_i
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end
endmodule
