// A or B data memory with memory-mapped I/O ports.
//
// Octavo has two data memories, A and B, each read by one source operand and
// both written by the ALU result. A small range of addresses in each memory
// is not storage but I/O: reading there takes a word from an input port,
// writing there sends a word to an output port, so custom hardware can be
// attached directly to the datapath.
//
// Read path (two registered stages, RD0 and RD1, matching the block RAM and
// its output register): rd_addr_i is presented in pipeline stage 4 and
// rd_data_o is valid two cycles later, at the ALU input. When rd_en_i is high
// and the address is an I/O port, io_in_pop_o pulses in the same cycle, to
// advance the port's source, and the port word is returned in place of the
// memory word. rd_en_i is low for annulled or cancelled instructions, so
// they consume no input.
//
// Write path (two stages, WR0 and WR1): WR0 registers wr_en_i, wr_addr_i
// and wr_data_i; WR1 writes the block RAM at the next clock edge, so a word
// written in cycle w can be read from cycle w+2 on (a read presented in cycle
// w+1 still returns the old word). A thread's next read comes eight cycles
// after its write is presented, so it always sees it. A write to an I/O
// address does not touch the memory: the WR0 register is the port output,
// io_out_data_o with a one-cycle io_out_valid_o pulse in cycle w+1.
//
// The port range (IO_BASE, IO_PORTS) and the port handshake are choices of
// this design; the published material only says the ports are memory mapped.
module data_mem
  import octavo_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W,
  parameter int unsigned DEPTH = 2**MEM_AW,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // read port, stage 4 in, stage 6 out
  input  logic             rd_en_i,
  input  logic [AW-1:0]    rd_addr_i,
  output logic [WIDTH-1:0] rd_data_o,
  // write port
  input  logic             wr_en_i,
  input  logic [AW-1:0]    wr_addr_i,
  input  logic [WIDTH-1:0] wr_data_i,
  // memory-mapped I/O
  input  logic [WIDTH-1:0] io_in_data_i  [IO_PORTS],
  output logic [IO_PORTS-1:0] io_in_pop_o,
  output logic [WIDTH-1:0] io_out_data_o [IO_PORTS],
  output logic [IO_PORTS-1:0] io_out_valid_o
);
  localparam int unsigned PW = (IO_PORTS > 1) ? $clog2(IO_PORTS) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] mem_q, io_q;
  logic             io_sel_q;

  logic             rd_io, wr_io;
  logic [PW-1:0]    rd_port, wr_port;

  always_comb begin
    rd_io   = is_io_addr(MEM_AW'(rd_addr_i));
    wr_io   = is_io_addr(MEM_AW'(wr_addr_i));
    rd_port = PW'(rd_addr_i - AW'(IO_BASE));
    wr_port = PW'(wr_addr_i - AW'(IO_BASE));
    for (int p = 0; p < int'(IO_PORTS); p++)
      io_in_pop_o[p] = rd_en_i && rd_io && (rd_port == PW'(p));
  end

  // RD0: block RAM read and I/O capture
  always_ff @(posedge clk) begin
    mem_q    <= mem[rd_addr_i];
    io_q     <= io_in_data_i[rd_port];
    io_sel_q <= rd_io;
  end

  // RD1: output register
  always_ff @(posedge clk) begin
    rd_data_o <= io_sel_q ? io_q : mem_q;
  end

  // WR0: write register (memory words)
  logic             wr0_en;
  logic [AW-1:0]    wr0_addr;
  logic [WIDTH-1:0] wr0_data;

  always_ff @(posedge clk) begin
    if (rst) wr0_en <= 1'b0;
    else     wr0_en <= wr_en_i && !wr_io;
    wr0_addr <= wr_addr_i;
    wr0_data <= wr_data_i;
  end

  // WR1: block RAM write
  always_ff @(posedge clk) begin
    if (wr0_en) mem[wr0_addr] <= wr0_data;
  end

  // WR0 for I/O addresses: output port register

  always_ff @(posedge clk) begin
    if (rst) begin
      io_out_valid_o <= '0;
      for (int p = 0; p < int'(IO_PORTS); p++) io_out_data_o[p] <= '0;
    end else begin
      for (int p = 0; p < int'(IO_PORTS); p++) begin
        io_out_valid_o[p] <= wr_en_i && wr_io && (wr_port == PW'(p));
        if (wr_en_i && wr_io && (wr_port == PW'(p))) io_out_data_o[p] <= wr_data_i;
      end
    end
  end
endmodule
