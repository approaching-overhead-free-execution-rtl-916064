// Reduced-overhead Octavo: an 8-thread, 10-stage barrel soft-processor in
// which addressing and flow control run as parallel per-thread
// "sub-programs" in hardware, beside the instruction stream.
//
// Threads issue in fixed round-robin order, one instruction per cycle, so a
// thread's next instruction enters eight cycles after the previous one and
// always sees its results: no forwarding, no interlocks. Each instruction is
// a three-operand memory-to-memory operation  D <- A op B  on 36-bit words.
//
// Stage map (a thread's instruction enters stage 0 in cycle c):
//   0     PC read from the controller; instruction memory read; BTM entry read
//   1     instruction word available; AOMs and BTM compare PC = BO
//   2-3   empty stages of the instruction path; I/O predictor (PRD0, PRD1);
//         AOM offset add; BTM condition and cancel
//   4     A', B' address the data memories (RD0); commit = valid & IOR & !C
//   5     data memory output register (RD1); BTM OR-reducers
//   6-7   controller (CTL0, CTL1): next PC written for the thread's next turn
//   6-9   ALU (ALU0..ALU3)
//   10    result R presented at D' to A, B, I and the configuration space;
//         I and configuration are written here, A and B register it (WR0)
//         and write their block RAM in stage 11 (WR1), so the data path is
//         2 read + 4 compute + 2 write stages; stage 10 is stage 2 of the
//         same thread's next instruction, where the BTM reads R to evaluate
//         branch conditions, and stage 11 is before that instruction's
//         operand read in stage 4 (cycle c+12)
// An instruction whose I/O ports are not ready (IOR low) is annulled and
// re-issued on the thread's next turn. A write into instruction memory is
// seen by the same thread's instruction after next (fetch happens in stage
// 0 of cycle c+8, the write in cycle c+10). The same holds for
// configuration writes to the thread's AOM and BTM entries.
//
// Interfaces:
//   run_i          threads issue while high; low slots drain as no-ops
//   ext_*          load port for program, data and configuration before run_i
//                  rises; uses the D address map of octavo_pkg (this port is
//                  this design's addition, for loading and testing)
//   io_in_*, io_out_*   memory-mapped I/O ports of memories A and B; the
//                  empty/full flags feed the I/O predictor
//   wb_*           the write-back bus (stage 10), brought out for observation
// The pipeline organisation, the AOM/BTM/PRD blocks and their connections
// follow the published reduced-overhead Octavo; widths, the address map and
// the port handshake are choices of this design, listed in octavo_pkg.
// Lint notes: the A and B fields of the stage-6 instruction copy are unused
// (only the opcode and the D field, the jump target, are needed there), and
// the stage-3 output of the I/O predictor is unused because the top consumes
// its stage-4 output; both are kept for observation and stage alignment.
module octavo_ro
  import octavo_pkg::*;
#(
  parameter int unsigned POINTERS    = 4,
  parameter int unsigned BTM_ENTRIES = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  run_i,
  // load port
  input  logic                  ext_we_i,
  input  logic [TID_W-1:0]      ext_tid_i,
  input  logic [D_W-1:0]        ext_addr_i,
  input  logic [WORD_W-1:0]     ext_data_i,
  // I/O ports: index p = port p of memory A, IO_PORTS + p = port p of memory B
  input  logic [WORD_W-1:0]     io_in_data_i  [2*IO_PORTS],
  input  logic [2*IO_PORTS-1:0] io_in_empty_i,
  output logic [2*IO_PORTS-1:0] io_in_pop_o,
  output logic [WORD_W-1:0]     io_out_data_o [2*IO_PORTS],
  output logic [2*IO_PORTS-1:0] io_out_valid_o,
  input  logic [2*IO_PORTS-1:0] io_out_full_i,
  // write-back observation
  output logic                  wb_valid_o,
  output logic [TID_W-1:0]      wb_tid_o,
  output logic [D_W-1:0]        wb_addr_o,
  output logic [WORD_W-1:0]     wb_data_o
);
  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] tid;
    logic [PC_W-1:0]  pc;
  } meta_t;

  typedef struct packed {
    logic           commit;
    logic           ior;
    logic           cancel;
    logic [D_W-1:0] dp;
  } exec_t;

  // ---------------------------------------------------------------- stage 0
  logic [TID_W-1:0] tid0;
  logic [PC_W-1:0]  pc0;
  meta_t            meta0, meta1, meta4, meta6;

  always_ff @(posedge clk) begin
    if (rst) tid0 <= '0;
    else     tid0 <= tid0 + 1'b1;
  end

  assign meta0 = '{valid: run_i, tid: tid0, pc: pc0};

  pipe_delay #(.WIDTH($bits(meta_t)), .DEPTH(1)) u_meta01 (.clk, .rst, .d_i(meta0), .q_o(meta1));
  pipe_delay #(.WIDTH($bits(meta_t)), .DEPTH(3)) u_meta14 (.clk, .rst, .d_i(meta1), .q_o(meta4));
  pipe_delay #(.WIDTH($bits(meta_t)), .DEPTH(2)) u_meta46 (.clk, .rst, .d_i(meta4), .q_o(meta6));

  // write-back bus (stage 10)
  logic              alu_wr;
  logic [D_W-1:0]    alu_d;
  logic [WORD_W-1:0] alu_r;
  logic [TID_W-1:0]  tid10;
  logic              wr_en;
  logic [D_W-1:0]    wr_addr;
  logic [WORD_W-1:0] wr_data;
  logic [TID_W-1:0]  wr_tid;
  region_e           wr_region;
  cfg_wr_t           cfg;

  always_comb begin
    if (ext_we_i) begin
      wr_en = 1'b1; wr_addr = ext_addr_i; wr_data = ext_data_i; wr_tid = ext_tid_i;
    end else begin
      wr_en = alu_wr; wr_addr = alu_d; wr_data = alu_r; wr_tid = tid10;
    end
    wr_region = region_e'(wr_addr[D_W-1:MEM_AW]);
    cfg = '{we: wr_en && (wr_region == REG_CFG), tid: wr_tid,
            addr: wr_addr[MEM_AW-1:0], data: wr_data};
  end

  assign wb_valid_o = alu_wr;
  assign wb_tid_o   = tid10;
  assign wb_addr_o  = alu_d;
  assign wb_data_o  = alu_r;

  // instruction memory: read stage 0, word in stage 1
  logic [WORD_W-1:0] iword1;
  instr_t            ins1, ins2, ins6;

  instr_mem #(.WIDTH(WORD_W), .DEPTH(2**PC_W)) u_imem (
    .clk,
    .rd_addr_i (pc0),
    .rd_data_o (iword1),
    .wr_en_i   (wr_en && (wr_region == REG_I)),
    .wr_addr_i (wr_addr[PC_W-1:0]),
    .wr_data_i (wr_data)
  );

  assign ins1 = instr_t'(iword1);

  // empty stages of the instruction path
  pipe_delay #(.WIDTH($bits(instr_t)), .DEPTH(1)) u_ins12 (.clk, .rst, .d_i(ins1), .q_o(ins2));
  pipe_delay #(.WIDTH($bits(instr_t)), .DEPTH(4)) u_ins26 (.clk, .rst, .d_i(ins2), .q_o(ins6));

  // ---------------------------------------------------------------- controller
  logic              btm_j, btm_ior, cancel4;
  logic [PC_W-1:0]   btm_bd;
  logic [WORD_W-1:0] a_data6, b_data6;
  exec_t             ex4, ex6;

  controller #(.N_THREADS(THREADS), .PCW(PC_W)) u_ctl (
    .clk, .rst,
    .tid0_i   (tid0),
    .pc0_o    (pc0),
    .valid_i  (meta6.valid),
    .tid_i    (meta6.tid),
    .pc_i     (meta6.pc),
    .op_i     (ins6.op),
    .target_i (ins6.d[PC_W-1:0]),
    .a_i      (a_data6),
    .ior_i    (ex6.ior),
    .cancel_i (ex6.cancel),
    .btm_j_i  (btm_j),
    .btm_bd_i (btm_bd)
  );

  // ---------------------------------------------------------------- BTM
  logic ior3, ior4;

  btm #(.N_THREADS(THREADS), .ENTRIES(BTM_ENTRIES), .PCW(PC_W)) u_btm (
    .clk, .rst,
    .tid0_i    (tid0),
    .pc0_i     (pc0),
    .r_valid_i (alu_wr),
    .r_i       (alu_r),
    .ior_i     (ior4),
    .cancel_o  (cancel4),
    .j_o       (btm_j),
    .bd_o      (btm_bd),
    .ior_o     (btm_ior),
    .cfg_i     (cfg)
  );

  // ---------------------------------------------------------------- I/O predictor
  io_predictor u_prd (
    .clk, .rst,
    .d_i        (ins2.d),
    .a_i        (ins2.a),
    .b_i        (ins2.b),
    .in_empty_i (io_in_empty_i),
    .out_full_i (io_out_full_i),
    .ior_s3_o   (ior3),
    .ior_s4_o   (ior4)
  );

  // ---------------------------------------------------------------- AOMs
  logic [MEM_AW-1:0] a_addr4, b_addr4;
  logic [D_W-1:0]    d_addr4;
  logic              commit4;

  assign commit4 = meta4.valid && ior4 && !cancel4;

  aom #(.N_THREADS(THREADS), .POINTERS(POINTERS), .AW(MEM_AW), .OPERAND(0), .OFFSET_REGIONS(1)) u_aom_a (
    .clk, .rst, .tid_i(meta1.tid), .addr_i(ins1.a), .addr_o(a_addr4), .commit_i(commit4), .cfg_i(cfg));
  aom #(.N_THREADS(THREADS), .POINTERS(POINTERS), .AW(MEM_AW), .OPERAND(1), .OFFSET_REGIONS(1)) u_aom_b (
    .clk, .rst, .tid_i(meta1.tid), .addr_i(ins1.b), .addr_o(b_addr4), .commit_i(commit4), .cfg_i(cfg));
  aom #(.N_THREADS(THREADS), .POINTERS(POINTERS), .AW(D_W), .OPERAND(2), .OFFSET_REGIONS(2)) u_aom_d (
    .clk, .rst, .tid_i(meta1.tid), .addr_i(ins1.d), .addr_o(d_addr4), .commit_i(commit4), .cfg_i(cfg));

  assign ex4 = '{commit: commit4, ior: ior4, cancel: cancel4, dp: d_addr4};
  pipe_delay #(.WIDTH($bits(exec_t)), .DEPTH(2)) u_ex46 (.clk, .rst, .d_i(ex4), .q_o(ex6));

  // ---------------------------------------------------------------- data memories
  data_mem #(.WIDTH(WORD_W), .DEPTH(2**MEM_AW)) u_amem (
    .clk, .rst,
    .rd_en_i        (commit4),
    .rd_addr_i      (a_addr4),
    .rd_data_o      (a_data6),
    .wr_en_i        (wr_en && (wr_region == REG_A)),
    .wr_addr_i      (wr_addr[MEM_AW-1:0]),
    .wr_data_i      (wr_data),
    .io_in_data_i   (io_in_data_i[0:IO_PORTS-1]),
    .io_in_pop_o    (io_in_pop_o[IO_PORTS-1:0]),
    .io_out_data_o  (io_out_data_o[0:IO_PORTS-1]),
    .io_out_valid_o (io_out_valid_o[IO_PORTS-1:0])
  );

  data_mem #(.WIDTH(WORD_W), .DEPTH(2**MEM_AW)) u_bmem (
    .clk, .rst,
    .rd_en_i        (commit4),
    .rd_addr_i      (b_addr4),
    .rd_data_o      (b_data6),
    .wr_en_i        (wr_en && (wr_region == REG_B)),
    .wr_addr_i      (wr_addr[MEM_AW-1:0]),
    .wr_data_i      (wr_data),
    .io_in_data_i   (io_in_data_i[IO_PORTS:2*IO_PORTS-1]),
    .io_in_pop_o    (io_in_pop_o[2*IO_PORTS-1:IO_PORTS]),
    .io_out_data_o  (io_out_data_o[IO_PORTS:2*IO_PORTS-1]),
    .io_out_valid_o (io_out_valid_o[2*IO_PORTS-1:IO_PORTS])
  );

  // ---------------------------------------------------------------- ALU
  alu #(.WIDTH(WORD_W), .DW(D_W)) u_alu (
    .clk, .rst,
    .op_i (ins6.op),
    .a_i  (a_data6),
    .b_i  (b_data6),
    .d_i  (ex6.dp),
    .wr_i (ex6.commit),
    .r_o  (alu_r),
    .d_o  (alu_d),
    .wr_o (alu_wr)
  );

  pipe_delay #(.WIDTH(TID_W), .DEPTH(4)) u_tid610 (.clk, .rst, .d_i(meta6.tid), .q_o(tid10));

  // BTM's copy of IOR must equal the predictor's, two stages later
  logic ior6_chk;
  assign ior6_chk = ex6.ior;
  always_ff @(posedge clk) begin
    if (!rst && meta6.valid) assert (btm_ior == ior6_chk)
      else $error("BTM IOR' out of step with the I/O predictor");
  end
endmodule
