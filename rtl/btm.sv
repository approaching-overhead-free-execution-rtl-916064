// Branch Trigger Module (BTM): folded, cancelling, multi-way branches,
// pipeline stages 0 to 5.
//
// The BTM removes flow-control instructions from the program. Each thread
// owns ENTRIES branch entries; an entry holds
//   BO   branch origin: the PC at which the branch fires,
//   BD   branch destination,
//   BF   which condition of the thread's latest result to test (bcond_e),
//   BP   the predicted outcome, and BPE whether the prediction is used.
// Every cycle the PC of the fetched instruction is compared with BO of all
// the thread's entries in parallel. A matching entry whose condition holds
// fires: its destination becomes the thread's next PC (J, BD'), while the
// instruction at the origin still executes, so the branch costs no cycle
// (folded). With BPE set, the instruction at the origin is cancelled (C)
// when the outcome differs from BP: the instruction is then work for one
// path only. Several entries may share an origin and test different,
// mutually exclusive conditions (multi-way branch); their outputs are
// OR-reduced, so two entries firing at once give an OR of destinations.
//
// Timing (stage numbers of the processor pipeline):
//   0  PC and thread enter, the thread's entries are read
//   1  PC = BO comparison per entry
//   2  the condition flags of the thread's latest result R are formed; R of the
//      thread's previous instruction arrives in this stage (r_valid_i), else
//      the last result kept for the thread is used. BF selects a flag, which
//      is compared with BP
//   3  per entry: BD' = BD if matched and taken, C = BPE and matched and the
//      outcome differs from BP, J = matched and taken; C is OR-reduced over
//      the entries -> cancel_o (stage 4)
//   4  J and BD' are dropped if the instruction is annulled for I/O (ior_i)
//   5  OR-reducers -> j_o, bd_o, ior_o (used by the controller in stage 6)
// The entry fields, the PC = BO comparison, the outputs BD', C and J and
// the stage in which each appears follow the published BTM; the logic that
// combines them is this design's reading of folded, cancelling branches.
// The condition set, the per-thread copy of the latest result and the
// configuration layout (BTM_BASE + 4*e + {0: BO, 1: BD, 2: {BF, BPE, BP}})
// are this design's choices.
module btm
  import octavo_pkg::*;
#(
  parameter int unsigned N_THREADS = THREADS,
  parameter int unsigned ENTRIES   = 8,
  parameter int unsigned PCW       = PC_W,
  localparam int unsigned TW       = $clog2(N_THREADS)
) (
  input  logic              clk,
  input  logic              rst,
  // stage 0
  input  logic [TW-1:0]     tid0_i,
  input  logic [PCW-1:0]    pc0_i,
  // stage 2
  input  logic              r_valid_i,
  input  logic [WORD_W-1:0] r_i,
  // stage 4
  input  logic              ior_i,
  output logic              cancel_o,
  // stage 6
  output logic              j_o,
  output logic [PCW-1:0]    bd_o,
  output logic              ior_o,
  // configuration
  input  cfg_wr_t           cfg_i
);
  typedef struct packed {
    logic [PCW-1:0] bo;
    logic [PCW-1:0] bd;
    logic [2:0]     bf;
    logic           bpe;
    logic           bp;
  } entry_t;

  entry_t            tbl [N_THREADS][ENTRIES];
  logic [WORD_W-1:0] last_r [N_THREADS];

  // stage 0 -> 1
  entry_t         e1 [ENTRIES];
  logic [PCW-1:0] pc1;
  logic [TW-1:0]  tid1;
  // stage 1 -> 2
  logic [ENTRIES-1:0] match2, bpe2, bp2;
  logic [PCW-1:0]     bd2 [ENTRIES];
  logic [2:0]         bf2 [ENTRIES];
  logic [TW-1:0]      tid2;
  // stage 2 -> 3
  logic [ENTRIES-1:0] match3, bpe3, miss3, cond3;
  logic [PCW-1:0]     bdm3 [ENTRIES];
  // stage 3 -> 4
  logic [ENTRIES-1:0] j4;
  logic [PCW-1:0]     bd4 [ENTRIES];
  // stage 4 -> 5
  logic [ENTRIES-1:0] j5;
  logic [PCW-1:0]     bd5 [ENTRIES];
  logic               ior5;

  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++) e1[e] <= tbl[tid0_i][e];
    pc1  <= pc0_i;
    tid1 <= tid0_i;
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      match2[e] <= (pc1 == e1[e].bo);
      bd2[e]    <= e1[e].bd;
      bf2[e]    <= e1[e].bf;
      bpe2[e]   <= e1[e].bpe;
      bp2[e]    <= e1[e].bp;
    end
    tid2 <= tid1;
  end

  logic [7:0] flags2;
  assign flags2 = cond_flags(r_valid_i ? r_i : last_r[tid2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(N_THREADS); t++) last_r[t] <= '0;
    end else if (r_valid_i) begin
      last_r[tid2] <= r_i;
    end
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      cond3[e]  <= flags2[bf2[e]];
      miss3[e]  <= flags2[bf2[e]] ^ bp2[e];
      bdm3[e]   <= bd2[e] & {PCW{match2[e]}};
      match3[e] <= match2[e];
      bpe3[e]   <= bpe2[e];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cancel_o <= 1'b0;
      j4       <= '0;
    end else begin
      cancel_o <= |(bpe3 & match3 & miss3);
      j4       <= match3 & cond3;
    end
    for (int e = 0; e < int'(ENTRIES); e++) bd4[e] <= bdm3[e] & {PCW{cond3[e]}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      j5   <= '0;
      ior5 <= 1'b1;
    end else begin
      j5   <= j4 & {ENTRIES{ior_i}};
      ior5 <= ior_i;
    end
    for (int e = 0; e < int'(ENTRIES); e++) bd5[e] <= bd4[e] & {PCW{ior_i}};
  end

  // OR-reducers
  logic [PCW-1:0] bd_or;
  always_comb begin
    bd_or = '0;
    for (int e = 0; e < int'(ENTRIES); e++) bd_or |= bd5[e];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      j_o   <= 1'b0;
      bd_o  <= '0;
      ior_o <= 1'b1;
    end else begin
      j_o   <= |j5;
      bd_o  <= bd_or;
      ior_o <= ior5;
    end
  end

  // configuration writes
  int unsigned cfg_rel;
  logic        cfg_hit;
  always_comb begin
    cfg_rel = int'(cfg_i.addr) - BTM_BASE;
    cfg_hit = cfg_i.we && (int'(cfg_i.addr) >= int'(BTM_BASE)) && (cfg_rel < 4 * ENTRIES);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(N_THREADS); t++)
        for (int e = 0; e < int'(ENTRIES); e++)
          tbl[t][e] <= '{bo: '1, bd: '0, bf: BC_NEVER, bpe: 1'b0, bp: 1'b0};
    end else if (cfg_hit) begin
      unique case (cfg_rel % 4)
        0: tbl[cfg_i.tid][cfg_rel / 4].bo <= PCW'(cfg_i.data);
        1: tbl[cfg_i.tid][cfg_rel / 4].bd <= PCW'(cfg_i.data);
        2: {tbl[cfg_i.tid][cfg_rel / 4].bf, tbl[cfg_i.tid][cfg_rel / 4].bpe,
            tbl[cfg_i.tid][cfg_rel / 4].bp} <= cfg_i.data[4:0];
        default: ;
      endcase
    end
  end
endmodule
