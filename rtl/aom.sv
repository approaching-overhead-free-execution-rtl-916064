// Address Offset Module (AOM): per-thread operand address translation,
// pipeline stages 1 to 3, one instance per instruction operand (A, B, D).
//
// The AOM removes addressing overhead from the instruction stream. Each
// thread owns, per operand:
//   DO          a default offset, added to every private address, so that all
//               threads can run the same code on separate data;
//   PO[p],PI[p] POINTERS programmed offsets and increments. An operand that
//               names indirect slot p (address IND_BASE + p) is redirected to
//               slot address + PO[p], and PO[p] is then advanced by PI[p]:
//               indirect addressing with post-increment, done in hardware.
// Shared addresses (offset below SHARED_WORDS, which includes the I/O ports)
// and, for D, the instruction-memory and configuration regions are passed
// unchanged (the SM? test); indirect slots (the IM? test) take PO. The
// offset is added to the 10-bit offset inside a memory; region bits of D
// are kept.
//
// Timing: tid_i and addr_i (the raw field) enter in stage 1; addr_o (A', B'
// or D') is registered at the end of stage 3 and used in stage 4. The
// post-increment is held one more cycle and written back at the end of stage
// 4 only if commit_i (stage 4: instruction neither annulled nor cancelled)
// is high, so a retried instruction does not advance its pointer twice.
// The thread's next use of the pointer is four cycles later, so no hazard.
//
// Configuration: cfg_i writes DO, PO[p] and PI[p] of thread cfg_i.tid at the
// configuration-space offsets OPERAND*32 + p, OPERAND*32 + 8 + p and
// OPERAND*32 + 16 (this layout is this design's choice). A configuration
// write wins over a post-increment of the same entry in the same cycle.
// The entry set (DO, PO, PI), the SM?/IM? tests, the two adders and their
// stages follow the published AOM, the selection logic between them is this
// design's reading; the stage in which the increment is written back is
// moved one cycle later here so that it can be gated by commit_i.
module aom
  import octavo_pkg::*;
#(
  parameter int unsigned N_THREADS      = THREADS,
  parameter int unsigned POINTERS       = 4,
  parameter int unsigned AW             = MEM_AW,
  parameter int unsigned OPERAND        = 0,
  parameter int unsigned OFFSET_REGIONS = 1,
  localparam int unsigned TW            = $clog2(N_THREADS),
  localparam int unsigned SW            = (POINTERS > 1) ? $clog2(POINTERS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [TW-1:0] tid_i,
  input  logic [AW-1:0] addr_i,
  output logic [AW-1:0] addr_o,
  input  logic          commit_i,
  input  cfg_wr_t       cfg_i
);
  typedef logic [MEM_AW-1:0] off_t;

  // The configuration layout leaves room for MAX_PTRS pointers per operand.
  if (POINTERS < 1 || POINTERS > MAX_PTRS) begin : g_bad_pointers
    $error("aom: POINTERS must be 1..%0d", MAX_PTRS);
  end

  off_t po_mem [N_THREADS][POINTERS];
  off_t pi_mem [N_THREADS][POINTERS];
  off_t do_mem [N_THREADS];

  // stage 1 registers
  off_t          po1 [POINTERS];
  off_t          pi1 [POINTERS];
  off_t          do1;
  logic [AW-1:0] addr1;
  logic [TW-1:0] tid1;

  // stage 2 registers
  off_t          po2, pi2, dflt2;
  logic          im2;
  logic [SW-1:0] slot2;
  logic [AW-1:0] addr2;
  logic [TW-1:0] tid2;

  // stage 3 registers (write-back)
  off_t          po3;
  logic          im3;
  logic [SW-1:0] slot3;
  logic [TW-1:0] tid3;

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(POINTERS); p++) begin
      po1[p] <= po_mem[tid_i][p];
      pi1[p] <= pi_mem[tid_i][p];
    end
    do1   <= do_mem[tid_i];
    addr1 <= addr_i;
    tid1  <= tid_i;
  end

  // SM? and IM?, pointer selection
  logic          sm, im;
  logic [SW-1:0] slot;
  off_t          low1;
  int unsigned   region1;

  always_comb begin
    low1    = addr1[MEM_AW-1:0];
    region1 = int'(addr1) >> MEM_AW;
    sm   = (low1 < off_t'(SHARED_WORDS)) || (region1 >= OFFSET_REGIONS);
    im   = (region1 < OFFSET_REGIONS) && (low1 >= off_t'(IND_BASE)) &&
           (low1 < off_t'(IND_BASE + POINTERS));
    slot = SW'(low1 - off_t'(IND_BASE));
  end

  always_ff @(posedge clk) begin
    po2   <= po1[slot];
    pi2   <= pi1[slot];
    dflt2 <= sm ? '0 : do1;
    im2   <= im;
    slot2 <= slot;
    addr2 <= addr1;
    tid2  <= tid1;
  end

  // offset add and pointer increment
  off_t sel_off;
  assign sel_off = im2 ? po2 : dflt2;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_o <= '0;
      im3    <= 1'b0;
    end else begin
      addr_o <= (addr2 & ~AW'(2**MEM_AW - 1)) | AW'(off_t'(addr2[MEM_AW-1:0] + sel_off));
      im3    <= im2;
    end
    po3   <= po2 + pi2;
    slot3 <= slot2;
    tid3  <= tid2;
  end

  // table writes: configuration, then committed post-increment
  logic          cfg_hit;
  int unsigned   cfg_rel;
  always_comb begin
    cfg_rel = int'(cfg_i.addr) - int'(OPERAND * 32);
    cfg_hit = cfg_i.we && (int'(cfg_i.addr) >= int'(OPERAND * 32)) && (cfg_rel <= 2 * MAX_PTRS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(N_THREADS); t++) begin
        do_mem[t] <= '0;
        for (int p = 0; p < int'(POINTERS); p++) begin
          po_mem[t][p] <= '0;
          pi_mem[t][p] <= '0;
        end
      end
    end else begin
      if (im3 && commit_i) po_mem[tid3][slot3] <= po3;
      if (cfg_hit) begin
        if (cfg_rel < POINTERS)
          po_mem[cfg_i.tid][SW'(cfg_rel)] <= off_t'(cfg_i.data);
        else if (cfg_rel >= MAX_PTRS && cfg_rel < MAX_PTRS + POINTERS)
          pi_mem[cfg_i.tid][SW'(cfg_rel - MAX_PTRS)] <= off_t'(cfg_i.data);
        else if (cfg_rel == 2 * MAX_PTRS)
          do_mem[cfg_i.tid] <= off_t'(cfg_i.data);
      end
    end
  end
endmodule
