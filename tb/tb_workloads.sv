// Benchmark-kernel testbench for octavo_ro at its default parameters.
//
// Runs four small kernels at once, two threads each, every one in its
// reduced-overhead form: the loop body holds only useful instructions,
// array walking is done by AOM pointers with post-increment and all loop
// and exit control by folded BTM branches. Each array ends with a negative
// sentinel; a BTM entry that tests for "negative" leaves the loop and
// cancels the instruction at its origin.
//   threads 0,1  Increment  out[i] = in[i] + 1          body: 1 instruction
//   threads 2,3  Reverse    out[N-1-i] = in[i]          body: 1 instruction
//                           (write pointer steps by -1, i.e. 1023 mod 1024)
//   threads 4,5  FIR        y[n] = sum h[k] x[n-k], 4 taps, delay line in
//                           private words              body: 12 instructions
//   threads 6,7  FSM        falling-edge detector over a 0/1 stream; the
//                           state is the code position, each state's
//                           three-way branch (0, 1, end) is folded into the
//                           state's output instruction  body: 2 per symbol
// Every thread starts at PC 0, where a folded branch sends it to its
// kernel; the kernel writes its own pointers through configuration space,
// then loops, and finally parks at a halt instruction that branches to
// itself.
//
// Checked against reference models: every output word, that nothing is
// written past the outputs, and the time between consecutive outputs of a
// thread, which must be exactly the loop body length in thread turns (8
// cycles each): the loops run with no addressing or branching overhead.
// Array sizes and data are this testbench's own choices.
module tb_workloads;
  import octavo_pkg::*;

  localparam int CFG = 3 << 10;
  localparam int BREG = 1 << 10;
  localparam int IREG = 2 << 10;
  // shared words: A[0] = 0, A[1] = 1, B[0] = 0, B[1] = 1
  localparam int ZERO_A = 0, ONE_A = 1, ZERO_B = 0, ONE_B = 1;
  // private words (raw addresses, offset by DO = 100*t)
  localparam int SCRATCH = 64, SRC_INIT = 65, DST_INIT = 66;
  localparam int X0 = 67, X1 = 68, X2 = 69, X3 = 70, ACC = 71, DONE = 72;
  localparam int H0 = 64, P = 68, BSYM = 69;            // in memory B
  // arrays (absolute addresses in memory A)
  localparam int SRC_OFS = 80, DST_OFS = 110;
  // code
  localparam int K_INC = 100, K_REV = 120, K_FIR = 140, K_FSM = 170;
  localparam int PERIOD [4] = '{8, 8, 96, 16};
  localparam int WATCHDOG = 20000;

  logic clk = 0, rst = 1, run = 0;
  logic ext_we = 0;
  logic [2:0] ext_tid = '0;
  logic [11:0] ext_addr = '0;
  logic [35:0] ext_data = '0;
  logic [35:0] in_data [4];
  logic [3:0] in_pop, out_valid;
  logic [35:0] out_data [4];
  logic wb_valid;
  logic [2:0] wb_tid;
  logic [11:0] wb_addr;
  logic [35:0] wb_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_comb for (int p = 0; p < 4; p++) in_data[p] = '0;

  octavo_ro dut (
    .clk, .rst, .run_i(run),
    .ext_we_i(ext_we), .ext_tid_i(ext_tid), .ext_addr_i(ext_addr), .ext_data_i(ext_data),
    .io_in_data_i(in_data), .io_in_empty_i(4'b1111), .io_in_pop_o(in_pop),
    .io_out_data_o(out_data), .io_out_valid_o(out_valid), .io_out_full_i(4'b0000),
    .wb_valid_o(wb_valid), .wb_tid_o(wb_tid), .wb_addr_o(wb_addr), .wb_data_o(wb_data)
  );

  function automatic logic [35:0] ins(opcode_e op, int d, int a, int b);
    return {op, 12'(d), 10'(a), 10'(b)};
  endfunction

  task automatic load(int t, int addr, logic [35:0] v);
    @(negedge clk);
    ext_we = 1; ext_tid = 3'(t); ext_addr = 12'(addr); ext_data = v;
    @(negedge clk);
    ext_we = 0;
  endtask

  // BTM entry e of thread t: fire at PC bo, go to bd when cond holds
  task automatic branch(int t, int e, int bo, int bd, bcond_e c, bit bpe);
    load(t, CFG + BTM_BASE + 4 * e + 0, 36'(bo));
    load(t, CFG + BTM_BASE + 4 * e + 1, 36'(bd));
    load(t, CFG + BTM_BASE + 4 * e + 2, 36'({c, bpe, 1'b0}));
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- models
  int          n [8];
  logic [35:0] src [8][17];
  logic [35:0] h [8][4];
  logic [35:0] expect_out [8][16];
  logic [35:0] written [int];     // region-A words written by the program
  int          n_wr [int];
  int          n_out [8], n_done [8];
  longint      last_out [8];
  int          gap_bad [8];
  longint      cyc = 0;
  int          n_fold = 0, n_cancel = 0, n_pinc = 0, n_cfg = 0, n_fsm0 = 0, n_fsm1 = 0;

  function automatic int kernel(int t);
    return t / 2;
  endfunction

  function automatic int dst_lo(int t);
    return 100 * t + DST_OFS;
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (dut.meta6.valid && dut.btm_j) n_fold++;
      if (dut.meta4.valid && dut.ior4 && dut.cancel4) n_cancel++;
      if (dut.u_aom_a.im3 && dut.commit4) n_pinc++;
      if (dut.cfg.we && !ext_we) n_cfg++;
      if (dut.meta6.valid && dut.btm_j && dut.meta6.pc == 10'(K_FSM + 4)) begin
        if (dut.btm_bd == 10'(K_FSM + 3)) n_fsm0++;
        if (dut.btm_bd == 10'(K_FSM + 5)) n_fsm1++;
      end
      if (wb_valid && wb_addr[11:10] == 2'd0) begin
        int a, t;
        a = int'(wb_addr);
        t = int'(wb_tid);
        written[a] = wb_data;
        n_wr[a] = n_wr.exists(a) ? n_wr[a] + 1 : 1;
        if (a == 100 * t + DONE) n_done[t]++;
        if (a >= dst_lo(t) - 1 && a <= dst_lo(t) + 16) begin
          if (n_out[t] > 0 && cyc - last_out[t] != longint'(PERIOD[kernel(t)])) gap_bad[t]++;
          last_out[t] = cyc;
          n_out[t]++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    int k;
    logic state;
    for (int t = 0; t < 8; t++) begin n_out[t] = 0; n_done[t] = 0; gap_bad[t] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;

    // PC 0: a harmless instruction; a folded branch sends each thread to its kernel
    load(0, IREG + 0, ins(OP_ADD, SCRATCH, ZERO_A, ZERO_B));
    // common kernel prologue at K: set read and write pointers, one spacer
    for (int kk = 0; kk < 4; kk++) begin
      int base;
      base = (kk == 0) ? K_INC : (kk == 1) ? K_REV : (kk == 2) ? K_FIR : K_FSM;
      load(0, IREG + base + 0, ins(OP_ADD, CFG + 0, SRC_INIT, ZERO_B));
      load(0, IREG + base + 1, ins(OP_ADD, CFG + 64, DST_INIT, ZERO_B));
      load(0, IREG + base + 2, ins(OP_ADD, SCRATCH, ZERO_A, ZERO_B));
    end
    // Increment
    load(0, IREG + K_INC + 3, ins(OP_ADD, IND_BASE, IND_BASE, ONE_B));
    load(0, IREG + K_INC + 4, ins(OP_ADD, DONE, ONE_A, ZERO_B));
    // Reverse
    load(0, IREG + K_REV + 3, ins(OP_ADD, IND_BASE, IND_BASE, ZERO_B));
    load(0, IREG + K_REV + 4, ins(OP_ADD, DONE, ONE_A, ZERO_B));
    // FIR
    load(0, IREG + K_FIR + 3,  ins(OP_ADD, X3, X2, ZERO_B));
    load(0, IREG + K_FIR + 4,  ins(OP_ADD, X2, X1, ZERO_B));
    load(0, IREG + K_FIR + 5,  ins(OP_ADD, X1, X0, ZERO_B));
    load(0, IREG + K_FIR + 6,  ins(OP_ADD, X0, IND_BASE, ZERO_B));
    load(0, IREG + K_FIR + 7,  ins(OP_MLS, ACC, X0, H0));
    load(0, IREG + K_FIR + 8,  ins(OP_MLS, BREG + P, X1, H0 + 1));
    load(0, IREG + K_FIR + 9,  ins(OP_ADD, ACC, ACC, P));
    load(0, IREG + K_FIR + 10, ins(OP_MLS, BREG + P, X2, H0 + 2));
    load(0, IREG + K_FIR + 11, ins(OP_ADD, ACC, ACC, P));
    load(0, IREG + K_FIR + 12, ins(OP_MLS, BREG + P, X3, H0 + 3));
    load(0, IREG + K_FIR + 13, ins(OP_ADD, ACC, ACC, P));
    load(0, IREG + K_FIR + 14, ins(OP_ADD, IND_BASE, ACC, ZERO_B));
    load(0, IREG + K_FIR + 15, ins(OP_ADD, DONE, ONE_A, ZERO_B));
    // FSM: state A at K+3/K+4, state B at K+5/K+6, halt at K+7
    load(0, IREG + K_FSM + 3, ins(OP_ADD, BREG + BSYM, IND_BASE, ZERO_B));
    load(0, IREG + K_FSM + 4, ins(OP_ADD, IND_BASE, ZERO_A, ZERO_B));
    load(0, IREG + K_FSM + 5, ins(OP_ADD, BREG + BSYM, IND_BASE, ZERO_B));
    load(0, IREG + K_FSM + 6, ins(OP_SUB, IND_BASE, ONE_A, BSYM));
    load(0, IREG + K_FSM + 7, ins(OP_ADD, DONE, ONE_A, ZERO_B));

    // shared constants
    load(0, ZERO_A, '0);
    load(0, ONE_A, 36'd1);
    load(0, BREG + ZERO_B, '0);
    load(0, BREG + ONE_B, 36'd1);

    for (int t = 0; t < 8; t++) begin
      int so, dl;
      k = kernel(t);
      so = 100 * t + SRC_OFS;
      dl = dst_lo(t);
      n[t] = $urandom_range(10, 16);
      for (int d = 0; d < 3; d++) load(t, CFG + 32 * d + 16, 36'(100 * t));
      load(t, SRC_INIT + 100 * t, 36'(so - int'(IND_BASE)));
      load(t, CFG + 8, 36'd1);
      // input data and sentinel
      for (int i = 0; i < n[t]; i++) begin
        case (k)
          3:       src[t][i] = 36'($urandom_range(1));
          default: src[t][i] = 36'($urandom_range(500));
        endcase
        load(t, so + i, src[t][i]);
      end
      src[t][n[t]] = (k == 0 || k == 3) ? -36'sd2 : -36'sd1;
      load(t, so + n[t], src[t][n[t]]);
      // write pointer, its step and the reference outputs
      if (k == 1) begin
        load(t, DST_INIT + 100 * t, 36'(dl + n[t] - 1 - int'(IND_BASE)));
        load(t, CFG + 64 + 8, 36'd1023);
      end else begin
        load(t, DST_INIT + 100 * t, 36'(dl - int'(IND_BASE)));
        load(t, CFG + 64 + 8, 36'd1);
      end
      state = 1'b0;
      for (int i = 0; i < n[t]; i++) begin
        case (k)
          0: expect_out[t][i] = src[t][i] + 36'd1;
          1: expect_out[t][n[t] - 1 - i] = src[t][i];
          2: begin
               expect_out[t][i] = '0;
               for (int j = 0; j < 4; j++)
                 if (i - j >= 0) expect_out[t][i] += src[t][i - j] * h[t][j];
             end
          default: begin
               expect_out[t][i] = (state && src[t][i] == 0) ? 36'd1 : 36'd0;
               state = src[t][i][0];
             end
        endcase
      end
      // BTM: entry 0 sends the thread from PC 0 to its kernel
      case (k)
        0: begin
             branch(t, 0, 0, K_INC, BC_ALWAYS, 0);
             branch(t, 1, K_INC + 3, K_INC + 3, BC_POS, 0);
             branch(t, 2, K_INC + 3, K_INC + 4, BC_NEG, 1);
             branch(t, 3, K_INC + 4, K_INC + 4, BC_ALWAYS, 0);
           end
        1: begin
             branch(t, 0, 0, K_REV, BC_ALWAYS, 0);
             branch(t, 1, K_REV + 3, K_REV + 3, BC_POS, 0);
             branch(t, 2, K_REV + 3, K_REV + 4, BC_NEG, 1);
             branch(t, 3, K_REV + 4, K_REV + 4, BC_ALWAYS, 0);
           end
        2: begin
             branch(t, 0, 0, K_FIR, BC_ALWAYS, 0);
             branch(t, 1, K_FIR + 7, K_FIR + 15, BC_NEG, 1);
             branch(t, 2, K_FIR + 14, K_FIR + 3, BC_ALWAYS, 0);
             branch(t, 3, K_FIR + 15, K_FIR + 15, BC_ALWAYS, 0);
             for (int j = 0; j < 4; j++) load(t, BREG + H0 + j + 100 * t, h[t][j]);
             for (int j = X0; j <= X3; j++) load(t, j + 100 * t, '0);
           end
        default: begin
             branch(t, 0, 0, K_FSM, BC_ALWAYS, 0);
             for (int s = 0; s < 2; s++) begin
               branch(t, 1 + 3 * s, K_FSM + 4 + 2 * s, K_FSM + 3, BC_ZERO, 0);
               branch(t, 2 + 3 * s, K_FSM + 4 + 2 * s, K_FSM + 5, BC_ODD, 0);
               branch(t, 3 + 3 * s, K_FSM + 4 + 2 * s, K_FSM + 7, BC_NEG, 1);
             end
             branch(t, 7, K_FSM + 7, K_FSM + 7, BC_ALWAYS, 0);
           end
      endcase
    end

    while (cyc % 8 != 7) @(negedge clk);
    run = 1;
    // run until every thread has reached its halt loop, then a while longer
    while (!(n_done[0] > 0 && n_done[1] > 0 && n_done[2] > 0 && n_done[3] > 0 &&
             n_done[4] > 0 && n_done[5] > 0 && n_done[6] > 0 && n_done[7] > 0))
      @(negedge clk);
    repeat (400) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);

    for (int t = 0; t < 8; t++) begin
      int dl, extra;
      k = kernel(t);
      dl = dst_lo(t);
      for (int i = 0; i < n[t]; i++) begin
        checks++;
        if (!written.exists(dl + i) || written[dl + i] != expect_out[t][i] || n_wr[dl + i] != 1) begin
          failures++;
          $display("FAIL kernel %0d thread %0d out[%0d]: got %0d expected %0d", k, t, i,
                   written.exists(dl + i) ? written[dl + i] : 36'hbad, expect_out[t][i]);
        end
      end
      // the sentinel passes through Increment (as -1) and Reverse; nothing else lands outside
      extra = (k == 0 || k == 1) ? 1 : 0;
      check(n_out[t] == n[t] + extra, $sformatf("thread %0d output count %0d", t, n_out[t]));
      if (k == 0) check(written.exists(dl + n[t]) && written[dl + n[t]] == '1, "increment sentinel");
      if (k == 1) check(written.exists(dl - 1) && written[dl - 1] == '1, "reverse sentinel");
      check(gap_bad[t] == 0, $sformatf("thread %0d outputs every %0d cycles", t, PERIOD[k]));
    end
    $display("folded=%0d cancel=%0d postinc_a=%0d cfg_writes=%0d fsm_to_A=%0d fsm_to_B=%0d",
             n_fold, n_cancel, n_pinc, n_cfg, n_fsm0, n_fsm1);
    check(n_fold > 0, "folded branches happened");
    check(n_cancel == 8, "each thread cancelled once, at its loop exit");
    check(n_pinc > 0, "pointer post-increments happened");
    check(n_cfg > 0, "program wrote configuration");
    check(n_fsm0 > 0 && n_fsm1 > 0, "both ways of the FSM branch taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIR taps: small signed values, drawn before the loads above use them
  initial begin
    for (int t = 0; t < 8; t++)
      for (int j = 0; j < 4; j++) h[t][j] = 36'($signed($urandom_range(100)) - 50);
  end
endmodule
