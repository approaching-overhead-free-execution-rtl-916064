// End-to-end testbench for octavo_ro at its default parameters.
//
// Threads 0-6 run the Hailstone kernel in its reduced-overhead form: the
// loop body holds only useful work, while pointer stepping is done by
// AOM indirect slots with post-increment and all flow control by BTM
// entries (a two-way cancelling branch on the loaded value, two
// unconditional folded jumps):
//   0  ADD  cfg.PO_A[0], ptr_init, zero     ; restart: reset read pointer
//   1  ADD  cfg.PO_D[0], ptr_init, zero     ;          reset write pointer
//   2  ADD  temp, *A[0], zero               ; load seed, pointer += 1
//   3  MLS  temp, temp, three               ; BTM: even -> 5, negative -> 0,
//                                           ;      both cancel this MLS
//   4  ADD  temp, temp, one                 ; BTM: always -> 6
//   5  MHU  temp, temp, 2**35               ; temp / 2
//   6  ADD  *D[0], temp, zero               ; store back, pointer += 1
//   7  ADD  out_port_A0, temp, zero         ; BTM: always -> 2
// Each thread has its own default offset, so the same code uses private
// temp/ptr_init words and its own seed list, terminated by -1.
// Thread 7 has one more BTM entry, folded into PC 0, that sends it to an
// accumulator loop using the ordinary jump instruction:
//   32 ADD  acc, in_port_A0, acc
//   33 ADD  out_port_B1, zero, acc
//   34 JMP  32
// The input port is fed from a queue with random gaps and both output ports
// report "full" at random, so I/O stalls and retries happen throughout.
// Every output word is compared with a reference model of the two programs.
// Also checked: the write-back of each instruction happens 10 cycles after
// its issue slot, and a Hailstone step without stalls takes exactly five
// thread turns (40 cycles), i.e. the folded branches cost nothing.
// Each mechanism (I/O stall, cancel, folded branch, multi-way branch, own
// jump, pointer post-increment, configuration write, port pop) is counted
// and must occur.
module tb_octavo_ro;
  import octavo_pkg::*;

  localparam int unsigned CYCLES = 40000;
  localparam logic [35:0] NEG1 = '1;

  logic clk = 0, rst = 1, run = 0;
  logic ext_we = 0;
  logic [2:0] ext_tid = '0;
  logic [11:0] ext_addr = '0;
  logic [35:0] ext_data = '0;
  logic [35:0] in_data [4];
  logic [3:0] in_empty, in_pop, out_valid, out_full;
  logic [35:0] out_data [4];
  logic wb_valid;
  logic [2:0] wb_tid;
  logic [11:0] wb_addr;
  logic [35:0] wb_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  octavo_ro dut (
    .clk, .rst, .run_i(run),
    .ext_we_i(ext_we), .ext_tid_i(ext_tid), .ext_addr_i(ext_addr), .ext_data_i(ext_data),
    .io_in_data_i(in_data), .io_in_empty_i(in_empty), .io_in_pop_o(in_pop),
    .io_out_data_o(out_data), .io_out_valid_o(out_valid), .io_out_full_i(out_full),
    .wb_valid_o(wb_valid), .wb_tid_o(wb_tid), .wb_addr_o(wb_addr), .wb_data_o(wb_data)
  );

  // ---------------------------------------------------------------- helpers
  function automatic logic [35:0] ins(opcode_e op, int d, int a, int b);
    return {op, 12'(d), 10'(a), 10'(b)};
  endfunction

  localparam int CFG = 3 << 10;
  localparam int BREG = 1 << 10;
  localparam int IREG = 2 << 10;
  localparam int TEMP = 65, PINIT = 70, ACC = 100;
  localparam int ZERO_B = 0, THREE_B = 4, ONE_B = 5, HALF_B = 6;
  localparam int SEED_BASE = 800, SEED_STRIDE = 24, SEED_MAX = 12;

  task automatic load(int t, int addr, logic [35:0] v);
    @(negedge clk);
    ext_we = 1; ext_tid = 3'(t); ext_addr = 12'(addr); ext_data = v;
    @(negedge clk);
    ext_we = 0;
  endtask

  // ---------------------------------------------------------------- models
  logic [35:0] seeds [7][SEED_MAX];
  int          nseeds [7];
  int          idx [7];
  logic [35:0] acc_model;
  logic [35:0] in_q [$];
  logic [35:0] fed [$];

  function automatic logic [35:0] hail_next(int t);
    logic [35:0] v;
    if (idx[t] == nseeds[t]) idx[t] = 0;
    v = seeds[t][idx[t]];
    v = v[0] ? 36'(3) * v + 36'(1) : v >> 1;
    seeds[t][idx[t]] = v;
    idx[t]++;
    return v;
  endfunction

  // ---------------------------------------------------------------- counters
  int n_stall = 0, n_cancel = 0, n_fold = 0, n_own = 0, n_pinc_a = 0, n_pinc_d = 0;
  int n_cfg = 0, n_pop = 0, n_even = 0, n_neg = 0, n_out [8];
  longint last_out [8];
  int min_gap = 1 << 30, n_gap40 = 0;
  longint cyc = 0;

  initial begin
    repeat (CYCLES + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // I/O environment: input queue with gaps, random back-pressure
  always_comb begin
    in_empty = 4'b1111;
    for (int p = 0; p < 4; p++) in_data[p] = '0;
    in_empty[0] = (in_q.size() == 0);
    if (in_q.size() != 0) in_data[0] = in_q[0];
  end

  always @(posedge clk) begin
    if (rst) begin
      out_full <= '0;
    end else begin
      if (in_pop[0]) begin
        if (in_q.size() == 0) begin failures++; $display("FAIL pop of empty port"); end
        else void'(in_q.pop_front());
        n_pop++;
      end
      if (run && in_q.size() < 3 && $urandom_range(3) == 0) begin
        logic [35:0] v;
        v = 36'($urandom_range(1000));
        in_q.push_back(v);
        fed.push_back(v);
      end
      out_full <= {1'b0, 1'($urandom_range(3) == 0), 1'b0, 1'($urandom_range(3) == 0)};
    end
  end

  // observation and checking
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (dut.meta4.valid && !dut.ior4) n_stall++;
      if (dut.meta4.valid && dut.ior4 && dut.cancel4) n_cancel++;
      if (dut.meta6.valid && dut.btm_j) begin
        n_fold++;
        if (dut.meta6.pc == 10'd3 && dut.btm_bd == 10'd5) n_even++;
        if (dut.meta6.pc == 10'd3 && dut.btm_bd == 10'd0) n_neg++;
      end
      if (dut.u_ctl.s6_q.valid && dut.u_ctl.s6_q.ior && !dut.u_ctl.s6_q.btm_j &&
          dut.u_ctl.s6_q.own_jump) n_own++;
      if (dut.u_aom_a.im3 && dut.commit4) n_pinc_a++;
      if (dut.u_aom_d.im3 && dut.commit4) n_pinc_d++;
      if (dut.cfg.we && !ext_we) n_cfg++;
      if (wb_valid) begin
        // issue slot of thread t is every cycle with (cycle mod 8) = t;
        // write-back is 10 cycles after issue
        checks++;
        if (wb_tid != 3'(cyc - 10)) begin
          failures++; $display("FAIL write-back slot: tid %0d at cycle %0d", wb_tid, cyc);
        end
        if (wb_addr == 12'(IO_BASE)) begin
          int t;
          logic [35:0] e;
          t = int'(wb_tid);
          checks++;
          if (t == 7) begin failures++; $display("FAIL thread 7 wrote the Hailstone port"); end
          else begin
            e = hail_next(t);
            if (wb_data != e) begin
              failures++; $display("FAIL hailstone thread %0d: got %0d expected %0d", t, wb_data, e);
            end
            if (n_out[t] > 0 && int'(cyc - last_out[t]) < min_gap) min_gap = int'(cyc - last_out[t]);
            if (n_out[t] > 0 && cyc - last_out[t] == 40) n_gap40++;
          end
          last_out[t] = cyc;
          n_out[t]++;
        end else if (wb_addr == 12'(BREG + IO_BASE + 1)) begin
          checks++;
          if (fed.size() == 0) begin failures++; $display("FAIL accumulator output without input"); end
          else begin
            acc_model = acc_model + fed.pop_front();
            if (wb_data != acc_model || wb_tid != 3'd7) begin
              failures++; $display("FAIL accumulator: got %0d expected %0d", wb_data, acc_model);
            end
          end
          n_out[7]++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    for (int t = 0; t < 8; t++) begin n_out[t] = 0; last_out[t] = 0; end
    acc_model = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // program
    load(0, IREG + 0, ins(OP_ADD, CFG + 0,  PINIT, ZERO_B));
    load(0, IREG + 1, ins(OP_ADD, CFG + 64, PINIT, ZERO_B));
    load(0, IREG + 2, ins(OP_ADD, TEMP, IND_BASE, ZERO_B));
    load(0, IREG + 3, ins(OP_MLS, TEMP, TEMP, THREE_B));
    load(0, IREG + 4, ins(OP_ADD, TEMP, TEMP, ONE_B));
    load(0, IREG + 5, ins(OP_MHU, TEMP, TEMP, HALF_B));
    load(0, IREG + 6, ins(OP_ADD, IND_BASE, TEMP, ZERO_B));
    load(0, IREG + 7, ins(OP_ADD, IO_BASE, TEMP, ZERO_B));
    load(0, IREG + 32, ins(OP_ADD, BREG + ACC, IO_BASE, ACC));
    load(0, IREG + 33, ins(OP_ADD, BREG + IO_BASE + 1, 0, ACC));
    load(0, IREG + 34, ins(OP_JMP, 32, 0, 0));
    // shared constants
    load(0, 0, '0);
    load(0, BREG + ZERO_B, '0);
    load(0, BREG + THREE_B, 36'd3);
    load(0, BREG + ONE_B, 36'd1);
    load(0, BREG + HALF_B, 36'h800000000);
    for (int t = 0; t < 8; t++) begin
      // default offsets of A, B and D
      load(t, CFG + 16, 36'(t * 100));
      load(t, CFG + 48, 36'(t * 100));
      load(t, CFG + 80, 36'(t * 100));
      if (t < 7) begin
        // pointer increments
        load(t, CFG + 8, 36'd1);
        load(t, CFG + 64 + 8, 36'd1);
        // BTM entries
        load(t, CFG + BTM_BASE + 0, 36'd3);
        load(t, CFG + BTM_BASE + 1, 36'd5);
        load(t, CFG + BTM_BASE + 2, 36'({BC_EVEN, 1'b1, 1'b0}));
        load(t, CFG + BTM_BASE + 4, 36'd3);
        load(t, CFG + BTM_BASE + 5, 36'd0);
        load(t, CFG + BTM_BASE + 6, 36'({BC_NEG, 1'b1, 1'b0}));
        load(t, CFG + BTM_BASE + 8, 36'd4);
        load(t, CFG + BTM_BASE + 9, 36'd6);
        load(t, CFG + BTM_BASE + 10, 36'({BC_ALWAYS, 1'b0, 1'b0}));
        load(t, CFG + BTM_BASE + 12, 36'd7);
        load(t, CFG + BTM_BASE + 13, 36'd2);
        load(t, CFG + BTM_BASE + 14, 36'({BC_ALWAYS, 1'b0, 1'b0}));
        // private pointer start value and seed list
        load(t, PINIT + t * 100, 36'(SEED_BASE + t * SEED_STRIDE - IND_BASE));
        nseeds[t] = 3 + t;
        idx[t] = 0;
        for (int i = 0; i < nseeds[t]; i++) begin
          seeds[t][i] = 36'($urandom_range(1, 999));
          load(t, SEED_BASE + t * SEED_STRIDE + i, seeds[t][i]);
        end
        load(t, SEED_BASE + t * SEED_STRIDE + nseeds[t], NEG1);
      end else begin
        load(t, CFG + BTM_BASE + 0, 36'd0);
        load(t, CFG + BTM_BASE + 1, 36'd32);
        load(t, CFG + BTM_BASE + 2, 36'({BC_ALWAYS, 1'b0, 1'b0}));
        load(t, BREG + ACC + t * 100, '0);
        load(t, PINIT + t * 100, '0);
      end
    end
    // start issuing in thread 0's slot
    while (cyc % 8 != 7) @(negedge clk);
    run = 1;
    repeat (CYCLES) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);

    $display("outputs per thread: %0d %0d %0d %0d %0d %0d %0d %0d",
             n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], n_out[5], n_out[6], n_out[7]);
    $display("stall=%0d cancel=%0d folded=%0d even=%0d negative=%0d own_jump=%0d",
             n_stall, n_cancel, n_fold, n_even, n_neg, n_own);
    $display("postinc_a=%0d postinc_d=%0d cfg_writes=%0d pops=%0d min_gap=%0d gap40=%0d",
             n_pinc_a, n_pinc_d, n_cfg, n_pop, min_gap, n_gap40);
    for (int t = 0; t < 8; t++) check(n_out[t] > 20, "thread produced outputs");
    check(n_stall > 0, "I/O stall happened");
    check(n_cancel > 0, "cancelled instruction happened");
    check(n_fold > 0, "folded branch happened");
    check(n_even > 0 && n_neg > 0, "both ways of the multi-way branch taken");
    check(n_own > 0, "jump instruction taken");
    check(n_pinc_a > 0 && n_pinc_d > 0, "pointer post-increments happened");
    check(n_cfg > 0, "program wrote configuration");
    check(n_pop > 0, "input port popped");
    check(min_gap == 40 && n_gap40 > 0, "Hailstone step takes five thread turns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
endmodule
