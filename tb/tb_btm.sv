// Testbench for btm: every thread gets eight random branch entries whose
// origins cluster on a few PCs, so single and multi-way matches happen.
// Threads then issue in round-robin order with random PCs; the thread's
// previous result arrives two cycles after issue (or is absent, in which
// case the kept result is used) and IOR four cycles after issue. A reference
// model gives the cancel bit (checked four cycles after issue) and the
// jump, destination and IOR' (six cycles after issue).
module tb_btm;
  import octavo_pkg::*;
  localparam int unsigned E = 8;
  logic clk = 0, rst = 1;
  logic [2:0] tid0;
  logic [9:0] pc0, bd;
  logic r_valid, ior, cancel, j, ior_o;
  logic [35:0] r;
  cfg_wr_t cfg;
  int checks = 0, failures = 0, n_j = 0, n_c = 0, n_multi = 0;

  logic [9:0] bo_m [8][E];
  logic [9:0] bd_m [8][E];
  logic [2:0] bf_m [8][E];
  logic       bpe_m [8][E];
  logic       bp_m [8][E];
  logic [35:0] last_r [8];

  always #5 clk = ~clk;

  btm #(.ENTRIES(E)) dut (.clk, .rst, .tid0_i(tid0), .pc0_i(pc0), .r_valid_i(r_valid),
                          .r_i(r), .ior_i(ior), .cancel_o(cancel), .j_o(j), .bd_o(bd),
                          .ior_o(ior_o), .cfg_i(cfg));

  task automatic cfg_write(int t, int addr, logic [35:0] v);
    @(negedge clk);
    cfg = '{we: 1'b1, tid: 3'(t), addr: 10'(addr), data: v};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  function automatic logic [35:0] pick_r();
    case ($urandom_range(3))
      0: return '0;
      1: return 36'($urandom_range(20));
      2: return -36'($urandom_range(20));
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        rv_q [$];
    logic [35:0] r_q [$];
    logic        ior_q [$];
    logic        c_q [$];
    logic        j_q [$];
    logic [9:0]  bd_q [$];
    logic        io_q [$];
    tid0 = '0; pc0 = '0; r_valid = 0; r = '0; ior = 1; cfg = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      last_r[t] = '0;
      for (int e = 0; e < int'(E); e++) begin
        bo_m[t][e] = 10'(20 + $urandom_range(5));
        bd_m[t][e] = 10'($urandom);
        bf_m[t][e] = 3'($urandom);
        bpe_m[t][e] = 1'($urandom);
        bp_m[t][e] = 1'($urandom);
        cfg_write(t, BTM_BASE + 4 * e, 36'(bo_m[t][e]));
        cfg_write(t, BTM_BASE + 4 * e + 1, 36'(bd_m[t][e]));
        cfg_write(t, BTM_BASE + 4 * e + 2, 36'({bf_m[t][e], bpe_m[t][e], bp_m[t][e]}));
      end
    end
    for (int k = 0; k < 6000; k++) begin
      int t;
      logic rv, io, c, jj;
      logic [35:0] rr;
      logic [9:0] dd;
      logic [7:0] f;
      int nm;
      @(negedge clk);
      // stage 6 outputs of the instruction issued six cycles ago
      if (j_q.size() == 6) begin
        check(j == j_q.pop_front(), "J");
        check(bd == bd_q.pop_front(), "BD'");
        check(ior_o == io_q.pop_front(), "IOR'");
      end
      // stage 4
      if (c_q.size() == 4) begin
        check(cancel == c_q.pop_front(), "cancel");
        ior = ior_q.pop_front();
      end else ior = 1;
      // stage 2
      if (r_q.size() == 2) begin
        r_valid = rv_q.pop_front();
        r = r_q.pop_front();
      end else r_valid = 0;
      // stage 0: new instruction
      t = k % 8;
      tid0 = 3'(t);
      pc0 = ($urandom_range(4) == 0) ? 10'($urandom) : 10'(20 + $urandom_range(5));
      rv = 1'($urandom_range(3) != 0);
      rr = pick_r();
      io = 1'($urandom_range(5) != 0);
      f = cond_flags(rv ? rr : last_r[t]);
      if (rv) last_r[t] = rr;
      c = 0; jj = 0; dd = '0; nm = 0;
      for (int e = 0; e < int'(E); e++) begin
        if (pc0 == bo_m[t][e]) begin
          logic cd;
          cd = f[bf_m[t][e]];
          if (bpe_m[t][e] && (cd ^ bp_m[t][e])) c = 1;
          if (cd) begin jj = 1; dd |= bd_m[t][e]; nm++; end
        end
      end
      if (nm > 1) n_multi++;
      if (c) n_c++;
      if (jj && io) n_j++;
      rv_q.push_back(rv); r_q.push_back(rr); ior_q.push_back(io);
      c_q.push_back(c);
      j_q.push_back(jj && io);
      bd_q.push_back(io ? dd : '0);
      io_q.push_back(io);
    end
    check(n_j > 100 && n_c > 100 && n_multi > 10, "branches, cancels and multi-way matches seen");
    $display("j=%0d cancel=%0d multi=%0d", n_j, n_c, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
