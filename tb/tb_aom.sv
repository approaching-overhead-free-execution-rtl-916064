// Testbench for aom: one instance for an A operand (10-bit, configuration
// base 0) and one for a D operand (12-bit with region bits, base 64). Random
// default offsets, pointer offsets and increments are written through the
// configuration port; then threads access shared, private and indirect
// addresses in round-robin order. The expected translated address and the
// post-increment (only when the instruction commits, four cycles after
// entry) come from a reference model; the latency of three cycles is
// checked with every access.
module tb_aom;
  import octavo_pkg::*;
  localparam int unsigned P = 4;
  logic clk = 0, rst = 1;
  logic [2:0] tid;
  logic [9:0] a_in, a_out;
  logic [11:0] d_in, d_out;
  logic commit;
  cfg_wr_t cfg;
  int checks = 0, failures = 0, n_ind = 0, n_priv = 0, n_shared = 0;

  logic [9:0] do_m [2][8];
  logic [9:0] po_m [2][8][P];
  logic [9:0] pi_m [2][8][P];

  always #5 clk = ~clk;

  aom #(.POINTERS(P), .AW(10), .OPERAND(0), .OFFSET_REGIONS(1)) dut_a (
    .clk, .rst, .tid_i(tid), .addr_i(a_in), .addr_o(a_out), .commit_i(commit), .cfg_i(cfg));
  aom #(.POINTERS(P), .AW(12), .OPERAND(2), .OFFSET_REGIONS(2)) dut_d (
    .clk, .rst, .tid_i(tid), .addr_i(d_in), .addr_o(d_out), .commit_i(commit), .cfg_i(cfg));

  task automatic cfg_write(int t, int addr, logic [9:0] v);
    @(negedge clk);
    cfg = '{we: 1'b1, tid: 3'(t), addr: 10'(addr), data: 36'(v)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  // op: 0 = A instance, 1 = D instance
  function automatic logic [11:0] xlate(int op, int t, logic [11:0] addr, logic cm);
    logic [9:0] low;
    int region, nreg;
    low = addr[9:0];
    region = op ? int'(addr[11:10]) : 0;
    nreg = op ? 2 : 1;
    if (region < nreg && low >= IND_BASE && low < IND_BASE + P) begin
      int p;
      logic [9:0] po;
      p = int'(low) - IND_BASE;
      po = po_m[op][t][p];
      if (cm) po_m[op][t][p] = po + pi_m[op][t][p];
      if (op == 0) n_ind++;
      return {addr[11:10], low + po};
    end
    if (low < SHARED_WORDS || region >= nreg) begin
      if (op == 0) n_shared++;
      return addr;
    end
    if (op == 0) n_priv++;
    return {addr[11:10], low + do_m[op][t]};
  endfunction

  function automatic logic [9:0] pick();
    case ($urandom_range(3))
      0: return 10'($urandom_range(SHARED_WORDS - 1));
      1: return 10'(IND_BASE + $urandom_range(P - 1));
      default: return 10'($urandom);
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0]  exp_a [$];
    logic [11:0] exp_d [$];
    logic        cm_q [$];
    tid = '0; a_in = '0; d_in = '0; commit = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int op = 0; op < 2; op++)
      for (int t = 0; t < 8; t++) begin
        do_m[op][t] = 10'($urandom);
        cfg_write(t, op * 64 + 16, do_m[op][t]);
        for (int p = 0; p < int'(P); p++) begin
          po_m[op][t][p] = 10'($urandom);
          pi_m[op][t][p] = 10'($urandom_range(5));
          cfg_write(t, op * 64 + p, po_m[op][t][p]);
          cfg_write(t, op * 64 + 8 + p, pi_m[op][t][p]);
        end
      end
    for (int k = 0; k < 4000; k++) begin
      logic cm;
      @(negedge clk);
      if (exp_a.size() == 3) begin
        check(a_out == exp_a.pop_front(), "A operand address");
        check(d_out == exp_d.pop_front(), "D operand address");
        commit = cm_q.pop_front();
      end else commit = 0;
      tid = 3'(k % 8);
      a_in = pick();
      d_in = {2'($urandom), pick()};
      cm = 1'($urandom_range(3) != 0);
      exp_a.push_back(xlate(0, int'(tid), {2'b00, a_in}, cm) [9:0]);
      exp_d.push_back(xlate(1, int'(tid), d_in, cm));
      cm_q.push_back(cm);
    end
    check(n_ind > 100 && n_priv > 100 && n_shared > 100, "all address kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
