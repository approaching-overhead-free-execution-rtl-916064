// Testbench for controller: random stage-6 decisions for random threads,
// one per cycle. A reference model applies the next-PC rules (IOR retry,
// BTM branch, own jump on the A operand unless cancelled, PC + 1) with the
// two-cycle CTL0/CTL1 latency; every cycle all eight PCs are read back
// through the fetch port and compared.
module tb_controller;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] tid0, tid;
  logic [9:0] pc0, pc, target, bd;
  logic [3:0] op;
  logic [35:0] a;
  logic valid, ior, cancel, bj;
  logic [9:0] model [8];
  int checks = 0, failures = 0;
  int n_retry = 0, n_btm = 0, n_jump = 0, n_inc = 0;

  always #50 clk = ~clk;

  controller dut (.clk, .rst, .tid0_i(tid0), .pc0_o(pc0), .valid_i(valid), .tid_i(tid),
                  .pc_i(pc), .op_i(op), .target_i(target), .a_i(a), .ior_i(ior),
                  .cancel_i(cancel), .btm_j_i(bj), .btm_bd_i(bd));

  function automatic logic [9:0] next_pc(logic [3:0] o, logic [35:0] x, logic [9:0] p,
                                         logic [9:0] t, logic io, logic c, logic j,
                                         logic [9:0] d, ref int nr, ref int nb, ref int nj, ref int ni);
    logic jump;
    case (o)
      4'b1011: jump = 1;
      4'b1100: jump = (x == 0);
      4'b1101: jump = (x != 0);
      4'b1110: jump = !x[35];
      4'b1111: jump = x[35];
      default: jump = 0;
    endcase
    if (!io) begin nr++; return p; end
    if (j) begin nb++; return d; end
    if (jump && !c) begin nj++; return t; end
    ni++;
    return p + 10'd1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] upd_pc [$];
    int         upd_t [$];
    valid = 0; tid = '0; pc = '0; op = '0; target = '0; a = '0; ior = 1; cancel = 0; bj = 0; bd = '0;
    tid0 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8; t++) model[t] = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // updates issued two cycles ago are now visible
      if (upd_t.size() == 2) begin
        int tt;
        logic [9:0] np;
        tt = upd_t.pop_front();
        np = upd_pc.pop_front();
        if (tt >= 0) model[tt] = np;
      end
      for (int t = 0; t < 8; t++) begin
        tid0 = 3'(t);
        #1;
        check(pc0 == model[t], "PC of thread");
      end
      valid = 1'($urandom_range(7) != 0);
      tid = 3'($urandom); pc = 10'($urandom); target = 10'($urandom); bd = 10'($urandom);
      op = 4'($urandom); ior = 1'($urandom_range(5) != 0); cancel = 1'($urandom_range(3) == 0);
      bj = 1'($urandom_range(3) == 0);
      case ($urandom_range(3))
        0: a = '0;
        1: a = 36'h800000005;
        default: a = {$urandom, $urandom};
      endcase
      if (valid) begin
        upd_t.push_back(int'(tid));
        upd_pc.push_back(next_pc(op, a, pc, target, ior, cancel, bj, bd, n_retry, n_btm, n_jump, n_inc));
      end else begin
        upd_t.push_back(-1);
        upd_pc.push_back('0);
      end
    end
    check(n_retry > 0 && n_btm > 0 && n_jump > 0 && n_inc > 0, "every next-PC case seen");
    $display("retry=%0d btm=%0d jump=%0d inc=%0d", n_retry, n_btm, n_jump, n_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
