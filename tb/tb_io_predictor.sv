// Testbench for io_predictor: random D/A/B fields, biased towards the I/O
// port addresses, with random empty/full flags. The expected IOR is worked
// out here from the address map and checked one cycle (PRD0) and two cycles
// (PRD1) after the inputs.
module tb_io_predictor;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic [D_W-1:0] d;
  logic [MEM_AW-1:0] a, b;
  logic [2*IO_PORTS-1:0] empty, full;
  logic ior3, ior4;
  int checks = 0, failures = 0, n_block = 0;

  always #5 clk = ~clk;

  io_predictor dut (.clk, .rst, .d_i(d), .a_i(a), .b_i(b), .in_empty_i(empty),
                    .out_full_i(full), .ior_s3_o(ior3), .ior_s4_o(ior4));

  function automatic logic [9:0] pick10();
    return ($urandom_range(2) == 0) ? 10'($urandom) : 10'(IO_BASE + $urandom_range(IO_PORTS - 1));
  endfunction

  function automatic logic expect_ior(logic [11:0] dd, logic [9:0] aa, logic [9:0] bb,
                                      logic [3:0] e, logic [3:0] f);
    logic ok;
    ok = 1;
    if (aa >= IO_BASE && aa < IO_BASE + IO_PORTS && e[aa - IO_BASE]) ok = 0;
    if (bb >= IO_BASE && bb < IO_BASE + IO_PORTS && e[IO_PORTS + bb - IO_BASE]) ok = 0;
    if (dd[11:10] < 2 && dd[9:0] >= IO_BASE && dd[9:0] < IO_BASE + IO_PORTS &&
        f[dd[10] * IO_PORTS + dd[9:0] - IO_BASE]) ok = 0;
    return ok;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e3, e4;
    logic hist [$];
    d = '0; a = '0; b = '0; empty = '0; full = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      d = {2'($urandom), pick10()}; a = pick10(); b = pick10();
      empty = 4'($urandom); full = 4'($urandom);
      hist.push_back(expect_ior(d, a, b, empty, full));
      if (!hist[$]) n_block++;
      @(negedge clk);
      check(ior3 == hist[$], "PRD0 output");
      if (hist.size() == 2) begin
        check(ior4 == hist[0], "PRD1 output");
        void'(hist.pop_front());
      end
    end
    check(n_block > 100, "blocked cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
