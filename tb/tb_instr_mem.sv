// Testbench for instr_mem: fills addresses with random words, reads them
// back with the one-cycle read latency, and checks read-before-write when
// the read and write addresses coincide.
module tb_instr_mem;
  localparam int unsigned W = 36, N = 1024;
  logic clk = 0;
  logic [9:0] ra, wa;
  logic [W-1:0] rd, wd;
  logic we;
  logic [W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_mem #(.WIDTH(W), .DEPTH(N)) dut (.clk, .rd_addr_i(ra), .rd_data_o(rd),
                                         .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = '0; wa = '0; wd = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; wa = 10'(i); wd = {$urandom, $urandom};
      ref_mem[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      int a = $urandom_range(N - 1);
      @(negedge clk); ra = 10'(a);
      @(negedge clk);
      check(rd == ref_mem[a], "read back");
    end
    // simultaneous read and write of one address returns the old word
    @(negedge clk);
    ra = 10'd77; wa = 10'd77; we = 1; wd = 36'h123456789;
    @(negedge clk);
    we = 0;
    check(rd == ref_mem[77], "read before write");
    ref_mem[77] = 36'h123456789;
    @(negedge clk);
    check(rd == 36'h123456789, "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
