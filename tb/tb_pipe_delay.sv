// Testbench for pipe_delay: random words enter every cycle; each must leave
// exactly DEPTH cycles later. A reference queue holds the expected words.
module tb_pipe_delay;
  localparam int unsigned W = 36, D = 3;
  logic clk = 0, rst = 1;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  always #5 clk = ~clk;

  pipe_delay #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .d_i(d), .q_o(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // after reset the pipe holds zeros
    check(q == '0, "zero after reset");
    for (int i = 0; i < 200; i++) begin
      d = {$urandom, $urandom};
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() > D) void'(hist.pop_front());
      if (i >= int'(D) - 1) check(q == hist[0], "delayed word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
