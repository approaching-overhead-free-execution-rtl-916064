// Testbench for alu: random operations on random and corner-case operands.
// Results are predicted with 72-bit signed/unsigned arithmetic written
// independently here and compared exactly four cycles after issue, together
// with the destination and the write flag (off for non-ALU opcodes).
module tb_alu;
  import octavo_pkg::*;
  logic clk = 0, rst = 1;
  logic [OP_W-1:0] op;
  logic [WORD_W-1:0] a, b, r;
  logic [D_W-1:0] d, dq;
  logic wr, wrq;
  int checks = 0, failures = 0;

  typedef struct { logic [WORD_W-1:0] r; logic [D_W-1:0] d; logic wr; } exp_t;
  exp_t pipe [$];

  always #5 clk = ~clk;

  alu dut (.clk, .rst, .op_i(op), .a_i(a), .b_i(b), .d_i(d), .wr_i(wr),
           .r_o(r), .d_o(dq), .wr_o(wrq));

  function automatic exp_t model(logic [3:0] o, logic [35:0] x, logic [35:0] y,
                                 logic [11:0] dd, logic w);
    exp_t e;
    logic signed [71:0] sp;
    logic [71:0] up;
    sp = $signed(x) * $signed(y);
    up = {36'd0, x} * {36'd0, y};
    e.d = dd;
    e.wr = w && (o <= 4 || o == 8 || o == 9 || o == 10);
    case (o)
      0: e.r = x ^ y;
      1: e.r = x & y;
      2: e.r = x | y;
      3: e.r = x - y;
      4: e.r = x + y;
      8: e.r = sp[71:36];
      9: e.r = sp[35:0];
      10: e.r = up[71:36];
      default: e.r = 'x;
    endcase
    return e;
  endfunction

  function automatic logic [35:0] pick();
    case ($urandom_range(5))
      0: return '0;
      1: return '1;
      2: return 36'h800000000;
      3: return 36'h7FFFFFFFF;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = '0; a = '0; b = '0; d = '0; wr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pipe.size() == 4) begin
        exp_t e;
        e = pipe.pop_front();
        check(wrq == e.wr && dq == e.d, "write flag and destination");
        if (e.wr) check(r == e.r, "result");
      end
      op = 4'($urandom); a = pick(); b = pick(); d = 12'($urandom); wr = 1'($urandom_range(3) != 0);
      // shift right by one: high unsigned word of a product by 2**35
      if (i % 50 == 0) begin op = OP_MHU; b = 36'h800000000; end
      pipe.push_back(model(op, a, b, d, wr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
