// Testbench for data_mem: random writes and reads of ordinary words with the
// two-cycle read latency; reads of I/O addresses must pop the addressed input
// port (only when rd_en_i is high) and return the port word; writes to I/O
// addresses must appear on the output port one cycle later and leave memory
// untouched; an ordinary write takes two stages (a read one cycle after the
// write still returns the old word, two cycles after the new one).
module tb_data_mem;
  import octavo_pkg::*;
  localparam int unsigned N = 1024;
  logic clk = 0, rst = 1;
  logic rd_en, we;
  logic [9:0] ra, wa;
  logic [WORD_W-1:0] rd, wd;
  logic [WORD_W-1:0] in_data [IO_PORTS];
  logic [IO_PORTS-1:0] pop, ovalid;
  logic [WORD_W-1:0] out_data [IO_PORTS];
  logic [WORD_W-1:0] ref_mem [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem dut (.clk, .rst, .rd_en_i(rd_en), .rd_addr_i(ra), .rd_data_o(rd),
                .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd),
                .io_in_data_i(in_data), .io_in_pop_o(pop),
                .io_out_data_o(out_data), .io_out_valid_o(ovalid));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; we = 0; ra = '0; wa = '0; wd = '0;
    for (int p = 0; p < int'(IO_PORTS); p++) in_data[p] = 36'(100 + p);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      we = 1; wa = 10'(i); wd = {$urandom, $urandom};
      if (!is_io_addr(10'(i))) ref_mem[i] = wd;
    end
    @(negedge clk); we = 0;
    // ordinary reads, two-cycle latency, rd_en toggling must not matter
    for (int k = 0; k < 300; k++) begin
      int a;
      do a = $urandom_range(N - 1); while (is_io_addr(10'(a)));
      @(negedge clk); ra = 10'(a); rd_en = 1'($urandom);
      #1 check(pop == '0, "no pop for memory address");
      @(negedge clk); rd_en = 0;
      @(negedge clk);
      check(rd == ref_mem[a], "memory read, 2 cycles");
    end
    // I/O reads
    for (int p = 0; p < int'(IO_PORTS); p++) begin
      @(negedge clk); ra = 10'(IO_BASE + p); rd_en = 1; in_data[p] = 36'h0ABCD0 + 36'(p);
      #1 check(pop == IO_PORTS'(1 << p), "pop of addressed port");
      @(negedge clk); rd_en = 0; in_data[p] = '0;
      #1 check(pop == '0, "pop is one cycle");
      @(negedge clk);
      check(rd == 36'h0ABCD0 + 36'(p), "port word returned");
      @(negedge clk); ra = 10'(IO_BASE + p); rd_en = 0;
      #1 check(pop == '0, "no pop when rd_en is low");
    end
    // I/O writes
    for (int p = 0; p < int'(IO_PORTS); p++) begin
      @(negedge clk); we = 1; wa = 10'(IO_BASE + p); wd = 36'h5A5A0 + 36'(p);
      @(negedge clk); we = 0;
      check(ovalid == IO_PORTS'(1 << p), "output valid pulse");
      check(out_data[p] == 36'h5A5A0 + 36'(p), "output word");
      @(negedge clk);
      check(ovalid == '0, "output valid is one cycle");
      ra = 10'(IO_BASE + p); rd_en = 0;
    end
    // two-stage write: a read one cycle after the write still sees the old
    // word, a read two cycles after sees the new one
    for (int k = 0; k < 50; k++) begin
      int a;
      logic [WORD_W-1:0] old_w, new_w;
      do a = $urandom_range(N - 1); while (is_io_addr(10'(a)));
      old_w = ref_mem[a];
      new_w = {$urandom, $urandom};
      @(negedge clk); we = 1; wa = 10'(a); wd = new_w; ref_mem[a] = new_w;
      @(negedge clk); we = 0; ra = 10'(a);
      @(negedge clk); ra = 10'(a);
      @(negedge clk);
      check(rd == old_w, "read one cycle after write returns old word");
      @(negedge clk);
      check(rd == new_w, "read two cycles after write returns new word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
endmodule
