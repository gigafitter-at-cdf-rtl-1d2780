// tb_gf_spy_buffer: self-checking test of a 256-word spy buffer.
//
// Random words are monitored with random gaps, more than the depth so the
// buffer wraps. Each clock the write pointer and wrap flag are compared with
// a model, and a random address is read back (one clock latency) and
// compared with the last word written there. freeze is raised at random:
// while it is high nothing may be recorded, so the memory keeps the words
// that preceded the freeze.
module tb_gf_spy_buffer;
  import gf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic      mon_valid = 0, freeze = 0, wrapped;
  svt_word_t mon_word = '0, rd_data;
  logic [7:0] rd_addr = '0, wr_ptr;

  gf_spy_buffer dut (.clk, .rst_n, .mon_valid, .mon_word, .freeze, .rd_addr, .rd_data,
                     .wr_ptr, .wrapped);

  int checks = 0, failures = 0, n_frozen = 0;
  svt_word_t model [256];
  bit        known [256];
  int        ptr = 0;
  bit        wr = 0;
  svt_word_t  exp_rd;
  bit         exp_known = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(wr_ptr == 8'(ptr), "write pointer");
      check(wrapped == wr, "wrap flag");
      if (exp_known) check(rd_data == exp_rd, "read back");
      if (i % 400 == 0) freeze = ($urandom_range(0, 2) == 0);
      mon_valid = ($urandom_range(0, 2) != 0);
      mon_word  = SVT_W'($urandom);
      rd_addr   = 8'($urandom);
      exp_rd    = model[rd_addr];   // a read sees the memory before this clock's write
      exp_known = known[rd_addr];
      if (freeze && mon_valid) n_frozen++;
      if (mon_valid && !freeze) begin
        model[ptr] = mon_word;
        known[ptr] = 1;
        if (ptr == 255) wr = 1;
        ptr = (ptr + 1) % 256;
      end
    end
    checks++;
    if (n_frozen == 0 || !wr) begin failures++; $display("freeze or wrap not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
