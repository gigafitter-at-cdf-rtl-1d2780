// tb_gf_fit_organizer: self-checking test of the Fit Organizer with its
// default six Serializers and 256 constant sets.
//
// The condition RAM (8192 entries) and the constant RAM (256 sets of 756
// bits) are loaded with the pseudo-random tables of gf_tb_pkg. Random fits
// are then offered with random gaps while `hold` is raised at random. Every
// issued fit must be the next fit popped, start exactly one Serializer, the
// Serializers must be started in turn 0, 1, ... 5, 0, ..., and the constant
// set delivered with it must be the one the condition RAM names for the
// fit's zeta barrels, left-out layer and long-cluster map. No fit may be
// popped while hold is high, and every popped fit must be issued two clocks
// later.
module tb_gf_fit_organizer;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic              fit_valid, fit_pop, hold = 0, gate;
  fit_t              fit, ser_fit;
  logic              cond_we = 0, cset_we = 0;
  logic [COND_W-1:0] cond_addr = '0;
  logic [SET_W-1:0]  cond_data = '0, cset_addr = '0;
  logic [CSET_W-1:0] cset_data = '0, ser_cset;
  logic [5:0]        ser_start;

  gf_fit_organizer dut (.clk, .rst_n, .fit_valid, .fit, .fit_pop, .hold, .cond_we, .cond_addr,
                        .cond_data, .cset_we, .cset_addr, .cset_data, .ser_start, .ser_fit,
                        .ser_cset);

  int checks = 0, failures = 0, n_issued = 0, n_hold = 0;
  fit_t q [$], exp_q [$];
  int   pop_t [$];
  int   cyc = 0;
  bit   run = 0;

  assign fit_valid = run && gate && q.size() > 0;
  assign fit       = (q.size() > 0) ? q[0] : '0;

  always @(negedge clk) begin
    gate <= ($urandom_range(0, 4) != 0);
    if (run) hold <= ($urandom_range(0, 5) == 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (hold && fit_valid) n_hold++;
    if (fit_pop) begin
      check(fit_valid && !hold, "pop while hold or empty");
      exp_q.push_back(q.pop_front());
      pop_t.push_back(cyc);
    end
    if (ser_start != 0) begin
      fit_t e;
      logic [12:0] c;
      check($onehot(ser_start), "more than one Serializer started");
      check(ser_start == 6'(1 << (n_issued % 6)), "Serializer order");
      if (exp_q.size() == 0) check(0, "issue without a pop");
      else begin
        e = exp_q.pop_front();
        check(cyc - pop_t.pop_front() == 2, "issue latency");
        check(ser_fit == e, "issued fit");
        c = {e.zin, e.zout, e.miss, e.lcmap};
        check(ser_cset == cset(int'(cond_map(c))), "constant set");
      end
      n_issued++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk); cond_we = 1; cond_addr = 13'(a); cond_data = cond_map(13'(a));
    end
    @(negedge clk); cond_we = 0;
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); cset_we = 1; cset_addr = 8'(s); cset_data = cset(s);
    end
    @(negedge clk); cset_we = 0;
    for (int i = 0; i < 4000; i++) begin
      fit_t f;
      f = fit_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      q.push_back(f);
    end
    run = 1;
    while (q.size() > 0) @(posedge clk);
    run = 0;
    hold = 0;
    repeat (10) @(posedge clk);
    checks += 2;
    if (n_issued != 4000) begin failures++; $display("%0d fits issued", n_issued); end
    if (n_hold == 0) begin failures++; $display("hold never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
