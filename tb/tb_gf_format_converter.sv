// tb_gf_format_converter: self-checking test of the 7-to-6 coordinate
// format converter.
//
// Random 7-coordinate combinations with five, four or three layers present
// and random end-event tokens are offered with random gaps, and the output is
// taken with random back-pressure. A 4/5 combination must give one fit of
// its four layers, a 5/5 combination five fits leaving out layer 0, 1, ... 4
// marked as one sequence, a 3/5 combination nothing plus an err_invalid
// pulse, and each end-event token must pass with the invalid-data flag set
// exactly when its event lost a combination. Each fit's coordinates,
// long-cluster map, zeta conditions and left-out layer are compared with the
// reference in gf_tb_pkg.
module tb_gf_format_converter;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic   c7_valid, c7_ready, c6_valid, c6_ready, err_invalid, gate, rgate;
  comb7_t c7;
  fit_t   c6;

  gf_format_converter dut (.clk, .rst_n, .c7_valid, .c7, .c7_ready, .c6_valid, .c6, .c6_ready,
                           .err_invalid);

  int checks = 0, failures = 0, n_five = 0, n_bad = 0, n_err = 0;
  comb7_t q [$];
  fit_t   exp_q [$];

  assign c7_valid = gate && q.size() > 0;
  assign c7       = (q.size() > 0) ? q[0] : '0;
  assign c6_ready = rgate;

  always @(negedge clk) begin
    gate  <= ($urandom_range(0, 3) != 0);
    rgate <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (c7_valid && c7_ready) void'(q.pop_front());
    if (err_invalid) n_err++;
    if (c6_valid && c6_ready) begin
      fit_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected fit"); end
      else begin
        e = exp_q.pop_front();
        if (c6 !== e) begin
          failures++;
          if (failures < 10) $display("%0t: got %h exp %h", $time, c6, e);
        end
      end
    end
  end

  initial begin
    bit inv;
    inv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      comb7_t k;
      k = comb7_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      k.ee = '0;
      if ($urandom_range(0, 19) == 0) begin
        k.is_ee = 1;
        k.ee = ee_data_t'({12'($urandom) & ~(12'd1 << E_INVALID), 9'($urandom)});
        expect_fits(k, exp_q);
        exp_q[exp_q.size() - 1].ee.err[E_INVALID] = inv;
        inv = 0;
      end else begin
        int np;
        k.is_ee = 0;
        case ($urandom_range(0, 5))
          0:       k.hitmap = 5'b11111 & ~(5'b00011 << $urandom_range(0, 3));  // 3/5
          1, 2:    k.hitmap = 5'b11111;
          default: k.hitmap = 5'b11111 & ~(5'b00001 << $urandom_range(0, 4));
        endcase
        np = $countones(k.hitmap);
        if (np == 5) n_five++;
        if (np < 4) begin n_bad++; inv = 1; end
        expect_fits(k, exp_q);
      end
      q.push_back(k);
    end
    while (exp_q.size() > 0 || q.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_err != n_bad) begin failures++; $display("err_invalid %0d, 3/5 inputs %0d", n_err, n_bad); end
    if (n_five == 0 || n_bad == 0) begin failures++; $display("5/5 or 3/5 not exercised"); end
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
