// tb_gf_comparator: self-checking test of the Comparator (three chi2 units).
//
// Fit results arrive at up to one per clock with random gaps, grouped in
// sequences of one fit (4/5) or five fits (5/5) and separated now and then by
// end-event tokens. The chi components are mostly small, sometimes large
// enough for chi2 to pass 21 bits, often so small that the long-cluster
// penalty decides which fit of a sequence is best; some fits carry the overflow flag and
// some have long-cluster hits. For each sequence the model computes chi2,
// applies the cut and the overflow veto, the goodness chi2 + penalty x
// (long clusters) and keeps the best passing fit (earlier one on ties); the
// Comparator must write exactly that track, or nothing, four clocks after
// the sequence's last fit. End-event tokens must pass in order with the
// fit-overflow flag set when a fit of their event overflowed. The pass and
// fail pulses are counted against the model.
module tb_gf_comparator;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  localparam longint CUT = 300000;
  localparam int     PEN = 200;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic    f_valid = 0, trk_valid, n_fit_pass, n_fit_fail;
  fitres_t f = '0;
  track_t  trk;

  gf_comparator dut (.clk, .rst_n, .f_valid, .f, .chi2_cut(CHI2_W'(CUT)), .lc_penalty(8'(PEN)),
                     .trk_valid, .trk, .n_fit_pass, .n_fit_fail);

  typedef struct {
    track_t t;
    int     at;
  } exp_t;

  int checks = 0, failures = 0, cyc = 0, n_pass = 0, n_fail = 0, m_pass = 0, m_fail = 0;
  int n_trk = 0, n_ee = 0;
  exp_t exp_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (n_fit_pass) n_pass++;
    if (n_fit_fail) n_fail++;
    if (trk_valid) begin
      exp_t e;
      if (exp_q.size() == 0) check(0, "unexpected track");
      else begin
        e = exp_q.pop_front();
        check(cyc == e.at, "decision time");
        if (e.t.side.is_ee) check(trk.side == e.t.side, "end-event token");
        else check(trk == e.t, "track");
      end
    end
  end

  function automatic logic [17:0] chi_val();
    int v;
    case ($urandom_range(0, 19))
      0:         v = $urandom_range(0, 3000);    // chi2 past 21 bits
      1, 2, 3:   v = $urandom_range(0, 400);
      default:   v = $urandom_range(0, 16);      // close fits: penalty decides
    endcase
    return 18'(($urandom_range(0, 1) == 1) ? -v : v);
  endfunction

  initial begin
    bit ovf_ev;
    int at;
    ovf_ev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2000; s++) begin
      int n;
      bit best_v;
      longint best_q;
      track_t best;
      n = ($urandom_range(0, 11) == 0) ? 0 : ($urandom_range(0, 1) ? 5 : 1);   // 0: end event
      best_v = 0;
      best_q = 0;
      best = '0;
      for (int k = 0; k < ((n == 0) ? 1 : n); k++) begin
        fitres_t x;
        track_t  c;
        longint  chi2, c2s, q;
        bit      pass;
        int      nlc;
        x = fitres_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        for (int j = 3; j < 6; j++) x.p[j] = chi_val();
        x.side.is_ee     = (n == 0);
        x.side.seq_first = (n == 0) || (k == 0);
        x.side.seq_last  = (n == 0) || (k == n - 1);
        x.ovf = ($urandom_range(0, 19) == 0);
        if (n == 0) x.side.ee.err[E_FIT_OVF] = 1'b0;
        // drive
        if ($urandom_range(0, 1) == 1)
          repeat ($urandom_range(1, 2)) begin @(negedge clk); f_valid = 0; end
        @(negedge clk);
        f_valid = 1; f = x;
        at = cyc + 5;
        // model
        chi2 = 0;
        for (int j = 3; j < 6; j++) chi2 += longint'($signed(x.p[j])) * longint'($signed(x.p[j]));
        c2s  = (chi2 > 2097151) ? 2097151 : chi2;
        nlc  = $countones(x.side.lcmap);
        q    = c2s + PEN * nlc;
        c = '0;
        c.side = x.side; c.c = $signed(x.p[0]); c.d = $signed(x.p[1]); c.phi = $signed(x.p[2]);
        c.chi2 = 21'(c2s); c.ovf = x.ovf;
        if (n == 0) begin
          c.side.ee.err[E_FIT_OVF] = ovf_ev;
          ovf_ev = 0;
          exp_q.push_back('{c, at});
          n_ee++;
        end else begin
          pass = !x.ovf && chi2 <= CUT;
          if (x.ovf) ovf_ev = 1;
          if (pass) m_pass++; else m_fail++;
          if (pass && (!best_v || q < best_q)) begin best_v = 1; best_q = q; best = c; end
          if (k == n - 1 && best_v) begin exp_q.push_back('{best, at}); n_trk++; end
        end
      end
    end
    @(negedge clk); f_valid = 0;
    repeat (10) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("%0d tracks missing", exp_q.size()); end
    if (n_pass != m_pass || n_fail != m_fail) begin
      failures++; $display("pass/fail %0d/%0d, expected %0d/%0d", n_pass, n_fail, m_pass, m_fail);
    end
    if (m_pass == 0 || m_fail == 0) begin failures++; $display("cut not exercised"); end
    $display("tracks=%0d end events=%0d pass=%0d fail=%0d", n_trk, n_ee, m_pass, m_fail);
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
