// tb_gf_dsp_fitter: self-checking test of a Serializer feeding a DSP Fitter,
// the pair that computes one fit every six clocks in a track processor.
//
// Random fits (six 15-bit coordinates and random side information) are
// started with random constant sets of gf_tb_pkg, sometimes back to back
// every six clocks (the Fit Organizer's worst case) and sometimes with
// gaps. Sets 250-255 have full-scale chi coefficients and overflow. For
// every fit the six results (curvature, impact parameter, phi, three chi
// components) must equal the exact scalar products, shifted and saturated
// as the reference does, ovf must flag a saturation (except on end-event
// tokens, which carry no fit), the side information
// must come through unchanged, and the result must appear a fixed number of
// clocks after the start.
module tb_gf_dsp_fitter;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic                         start = 0, busy, s_valid, s_first, s_last, r_valid;
  fit_t                         fit_in = '0;
  logic [CSET_W-1:0]            cset_in = '0;
  logic [X_W-1:0]               s_x;
  logic [N_PAR-1:0][COEF_W-1:0] s_coef, s_c0;
  side_t                        s_side;
  fitres_t                      r;

  gf_serializer u_ser (.clk, .rst_n, .start, .fit_in, .cset_in, .busy, .s_valid, .s_first,
                       .s_last, .s_x, .s_coef, .s_c0, .s_side);
  gf_dsp_fitter dut (.clk, .rst_n, .s_valid, .s_first, .s_last, .s_x, .s_coef, .s_c0, .s_side,
                     .r_valid, .r);

  typedef struct {
    fit_t    f;
    fitref_t ref_r;
    int      t;
  } item_t;

  int checks = 0, failures = 0, n_ovf = 0, cyc = 0, lat = -1;
  item_t exp_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (r_valid) begin
      item_t e;
      if (exp_q.size() == 0) check(0, "unexpected result");
      else begin
        side_t sd;
        e = exp_q.pop_front();
        if (lat < 0) lat = cyc - e.t;
        check(cyc - e.t == lat, "latency changed");
        for (int n = 0; n < N_PAR; n++)
          check(longint'($signed(r.p[n])) == e.ref_r.p[n], $sformatf("result %0d", n));
        check(r.ovf == (e.ref_r.ovf && !e.f.is_ee), "overflow flag");  // never on end-event tokens
        sd = '{is_ee: e.f.is_ee, ee: e.f.ee, seq_first: e.f.seq_first, seq_last: e.f.seq_last,
               miss: e.f.miss, lcmap: e.f.lcmap, five: e.f.five, xft: e.f.xft, road: e.f.road};
        check(r.side == sd, "side information");
        if (r.ovf) n_ovf++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      item_t it;
      int set;
      logic [14:0] x [N_FIT];
      @(negedge clk);
      set = ($urandom_range(0, 9) == 0) ? $urandom_range(250, 255) : $urandom_range(0, 249);
      it.f = fit_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                     $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                     $urandom});
      if (i % 50 == 0) for (int k = 0; k < N_FIT; k++) it.f.x[k] = 15'h7fff;   // largest inputs
      for (int k = 0; k < N_FIT; k++) x[k] = it.f.x[k];
      it.ref_r = fit(set, x);
      it.t = cyc;
      exp_q.push_back(it);
      fit_in = it.f; cset_in = cset(set); start = 1;
      @(negedge clk); start = 0;
      repeat (($urandom_range(0, 2) == 0) ? $urandom_range(5, 12) : 4) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    if (n_ovf == 0) begin failures++; $display("no overflow seen"); end
    $display("latency %0d clocks from start, overflows %0d", lat, n_ovf);
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
