// tb_gf_track_processor: end-to-end test of one wedge's track processor.
//
// Loads the condition and constant RAMs, sends random events (4/5 and 5/5
// roads, several XFT tracks, a 3/5 road, an event with a wrong parity bit)
// through the SVT input while honouring HOLD, pops the output with random
// pauses so that the Track FIFO fills and the Fit Organizer stalls, and
// compares every output word with the reference model of gf_tb_pkg.
// It then measures the document's timing figures: one fit per clock, i.e.
// a 10-combination road takes 9 clocks more than a 1-combination road in
// the 4/5 case and 45 more in the 5/5 case (about 75 ns and 373 ns at
// 120 MHz). Last it sends the largest road in common use, 25 words with
// four hits on every layer and two XFT tracks: 2048 combinations and 10240
// fits in one road, all checked against the model.
module tb_gf_track_processor;
  import gf_pkg::*;
  import gf_tb_pkg::*;

  localparam longint CUT = 600000;
  localparam int     PEN = 19;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic              in_ds, in_hold, out_valid, out_pop;
  svt_word_t         in_w, out_w;
  logic              cond_we, cset_we, err_clear;
  logic [COND_W-1:0] cond_addr;
  logic [SET_W-1:0]  cond_data, cset_addr;
  logic [CSET_W-1:0] cset_data;
  logic [ERR_W-1:0]  err_status;
  logic              svt_error, ev_fit, ev_pass, ev_five, stall;

  gf_track_processor dut (
    .clk, .rst_n, .in_ds, .in_word(in_w), .in_hold, .out_valid, .out_word(out_w), .out_pop,
    .cond_we, .cond_addr, .cond_data, .cset_we, .cset_addr, .cset_data,
    .chi2_cut(CHI2_W'(CUT)), .lc_penalty(8'(PEN)), .severity(12'h0), .err_clear,
    .err_status, .svt_error, .ev_fit, .ev_pass, .ev_five, .stall);

  int checks = 0, failures = 0;
  int n_five = 0, n_stall = 0, n_hold = 0, n_pass = 0, n_fail = 0, n_fit = 0;
  int n_ovf_ev = 0, n_inv_ev = 0, n_par_ev = 0;
  word_t in_q [$], exp_q [$];
  bit    pop_random = 1;
  int    cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (ev_five)  n_five++;
    if (stall)    n_stall++;
    if (in_hold)  n_hold++;
    if (ev_fit)   n_fit++;
    if (ev_pass)  n_pass++;
  end

  // Output checker
  always @(posedge clk) if (rst_n && out_valid && out_pop) begin
    word_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected word %h", out_w);
    end else begin
      e = exp_q.pop_front();
      if (out_w.ee !== e.ee || out_w.ep !== e.ep || out_w.data !== e.data) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: got ee=%b ep=%b %h exp ee=%b ep=%b %h", cyc,
                   out_w.ee, out_w.ep, out_w.data, e.ee, e.ep, e.data);
      end
      if (e.ee) begin
        if (e.data[9 + E_FIT_OVF]) n_ovf_ev++;
      end
    end
  end

  always_comb out_pop = out_valid && (!pop_random || ($urandom_range(0, 9) < 2));

  // Input driver
  task automatic send_all();
    while (in_q.size() > 0) begin
      @(negedge clk);
      if (!in_hold && $urandom_range(0, 3) != 0) begin
        word_t w;
        w = in_q.pop_front();
        in_ds = 1;
        in_w  = '{ee: w.ee, ep: w.ep, data: w.data};
      end else in_ds = 0;
    end
    @(negedge clk);
    in_ds = 0;
  endtask

  task automatic wait_drain();
    int t = 0;
    while ((exp_q.size() > 0) && t < 400000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  // Build one event and its expectation.
  task automatic make_event(input int tag, input int nroads, input int k3, input bit badpar);
    word_t tr [$], ev [$];
    stats_t st;
    logic [11:0] err;
    st = '{default: 0};
    gen_event(nroads, k3, CUT, PEN, tag, 0, ev, tr, st);
    if (badpar) begin
      ev[ev.size() - 1].data[8] = ~ev[ev.size() - 1].data[8];
      n_par_ev++;
    end
    err = '0;
    err[E_PARITY]  = badpar;
    err[E_INVALID] = st.inv;
    err[E_FIT_OVF] = st.ovf;
    if (st.inv) n_inv_ev++;
    foreach (tr[i]) exp_q.push_back(tr[i]);
    exp_q.push_back(ee_word(err, ^xor_words(tr), 8'(tag)));
    foreach (ev[i]) in_q.push_back(ev[i]);
    n_fail += st.nfits - st.npass;
  endtask

  // Timing: clocks from the road word entering to the last fit.
  int t_road, t_last;
  always @(posedge clk) begin
    if (in_ds && in_w.ep && !in_w.ee) t_road = cyc;
    if (ev_fit) t_last = cyc;
  end

  task automatic timed_road(input int n0, input int n4, output int dt);
    road_t r;
    word_t tr [$], ev [$];
    stats_t st;
    st = '{default: 0};
    r = gen_road(5, 21'h1abcd);
    r.nh[0] = n0; r.nh[1] = 1; r.nh[2] = 1; r.nh[3] = 1; r.nh[4] = n4; r.nx = 1;
    if (n0 > 1) r.nh[1] = 2;
    road_words(r, ev);
    expect_road(r, CUT, PEN, tr, st);
    foreach (tr[i]) exp_q.push_back(tr[i]);
    exp_q.push_back(ee_word({9'd0, st.ovf, 2'b0}, ^xor_words(tr), 8'h77));
    ev.push_back(ee_word(12'd0, ^xor_words(ev), 8'h77));
    foreach (ev[i]) in_q.push_back(ev[i]);
    pop_random = 0;
    send_all();
    wait_drain();
    dt = t_last - t_road;
  endtask

  initial begin
    in_ds = 0; in_w = '0; cond_we = 0; cset_we = 0; err_clear = 0;
    cond_addr = '0; cond_data = '0; cset_addr = '0; cset_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Load RAMs
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk); cond_we = 1; cond_addr = 13'(a); cond_data = cond_map(13'(a));
    end
    @(negedge clk); cond_we = 0;
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); cset_we = 1; cset_addr = 8'(s); cset_data = cset(s);
    end
    @(negedge clk); cset_we = 0;

    for (int e = 0; e < 12; e++)
      make_event(e, $urandom_range(1, 5), (e == 3) ? 0 : -1, (e == 5));
    send_all();
    wait_drain();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end

    begin
      int d1, d10, d1f, d10f;
      timed_road(1, 0, d1);     // 4/5, 1 combination
      timed_road(5, 0, d10);    // 4/5, 10 combinations
      timed_road(1, 1, d1f);    // 5/5, 1 combination (5 fits)
      timed_road(5, 1, d10f);   // 5/5, 10 combinations (50 fits)
      $display("road timing: 4/5 %0d -> %0d, 5/5 %0d -> %0d clocks", d1, d10, d1f, d10f);
      checks += 2;
      if (d10 - d1 != 9)    begin failures++; $display("4/5 difference %0d, expected 9", d10 - d1); end
      if (d10f - d1f != 45) begin failures++; $display("5/5 difference %0d, expected 45", d10f - d1f); end
    end

    // Workload: the largest road commonly used, 25 words (four hits on each
    // of the five layers, two XFT tracks, the road identifier), giving
    // 4^5 x 2 = 2048 combinations and 10240 fits, far beyond 32 combinations.
    begin
      road_t r;
      word_t tr [$], ev [$];
      stats_t st;
      int f0, dt;
      st = '{default: 0};
      r = gen_road(5, 21'h0b16);
      for (int l = 0; l < N_SVX; l++) r.nh[l] = 4;
      r.nx = 2;
      road_words(r, ev);
      checks++;
      if (ev.size() != 25) begin failures++; $display("big road has %0d words", ev.size()); end
      expect_road(r, CUT, PEN, tr, st);
      foreach (tr[i]) exp_q.push_back(tr[i]);
      exp_q.push_back(ee_word({9'd0, st.ovf, 2'b0}, ^xor_words(tr), 8'h55));
      ev.push_back(ee_word(12'd0, ^xor_words(ev), 8'h55));
      foreach (ev[i]) in_q.push_back(ev[i]);
      f0 = n_fit;
      send_all();
      wait_drain();
      dt = t_last - t_road;
      $display("25-word road: %0d fits, %0d tracks, last fit %0d clocks after the road word",
               n_fit - f0, st.ntracks, dt);
      checks++;
      if (n_fit - f0 != 10240 || st.nfits != 10240) begin
        failures++;
        $display("big road gave %0d fits, model %0d, expected 10240", n_fit - f0, st.nfits);
      end
    end

    $display("mechanisms: five=%0d stall=%0d hold=%0d fits=%0d pass=%0d fail=%0d ovf_ev=%0d inv_ev=%0d par_ev=%0d",
             n_five, n_stall, n_hold, n_fit, n_pass, n_fail, n_ovf_ev, n_inv_ev, n_par_ev);
    checks += 6;
    if (n_five == 0)   begin failures++; $display("no 5/5 split"); end
    if (n_stall == 0)  begin failures++; $display("no organizer stall"); end
    if (n_pass == 0)   begin failures++; $display("no fit passed"); end
    if (n_fail == 0)   begin failures++; $display("no fit failed"); end
    if (n_ovf_ev == 0) begin failures++; $display("no fit overflow"); end
    if (n_inv_ev == 0) begin failures++; $display("no invalid road"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
