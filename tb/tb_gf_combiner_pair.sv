// tb_gf_combiner_pair: self-checking test of the two alternating Combiners.
//
// A stream of events is offered on the show-ahead input with random gaps:
// roads with 0-3 hits per layer (4/5, 5/5 and 3/5 roads), one or two XFT
// tracks, now and then a road without XFT track, each event closed by an
// End Event word.
// The combination stream, taken with random back-pressure, must hold every
// combination of every road in arrival order and odometer order (layer 0
// fastest, XFT slowest), and one end-event token per event whose
// invalid-data flag is set exactly when the event had a rejected road. It also checks that the pair keeps one combination per clock
// while the next road loads: a run of large roads with no back-pressure must
// take about one clock per combination.
module tb_gf_combiner_pair;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic      in_valid, in_pop, comb_valid, comb_ready, err_invalid, gate, rgate;
  svt_word_t in_word;
  comb7_t    comb;

  gf_combiner_pair dut (.clk, .rst_n, .in_valid, .in_word, .in_pop, .comb_valid, .comb,
                        .comb_ready, .err_invalid);

  int checks = 0, failures = 0, n_inv = 0, n_out = 0;
  word_t  q [$];
  comb7_t exp_q [$];
  bit     busy_test = 0;

  assign in_valid   = (gate || busy_test) && q.size() > 0;
  assign in_word    = (q.size() > 0) ? '{ee: q[0].ee, ep: q[0].ep, data: q[0].data} : '0;
  assign comb_ready = rgate || busy_test;

  always @(negedge clk) begin
    gate  <= ($urandom_range(0, 3) != 0);
    rgate <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (in_pop) begin
      checks++;
      if (!in_valid) begin failures++; $display("pop while not valid"); end
      else void'(q.pop_front());
    end
    if (comb_valid && comb_ready) begin
      comb7_t e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected combination"); end
      else begin
        e = exp_q.pop_front();
        if (!e.is_ee) e.ee = comb.ee;       // no meaning outside end-event tokens
        if (e.is_ee ? (comb.is_ee !== 1'b1 || comb.ee !== e.ee) : (comb !== e)) begin
          failures++;
          if (failures < 10) $display("%0t: got %h exp %h", $time, comb, e);
        end
      end
    end
  end

  task automatic make_event(input int tag, input int nroads, input bit odd);
    word_t ev [$];
    comb7_t t;
    bit inv;
    inv = 0;
    for (int i = 0; i < nroads; i++) begin
      road_t r;
      r = gen_road(($urandom_range(0, 5) == 0) ? 3 : 0, 21'($urandom));
      if (odd && i == 0) r.nx = 0;                       // no XFT track
      road_words(r, ev);
      if (r.nx == 0) inv = 1;
      expect_combs(r, exp_q);
    end
    foreach (ev[i]) q.push_back(ev[i]);
    q.push_back(ee_word(12'd0, 1'b0, 8'(tag)));
    t = '0;
    t.is_ee = 1;
    t.ee = ee_data_t'({12'(inv) << E_INVALID, 1'b0, 8'(tag)});
    exp_q.push_back(t);
    if (inv) n_inv++;
  endtask

  task automatic drain();
    int t = 0;
    while ((exp_q.size() > 0 || q.size() > 0) && t < 200000) begin @(posedge clk); t++; end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 60; e++) make_event(e, $urandom_range(1, 4), (e % 10 == 7));
    drain();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d combinations missing", exp_q.size()); end
    // throughput: 8 roads of 2x2x2x2x2 hits, one XFT = 256 combinations
    begin
      int t0, n0;
      busy_test = 1;
      n0 = n_out;
      for (int i = 0; i < 8; i++) begin
        road_t r;
        word_t ev [$];
        ev.delete();
        r = gen_road(5, 21'(i));
        for (int l = 0; l < N_SVX; l++) r.nh[l] = 2;
        r.nx = 1;
        road_words(r, ev);
        foreach (ev[k]) q.push_back(ev[k]);
        expect_combs(r, exp_q);
      end
      q.push_back(ee_word(12'd0, 1'b0, 8'd99));
      begin comb7_t t; t = '0; t.is_ee = 1; t.ee = ee_data_t'({12'd0, 1'b0, 8'd99}); exp_q.push_back(t); end
      t0 = $time / 8;
      drain();
      t0 = $time / 8 - t0 - 10;
      $display("257 outputs in %0d clocks", t0);
      checks++;
      if (n_out - n0 != 257 || t0 > 257 + 30) begin failures++; $display("throughput too low"); end
      busy_test = 0;
    end
    $display("events with invalid data=%0d", n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
