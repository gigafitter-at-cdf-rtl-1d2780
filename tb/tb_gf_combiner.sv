// tb_gf_combiner: self-checking test of one Combiner working alone
// (load_en and out_en held high, so it alternates loading and combining).
//
// A stream of events is offered on the show-ahead input with random gaps:
// roads with 0-3 hits per layer (4/5, 5/5 and 3/5 roads), one or two XFT
// tracks, now and then a road without XFT track, each event closed by an
// End Event word. The combination stream, taken with random back-pressure,
// must hold every combination of every road in odometer order (layer 0
// fastest, XFT slowest) followed by one end-event token per event carrying
// the End Event data unchanged; a road without XFT track must give no
// combination and one err_invalid pulse. pkt_end must mark the last word of
// each packet and done the end of each packet's output.
module tb_gf_combiner;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic      in_valid, in_pop, comb_valid, comb_ready, err_invalid, gate, rgate;
  svt_word_t in_word;
  comb7_t    comb;

  logic pkt_end, done, comb_last;
  gf_combiner dut (.clk, .rst_n, .load_en(1'b1), .in_valid, .in_word, .in_pop, .pkt_end,
                   .out_en(1'b1), .done, .comb_valid, .comb, .comb_last, .comb_ready,
                   .err_invalid);
  int n_pkt_end = 0, n_done = 0, n_err = 0, n_pkts = 0;
  always @(posedge clk) if (rst_n) begin
    if (pkt_end) begin
      n_pkt_end++;
      checks++;
      if (!(in_pop && (in_word.ep || in_word.ee))) begin failures++; $display("pkt_end not on a packet end"); end
    end
    if (done) n_done++;
    if (err_invalid) n_err++;
  end

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
      n_pkts++;
      expect_combs(r, exp_q);
    end
    foreach (ev[i]) q.push_back(ev[i]);
    q.push_back(ee_word(12'd0, 1'b0, 8'(tag)));
    t = '0;
    t.is_ee = 1;
    t.ee = ee_data_t'({12'd0, 1'b0, 8'(tag)});
    n_pkts++;
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
    checks += 3;
    if (n_pkt_end != n_pkts) begin failures++; $display("pkt_end %0d, packets %0d", n_pkt_end, n_pkts); end
    if (n_done != n_pkts)    begin failures++; $display("done %0d, packets %0d", n_done, n_pkts); end
    if (n_err != n_inv)      begin failures++; $display("err_invalid %0d, rejected roads %0d", n_err, n_inv); end
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
