// tb_gf_formatter: self-checking test of the track packet Formatter.
//
// Random tracks and end-event entries are offered with random gaps and the
// output is held at random. Each track must come out as its 7-word packet
// (layout in the Formatter header) with End Packet on the last word, and
// each end-event entry as one End Event word with the input tag, the input
// error flags ORed with err_local, and the parity of all the event's words.
// ee_sent must pulse with each End Event word, nothing may be sent while
// out_hold is high, and an entry is popped only after its last word.
module tb_gf_formatter;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic             trk_valid, trk_pop, ee_sent, out_valid, out_hold, gate;
  track_t           trk;
  logic [ERR_W-1:0] err_local;
  svt_word_t        out_word;

  gf_formatter dut (.clk, .rst_n, .trk_valid, .trk, .trk_pop, .err_local, .ee_sent, .out_valid,
                    .out_word, .out_hold);

  int checks = 0, failures = 0, n_ee = 0, n_sent = 0, n_hold = 0;
  track_t q [$];
  word_t  exp_q [$];
  logic [20:0] par = '0;

  assign trk_valid = gate && q.size() > 0;
  assign trk       = (q.size() > 0) ? q[0] : '0;

  always @(negedge clk) begin
    gate      <= ($urandom_range(0, 4) != 0);
    out_hold  <= ($urandom_range(0, 3) == 0);
    err_local <= ($urandom_range(0, 3) == 0) ? ERR_W'(1 << $urandom_range(0, 4)) : '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_hold && trk_valid) n_hold++;
    if (ee_sent) n_sent++;
    check(ee_sent == (out_valid && out_word.ee), "ee_sent");
    if (out_valid) begin
      word_t e;
      check(!out_hold, "word sent during hold");
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        e = exp_q.pop_front();
        if (e.ee) begin
          ee_data_t x;
          x = ee_data_t'(e.data);
          x.err |= err_local;
          x.parity = ^par;
          e.data = DATA_W'(x);
          par = '0;
        end else par ^= e.data;
        check(out_word.ee === e.ee && out_word.ep === e.ep && out_word.data === e.data,
              $sformatf("word: got %b%b %h exp %b%b %h", out_word.ee, out_word.ep,
                        out_word.data, e.ee, e.ep, e.data));
      end
    end
    if (trk_pop) begin
      check(trk_valid, "pop while empty");
      void'(q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      track_t t;
      word_t  w;
      t = track_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      t.side.is_ee = ($urandom_range(0, 7) == 0);
      q.push_back(t);
      if (t.side.is_ee) begin
        exp_q.push_back(ee_word(t.side.ee.err, 1'b0, t.side.ee.tag));
        n_ee++;
      end else begin
        w.ee = 0; w.ep = 0;
        w.data = {t.side.five, t.ovf, 1'b0, t.phi};             exp_q.push_back(w);
        w.data = {t.side.miss, t.d};                            exp_q.push_back(w);
        w.data = {t.side.lcmap[3:1], t.c};                      exp_q.push_back(w);
        w.data = t.chi2;                                        exp_q.push_back(w);
        w.data = {t.side.lcmap[0], 5'b0, t.side.xft.c};         exp_q.push_back(w);
        w.data = {6'b0, t.side.xft.phi};                        exp_q.push_back(w);
        w.ep = 1; w.data = t.side.road;                         exp_q.push_back(w);
      end
    end
    while (q.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    if (n_sent != n_ee) begin failures++; $display("ee_sent %0d, end events %0d", n_sent, n_ee); end
    if (n_hold == 0) begin failures++; $display("hold not exercised"); end
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
