// tb_gf_merger: self-checking test of the deterministic merger with four
// inputs (the mezzanine configuration).
//
// Each input receives events of random length ending in an End Event word
// with a tag and random error flags; the inputs present their words with
// random gaps and the output is held at random. The expected output of an
// event is the words of the enabled inputs in input order followed by one
// End Event word: tag of the first enabled input, OR of the error flags,
// Lost Sync if any tag differs, and the parity of the merged words. Events
// run in groups with different enable masks (including one input only), and
// some events carry a wrong tag on one input, which must pulse lost_sync.
module tb_gf_merger;
  import gf_pkg::*;
  import gf_tb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [N-1:0] in_enable, in_valid, in_pop, gate;
  svt_word_t    in_word [N];
  logic         out_valid, out_hold, lost_sync;
  svt_word_t    out_word;

  gf_merger dut (.clk, .rst_n, .in_enable, .in_valid, .in_word, .in_pop, .out_valid,
                 .out_word, .out_hold, .lost_sync);

  int checks = 0, failures = 0, n_lost = 0, n_hold = 0;
  word_t q [N][$];
  word_t exp_q [$];

  always_comb
    for (int i = 0; i < N; i++) begin
      in_valid[i] = gate[i] && q[i].size() > 0;
      in_word[i]  = (q[i].size() > 0) ? '{ee: q[i][0].ee, ep: q[i][0].ep, data: q[i][0].data} : '0;
    end

  always @(negedge clk) begin
    gate     <= N'($urandom);
    out_hold <= ($urandom_range(0, 3) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (in_pop[i]) begin
      checks++;
      if (!in_valid[i]) begin failures++; $display("pop of an empty input %0d", i); end
      else void'(q[i].pop_front());
    end
    if (lost_sync) n_lost++;
    if (out_hold) n_hold++;
    if (out_valid) begin
      word_t e;
      checks++;
      if (out_hold) begin failures++; $display("word sent during hold"); end
      if (exp_q.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        e = exp_q.pop_front();
        if (out_word.ee !== e.ee || out_word.ep !== e.ep || out_word.data !== e.data) begin
          failures++;
          if (failures < 10) $display("%0t: got %b%b %h exp %b%b %h", $time, out_word.ee,
                                      out_word.ep, out_word.data, e.ee, e.ep, e.data);
        end
      end
    end
  end

  task automatic make_event(input int tag, input int badw);
    logic [11:0] err;
    logic [20:0] par;
    int first;
    err = '0; par = '0; first = -1;
    for (int i = 0; i < N; i++) if (in_enable[i]) begin
      int n, t;
      logic [11:0] e;
      word_t w;
      n = $urandom_range(0, 6);
      for (int k = 0; k < n; k++) begin
        w.ee = 0; w.ep = ($urandom_range(0, 3) == 0); w.data = 21'($urandom);
        q[i].push_back(w); exp_q.push_back(w); par ^= w.data;
      end
      t = (i == badw) ? tag + 3 : tag;
      if (first < 0) first = t; else if (t != first) err[E_LOSTSYNC] = 1'b1;
      e = ($urandom_range(0, 3) == 0) ? 12'(1 << $urandom_range(0, 3)) : 12'd0;
      err |= e;
      q[i].push_back(ee_word(e, $urandom_range(0, 1), 8'(t)));
    end
    exp_q.push_back(ee_word(err, ^par, 8'(first)));
  endtask

  task automatic drain();
    int t = 0;
    while ((exp_q.size() > 0 || q[0].size() + q[1].size() + q[2].size() + q[3].size() > 0)
           && t < 100000) begin @(posedge clk); t++; end
    repeat (10) @(posedge clk);
  endtask

  logic [N-1:0] masks [5] = '{4'b1111, 4'b0101, 4'b1000, 4'b0110, 4'b1111};

  initial begin
    in_enable = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 5; g++) begin
      @(negedge clk); in_enable = masks[g];
      repeat (5) @(negedge clk);
      for (int e = 0; e < 40; e++)
        make_event(g * 40 + e, ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3) : -1);
      drain();
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    checks++;
    if (n_lost == 0 || n_hold == 0) begin failures++; $display("lost sync or hold not seen"); end
    $display("lost_sync=%0d", n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
