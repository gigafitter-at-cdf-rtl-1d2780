// tb_gf_mezzanine: self-checking test of one GigaFitter mezzanine: four
// track processors, their merger, spy buffers and error registers.
//
// It loads the condition and constant RAMs of the four processors through
// cfg_wedge and sends events on the four input cables, each driven
// independently with random gaps and obeying its HOLD line, while the
// output is popped with random pauses. Every output word is compared with
// gf_tb_pkg's prediction: the tracks of wedge 0, 1, 2, 3 (enabled wedges
// only), then one End Event word with the first enabled wedge's tag, the OR
// of the error flags (Lost Sync when tags differ) and the merged parity.
// Events include a 3/5 road, a wrong parity bit, a wedge out of sync, fit
// overflows and 5/5 roads, and the enabled set changes between groups of
// events. Finally the spy buffers are frozen, one more event passes, and the
// merger-output and wedge-0 input spy buffers are read back and compared
// with the words seen before the freeze.
module tb_gf_mezzanine;
  import gf_pkg::*;
  import gf_tb_pkg::*;

  localparam int     NW  = 4;
  localparam longint CUT = 600000;
  localparam int     PEN = 19;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [NW-1:0]     in_ds, in_hold, wedge_enable;
  svt_word_t         in_word [NW];
  logic              out_valid, out_pop, out_hold;
  svt_word_t         out_word;
  logic [1:0]        cfg_wedge;
  logic              cond_we, cset_we, err_clear, freeze_req;
  logic [COND_W-1:0] cond_addr;
  logic [SET_W-1:0]  cond_data, cset_addr;
  logic [CSET_W-1:0] cset_data;
  logic [3:0]        spy_sel;
  logic [7:0]        spy_addr;
  svt_word_t         spy_data;
  logic [ERR_W-1:0]  err_status [5];
  logic              svt_error;
  logic [NW-1:0]     ev_fit, ev_pass, ev_five, ev_stall;
  logic              ev_lost_sync, freeze;
  assign freeze = freeze_req;
  assign out_pop = out_valid && !out_hold;

  gf_mezzanine dut (
    .clk, .rst_n, .in_ds, .in_word, .in_hold, .wedge_enable,
    .out_valid, .out_word, .out_pop,
    .cfg_wedge, .cond_we, .cond_addr, .cond_data, .cset_we, .cset_addr, .cset_data,
    .chi2_cut(CHI2_W'(CUT)), .lc_penalty(8'(PEN)), .severity(12'h0), .err_clear,
    .freeze, .spy_sel, .spy_addr, .spy_data, .err_status,
    .svt_error, .ev_fit, .ev_pass, .ev_five, .ev_stall, .ev_lost_sync);

  int checks = 0, failures = 0;
  int n_five = 0, n_stall = 0, n_hold = 0, n_pass = 0, n_fit = 0, n_fail = 0;
  int n_ovf_ev = 0, n_lost = 0, n_lost_ev = 0, n_mode = 0, n_inv_ev = 0, n_par_ev = 0;
  word_t in_q [NW][$];
  word_t exp_q [$];
  word_t out_hist [$];
  word_t in0_hist [$];

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (|ev_five)      n_five++;
    if (|ev_stall)     n_stall++;
    if (|in_hold)      n_hold++;
    if (|ev_lost_sync) n_lost++;
    n_fit  += $countones(ev_fit);
    n_pass += $countones(ev_pass);
  end

  // ---------------- output checker ----------------
  always @(posedge clk) if (rst_n && out_pop) begin
    word_t e, g;
    g = '{ee: out_word.ee, ep: out_word.ep, data: out_word.data};
    out_hist.push_back(g);
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      if (failures < 10) $display("unexpected word ee=%b ep=%b %h", g.ee, g.ep, g.data);
    end else begin
      e = exp_q.pop_front();
      if (g != e) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0t: got ee=%b ep=%b %h exp ee=%b ep=%b %h", $time,
                   g.ee, g.ep, g.data, e.ee, e.ep, e.data);
      end
      if (e.ee && e.data[9 + E_FIT_OVF]) n_ovf_ev++;
      if (e.ee && e.data[9 + E_LOSTSYNC]) n_lost_ev++;
    end
  end

  // ---------------- drivers ----------------
  always @(negedge clk) begin
    out_hold <= ($urandom_range(0, 3) == 0);
    for (int w = 0; w < NW; w++) begin
      if (in_q[w].size() > 0 && !in_hold[w] && $urandom_range(0, 2) != 0) begin
        word_t x;
        x = in_q[w].pop_front();
        in_ds[w]   <= 1'b1;
        in_word[w] <= '{ee: x.ee, ep: x.ep, data: x.data};
        if (w == 0) in0_hist.push_back(x);
      end else in_ds[w] <= 1'b0;
    end
  end

  // ---------------- stimulus ----------------
  // One event on all enabled wedges. k3w: wedge given a 3/5 road; parw: wedge
  // with a wrong parity bit; syncw: wedge sent with a different tag.
  task automatic make_event(input int tag, input int k3w, input int parw, input int syncw);
    logic [11:0] err;
    logic [20:0] par;
    int first_tag;
    err = '0;
    par = '0;
    first_tag = -1;
    for (int w = 0; w < NW; w++) if (wedge_enable[w]) begin
      word_t tr [$], ev [$];
      stats_t st;
      int wtag;
      st = '{default: 0};
      wtag = (w == syncw) ? tag + 1 : tag;
      if (first_tag < 0) first_tag = wtag;
      else if (wtag != first_tag) err[E_LOSTSYNC] = 1'b1;
      gen_event($urandom_range(1, 2), (w == k3w) ? 0 : -1, CUT, PEN, wtag, w, ev, tr, st);
      if (w == parw) begin
        ev[ev.size() - 1].data[8] = ~ev[ev.size() - 1].data[8];
        err[E_PARITY] = 1'b1;
        n_par_ev++;
      end
      if (st.inv) begin err[E_INVALID] = 1'b1; n_inv_ev++; end
      if (st.ovf) err[E_FIT_OVF] = 1'b1;
      n_fail += st.nfits - st.npass;
      foreach (tr[i]) exp_q.push_back(tr[i]);
      par ^= xor_words(tr);
      foreach (ev[i]) in_q[w].push_back(ev[i]);
    end
    exp_q.push_back(ee_word(err, ^par, 8'(first_tag)));
  endtask

  // Waits until every expected word has come out, or until no word has come
  // out for 20000 clocks (a stuck design is then reported as missing words).
  task automatic wait_drain();
    int idle = 0;
    while (exp_q.size() > 0 && idle < 20000) begin
      @(posedge clk);
      idle = out_pop ? 0 : idle + 1;
    end
    repeat (50) @(posedge clk);
  endtask

  task automatic set_mode(input logic [NW-1:0] m);
    @(negedge clk);
    if (m != wedge_enable) n_mode++;
    wedge_enable = m;
  endtask

  int tag = 0;

  initial begin
    in_ds = '0; out_hold = 0; wedge_enable = '1; cfg_wedge = 0;
    cond_we = 0; cset_we = 0; err_clear = 0; freeze_req = 0;
    cond_addr = '0; cond_data = '0; cset_addr = '0; cset_data = '0;
    spy_sel = 0; spy_addr = 0;
    for (int w = 0; w < NW; w++) in_word[w] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Configuration of all twelve track processors.
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      cfg_wedge = 2'(w);
      for (int a = 0; a < 8192; a++) begin
        @(negedge clk); cond_we = 1; cond_addr = 13'(a); cond_data = cond_map(13'(a));
      end
      @(negedge clk); cond_we = 0;
      for (int s = 0; s < 256; s++) begin
        @(negedge clk); cset_we = 1; cset_addr = 8'(s); cset_data = cset(s);
      end
      @(negedge clk); cset_we = 0;
    end

    // Group 1: all wedges.
    set_mode('1);
    for (int e = 0; e < 5; e++, tag++)
      make_event(tag, (e == 1) ? 2 : -1, (e == 2) ? 3 : -1, (e == 3) ? 1 : -1);
    wait_drain();
    // Group 2: mode switch to a subset; mezzanine 2 idle.
    set_mode(4'b1010);
    for (int e = 0; e < 3; e++, tag++)
      make_event(tag, -1, -1, -1);
    wait_drain();
    // Group 3: back to all wedges, tags continue.
    set_mode('1);
    for (int e = 0; e < 2; e++, tag++)
      make_event(tag, -1, -1, (e == 1) ? 0 : -1);
    wait_drain();
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d words missing", exp_q.size());
      exp_q.delete();
    end

    // Spy buffers: freeze, run one more event, read back.
    begin
      word_t oh [$], ih [$];
      @(negedge clk); freeze_req = 1;
      oh = out_hist;
      ih = in0_hist;
      make_event(tag, -1, -1, -1);
      tag++;
      wait_drain();
      for (int i = 0; i < 256 && i < oh.size(); i++) begin
        int k;
        k = oh.size() - 1 - i;
        @(negedge clk); spy_sel = 8; spy_addr = 8'(k);
        @(negedge clk);
        checks++;
        if (spy_data.ee !== oh[k].ee || spy_data.ep !== oh[k].ep || spy_data.data !== oh[k].data) begin
          failures++;
          if (failures < 10) $display("merger spy word %0d differs", k);
        end
      end
      for (int i = 0; i < 256 && i < ih.size(); i++) begin
        int k;
        k = ih.size() - 1 - i;
        @(negedge clk); spy_sel = 0; spy_addr = 8'(k);
        @(negedge clk);
        checks++;
        if (spy_data.ee !== ih[k].ee || spy_data.ep !== ih[k].ep || spy_data.data !== ih[k].data) begin
          failures++;
          if (failures < 10) $display("wedge 0 input spy word %0d differs", k);
        end
      end
      freeze_req = 0;
    end

    $display("mechanisms: five=%0d stall=%0d hold=%0d fits=%0d pass=%0d fail=%0d ovf_ev=%0d lost_sync=%0d/%0d mode=%0d inv_ev=%0d par_ev=%0d",
             n_five, n_stall, n_hold, n_fit, n_pass, n_fail, n_ovf_ev, n_lost, n_lost_ev, n_mode,
             n_inv_ev, n_par_ev);
    checks += 9;
    if (n_five == 0)    begin failures++; $display("no 5/5 split"); end
    if (n_stall == 0)   begin failures++; $display("no organizer stall"); end
    if (n_hold == 0)    begin failures++; $display("no HOLD"); end
    if (n_pass == 0)    begin failures++; $display("no fit passed"); end
    if (n_fail == 0)    begin failures++; $display("no fit failed"); end
    if (n_ovf_ev == 0)  begin failures++; $display("no fit overflow"); end
    if (n_lost == 0 || n_lost_ev == 0) begin failures++; $display("no lost sync"); end
    if (n_mode < 2)     begin failures++; $display("no mode switch"); end
    if (n_inv_ev == 0 || n_par_ev == 0) begin failures++; $display("no data error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
