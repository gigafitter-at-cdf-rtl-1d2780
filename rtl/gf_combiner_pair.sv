// gf_combiner_pair: the two Combiners of a track processor working in
// alternation, so that one loads the next road from the Input FIFO while the
// other sends the combinations of the current road; together they keep the
// Combination FIFO fed continuously, as the document describes.
//
// Packets (roads and end-event tokens) are handed to the two Combiners in
// strict turn, and their outputs are taken in the same turn order, so
// combinations leave in the order the roads arrived. That ordering rule is
// this design's choice: it keeps the output predictable for a simulation, in
// the spirit of the document's deterministic merge.
//
// Interface: in_* is the show-ahead Input FIFO port; comb_* is a valid/ready
// stream into Combination FIFO 1. Invalid-data errors found while loading
// are ORed into the error field of the event's end-event token. Timing: one combination per clock
// sustained while the next road loads in the other Combiner.
module gf_combiner_pair
  import gf_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  svt_word_t in_word,
  output logic      in_pop,
  output logic      comb_valid,
  output comb7_t    comb,
  input  logic      comb_ready,
  output logic      err_invalid
);
  logic       load_turn, out_turn;
  logic [1:0] pop, pend, dn, cv, ei;
  comb7_t     cc [2];

  for (genvar i = 0; i < 2; i++) begin : g_comb
    gf_combiner #(.RAM_DEPTH(RAM_DEPTH)) u_comb (
      .clk, .rst_n,
      .load_en    (load_turn == 1'(i)),
      .in_valid,
      .in_word,
      .in_pop     (pop[i]),
      .pkt_end    (pend[i]),
      .out_en     (out_turn == 1'(i)),
      .done       (dn[i]),
      .comb_valid (cv[i]),
      .comb       (cc[i]),
      .comb_last  (),
      .comb_ready,
      .err_invalid(ei[i])
    );
  end

  assign in_pop      = |pop;
  assign comb_valid  = |cv;
  assign err_invalid = |ei;

  // Invalid-data errors of the event are reported in its End Event word.
  logic inv_acc;
  always_comb begin
    comb = cc[out_turn];
    if (comb.is_ee) comb.ee.err[E_INVALID] = comb.ee.err[E_INVALID] | inv_acc | err_invalid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_turn <= 1'b0;
      out_turn  <= 1'b0;
      inv_acc   <= 1'b0;
    end else begin
      if (comb_valid && comb_ready && comb.is_ee) inv_acc <= 1'b0;
      else if (err_invalid)                       inv_acc <= 1'b1;
      if (|pend) load_turn <= ~load_turn;
      if (|dn)   out_turn  <= ~out_turn;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop[0] && pop[1]));
  assert property (@(posedge clk) disable iff (!rst_n) !(cv[0] && cv[1]));
endmodule
