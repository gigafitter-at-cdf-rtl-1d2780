// gf_format_converter: turns 7-coordinate combinations (five SVX hits plus
// the XFT curvature and phi, with a hitmap of the layers present) into the
// 6-coordinate fits the rest of the pipeline uses (four SVX hits plus XFT),
// sitting between the two Combination FIFOs as in the document.
//
// A 4/5 combination gives one fit made of its four present layers. A 5/5
// combination gives five fits, each leaving out a different layer, sent on
// five consecutive clocks and marked as one sequence (seq_first on the first,
// seq_last on the fifth) so the Comparator keeps only the best of them; this
// is how the document's GigaFitter fits every layer choice of a full track.
// Each fit also carries the constant-selection conditions: the zeta barrel
// of the innermost and outermost used hits, the left-out layer and the
// long-cluster map of the four used hits. Dropping combinations with fewer
// than four layers (reported on err_invalid and in the error field of the
// event's end-event token) is this design's choice.
//
// Interface: valid/ready on both sides; an end-event token passes through
// unchanged. Timing: combinational path from input to output, one fit per
// clock; a 5/5 combination is held for five clocks. The road identifier,
// XFT track and end-event fields are copied from input to output, so those
// output bits are plain wires from the input.
module gf_format_converter
  import gf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   c7_valid,
  input  comb7_t c7,
  output logic   c7_ready,
  output logic   c6_valid,
  output fit_t   c6,
  input  logic   c6_ready,
  output logic   err_invalid
);
  logic [2:0] k;          // layer left out of the current 5/5 fit
  logic [2:0] nhits;
  logic       five, bad;
  logic       inv_acc;    // a combination of this event was dropped

  always_comb begin
    nhits = '0;
    for (int l = 0; l < N_SVX; l++) nhits += 3'(c7.hitmap[l]);
  end
  assign five = (nhits == 3'd5);
  assign bad  = !c7.is_ee && (nhits < 3'd4);

  // Build the fit that leaves out layer `miss`.
  always_comb begin
    logic [2:0] miss;
    int unsigned j;
    c6           = '0;
    c6.is_ee     = c7.is_ee;
    c6.ee        = c7.ee;
    c6.xft       = c7.xft;
    c6.road      = c7.road;
    c6.five      = five;
    c6.x[4]      = c7.xft.c;
    c6.x[5]      = c7.xft.phi;
    miss = 3'd0;
    for (int l = N_SVX - 1; l >= 0; l--)
      if (!c7.hitmap[l]) miss = 3'(l);
    if (five) miss = k;
    c6.miss      = miss;
    c6.seq_first = !five || (k == 3'd0);
    c6.seq_last  = !five || (k == 3'd4);
    j = 0;
    for (int l = 0; l < N_SVX; l++) begin
      if (3'(l) != miss && j < 4) begin
        c6.x[j]     = X_W'(c7.hit[l].coord);
        c6.lcmap[j] = c7.hit[l].lc;
        if (j == 0) c6.zin = c7.hit[l].zeta;
        if (j == 3) c6.zout = c7.hit[l].zeta;
        j++;
      end
    end
    if (c7.is_ee) begin
      c6.ee.err[E_INVALID] = c7.ee.err[E_INVALID] | inv_acc;
      c6.x = '0; c6.lcmap = '0; c6.zin = '0; c6.zout = '0; c6.miss = '0;
      c6.seq_first = 1'b1; c6.seq_last = 1'b1; c6.five = 1'b0;
    end
  end

  assign c6_valid    = c7_valid && !bad;
  assign c7_ready    = bad || (c6_ready && (!five || c7.is_ee || k == 3'd4));
  assign err_invalid = c7_valid && bad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= '0;
      inv_acc <= 1'b0;
    end else begin
      if (c6_valid && c6_ready && five && !c7.is_ee)
        k <= (k == 3'd4) ? 3'd0 : k + 1'b1;
      if (c6_valid && c6_ready && c7.is_ee) inv_acc <= 1'b0;
      else if (err_invalid)                 inv_acc <= 1'b1;
    end
  end
endmodule
