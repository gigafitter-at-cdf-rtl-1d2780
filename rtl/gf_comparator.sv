// gf_comparator: judges the fits of a track processor and keeps the best
// track of each sequence.
//
// The chi2 of a fit is the sum of the squares of its three chi components.
// As in the document it is computed by multiply-accumulate units, three
// clocks per fit, with N_UNITS = 3 units taken in turn so that one fit per
// clock is sustained; since all units have the same latency, fits leave them
// in arrival order. A fit passes when its chi2 is at or below the
// programmable cut `chi2_cut` and no scalar product overflowed. A passing fit
// gets the goodness q = chi2 + lc_penalty * (number of long-cluster hits
// used), lower being better; the document only says that q combines chi2
// with the used layers and hit quality, so this formula is this design's
// choice. Within a sequence (the five fits of a 5/5 combination; a 4/5 fit
// is a sequence of one) the best passing fit is kept, the earlier one on a
// tie, and at the end of the sequence it is written to the Track FIFO if
// there was one. End-event tokens go straight through, carrying the
// fit-overflow error if any fit of their event saturated.
//
// Timing: a fit entering at clock t leaves its decision at t + 4.
module gf_comparator
  import gf_pkg::*;
#(
  parameter int unsigned N_UNITS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              f_valid,
  input  fitres_t           f,
  input  logic [CHI2_W-1:0] chi2_cut,
  input  logic [7:0]        lc_penalty,
  output logic              trk_valid,
  output track_t            trk,
  output logic              n_fit_pass,   // pulse: a fit passed the cut
  output logic              n_fit_fail    // pulse: a fit failed the cut
);
  localparam int unsigned SQ_W = 2 * RES_W + 2;   // sum of three squares

  // chi2 units: load three components, accumulate one square per clock.
  logic [$clog2(N_UNITS)-1:0] rr;
  logic [N_UNITS-1:0]         u_busy, u_done;
  logic [1:0]                 u_k   [N_UNITS];
  fitres_t                    u_f   [N_UNITS];
  logic [SQ_W-1:0]            u_acc [N_UNITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr     <= '0;
      u_busy <= '0;
      u_done <= '0;
      for (int u = 0; u < N_UNITS; u++) begin
        u_k[u]   <= '0;
        u_acc[u] <= '0;
        u_f[u]   <= '0;
      end
    end else begin
      u_done <= '0;
      for (int u = 0; u < N_UNITS; u++) begin
        if (u_busy[u]) begin
          logic signed [RES_W-1:0] ch;
          ch = $signed(u_f[u].p[3 + u_k[u]]);
          u_acc[u] <= u_acc[u] + SQ_W'(ch * ch);
          if (u_k[u] == 2'd2) begin
            u_busy[u] <= 1'b0;
            u_done[u] <= 1'b1;
          end
          u_k[u] <= u_k[u] + 1'b1;
        end
      end
      if (f_valid) begin
        // First square is taken as the unit loads: three clocks per fit.
        u_f[rr]    <= f;
        u_acc[rr]  <= SQ_W'($signed(f.p[3]) * $signed(f.p[3]));
        u_k[rr]    <= 2'd1;
        u_busy[rr] <= 1'b1;
        rr <= (rr == $clog2(N_UNITS)'(N_UNITS - 1)) ? '0 : rr + 1'b1;
      end
    end
  end

  // Pick the unit that finished (at most one per clock).
  logic            d_valid;
  fitres_t         d_f;
  logic [SQ_W-1:0] d_chi2;
  always_comb begin
    d_valid = 1'b0;
    d_f     = '0;
    d_chi2  = '0;
    for (int u = 0; u < N_UNITS; u++)
      if (u_done[u]) begin
        d_valid = 1'b1;
        d_f     = u_f[u];
        d_chi2  = u_acc[u];
      end
  end

  // Decision: chi2 cut, goodness, best of sequence.
  logic [CHI2_W-1:0] chi2_sat;
  logic [CHI2_W+3:0] q;
  logic              pass;
  logic [2:0]        nlc;
  always_comb begin
    chi2_sat = (d_chi2 > SQ_W'({CHI2_W{1'b1}})) ? {CHI2_W{1'b1}} : CHI2_W'(d_chi2);
    nlc      = 3'(d_f.side.lcmap[0]) + 3'(d_f.side.lcmap[1]) + 3'(d_f.side.lcmap[2])
             + 3'(d_f.side.lcmap[3]);
    q        = (CHI2_W+4)'(chi2_sat) + (CHI2_W+4)'(lc_penalty * nlc);
    pass     = !d_f.ovf && (d_chi2 <= SQ_W'(chi2_cut));
  end

  logic              best_v;
  logic [CHI2_W+3:0] best_q;
  track_t            best;
  track_t            cur;
  logic              take;
  logic              ovf_acc;   // a fit of this event overflowed

  always_comb begin
    cur      = '0;
    cur.side = d_f.side;
    cur.c    = $signed(d_f.p[0]);
    cur.d    = $signed(d_f.p[1]);
    cur.phi  = $signed(d_f.p[2]);
    cur.chi2 = chi2_sat;
    cur.ovf  = d_f.ovf;
    take     = pass && (d_f.side.seq_first || !best_v || q < best_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_v     <= 1'b0;
      ovf_acc    <= 1'b0;
      best_q     <= '0;
      best       <= '0;
      trk_valid  <= 1'b0;
      trk        <= '0;
      n_fit_pass <= 1'b0;
      n_fit_fail <= 1'b0;
    end else begin
      trk_valid  <= 1'b0;
      n_fit_pass <= d_valid && !d_f.side.is_ee && pass;
      n_fit_fail <= d_valid && !d_f.side.is_ee && !pass;
      if (d_valid && !d_f.side.is_ee && d_f.ovf) ovf_acc <= 1'b1;
      if (d_valid) begin
        if (d_f.side.is_ee) begin
          trk_valid <= 1'b1;
          trk       <= cur;
          trk.side.ee.err[E_FIT_OVF] <= d_f.side.ee.err[E_FIT_OVF] | ovf_acc;
          best_v    <= 1'b0;
          ovf_acc   <= 1'b0;
        end else begin
          if (d_f.side.seq_first) best_v <= 1'b0;
          if (take) begin
            best   <= cur;
            best_q <= q;
            best_v <= 1'b1;
          end
          if (d_f.side.seq_last) begin
            if (take) begin
              trk_valid <= 1'b1;
              trk       <= cur;
            end else if (best_v && !d_f.side.seq_first) begin
              trk_valid <= 1'b1;
              trk       <= best;
            end
            best_v <= 1'b0;
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(u_done));
endmodule
