// gf_track_processor: one GigaFitter track processing module, the engine
// that fits the roads of one SVT wedge (the work one old TF++ board did).
//
// Pipeline, as in the document's fitter-module figure:
//   Input FIFO (SVT cable; almost-full is the HOLD line)
//   -> two Combiners in alternation (all hit combinations of each road,
//      one per clock, 7-coordinate format)
//   -> Combination FIFO 1 -> format converter (7 -> 6 coordinates; a 5/5
//      combination becomes five 4-layer fits) -> Combination FIFO 2
//   -> Fit Organizer (condition RAM -> constant-set RAM, issues one fit
//      per clock to six Serializers in turn)
//   -> six Serializer + DSP Fitter pairs (six 6-clock scalar products each)
//   -> Comparator (chi2, cut, best fit of each sequence) -> Track FIFO
//   -> Formatter (7-word track packets, End Event) -> output FIFO.
// Everything after the Combiners runs at one fit per clock. The only place
// that stops is the Fit Organizer: it stops popping while the Track FIFO
// could not absorb every fit already in flight (the `stall` output), so no
// stage after it ever needs back-pressure, as in the document's fully
// synchronous pipeline.
//
// The input parity of each event is checked when its End Event word is
// taken. Parity, invalid-data and fit-overflow errors travel in band with the
// end-event token of their event, so each lands in the End Event word of the
// event that caused it; FIFO overflows, which belong to no event, go into
// the next End Event sent. All errors also go to the sticky error register
// and, when severe, to svt_error. FIFO depths and the Track FIFO reserve are this design's
// choices; the document runs everything in one 120 MHz clock domain and so
// does this model.
module gf_track_processor
  import gf_pkg::*;
#(
  parameter int unsigned IN_DEPTH   = 64,
  parameter int unsigned C1_DEPTH   = 64,
  parameter int unsigned C2_DEPTH   = 16,
  parameter int unsigned TRK_DEPTH  = 64,
  parameter int unsigned TRK_RESERVE = 24,
  parameter int unsigned OUT_DEPTH  = 64,
  parameter int unsigned N_SER      = 6,
  parameter int unsigned N_SETS     = 256,
  parameter int unsigned RES_SHIFT  = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  // SVT cable from the HitBuffer
  input  logic                in_ds,
  input  svt_word_t           in_word,
  output logic                in_hold,
  // Output stream (show-ahead) to the merger
  output logic                out_valid,
  output svt_word_t           out_word,
  input  logic                out_pop,
  // Configuration
  input  logic                cond_we,
  input  logic [COND_W-1:0]   cond_addr,
  input  logic [SET_W-1:0]    cond_data,
  input  logic                cset_we,
  input  logic [SET_W-1:0]    cset_addr,
  input  logic [CSET_W-1:0]   cset_data,
  input  logic [CHI2_W-1:0]   chi2_cut,
  input  logic [7:0]          lc_penalty,
  input  logic [ERR_W-1:0]    severity,
  input  logic                err_clear,
  // Status
  output logic [ERR_W-1:0]    err_status,
  output logic                svt_error,
  output logic                ev_fit,       // a fit entered the Comparator
  output logic                ev_pass,      // a fit passed the chi2 cut
  output logic                ev_five,      // a 5/5 combination was split
  output logic                stall         // Fit Organizer held
);
  localparam int unsigned C7_W  = $bits(comb7_t);
  localparam int unsigned F_W   = $bits(fit_t);
  localparam int unsigned T_W   = $bits(track_t);

  // ---------------- Input FIFO and parity check ----------------
  logic      in_empty, in_pop, in_ovf;
  svt_word_t in_head, in_mod;
  logic [DATA_W-1:0] in_par;
  logic      par_err;

  svt_fifo #(.W(SVT_W), .DEPTH(IN_DEPTH), .AF_MARGIN(16)) u_in_fifo (
    .clk, .rst_n, .wr_en(in_ds), .wr_data(in_word), .rd_en(in_pop),
    .rd_data(in_head), .empty(in_empty), .full(), .almost_full(in_hold),
    .count(), .overflow(in_ovf));

  ee_data_t in_ee;
  always_comb begin
    in_ee   = ee_data_t'(in_head.data);
    par_err = in_head.ee && (in_ee.parity != ^in_par);
    in_mod  = in_head;
    if (in_head.ee) begin
      in_ee.err[E_PARITY] = in_ee.err[E_PARITY] | par_err;
      in_mod.data = DATA_W'(in_ee);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_par <= '0;
    else if (in_pop) in_par <= in_head.ee ? '0 : (in_par ^ in_head.data);
  end

  // ---------------- Combiners ----------------
  logic   pc_valid, pc_ready, pair_inv;
  comb7_t pc;
  gf_combiner_pair u_pair (
    .clk, .rst_n, .in_valid(!in_empty), .in_word(in_mod), .in_pop,
    .comb_valid(pc_valid), .comb(pc), .comb_ready(pc_ready), .err_invalid(pair_inv));

  logic   c1_empty, c1_full, c1_pop, c1_ovf;
  logic [C7_W-1:0] c1_head;
  assign pc_ready = !c1_full;
  svt_fifo #(.W(C7_W), .DEPTH(C1_DEPTH), .AF_MARGIN(1)) u_comb_fifo1 (
    .clk, .rst_n, .wr_en(pc_valid && pc_ready), .wr_data(pc), .rd_en(c1_pop),
    .rd_data(c1_head), .empty(c1_empty), .full(c1_full), .almost_full(),
    .count(), .overflow(c1_ovf));

  // ---------------- 7 -> 6 coordinate conversion ----------------
  logic c7_ready, c6_valid, c6_ready, conv_inv;
  fit_t c6;
  gf_format_converter u_conv (
    .clk, .rst_n, .c7_valid(!c1_empty), .c7(comb7_t'(c1_head)), .c7_ready,
    .c6_valid, .c6, .c6_ready, .err_invalid(conv_inv));
  assign c1_pop = !c1_empty && c7_ready;

  logic c2_empty, c2_full, c2_pop, c2_ovf;
  logic [F_W-1:0] c2_head;
  assign c6_ready = !c2_full;
  svt_fifo #(.W(F_W), .DEPTH(C2_DEPTH), .AF_MARGIN(1)) u_comb_fifo2 (
    .clk, .rst_n, .wr_en(c6_valid && c6_ready), .wr_data(c6), .rd_en(c2_pop),
    .rd_data(c2_head), .empty(c2_empty), .full(c2_full), .almost_full(),
    .count(), .overflow(c2_ovf));

  // ---------------- Fit Organizer ----------------
  logic [$clog2(TRK_DEPTH+1)-1:0] trk_count;
  logic [N_SER-1:0]  ser_start;
  fit_t              ser_fit;
  logic [CSET_W-1:0] ser_cset;
  assign stall = !c2_empty && (trk_count >= $bits(trk_count)'(TRK_DEPTH - TRK_RESERVE));

  gf_fit_organizer #(.N_SER(N_SER), .N_SETS(N_SETS)) u_org (
    .clk, .rst_n, .fit_valid(!c2_empty), .fit(fit_t'(c2_head)), .fit_pop(c2_pop),
    .hold(trk_count >= $bits(trk_count)'(TRK_DEPTH - TRK_RESERVE)),
    .cond_we, .cond_addr, .cond_data, .cset_we, .cset_addr, .cset_data,
    .ser_start, .ser_fit, .ser_cset);

  // ---------------- Serializers and DSP Fitters ----------------
  logic    [N_SER-1:0] r_valid;
  fitres_t             r [N_SER];
  for (genvar s = 0; s < N_SER; s++) begin : g_fit
    logic                         sv, sf, sl;
    logic [X_W-1:0]               sx;
    logic [N_PAR-1:0][COEF_W-1:0] sc, s0;
    side_t                        ss;
    gf_serializer u_ser (
      .clk, .rst_n, .start(ser_start[s]), .fit_in(ser_fit), .cset_in(ser_cset),
      .busy(), .s_valid(sv), .s_first(sf), .s_last(sl), .s_x(sx), .s_coef(sc),
      .s_c0(s0), .s_side(ss));
    gf_dsp_fitter #(.RES_SHIFT(RES_SHIFT)) u_dsp (
      .clk, .rst_n, .s_valid(sv), .s_first(sf), .s_last(sl), .s_x(sx),
      .s_coef(sc), .s_c0(s0), .s_side(ss), .r_valid(r_valid[s]), .r(r[s]));
  end

  logic    f_valid;
  fitres_t f;
  always_comb begin
    f_valid = 1'b0;
    f       = '0;
    for (int s = 0; s < N_SER; s++)
      if (r_valid[s]) begin
        f_valid = 1'b1;
        f       = r[s];
      end
  end

  // ---------------- Comparator and Track FIFO ----------------
  logic   t_valid, fit_fail;
  track_t t;
  gf_comparator u_cmp (
    .clk, .rst_n, .f_valid, .f, .chi2_cut, .lc_penalty,
    .trk_valid(t_valid), .trk(t), .n_fit_pass(ev_pass), .n_fit_fail(fit_fail));

  logic tf_empty, tf_pop, tf_ovf;
  logic [T_W-1:0] tf_head;
  svt_fifo #(.W(T_W), .DEPTH(TRK_DEPTH), .AF_MARGIN(1)) u_trk_fifo (
    .clk, .rst_n, .wr_en(t_valid), .wr_data(t), .rd_en(tf_pop),
    .rd_data(tf_head), .empty(tf_empty), .full(), .almost_full(),
    .count(trk_count), .overflow(tf_ovf));

  // ---------------- Formatter and output FIFO ----------------
  logic      fo_valid, o_af, o_ovf, ee_sent, o_empty;
  svt_word_t fo_word;
  logic [ERR_W-1:0] ev_err;
  gf_formatter u_fmt (
    .clk, .rst_n, .trk_valid(!tf_empty), .trk(track_t'(tf_head)), .trk_pop(tf_pop),
    .err_local(ev_err & (ERR_W'(1) << E_FIFO_OVF)), .ee_sent, .out_valid(fo_valid), .out_word(fo_word),
    .out_hold(o_af));

  logic [SVT_W-1:0] o_head;
  svt_fifo #(.W(SVT_W), .DEPTH(OUT_DEPTH), .AF_MARGIN(2)) u_out_fifo (
    .clk, .rst_n, .wr_en(fo_valid), .wr_data(fo_word), .rd_en(out_pop),
    .rd_data(o_head), .empty(o_empty), .full(), .almost_full(o_af),
    .count(), .overflow(o_ovf));
  assign out_valid = !o_empty;
  assign out_word  = svt_word_t'(o_head);

  // ---------------- Errors ----------------
  logic [ERR_W-1:0] err_in;
  always_comb begin
    err_in               = '0;
    err_in[E_PARITY]     = in_pop && par_err;
    err_in[E_INVALID]    = pair_inv || conv_inv;
    err_in[E_FIT_OVF]    = f_valid && f.ovf;
    err_in[E_FIFO_OVF]   = in_ovf || c1_ovf || c2_ovf || tf_ovf || o_ovf;
  end
  gf_error_reg u_err (
    .clk, .rst_n, .err_in, .severity, .clear(err_clear), .ee_sent,
    .status(err_status), .event_err(ev_err), .svt_error);

  assign ev_fit  = f_valid && !f.side.is_ee;
  assign ev_five = c6_valid && c6_ready && c6.five && c6.seq_first;
endmodule
