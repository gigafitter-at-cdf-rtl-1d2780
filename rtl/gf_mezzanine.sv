// gf_mezzanine: one GigaFitter mezzanine FPGA. It holds N_WEDGE (4)
// independent track processors, one per SVT input cable, and a merger that
// joins their four track streams into the single output FIFO read by the
// Pulsar motherboard, as in the document's mezzanine scheme.
//
// Spy buffers sit on each input cable, on each track processor output and on
// the merger output (4 + 4 + 1). They are frozen by `freeze`, which the board
// drives from its SVT_ERROR line; any of them can be read back through
// spy_sel/spy_addr (selection 0-3 inputs, 4-7 processor outputs, 8 merger
// output; one clock read latency). Each track processor and the merger has
// an error register; their severe errors are ORed on svt_error. The fit
// constants and the chi2 cut are loaded per wedge through cfg_wedge.
// One clock domain, as in the other blocks.
module gf_mezzanine
  import gf_pkg::*;
#(
  parameter int unsigned N_WEDGE   = 4,
  parameter int unsigned SPY_DEPTH = 256,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Input cables
  input  logic [N_WEDGE-1:0]        in_ds,
  input  svt_word_t                 in_word [N_WEDGE],
  output logic [N_WEDGE-1:0]        in_hold,
  input  logic [N_WEDGE-1:0]        wedge_enable,
  // Output to the Pulsar FPGA (show-ahead)
  output logic                      out_valid,
  output svt_word_t                 out_word,
  input  logic                      out_pop,
  // Configuration
  input  logic [$clog2(N_WEDGE)-1:0] cfg_wedge,
  input  logic                      cond_we,
  input  logic [COND_W-1:0]         cond_addr,
  input  logic [SET_W-1:0]          cond_data,
  input  logic                      cset_we,
  input  logic [SET_W-1:0]          cset_addr,
  input  logic [CSET_W-1:0]         cset_data,
  input  logic [CHI2_W-1:0]         chi2_cut,
  input  logic [7:0]                lc_penalty,
  input  logic [ERR_W-1:0]          severity,
  input  logic                      err_clear,
  // Diagnostics
  input  logic                      freeze,
  input  logic [3:0]                spy_sel,
  input  logic [$clog2(SPY_DEPTH)-1:0] spy_addr,
  output svt_word_t                 spy_data,
  output logic [ERR_W-1:0]          err_status [N_WEDGE+1],
  output logic                      svt_error,
  output logic [N_WEDGE-1:0]        ev_fit,
  output logic [N_WEDGE-1:0]        ev_pass,
  output logic [N_WEDGE-1:0]        ev_five,
  output logic [N_WEDGE-1:0]        ev_stall,
  output logic                      ev_lost_sync
);
  logic [N_WEDGE-1:0] tp_valid, tp_pop, tp_err;
  svt_word_t          tp_word [N_WEDGE];
  svt_word_t          spy_rd [2*N_WEDGE+1];

  for (genvar w = 0; w < N_WEDGE; w++) begin : g_wedge
    gf_track_processor u_tp (
      .clk, .rst_n,
      .in_ds(in_ds[w]), .in_word(in_word[w]), .in_hold(in_hold[w]),
      .out_valid(tp_valid[w]), .out_word(tp_word[w]), .out_pop(tp_pop[w]),
      .cond_we(cond_we && cfg_wedge == w), .cond_addr, .cond_data,
      .cset_we(cset_we && cfg_wedge == w), .cset_addr, .cset_data,
      .chi2_cut, .lc_penalty, .severity, .err_clear,
      .err_status(err_status[w]), .svt_error(tp_err[w]),
      .ev_fit(ev_fit[w]), .ev_pass(ev_pass[w]), .ev_five(ev_five[w]),
      .stall(ev_stall[w]));

    gf_spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy_in (
      .clk, .rst_n, .mon_valid(in_ds[w]), .mon_word(in_word[w]), .freeze,
      .rd_addr(spy_addr), .rd_data(spy_rd[w]), .wr_ptr(), .wrapped());
    gf_spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy_tp (
      .clk, .rst_n, .mon_valid(tp_pop[w]), .mon_word(tp_word[w]), .freeze,
      .rd_addr(spy_addr), .rd_data(spy_rd[N_WEDGE+w]), .wr_ptr(), .wrapped());
  end

  // Merger into the mezzanine output FIFO
  logic      m_valid, m_hold, m_ovf, o_empty, m_err;
  svt_word_t m_word;
  logic [SVT_W-1:0] o_head;
  gf_merger #(.N_IN(N_WEDGE)) u_merge (
    .clk, .rst_n, .in_enable(wedge_enable), .in_valid(tp_valid), .in_word(tp_word),
    .in_pop(tp_pop), .out_valid(m_valid), .out_word(m_word), .out_hold(m_hold),
    .lost_sync(ev_lost_sync));
  svt_fifo #(.W(SVT_W), .DEPTH(OUT_DEPTH), .AF_MARGIN(2)) u_out_fifo (
    .clk, .rst_n, .wr_en(m_valid), .wr_data(m_word), .rd_en(out_pop),
    .rd_data(o_head), .empty(o_empty), .full(), .almost_full(m_hold),
    .count(), .overflow(m_ovf));
  assign out_valid = !o_empty;
  assign out_word  = svt_word_t'(o_head);

  gf_spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy_out (
    .clk, .rst_n, .mon_valid(m_valid), .mon_word(m_word), .freeze,
    .rd_addr(spy_addr), .rd_data(spy_rd[2*N_WEDGE]), .wr_ptr(), .wrapped());

  logic [ERR_W-1:0] m_err_in;
  always_comb begin
    m_err_in             = '0;
    m_err_in[E_LOSTSYNC] = ev_lost_sync;
    m_err_in[E_FIFO_OVF] = m_ovf;
  end
  gf_error_reg u_merr (
    .clk, .rst_n, .err_in(m_err_in), .severity, .clear(err_clear), .ee_sent(1'b0),
    .status(err_status[N_WEDGE]), .event_err(), .svt_error(m_err));

  assign spy_data  = (spy_sel < 4'(2*N_WEDGE+1)) ? spy_rd[spy_sel] : '0;
  assign svt_error = |tp_err || m_err;
endmodule
