// gigafitter: the complete GigaFitter board, a Pulsar motherboard carrying
// three GigaFitter mezzanines, which replaces the twelve per-wedge track
// fitter boards of the SVT trigger and the mergers behind them.
//
// Twelve SVT input cables, one per wedge, arrive in groups of four on the
// three mezzanines; each wedge has its own track processor, and each
// mezzanine merges its four track streams. On the motherboard the streams
// are merged again by the same deterministic merger: the Data1 FPGA merges
// mezzanines 0 and 1, Data2 takes mezzanine 2, and the Control FPGA merges
// Data1 and Data2 onto the single output cable to the GhostBuster. Which
// mezzanine goes to which Data FPGA is this design's reading of the board
// scheme.
//
// Diagnostics: 30 spy buffers (12 inputs, 12 track processor outputs, 3
// mezzanine outputs, 3 motherboard merger outputs), selected by spy_mezz
// (0-2 a mezzanine, then spy_sel 0-3 inputs, 4-7 processor outputs, 8
// mezzanine output; 3 the motherboard, spy_sel 0 Data1, 1 Data2, 2 Control).
// All freeze together when any severe error raises svt_error or when
// freeze_req is set. Error registers exist for every track processor and
// merger.
//
// Cable signals are modelled active-high and synchronous to the one clock:
// in_ds[w] writes in_word[w] into wedge w's input FIFO and in_hold[w]
// (almost full) asks the HitBuffer to pause; out_ds strobes out_word and
// out_hold from the GhostBuster pauses the output. The document's board uses
// several clocks (40, 66 and 120 MHz) with FIFOs between them; this model
// runs everything on one clock.
module gigafitter
  import gf_pkg::*;
#(
  parameter int unsigned N_MEZZ    = 3,
  parameter int unsigned SPY_DEPTH = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // Input cables from the HitBuffers
  input  logic [4*N_MEZZ-1:0]          in_ds,
  input  svt_word_t                    in_word [4*N_MEZZ],
  output logic [4*N_MEZZ-1:0]          in_hold,
  input  logic [4*N_MEZZ-1:0]          wedge_enable,
  // Output cable to the GhostBuster
  output logic                         out_ds,
  output svt_word_t                    out_word,
  input  logic                         out_hold,
  // Configuration
  input  logic [3:0]                   cfg_wedge,
  input  logic                         cond_we,
  input  logic [COND_W-1:0]            cond_addr,
  input  logic [SET_W-1:0]             cond_data,
  input  logic                         cset_we,
  input  logic [SET_W-1:0]             cset_addr,
  input  logic [CSET_W-1:0]            cset_data,
  input  logic [CHI2_W-1:0]            chi2_cut,
  input  logic [7:0]                   lc_penalty,
  input  logic [ERR_W-1:0]             severity,
  input  logic                         err_clear,
  // Diagnostics
  input  logic                         freeze_req,
  input  logic [1:0]                   spy_mezz,
  input  logic [3:0]                   spy_sel,
  input  logic [$clog2(SPY_DEPTH)-1:0] spy_addr,
  output svt_word_t                    spy_data,
  output logic [ERR_W-1:0]             err_mezz [N_MEZZ][5],
  output logic [ERR_W-1:0]             err_pulsar [3],
  output logic                         svt_error,
  output logic [4*N_MEZZ-1:0]          ev_fit,
  output logic [4*N_MEZZ-1:0]          ev_pass,
  output logic [4*N_MEZZ-1:0]          ev_five,
  output logic [4*N_MEZZ-1:0]          ev_stall,
  output logic [N_MEZZ+2:0]            ev_lost_sync
);
  logic              freeze;
  logic [N_MEZZ-1:0] mz_valid, mz_pop, mz_err;
  svt_word_t         mz_word [N_MEZZ];
  svt_word_t         mz_spy  [N_MEZZ];

  assign freeze = freeze_req || svt_error;

  for (genvar m = 0; m < N_MEZZ; m++) begin : g_mezz
    svt_word_t iw [4];
    for (genvar k = 0; k < 4; k++) begin : g_in
      assign iw[k] = in_word[4*m+k];
    end
    gf_mezzanine #(.N_WEDGE(4), .SPY_DEPTH(SPY_DEPTH)) u_mezz (
      .clk, .rst_n,
      .in_ds(in_ds[4*m +: 4]), .in_word(iw), .in_hold(in_hold[4*m +: 4]),
      .wedge_enable(wedge_enable[4*m +: 4]),
      .out_valid(mz_valid[m]), .out_word(mz_word[m]), .out_pop(mz_pop[m]),
      .cfg_wedge(cfg_wedge[1:0]),
      .cond_we(cond_we && cfg_wedge[3:2] == m), .cond_addr, .cond_data,
      .cset_we(cset_we && cfg_wedge[3:2] == m), .cset_addr, .cset_data,
      .chi2_cut, .lc_penalty, .severity, .err_clear,
      .freeze, .spy_sel, .spy_addr, .spy_data(mz_spy[m]),
      .err_status(err_mezz[m]), .svt_error(mz_err[m]),
      .ev_fit(ev_fit[4*m +: 4]), .ev_pass(ev_pass[4*m +: 4]),
      .ev_five(ev_five[4*m +: 4]), .ev_stall(ev_stall[4*m +: 4]),
      .ev_lost_sync(ev_lost_sync[m]));
  end

  // ---------------- Motherboard merge chain ----------------
  // Stage a: Data1 (mezzanines 0, 1) and Data2 (mezzanine 2).
  logic [1:0]       d_valid, d_pop, d_hold, d_wr, d_ovf, d_empty;
  svt_word_t        d_word [2];
  logic [SVT_W-1:0] d_head [2];
  svt_word_t        d_in0 [2];
  svt_word_t        d_in1 [1];
  logic [1:0]       d_pop0;
  logic [0:0]       d_pop1;
  svt_word_t        p_spy [3];

  assign d_in0[0] = mz_word[0];
  assign d_in0[1] = mz_word[1];
  assign d_in1[0] = mz_word[N_MEZZ-1];

  gf_merger #(.N_IN(2)) u_data1 (
    .clk, .rst_n, .in_enable({|wedge_enable[7:4], |wedge_enable[3:0]}),
    .in_valid(mz_valid[1:0]), .in_word(d_in0), .in_pop(d_pop0),
    .out_valid(d_wr[0]), .out_word(d_word[0]), .out_hold(d_hold[0]),
    .lost_sync(ev_lost_sync[N_MEZZ]));
  gf_merger #(.N_IN(1)) u_data2 (
    .clk, .rst_n, .in_enable(|wedge_enable[4*N_MEZZ-1:8]),
    .in_valid(mz_valid[N_MEZZ-1]), .in_word(d_in1), .in_pop(d_pop1),
    .out_valid(d_wr[1]), .out_word(d_word[1]), .out_hold(d_hold[1]),
    .lost_sync(ev_lost_sync[N_MEZZ+1]));
  assign mz_pop = {d_pop1[0], d_pop0};

  for (genvar i = 0; i < 2; i++) begin : g_dfifo
    svt_fifo #(.W(SVT_W), .DEPTH(64), .AF_MARGIN(2)) u_fifo (
      .clk, .rst_n, .wr_en(d_wr[i]), .wr_data(d_word[i]), .rd_en(d_pop[i]),
      .rd_data(d_head[i]), .empty(d_empty[i]), .full(), .almost_full(d_hold[i]),
      .count(), .overflow(d_ovf[i]));
    assign d_valid[i] = !d_empty[i];
    gf_spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy (
      .clk, .rst_n, .mon_valid(d_wr[i]), .mon_word(d_word[i]), .freeze,
      .rd_addr(spy_addr), .rd_data(p_spy[i]), .wr_ptr(), .wrapped());
  end

  // Stage b: Control FPGA merges Data1 and Data2 onto the output cable.
  svt_word_t        c_in [2];
  logic             c_wr, c_hold, c_ovf, c_empty;
  svt_word_t        c_word;
  logic [SVT_W-1:0] c_head;
  assign c_in[0] = svt_word_t'(d_head[0]);
  assign c_in[1] = svt_word_t'(d_head[1]);

  gf_merger #(.N_IN(2)) u_control (
    .clk, .rst_n,
    .in_enable({|wedge_enable[4*N_MEZZ-1:8], |wedge_enable[7:0]}),
    .in_valid(d_valid), .in_word(c_in), .in_pop(d_pop),
    .out_valid(c_wr), .out_word(c_word), .out_hold(c_hold),
    .lost_sync(ev_lost_sync[N_MEZZ+2]));
  svt_fifo #(.W(SVT_W), .DEPTH(64), .AF_MARGIN(2)) u_out_fifo (
    .clk, .rst_n, .wr_en(c_wr), .wr_data(c_word), .rd_en(out_ds),
    .rd_data(c_head), .empty(c_empty), .full(), .almost_full(c_hold),
    .count(), .overflow(c_ovf));
  gf_spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy_ctl (
    .clk, .rst_n, .mon_valid(c_wr), .mon_word(c_word), .freeze,
    .rd_addr(spy_addr), .rd_data(p_spy[2]), .wr_ptr(), .wrapped());

  assign out_ds   = !c_empty && !out_hold;
  assign out_word = svt_word_t'(c_head);

  // ---------------- Motherboard error registers ----------------
  logic [2:0] p_err;
  for (genvar i = 0; i < 3; i++) begin : g_perr
    logic [ERR_W-1:0] e;
    always_comb begin
      e             = '0;
      e[E_LOSTSYNC] = ev_lost_sync[N_MEZZ+i];
      e[E_FIFO_OVF] = (i < 2) ? d_ovf[i % 2] : c_ovf;
    end
    gf_error_reg u_err (
      .clk, .rst_n, .err_in(e), .severity, .clear(err_clear), .ee_sent(1'b0),
      .status(err_pulsar[i]), .event_err(), .svt_error(p_err[i]));
  end

  assign svt_error = |mz_err || |p_err;
  assign spy_data  = (spy_mezz == 2'd3) ? ((spy_sel < 4'd3) ? p_spy[spy_sel[1:0]] : '0)
                                        : mz_spy[spy_mezz];
endmodule
