// gf_merger: the deterministic merger used in the mezzanine FPGA and in the
// Pulsar FPGAs to merge several SVT streams into one.
//
// As the document describes, the inputs are read in a fixed priority order:
// the words of input 0 are copied to the output until its End Event word,
// then input 1 is read, and so on; when every enabled input has reached its
// End Event, one End Event word goes out. Its error flags are the OR of the
// inputs' flags, its tag is the tag of the first enabled input, and if the
// tags differ the Lost Sync error bit is set (and `lost_sync` pulses). The
// output order therefore depends only on the data, never on arrival times,
// so a simulation can predict it exactly. Inputs left out of `in_enable` are
// skipped, so any subset of wedges can run. The outgoing parity bit is
// recomputed over the merged event, which is this design's reading of the
// per-event parity.
//
// When no input is enabled the merger sends nothing. Until the first word
// of an event arrives the merger keeps rescanning in_enable from input 0, so
// the enabled set may be changed whenever the streams are idle between
// events.
//
// Interface: show-ahead input ports with a pop each; one word per clock out,
// held while out_hold is high. Timing: one word per clock; one extra clock
// per input to consume its End Event and one to send the merged one.
module gf_merger
  import gf_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_IN-1:0]     in_enable,
  input  logic [N_IN-1:0]     in_valid,
  input  svt_word_t           in_word [N_IN],
  output logic [N_IN-1:0]     in_pop,
  output logic                out_valid,
  output svt_word_t           out_word,
  input  logic                out_hold,
  output logic                lost_sync
);
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [IW:0]        cur;      // input being read; N_IN = send merged end event
  logic               have_tag;
  logic               started;  // a word of the current event was taken
  logic [TAG_W-1:0]   tag;
  logic [ERR_W-1:0]   err;
  logic               sync_bad;
  logic [DATA_W-1:0]  parity;

  svt_word_t w;
  logic      at_ee;
  assign w       = in_word[cur[IW-1:0]];
  assign at_ee   = (cur == (IW+1)'(N_IN));

  ee_data_t ee_in, ee_out;
  assign ee_in = ee_data_t'(w.data);

  always_comb begin
    ee_out        = '0;
    ee_out.tag    = tag;
    ee_out.err    = err;
    ee_out.err[E_LOSTSYNC] = err[E_LOSTSYNC] | sync_bad;
    ee_out.parity = ^parity;
  end

  logic en_cur;
  assign en_cur = !at_ee && in_enable[cur[IW-1:0]];

  always_comb begin
    in_pop    = '0;
    out_valid = 1'b0;
    out_word  = '0;
    if (at_ee) begin
      out_valid     = !out_hold && have_tag;
      out_word.ee   = 1'b1;
      out_word.ep   = 1'b1;
      out_word.data = DATA_W'(ee_out);
    end else if (en_cur && in_valid[cur[IW-1:0]]) begin
      if (w.ee) begin
        in_pop[cur[IW-1:0]] = 1'b1;            // consumed, not forwarded
      end else if (!out_hold) begin
        in_pop[cur[IW-1:0]] = 1'b1;
        out_valid = 1'b1;
        out_word  = w;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      have_tag  <= 1'b0;
      started   <= 1'b0;
      tag       <= '0;
      err       <= '0;
      sync_bad  <= 1'b0;
      parity    <= '0;
      lost_sync <= 1'b0;
    end else begin
      lost_sync <= 1'b0;
      if (at_ee) begin
        if (out_valid) begin
          lost_sync <= sync_bad;
          cur       <= '0;
          have_tag  <= 1'b0;
          started   <= 1'b0;
          err       <= '0;
          sync_bad  <= 1'b0;
          parity    <= '0;
        end else if (!have_tag) begin
          cur       <= '0;                     // no input enabled: send nothing
        end
      end else if (!en_cur) begin
        cur <= cur + 1'b1;                     // skip a disabled input
      end else if (!started && !in_valid[cur[IW-1:0]]) begin
        cur <= '0;                             // idle: rescan the enables
      end else if (|in_pop) begin
        started <= 1'b1;
        if (w.ee) begin
          if (!have_tag) tag <= ee_in.tag;
          else if (ee_in.tag != tag) sync_bad <= 1'b1;
          have_tag <= 1'b1;
          err      <= err | ee_in.err;
          cur      <= cur + 1'b1;
        end else begin
          parity <= parity ^ w.data;
        end
      end
    end
  end
endmodule
