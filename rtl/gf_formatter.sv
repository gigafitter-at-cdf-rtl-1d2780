// gf_formatter: writes the accepted tracks of a track processor out as SVT
// packets, in the same format for every wedge.
//
// It pops one entry of the Track FIFO at a time. A track becomes a 7-word
// packet; the track packet layout (from the most significant bit of the
// 21-bit data field) is this design's own:
//   w0 {fit status[2:0], phi[17:0]}     status = {5/5, overflow, 0}
//   w1 {left-out layer[2:0], d[17:0]}
//   w2 {lcmap[3:1], c[17:0]}  
//   w3 {chi2[20:0]}
//   w4 {lcmap[0], 5'b0, XFT c[14:0]}
//   w5 {6'b0, XFT phi[14:0]}
//   w6 {road identifier[20:0]}          with End Packet
// An end-event entry becomes one End Event word (End Packet also set) whose
// data are {error flags[11:0], parity, event tag[7:0]}: the flags are those
// of the input end event ORed with `err_local`, the errors seen in this
// processor since the previous end event, and the parity is the XOR of all
// data bits of the event's words as sent. `ee_sent` pulses when it goes out.
//
// Interface: Track FIFO show-ahead port in, one word per clock out, held
// while out_hold is high. Timing: 7 clocks per track, 1 per end event.
module gf_formatter
  import gf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trk_valid,
  input  track_t           trk,
  output logic             trk_pop,
  input  logic [ERR_W-1:0] err_local,
  output logic             ee_sent,
  output logic             out_valid,
  output svt_word_t        out_word,
  input  logic             out_hold
);
  logic [2:0]        w;
  logic [DATA_W-1:0] parity;

  logic [DATA_W-1:0] d;
  always_comb begin
    unique case (w)
      3'd0:    d = {trk.side.five, trk.ovf, 1'b0, trk.phi};
      3'd1:    d = {trk.side.miss, trk.d};
      3'd2:    d = {trk.side.lcmap[3:1], trk.c};
      3'd3:    d = trk.chi2;
      3'd4:    d = {trk.side.lcmap[0], 5'b0, trk.side.xft.c};
      3'd5:    d = {6'b0, trk.side.xft.phi};
      default: d = trk.side.road;
    endcase
  end

  ee_data_t eeo;
  always_comb begin
    eeo        = trk.side.ee;
    eeo.err    = trk.side.ee.err | err_local;
    eeo.parity = ^parity;
  end

  assign out_valid = trk_valid && !out_hold;
  always_comb begin
    out_word = '0;
    if (trk.side.is_ee) begin
      out_word.ee   = 1'b1;
      out_word.ep   = 1'b1;
      out_word.data = DATA_W'(eeo);
    end else begin
      out_word.ep   = (w == 3'd6);
      out_word.data = d;
    end
  end
  assign trk_pop = out_valid && (trk.side.is_ee || w == 3'd6);
  assign ee_sent = out_valid && trk.side.is_ee;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w      <= '0;
      parity <= '0;
    end else if (out_valid) begin
      if (trk.side.is_ee) begin
        parity <= '0;
        w      <= '0;
      end else begin
        parity <= parity ^ d;
        w      <= (w == 3'd6) ? 3'd0 : w + 1'b1;
      end
    end
  end
endmodule
