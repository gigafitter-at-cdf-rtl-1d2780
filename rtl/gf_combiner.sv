// gf_combiner: one Combiner of a GigaFitter track processor.
//
// It works in two steps, as the document describes. Loading: it pops one
// hits+road packet from the Input FIFO and writes each SVX hit into the RAM of
// its layer (32 entries per layer) while a counter per layer records how many
// hits arrived; XFT tracks (a first word with layer code 5 holding the
// curvature, then a second word holding phi) go to a sixth RAM. The packet
// ends with the road-identifier word, which carries End Packet. Combining:
// the per-layer counters drive an odometer of RAM addresses, and every clock
// the six RAMs are read in parallel to form one 7-coordinate combination
// (5 SVX hits + XFT c, phi) until all combinations of the road have been
// sent. A layer without hits gives a zeroed coordinate and a cleared hitmap
// bit (a 4/5 road); a road with hits on all five layers is 5/5.
//
// An End Event word met while idle is passed on as a single end-event token.
// Hits beyond the RAM depth, a road without an XFT track or an unexpected
// word are dropped and reported on err_invalid. Using six RAMs (the document
// speaks of one per layer) and the hit-word layout of gf_pkg are this
// design's choices.
//
// Interface: in_* is a show-ahead input stream, popped by in_pop when
// load_en is high; pkt_end marks the pop of a packet's last word. comb_* is
// a valid/ready stream, presented only while out_en is high; comb_last marks
// the last combination of a road (or the end-event token), and done pulses
// when the packet's output is complete (a rejected road completes with no
// output). Timing: one input word per clock while loading, one
// combination per clock while combining.
module gf_combiner
  import gf_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load_en,
  input  logic      in_valid,
  input  svt_word_t in_word,
  output logic      in_pop,
  output logic      pkt_end,
  input  logic      out_en,
  output logic      done,
  output logic      comb_valid,
  output comb7_t    comb,
  output logic      comb_last,
  input  logic      comb_ready,
  output logic      err_invalid
);
  localparam int unsigned CW = $clog2(RAM_DEPTH + 1);
  localparam int unsigned AW = $clog2(RAM_DEPTH);
  localparam int unsigned NL = N_SVX + 1;  // five SVX layers and XFT

  typedef enum logic [1:0] {S_LOAD, S_COMB, S_EE, S_SKIP} state_t;
  state_t state;

  logic [HIT_W-1:0]  ram_svx [N_SVX][RAM_DEPTH];
  logic [2*X_W-1:0]  ram_xft [RAM_DEPTH];
  logic [CW-1:0]     cnt [NL];
  logic [AW-1:0]     idx [NL];
  logic              xft_second;
  logic [X_W-1:0]    xft_c;
  logic [DATA_W-1:0] road;
  ee_data_t          ee_data;

  logic [2:0] lay;
  assign lay    = in_word.data[20:18];
  assign in_pop = (state == S_LOAD) && load_en && in_valid;

  // Last address of every layer reached: this is the road's last combination.
  logic [NL-1:0] at_end;
  always_comb begin
    for (int l = 0; l < NL; l++)
      at_end[l] = (cnt[l] == 0) || (CW'(idx[l]) == cnt[l] - 1'b1);
  end

  // Combination output, read from the RAMs at the odometer addresses.
  always_comb begin
    comb       = '0;
    comb.is_ee = (state == S_EE);
    comb.ee    = ee_data;
    comb.road  = road;
    for (int l = 0; l < N_SVX; l++) begin
      comb.hitmap[l] = (cnt[l] != 0);
      comb.hit[l]    = (cnt[l] != 0) ? hit_t'(ram_svx[l][idx[l]]) : '0;
    end
    comb.xft = xft_t'(ram_xft[idx[N_SVX]]);
    if (state == S_EE) begin
      comb.hitmap = '0;
      comb.hit    = '0;
      comb.xft    = '0;
    end
  end
  assign comb_valid = out_en && ((state == S_COMB) || (state == S_EE));
  assign comb_last  = (state == S_EE) || (&at_end);
  assign pkt_end    = in_pop && !xft_second && (in_word.ee || in_word.ep);
  assign done       = (comb_valid && comb_ready && comb_last) || (out_en && state == S_SKIP);

  always_ff @(posedge clk) begin
    if (in_pop && !in_word.ee && !xft_second && !in_word.ep && lay < 3'(N_SVX)
        && cnt[lay] < CW'(RAM_DEPTH))
      ram_svx[lay][AW'(cnt[lay])] <= in_word.data[HIT_W-1:0];
    if (in_pop && xft_second && cnt[N_SVX] < CW'(RAM_DEPTH))
      ram_xft[AW'(cnt[N_SVX])] <= {xft_c, in_word.data[X_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      xft_second  <= 1'b0;
      xft_c       <= '0;
      road        <= '0;
      ee_data     <= '0;
      err_invalid <= 1'b0;
      for (int l = 0; l < NL; l++) begin
        cnt[l] <= '0;
        idx[l] <= '0;
      end
    end else begin
      err_invalid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_pop) begin
          if (xft_second) begin
            xft_second <= 1'b0;
            if (cnt[N_SVX] < CW'(RAM_DEPTH)) cnt[N_SVX] <= cnt[N_SVX] + 1'b1;
            else err_invalid <= 1'b1;
          end else if (in_word.ee) begin
            // End event: only valid between packets.
            ee_data <= ee_data_t'(in_word.data);
            state   <= S_EE;
            if (cnt[0] != 0 || cnt[1] != 0 || cnt[2] != 0 || cnt[3] != 0 ||
                cnt[4] != 0 || cnt[N_SVX] != 0) begin
              err_invalid <= 1'b1;
              for (int l = 0; l < NL; l++) cnt[l] <= '0;
            end
          end else if (in_word.ep) begin
            road   <= in_word.data;
            if (cnt[N_SVX] == 0) begin
              err_invalid <= 1'b1;      // no XFT track: nothing to combine
              state       <= S_SKIP;
              for (int l = 0; l < NL; l++) cnt[l] <= '0;
            end else begin
              state <= S_COMB;
            end
          end else if (lay == XFT_LAYER) begin
            xft_c      <= in_word.data[X_W-1:0];
            xft_second <= 1'b1;
          end else if (lay < 3'(N_SVX)) begin
            if (cnt[lay] < CW'(RAM_DEPTH)) cnt[lay] <= cnt[lay] + 1'b1;
            else err_invalid <= 1'b1;
          end else begin
            err_invalid <= 1'b1;
          end
        end
        S_COMB: if (comb_valid && comb_ready) begin
          if (&at_end) begin
            state <= S_LOAD;
            for (int l = 0; l < NL; l++) begin
              cnt[l] <= '0;
              idx[l] <= '0;
            end
          end else begin
            // Odometer step: advance the lowest layer not at its end, clear those below.
            automatic logic carry = 1'b1;
            for (int l = 0; l < NL; l++) begin
              if (carry) begin
                if (at_end[l]) idx[l] <= '0;
                else begin
                  idx[l] <= idx[l] + 1'b1;
                  carry = 1'b0;
                end
              end
            end
          end
        end
        S_EE:   if (comb_valid && comb_ready) state <= S_LOAD;
        S_SKIP: if (out_en) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  // A combination must not change while it waits for the consumer.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (comb_valid && !comb_ready) |=> comb_valid;
  endproperty
  assert property (p_hold);
endmodule
