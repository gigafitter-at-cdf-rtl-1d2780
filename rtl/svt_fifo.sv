// svt_fifo: synchronous FIFO used wherever the pipeline buffers a stream:
// the SVT cable input FIFO, the two Combination FIFOs, the Track FIFO and
// the output FIFO of each track processor and merger.
//
// Words are written with wr_en and read from a show-ahead port: rd_data holds
// the oldest word whenever empty is low, and rd_en pops it. almost_full rises
// when AF_MARGIN or fewer places are left; on an SVT cable it is the HOLD_
// line sent back to the source, which gives the source time to stop, as the
// SVT protocol prescribes. A write into a full FIFO is dropped and reported
// on overflow for one cycle (the FIFO-overflow error). Depth and margin are
// this design's choices; the document gives neither. Both reads and writes
// take effect at the clock edge; a word written is visible one cycle later.
module svt_fifo #(
  parameter int unsigned W         = 23,
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned AF_MARGIN = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic         overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  localparam int unsigned CW = $clog2(DEPTH + 1);
  assign empty       = (count == '0);
  assign full        = (count == CW'(DEPTH));
  assign almost_full = (count >= CW'(DEPTH - AF_MARGIN));
  assign do_rd       = rd_en && !empty;
  assign do_wr       = wr_en && (!full || do_rd);
  assign rd_data     = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count    <= count + CW'(do_wr) - CW'(do_rd);
      overflow <= wr_en && !do_wr;
    end
  end
endmodule
