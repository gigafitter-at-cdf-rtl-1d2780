// gf_spy_buffer: an SVT spy buffer, a circular memory at the end of a cable
// (or of an internal stream) that records, like a logic state analyser, the
// last DEPTH words that passed. Recording stops while `freeze` is high, which
// the board drives from its own freeze request or from the SVT_ERROR line, so
// the words that led to an error stay in memory; the monitoring side then
// reads them back through rd_addr/rd_data (one clock of read latency). The
// write pointer and a wrap flag tell the reader where the oldest word is.
// The document does not give the depth; DEPTH is this design's choice.
module gf_spy_buffer
  import gf_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mon_valid,
  input  svt_word_t                mon_word,
  input  logic                     freeze,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output svt_word_t                rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped
);
  svt_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mon_valid && !freeze) mem[wr_ptr] <= mon_word;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (mon_valid && !freeze) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (wr_ptr == $clog2(DEPTH)'(DEPTH - 1)) wrapped <= 1'b1;
    end
  end
endmodule
