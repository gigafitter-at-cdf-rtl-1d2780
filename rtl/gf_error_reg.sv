// gf_error_reg: the error register of one track processor or merger.
//
// Each bit of err_in is a one-clock report of an error kind (bit assignment
// in gf_pkg: parity, invalid data, fit overflow, FIFO overflow, lost sync).
// Two copies are kept: `status`, sticky until `clear`, which the monitoring
// side reads, and `event_err`, the errors since the last end event sent
// (cleared by `ee_sent`), which goes into the next End Event word. The
// `severity` mask marks errors as severe; a severe error raises `svt_error`
// for as long as it is set in `status`, which on the board freezes all spy
// buffers, as the document describes for the SVT_ERROR backplane line.
module gf_error_reg
  import gf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ERR_W-1:0] err_in,
  input  logic [ERR_W-1:0] severity,
  input  logic             clear,
  input  logic             ee_sent,
  output logic [ERR_W-1:0] status,
  output logic [ERR_W-1:0] event_err,
  output logic             svt_error
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status    <= '0;
      event_err <= '0;
    end else begin
      status    <= (clear ? '0 : status) | err_in;
      event_err <= (ee_sent ? '0 : event_err) | err_in;
    end
  end
  assign svt_error = |(status & severity);
endmodule
