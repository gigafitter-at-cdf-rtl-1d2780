// gf_serializer: one Serializer of a track processor. On `start` it
// registers a whole fit (six coordinates and the 756-bit constant set) in a
// single clock; then, for six clocks, it sends one coordinate per clock
// together with the six coefficients that multiply it, one for each of the
// six scalar products of its DSP Fitter, as the document describes. The
// constant terms c0 are sent with the first coordinate so the Fitter can
// start its accumulators from them; the per-fit side information leaves with
// the sixth coordinate. A new start is accepted in the clock that sends the
// sixth coordinate, so one Serializer handles one fit every six clocks.
module gf_serializer
  import gf_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  fit_t                          fit_in,
  input  logic [CSET_W-1:0]             cset_in,
  output logic                          busy,
  output logic                          s_valid,
  output logic                          s_first,
  output logic                          s_last,
  output logic [X_W-1:0]                s_x,
  output logic [N_PAR-1:0][COEF_W-1:0]  s_coef,
  output logic [N_PAR-1:0][COEF_W-1:0]  s_c0,
  output side_t                         s_side
);
  typedef logic [N_PAR-1:0][N_FIT:0][COEF_W-1:0] cset_t;

  fit_t       f;
  cset_t      cs;
  logic [2:0] t;

  assign busy    = s_valid && !s_last;
  assign s_first = (t == 3'd0);
  assign s_last  = (t == 3'(N_FIT - 1));
  assign s_x     = f.x[t];

  always_comb begin
    for (int n = 0; n < N_PAR; n++) begin
      s_coef[n] = cs[n][t];
      s_c0[n]   = cs[n][N_FIT];
    end
    s_side = '{is_ee: f.is_ee, ee: f.ee, seq_first: f.seq_first, seq_last: f.seq_last,
               miss: f.miss, lcmap: f.lcmap, five: f.five, xft: f.xft, road: f.road};
  end

  always_ff @(posedge clk) begin
    if (start) begin
      f  <= fit_in;
      cs <= cset_t'(cset_in);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      t       <= '0;
    end else if (start) begin
      s_valid <= 1'b1;
      t       <= '0;
    end else if (s_valid) begin
      if (s_last) s_valid <= 1'b0;
      else        t <= t + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
