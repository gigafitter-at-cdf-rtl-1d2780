// gf_fit_organizer: the Fit Organizer of a track processor. It pops
// 6-coordinate fits from Combination FIFO 2, fetches the constant set that
// fits each one and starts the Serializers in turn.
//
// Constant selection uses the document's two-RAM scheme. The 13 condition
// bits of a fit (zeta barrel of the innermost and outermost used hits, 3 bits
// each; left-out layer, 3 bits; long-cluster map, 4 bits) address an
// 8192 x 8 condition RAM whose word is the index of one of 256 constant sets
// held in a 256 x 756 constant RAM (6 scalar products x 7 terms x 18 bits).
// Both RAMs read synchronously, so a fit spends two clocks here before it is
// issued, together with its constants, to Serializer `rr`; rr then advances
// modulo N_SER. Since a Serializer needs N_SER clocks per fit and at most one
// fit is issued per clock, each Serializer is free again when its turn comes.
//
// Popping stops while `hold` is high; the track processor raises it when the
// Track FIFO could not take every fit already in flight. The RAMs are loaded
// through a plain write port (the document loads them over VME). Bit order of
// a constant set (set[n][t], t = 0..5 coefficients of x[t], t = 6 the
// constant term) is this design's choice.
module gf_fit_organizer
  import gf_pkg::*;
#(
  parameter int unsigned N_SER  = 6,
  parameter int unsigned N_SETS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  // Combination FIFO 2 (show-ahead)
  input  logic                fit_valid,
  input  fit_t                fit,
  output logic                fit_pop,
  input  logic                hold,
  // RAM load port
  input  logic                cond_we,
  input  logic [COND_W-1:0]   cond_addr,
  input  logic [SET_W-1:0]    cond_data,
  input  logic                cset_we,
  input  logic [SET_W-1:0]    cset_addr,
  input  logic [CSET_W-1:0]   cset_data,
  // To the Serializers
  output logic [N_SER-1:0]    ser_start,
  output fit_t                ser_fit,
  output logic [CSET_W-1:0]   ser_cset
);
  logic [SET_W-1:0]  cond_ram [2**COND_W];
  logic [CSET_W-1:0] cset_ram [N_SETS];

  logic              v1, v2;
  fit_t              f1, f2;
  logic [SET_W-1:0]  set1;
  logic [CSET_W-1:0] cs2;
  logic [$clog2(N_SER)-1:0] rr;

  assign fit_pop = fit_valid && !hold;

  logic [COND_W-1:0] cond;
  assign cond = {fit.zin, fit.zout, fit.miss, fit.lcmap};

  always_ff @(posedge clk) begin
    if (cond_we) cond_ram[cond_addr] <= cond_data;
    if (cset_we) cset_ram[cset_addr] <= cset_data;
    set1 <= cond_ram[cond];
    cs2  <= cset_ram[set1[$clog2(N_SETS)-1:0]];
    f1   <= fit;
    f2   <= f1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      rr <= '0;
    end else begin
      v1 <= fit_pop;
      v2 <= v1;
      if (v2) rr <= (rr == $clog2(N_SER)'(N_SER - 1)) ? '0 : rr + 1'b1;
    end
  end

  always_comb begin
    ser_start = '0;
    if (v2) ser_start[rr] = 1'b1;
  end
  assign ser_fit  = f2;
  assign ser_cset = cs2;
endmodule
