// gf_dsp_fitter: one DSP Fitter, six multiply-accumulate lanes working in
// parallel, each computing one scalar product p_n = c0_n + sum_i c_ni * x_i:
// the curvature, the impact parameter, phi and the three chi components.
//
// Each lane mirrors a DSP48 slice in MACC mode, as in the document: an
// 18 x 25 multiplier (18-bit signed coefficient times the unsigned 15-bit
// coordinate), a product register and a 48-bit accumulator. The six products
// of a fit arrive on six consecutive clocks from the Serializer; the first
// one starts the accumulator from the constant term. The result appears two
// clocks after the last product was accumulated, while the lane already takes
// the next fit: a fit costs six clocks and the lanes never stall.
//
// The full 48-bit sum is kept, so the fit is exact. How the sum is scaled to
// the output is not given by the document; here the constant term is taken
// as already in output units (shifted left by RES_SHIFT before adding), the
// sum is shifted right by RES_SHIFT (arithmetic, rounding toward minus
// infinity) and saturated to RES_W bits. A saturation raises `ovf`, the
// fit-overflow error.
module gf_dsp_fitter
  import gf_pkg::*;
#(
  parameter int unsigned RES_SHIFT = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          s_valid,
  input  logic                          s_first,
  input  logic                          s_last,
  input  logic [X_W-1:0]                s_x,
  input  logic [N_PAR-1:0][COEF_W-1:0]  s_coef,
  input  logic [N_PAR-1:0][COEF_W-1:0]  s_c0,
  input  side_t                         s_side,
  output logic                          r_valid,
  output fitres_t                       r
);
  // Product stage
  logic                           m_valid, m_first, m_last;
  logic signed [X_W+COEF_W:0]     m_prod [N_PAR];
  logic signed [ACC_W-1:0]        m_c0   [N_PAR];
  side_t                          m_side;
  // Accumulate stage
  logic                           a_done;
  logic signed [ACC_W-1:0]        acc    [N_PAR];
  side_t                          a_side;

  localparam logic signed [ACC_W-1:0] RMAX = (ACC_W'(1) <<< (RES_W - 1)) - 1;
  localparam logic signed [ACC_W-1:0] RMIN = -(ACC_W'(1) <<< (RES_W - 1));

  always_ff @(posedge clk) begin
    for (int n = 0; n < N_PAR; n++) begin
      m_prod[n] <= $signed(s_coef[n]) * $signed({1'b0, s_x});
      m_c0[n]   <= ACC_W'($signed(s_c0[n])) <<< RES_SHIFT;
      if (m_valid)
        acc[n] <= (m_first ? m_c0[n] : acc[n]) + ACC_W'(m_prod[n]);
    end
    m_first <= s_first;
    m_last  <= s_last;
    if (s_valid && s_last) m_side <= s_side;
    if (m_valid && m_last) a_side <= m_side;
  end

  // Output stage: shift and saturate.
  always_ff @(posedge clk) begin
    if (a_done) begin
      logic any_ovf;
      any_ovf = 1'b0;
      for (int n = 0; n < N_PAR; n++) begin
        logic signed [ACC_W-1:0] v;
        v = acc[n] >>> RES_SHIFT;
        if (v > RMAX)      begin r.p[n] <= RES_W'(RMAX); any_ovf = 1'b1; end
        else if (v < RMIN) begin r.p[n] <= RES_W'(RMIN); any_ovf = 1'b1; end
        else                     r.p[n] <= RES_W'(v);
      end
      r.ovf  <= any_ovf && !a_side.is_ee;
      r.side <= a_side;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      a_done  <= 1'b0;
      r_valid <= 1'b0;
    end else begin
      m_valid <= s_valid;
      a_done  <= m_valid && m_last;
      r_valid <= a_done;
    end
  end
endmodule
