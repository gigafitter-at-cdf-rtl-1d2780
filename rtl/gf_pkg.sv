// gf_pkg: types and constants shared by the GigaFitter track-fitting pipeline.
//
// An SVT cable word carries 21 data bits plus the active-low End Packet and
// End Event marks; inside the chip both marks are kept active-high. Hits,
// combinations, fits and tracks travel between pipeline stages as the packed
// structs below. The 21-bit data width, the 7-coordinate combination, the
// 6-coordinate fit, the 18-bit fit constants, the 756-bit constant set
// (6 scalar products x 7 terms x 18 bits), the 13 condition bits and the
// 12-bit error field follow the document. The bit layout of a hit word, of
// the track packet and of the error field are this design's own choices.
package gf_pkg;

  localparam int unsigned DATA_W   = 21;  // data bits on an SVT cable
  localparam int unsigned N_SVX    = 5;   // SVX layers
  localparam int unsigned N_FIT    = 6;   // coordinates per fit (4 SVX + XFT c, phi)
  localparam int unsigned N_PAR    = 6;   // scalar products: c, d, phi, chi0..2
  localparam int unsigned COEF_W   = 18;  // fit constant width
  localparam int unsigned X_W      = 15;  // hit coordinate width in the fit
  localparam int unsigned COORD_W  = 14;  // SVX coordinate bits in a hit word
  localparam int unsigned ACC_W    = 48;  // DSP accumulator width
  localparam int unsigned RES_W    = 18;  // saturated fit result width
  localparam int unsigned CHI2_W   = 21;  // chi2 field in the track packet
  localparam int unsigned COND_W   = 13;  // constant-condition address bits
  localparam int unsigned SET_W    = 8;   // constant-set index (256 sets)
  localparam int unsigned CSET_W   = N_PAR * (N_FIT + 1) * COEF_W;  // 756
  localparam int unsigned ERR_W    = 12;
  localparam int unsigned TAG_W    = 8;
  localparam logic [2:0]  XFT_LAYER = 3'd5;  // layer code of an XFT first word

  // Error flag bits carried in end-event words and error registers.
  localparam int unsigned E_PARITY   = 0;
  localparam int unsigned E_INVALID  = 1;
  localparam int unsigned E_FIT_OVF  = 2;
  localparam int unsigned E_FIFO_OVF = 3;
  localparam int unsigned E_LOSTSYNC = 4;

  // One word on an SVT cable (marks active-high).
  typedef struct packed {
    logic              ee;
    logic              ep;
    logic [DATA_W-1:0] data;
  } svt_word_t;
  localparam int unsigned SVT_W = DATA_W + 2;

  // End-event data field.
  typedef struct packed {
    logic [ERR_W-1:0] err;
    logic             parity;
    logic [TAG_W-1:0] tag;
  } ee_data_t;

  // One SVX hit as stored in a Combiner RAM.
  typedef struct packed {
    logic [2:0]         zeta;   // electrical barrel
    logic               lc;     // long cluster (low precision)
    logic [COORD_W-1:0] coord;
  } hit_t;
  localparam int unsigned HIT_W = $bits(hit_t);

  // One XFT track: curvature and phi.
  typedef struct packed {
    logic [X_W-1:0] c;
    logic [X_W-1:0] phi;
  } xft_t;

  // Combination in 7-coordinate format (5 SVX + XFT c, phi), or an end-event token.
  typedef struct packed {
    logic              is_ee;
    ee_data_t          ee;
    hit_t [N_SVX-1:0]  hit;
    logic [N_SVX-1:0]  hitmap;   // 1 = layer has a hit
    xft_t              xft;
    logic [DATA_W-1:0] road;
  } comb7_t;

  // Combination in 6-coordinate fit format, with the sequence marks used by
  // the Comparator to pick the best of the five fits of a 5/5 combination.
  typedef struct packed {
    logic              is_ee;
    ee_data_t          ee;
    logic              seq_first;
    logic              seq_last;
    logic [N_FIT-1:0][X_W-1:0] x;  // x[0..3] SVX, x[4] c, x[5] phi
    logic [2:0]        miss;     // SVX layer left out
    logic [3:0]        lcmap;    // long-cluster flags of the 4 used hits
    logic [2:0]        zin;      // zeta of innermost used hit
    logic [2:0]        zout;     // zeta of outermost used hit
    logic              five;     // came from a 5/5 combination
    xft_t              xft;
    logic [DATA_W-1:0] road;
  } fit_t;

  // Per-fit information that travels alongside the scalar products.
  typedef struct packed {
    logic              is_ee;
    ee_data_t          ee;
    logic              seq_first;
    logic              seq_last;
    logic [2:0]        miss;
    logic [3:0]        lcmap;
    logic              five;
    xft_t              xft;
    logic [DATA_W-1:0] road;
  } side_t;

  // Fit result: track parameters and chi components.
  typedef struct packed {
    side_t                         side;
    logic [N_PAR-1:0][RES_W-1:0] p;  // p[0]=c p[1]=d p[2]=phi p[3..5]=chi (signed)
    logic                          ovf;
  } fitres_t;

  // Entry of the Track FIFO: an accepted track or an end-event marker.
  typedef struct packed {
    side_t                side;
    logic signed [RES_W-1:0] c;
    logic signed [RES_W-1:0] d;
    logic signed [RES_W-1:0] phi;
    logic [CHI2_W-1:0]       chi2;
    logic                    ovf;
  } track_t;

endpackage
