// mc_pkg: types and constants shared by the HEVC motion compensation datapaths.
//
// The coefficient tables are the fractional-sample interpolation filters of HEVC
// (8-tap luma filter at quarter-sample positions, 4-tap chroma filter at
// eighth-sample positions). Position 0 (an integer sample) is not filtered in the
// standard; the filters here express it as a single tap of weight 64, which with the
// standard's shifts reproduces the integer-sample equations exactly. Which tap carries
// that weight depends on how a filter lines up its input, so the caller names it.
//
// Widths: samples are up to 10 bits (8- and 10-bit video), the intermediate values
// between the filters and into the weighting unit are 16-bit signed as in HEVC.
// The job descriptor is this design's own encoding of one prediction-unit plane;
// the quarter/eighth-sample accuracy and the 8- and 10-bit support match the
// published accelerator (Goebel, 2014), whose filters are those of HEVC.
package mc_pkg;

  localparam int SAMPLE_W = 10;  // widest sample (bit depth 10)
  localparam int INTER_W  = 16;  // signed intermediate precision
  localparam int DIM_W    = 7;   // block widths and heights up to 64
  localparam int FRAC_W   = 3;   // luma uses 0..3, chroma 0..7
  localparam int WGT_W    = 9;   // signed weight, -128..255
  localparam int OFS_W    = 12;  // signed offset in sample units

  typedef logic        [SAMPLE_W-1:0] sample_t;
  typedef logic signed [INTER_W-1:0]  inter_t;
  typedef logic signed [7:0]          coef_t;

  // One plane of one prediction unit for one datapath.
  typedef struct packed {
    logic        [DIM_W-1:0]  width;       // output block width  (1..64)
    logic        [DIM_W-1:0]  height;      // output block height (1..64)
    logic        [FRAC_W-1:0] xfrac0;      // horizontal fraction, reference 0
    logic        [FRAC_W-1:0] yfrac0;      // vertical fraction,   reference 0
    logic        [FRAC_W-1:0] xfrac1;      // horizontal fraction, reference 1
    logic        [FRAC_W-1:0] yfrac1;      // vertical fraction,   reference 1
    logic                     bipred;      // 1: average both references
    logic        [3:0]        bit_depth;   // 8..10
    logic        [2:0]        log2_denom;  // weighted prediction denominator
    logic signed [WGT_W-1:0]  w0;          // weight of reference 0 (1 = default)
    logic signed [WGT_W-1:0]  w1;          // weight of reference 1
    logic signed [OFS_W-1:0]  o0;          // offset of reference 0, sample units
    logic signed [OFS_W-1:0]  o1;          // offset of reference 1, sample units
  } mc_job_t;

  // Coefficient i of the TAPS-tap filter at fractional position frac.
  // frac == 0 gives 64 on tap ident_tap and 0 elsewhere.
  function automatic coef_t mc_coef(int taps, logic [FRAC_W-1:0] frac, int i, int ident_tap);
    coef_t c;
    c = '0;
    if (frac == 0) begin
      c = (i == ident_tap) ? 8'sd64 : 8'sd0;
    end else if (taps == 8) begin
      case (frac[1:0])
        2'd1: case (i) 0: c = -1; 1: c = 4; 2: c = -10; 3: c = 58;
                       4: c = 17; 5: c = -5; 6: c = 1;  default: c = 0; endcase
        2'd2: case (i) 0: c = -1; 1: c = 4; 2: c = -11; 3: c = 40;
                       4: c = 40; 5: c = -11; 6: c = 4; default: c = -1; endcase
        default: case (i) 0: c = 0; 1: c = 1; 2: c = -5; 3: c = 17;
                       4: c = 58; 5: c = -10; 6: c = 4; default: c = -1; endcase
      endcase
    end else begin
      case (frac)
        3'd1: case (i) 0: c = -2; 1: c = 58; 2: c = 10; default: c = -2; endcase
        3'd2: case (i) 0: c = -4; 1: c = 54; 2: c = 16; default: c = -2; endcase
        3'd3: case (i) 0: c = -6; 1: c = 46; 2: c = 28; default: c = -4; endcase
        3'd4: case (i) 0: c = -4; 1: c = 36; 2: c = 36; default: c = -4; endcase
        3'd5: case (i) 0: c = -4; 1: c = 28; 2: c = 46; default: c = -6; endcase
        3'd6: case (i) 0: c = -2; 1: c = 16; 2: c = 54; default: c = -4; endcase
        default: case (i) 0: c = -2; 1: c = 10; 2: c = 58; default: c = -2; endcase
      endcase
    end
    return c;
  endfunction

endpackage
