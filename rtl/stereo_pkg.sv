// stereo_pkg: sizes, types and fixed coefficient tables shared by the stereo pipeline.
// Image geometry (640x240 fields), disparity range (128), window lengths per scale
// (9/5/3) and the 8-bit normalised phase width follow the design description; the
// filter coefficient values, Gaussian window weights and word widths not stated
// there are this design's own choices and are marked as such below.
package stereo_pkg;

  // ---- image geometry -------------------------------------------------------
  localparam int unsigned IMG_W   = 640;   // pixels per scanline
  localparam int unsigned IMG_H   = 240;   // scanlines per field
  localparam int unsigned XW      = 10;    // column index width
  localparam int unsigned YW      = 8;     // row index width
  localparam int unsigned PIX_W   = 8;     // camera pixel width (own choice)

  // ---- disparity ------------------------------------------------------------
  localparam int unsigned MAX_DISP = 128;  // largest disparity searched
  localparam int unsigned DW       = 8;    // disparity word width
  localparam int unsigned WIN1     = 9;    // voting units per window, scale 1
  localparam int unsigned WIN2     = 5;    // scale 2
  localparam int unsigned WIN4     = 3;    // scale 4
  localparam int unsigned NORI     = 3;    // orientations -45, 0, +45
  localparam int unsigned CONS_THR = 2;    // consistency threshold in pixels

  // ---- arithmetic widths ------------------------------------------------------
  localparam int unsigned FILT_W  = 16;    // G2/H2 filter output width
  localparam int unsigned PH_W    = 8;     // normalised real/imag width
  localparam int unsigned VOTE_W  = 20;    // voting (correlation) word width (own choice)
  localparam int unsigned SCORE_W = 24;    // combined confidence width (own choice)

  typedef logic signed [FILT_W-1:0] filt_t;
  typedef logic signed [PH_W-1:0]   ph_t;
  typedef logic signed [VOTE_W-1:0] vote_t;
  typedef logic signed [SCORE_W-1:0] score_t;
  typedef logic [DW-1:0]            disp_t;

  // complex filter / phase sample
  typedef struct packed {
    filt_t re;
    filt_t im;
  } cfilt_t;

  typedef struct packed {
    ph_t re;
    ph_t im;
  } cph_t;

  // one pixel of a filtered stream (complex output at every orientation)
  typedef struct packed {
    logic                 valid;
    logic [XW-1:0]        x;
    logic [YW-1:0]        y;
    cfilt_t [NORI-1:0]    c;
  } fsmp_t;

  // one pixel of a normalised phase stream
  typedef struct packed {
    logic                 valid;
    logic [XW-1:0]        x;
    logic [YW-1:0]        y;
    cph_t [NORI-1:0]      c;
  } psmp_t;

  // ---- G2/H2 separable basis filters (7 taps, sample spacing 0.67) -----------
  // Basis filters are products f(x)*g(y) of the 1-D factors below (coefficients in
  // Q1.10). They are the standard steerable G2/H2 set sampled at 7 points; the
  // values are this design's choice, the description gives only the filter family.
  //   K_GAUSS = e^-t^2                    K_TG  = 1.3576*t*e^-t^2
  //   K_G2Q   = 0.9213*(2t^2-1)*e^-t^2    K_H2C = 0.9780*(t^3-2.254t)*e^-t^2
  //   K_H2Q   = 0.7204*(t^2-0.7515)*e^-t^2, with t = 0.67*(i-3), scaled by 1024.
  localparam int unsigned NBASIS = 7;
  typedef logic signed [11:0] coef_t;

  // index: 0 even gauss, 1 odd t*gauss, 2 G2 quad, 3 H2 cubic, 4 H2 (t^2-0.75)
  localparam coef_t K_GAUSS [7] = '{12'sd18, 12'sd170, 12'sd654, 12'sd1024, 12'sd654, 12'sd170, 12'sd18};
  localparam coef_t K_TG    [7] = '{-12'sd49, -12'sd309, -12'sd595, 12'sd0, 12'sd595, 12'sd309, 12'sd49};
  localparam coef_t K_G2Q   [7] = '{12'sd118, 12'sd406, -12'sd62, -12'sd943, -12'sd62, 12'sd406, 12'sd118};
  localparam coef_t K_H2C   [7] = '{-12'sd63, 12'sd102, 12'sd773, 12'sd0, -12'sd773, -12'sd102, 12'sd63};
  localparam coef_t K_H2Q   [7] = '{12'sd43, 12'sd128, -12'sd142, -12'sd554, -12'sd142, 12'sd128, 12'sd43};

  // For basis b: horizontal kernel index and vertical kernel index into the table above.
  //   G2a = G2Q(x)G(y), G2b = TG(x)TG(y), G2c = G(x)G2Q(y)
  //   H2a = H2C(x)G(y), H2b = H2Q(x)TG(y), H2c = TG(x)H2Q(y), H2d = G(x)H2C(y)
  localparam int BASIS_HK [7] = '{2, 1, 0, 3, 4, 1, 0};
  localparam int BASIS_VK [7] = '{0, 1, 2, 0, 1, 4, 3};

  function automatic coef_t kern(input int k, input int i);
    case (k)
      0: return K_GAUSS[i];
      1: return K_TG[i];
      2: return K_G2Q[i];
      3: return K_H2C[i];
      default: return K_H2Q[i];
    endcase
  endfunction

  // kernel symmetry: 1 = symmetric, 0 = anti-symmetric
  function automatic bit kern_sym(input int k);
    return (k == 1 || k == 3) ? 1'b0 : 1'b1;
  endfunction

  // Steering gains (Q1.10) for orientations -45, 0, +45 degrees.
  //   G2(th) = c^2 G2a - 2cs G2b + s^2 G2c
  //   H2(th) = c^3 H2a - 3c^2 s H2b + 3c s^2 H2c - s^3 H2d
  typedef logic signed [11:0] gain_t;
  localparam gain_t STEER_G [3][3] = '{
    '{12'sd512,  12'sd1024, 12'sd512},   // -45 deg
    '{12'sd1024, 12'sd0,    12'sd0  },   //   0 deg
    '{12'sd512, -12'sd1024, 12'sd512}    // +45 deg
  };
  localparam gain_t STEER_H [3][4] = '{
    '{12'sd362,  12'sd1086, 12'sd1086,  12'sd362},  // -45 deg
    '{12'sd1024, 12'sd0,    12'sd0,     12'sd0  },  //   0 deg
    '{12'sd362, -12'sd1086, 12'sd1086, -12'sd362}   // +45 deg
  };

  // 1x5 Gaussian correlation window weights, sum 16 (own choice of values).
  localparam int GWIN [5] = '{1, 4, 6, 4, 1};

  function automatic int unsigned clog2c(input int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
