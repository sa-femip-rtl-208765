// femip_pkg: constants, types and elaboration-time functions shared by the
// feature extraction and matching pipeline.
//
// Frame geometry (1024x1024, 10 bits per pixel), the 7x7 Gaussian kernel, the
// 3x3 derivative kernel, the 8x8 cell grid and the constants of the adaptive
// cell thresholding algorithm (tolerance 15, threshold lower bound 15,
// 3000 overall target features, 48 target features per cell) follow the
// design description. Fixed-point formats (12 fractional bits for Gaussian
// coefficients, the Harris k = 0.04 as 41/1024, the 32-bit corner response)
// are this implementation's own choices.
package femip_pkg;

  // ---------------- frame and pixel format ----------------
  localparam int unsigned PIX_W   = 10;   // bits per pixel
  localparam int unsigned COORD_W = 10;   // enough for 1024 columns/rows
  localparam int unsigned WORD_W  = 32;   // input stream / external memory word
  localparam int unsigned ADDR_W  = 24;   // external memory word address

  // ---------------- Gaussian filter ----------------
  localparam int unsigned GK       = 7;   // kernel size
  localparam int unsigned COEF_W   = 12;  // unsigned coefficient width
  localparam int unsigned COEF_FRAC = 12; // coefficients sum to 2**COEF_FRAC
  localparam int unsigned N_CFG    = 5;   // number of filter configurations

  // ---------------- Harris ----------------
  localparam int unsigned R_W      = 32;  // signed corner response width
  localparam int unsigned HARRIS_K_NUM = 41;   // k = 41/1024 ~ 0.04
  localparam int unsigned HARRIS_K_SHIFT = 10;

  // ---------------- adaptive cell thresholding ----------------
  localparam int unsigned N_CELL_ROWS = 8;
  localparam int unsigned N_CELL_COLS = 8;
  localparam int unsigned TH_W   = 32;    // unsigned threshold (top bit kept 0)
  localparam int unsigned NF_W   = 16;    // per-cell feature count
  localparam int unsigned TF_W   = 16;    // per-cell target feature count

  // ---------------- external memory client ids ----------------
  typedef enum logic [1:0] {
    CL_NONE   = 2'd0,
    CL_FILTER = 2'd1,
    CL_RECFG  = 2'd2,
    CL_MATCH  = 2'd3
  } mem_client_e;

  // Un-normalised 2-D Gaussian weight of tap (i,j) of a size-s kernel with
  // variance sigma2, in units of 2**COEF_FRAC, before normalisation.
  function automatic real gauss_weight(input int i, input int j, input int s, input real sigma2);
    real di, dj;
    di = real'(i - (s - 1) / 2);
    dj = real'(j - (s - 1) / 2);
    return $exp(-(di * di + dj * dj) / (2.0 * sigma2));
  endfunction

  // Normalised fixed-point coefficient of tap (i,j) (row i, column j) of the
  // 7x7 kernel with variance sigma2: round(2**COEF_FRAC * w(i,j) / sum(w)).
  function automatic logic [COEF_W-1:0] gauss_coef(input int i, input int j, input real sigma2);
    real sum;
    sum = 0.0;
    for (int a = 0; a < GK; a++)
      for (int b = 0; b < GK; b++)
        sum += gauss_weight(a, b, GK, sigma2);
    return COEF_W'($rtoi(gauss_weight(i, j, GK, sigma2) * real'(1 << COEF_FRAC) / sum + 0.5));
  endfunction

  // Filter variance sigma_f^2 of configuration c (0.5, 0.75, 1, 1.5, 2).
  function automatic real cfg_sigma2(input int c);
    case (c)
      0: return 0.5;
      1: return 0.75;
      2: return 1.0;
      3: return 1.5;
      default: return 2.0;
    endcase
  endfunction

endpackage
