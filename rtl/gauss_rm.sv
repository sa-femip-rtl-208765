// gauss_rm: the reconfigurable multiplier block of the 7x7 Gaussian filter.
//
// Computes FI = sum_{i,j} W(i,j) * K(i,j) over a 7x7 pixel window in two
// pipeline stages: all 49 products in parallel in the first cycle, then an
// adder tree over the 49 products, rounding and saturation to PIX_W bits in
// the second. The 49 multiplications per pixel in one cycle and the adder
// tree follow the design description.
// On an FPGA with partial reconfiguration the kernel constants are fixed in
// each of several bitstreams and swapped at run time. Here the constants sit
// in 49 registers that the configuration port writes (cfg_we/cfg_addr/
// cfg_data, coefficient index i*7+j); this register model of the
// reconfiguration, and the unsigned 12-bit coefficient format whose 49 values
// sum to 4096, are this implementation's choices. After reset the kernel of
// variance sigma_f^2 = 2 is loaded.
// Timing: out_* follow in_* by two cycles, one pixel per cycle.
module gauss_rm
  import femip_pkg::*;
#(
  parameter int unsigned COORD_W = femip_pkg::COORD_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [COORD_W-1:0]                 in_x,
  input  logic [COORD_W-1:0]                 in_y,
  input  logic [GK-1:0][GK-1:0][PIX_W-1:0]   in_win,
  input  logic                               cfg_we,
  input  logic [5:0]                         cfg_addr,
  input  logic [COEF_W-1:0]                  cfg_data,
  output logic                               out_valid,
  output logic [COORD_W-1:0]                 out_x,
  output logic [COORD_W-1:0]                 out_y,
  output logic [PIX_W-1:0]                   out_pix
);
  localparam int unsigned NT     = GK * GK;
  localparam int unsigned PROD_W = PIX_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(NT);

  typedef logic [COEF_W-1:0] coef_arr_t [NT];

  function automatic coef_arr_t default_kernel();
    coef_arr_t k;
    for (int i = 0; i < GK; i++)
      for (int j = 0; j < GK; j++)
        k[i*GK+j] = gauss_coef(i, j, cfg_sigma2(N_CFG - 1));
    return k;
  endfunction

  localparam coef_arr_t RESET_KERNEL = default_kernel();

  logic [COEF_W-1:0] coef [NT];
  logic [PROD_W-1:0] prod [NT];
  logic              v1;
  logic [COORD_W-1:0] x1, y1;
  logic [SUM_W-1:0]  sum;
  logic [SUM_W-1:0]  rounded;

  // Coefficient registers (the "reconfigurable" constants).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++) coef[t] <= RESET_KERNEL[t];
    end else if (cfg_we && int'(cfg_addr) < NT) begin
      coef[cfg_addr] <= cfg_data;
    end
  end

  // Stage 1: 49 parallel products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      x1 <= '0;
      y1 <= '0;
      for (int t = 0; t < NT; t++) prod[t] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        x1 <= in_x;
        y1 <= in_y;
        for (int i = 0; i < GK; i++)
          for (int j = 0; j < GK; j++)
            prod[i*GK+j] <= PROD_W'(in_win[i][j]) * PROD_W'(coef[i*GK+j]);
      end
    end
  end

  // Adder tree over the 49 products.
  always_comb begin
    sum = '0;
    for (int t = 0; t < NT; t++) sum += SUM_W'(prod[t]);
    rounded = (sum + SUM_W'(1 << (COEF_FRAC - 1))) >> COEF_FRAC;
  end

  // Stage 2: round, saturate and register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_pix   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_x   <= x1;
        out_y   <= y1;
        out_pix <= (rounded > SUM_W'((1 << PIX_W) - 1)) ? '1 : PIX_W'(rounded);
      end
    end
  end
endmodule
