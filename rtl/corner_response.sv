// corner_response: Harris corner response R = Det(N) - k * Tr(N)^2.
//
// For each pixel the products Lx^2, Ly^2 and Lx*Ly are formed, summed over a
// 3x3 neighbourhood (a row buffer and sliding window carrying the three
// products side by side) to give the second-moment matrix
// N = [Sxx Sxy; Sxy Syy], and R = Sxx*Syy - Sxy^2 - k*(Sxx+Syy)^2 with
// k = 41/1024 (~0.04). R is shifted right by R_SHIFT and saturated to a
// 32-bit signed value. Eq. (1) and k = 0.04 follow the design description;
// the 3x3 unweighted summation window, the fixed-point widths and the output
// scaling are this implementation's choices.
// Interface: derivative stream (valid, coordinates, Lx, Ly) whose first
// coordinate is (X0,Y0); output stream of R at the window centre. Windows
// that leave the derivative image are dropped. Latency: 6 cycles.
module corner_response
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W   = 1024,
  parameter int unsigned COORD_W = femip_pkg::COORD_W,
  parameter int unsigned D_W     = PIX_W + 3,
  parameter int unsigned X0      = 4,
  parameter int unsigned Y0      = 4,
  parameter int unsigned R_SHIFT = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [COORD_W-1:0]         in_x,
  input  logic [COORD_W-1:0]         in_y,
  input  logic signed [D_W-1:0]      in_lx,
  input  logic signed [D_W-1:0]      in_ly,
  output logic                       out_valid,
  output logic [COORD_W-1:0]         out_x,
  output logic [COORD_W-1:0]         out_y,
  output logic signed [R_W-1:0]      out_r
);
  localparam int unsigned P_W  = 2 * D_W;          // one product, signed
  localparam int unsigned CH_W = 3 * P_W;          // three products side by side
  localparam int unsigned S_W  = P_W + 4;          // sum of 9 products
  localparam int unsigned M_W  = 2 * S_W + 2;      // det / trace^2 width

  // stage 1: products
  logic                 p_valid;
  logic [COORD_W-1:0]   p_x, p_y;
  logic signed [P_W-1:0] pxx, pyy, pxy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_x <= '0; p_y <= '0;
      pxx <= '0; pyy <= '0; pxy <= '0;
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        p_x <= in_x;
        p_y <= in_y;
        pxx <= P_W'(in_lx) * P_W'(in_lx);
        pyy <= P_W'(in_ly) * P_W'(in_ly);
        pxy <= P_W'(in_lx) * P_W'(in_ly);
      end
    end
  end

  // stages 2-3: 3x3 neighbourhood of the three products
  logic                             rb_valid, sw_valid;
  logic [COORD_W-1:0]               rb_x, rb_y, sw_x, sw_y;
  logic [2:0][CH_W-1:0]             rb_col;
  logic [2:0][2:0][CH_W-1:0]        w;

  row_buffer #(.K(3), .WIDTH(CH_W), .DEPTH(IMG_W), .COORD_W(COORD_W)) u_rows (
    .clk, .rst_n,
    .in_valid(p_valid), .in_x(p_x), .in_y(p_y), .in_data({pxx, pyy, pxy}),
    .out_valid(rb_valid), .out_x(rb_x), .out_y(rb_y), .out_col(rb_col)
  );

  sliding_window #(.K(3), .WIDTH(CH_W), .COORD_W(COORD_W), .X0(X0), .Y0(Y0)) u_win (
    .clk, .rst_n,
    .in_valid(rb_valid), .in_x(rb_x), .in_y(rb_y), .in_col(rb_col),
    .out_valid(sw_valid), .out_x(sw_x), .out_y(sw_y), .win(w)
  );

  // stage 4: window sums
  logic                  s_valid;
  logic [COORD_W-1:0]    s_x, s_y;
  logic signed [S_W-1:0] sxx, syy, sxy;
  logic signed [S_W-1:0] cxx, cyy, cxy;

  always_comb begin
    cxx = '0; cyy = '0; cxy = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        cxx += S_W'(signed'(w[r][c][3*P_W-1:2*P_W]));
        cyy += S_W'(signed'(w[r][c][2*P_W-1:P_W]));
        cxy += S_W'(signed'(w[r][c][P_W-1:0]));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_x <= '0; s_y <= '0;
      sxx <= '0; syy <= '0; sxy <= '0;
    end else begin
      s_valid <= sw_valid;
      if (sw_valid) begin
        s_x <= sw_x; s_y <= sw_y;
        sxx <= cxx; syy <= cyy; sxy <= cxy;
      end
    end
  end

  // stage 5: determinant and k * trace^2
  logic                  m_valid;
  logic [COORD_W-1:0]    m_x, m_y;
  logic signed [M_W-1:0] det, ktr2;
  logic signed [M_W-1:0] tr;

  assign tr = M_W'(sxx) + M_W'(syy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_x <= '0; m_y <= '0;
      det <= '0; ktr2 <= '0;
    end else begin
      m_valid <= s_valid;
      if (s_valid) begin
        m_x  <= s_x; m_y <= s_y;
        det  <= M_W'(sxx) * M_W'(syy) - M_W'(sxy) * M_W'(sxy);
        ktr2 <= ((tr * tr) >>> HARRIS_K_SHIFT) * M_W'(HARRIS_K_NUM);
      end
    end
  end

  // stage 6: R, scaled and saturated
  logic signed [M_W-1:0] r_full, r_sh;
  assign r_full = det - ktr2;
  assign r_sh   = r_full >>> R_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x <= '0; out_y <= '0;
      out_r <= '0;
    end else begin
      out_valid <= m_valid;
      if (m_valid) begin
        out_x <= m_x; out_y <= m_y;
        if (r_sh > M_W'(signed'({1'b0, {(R_W-1){1'b1}}})))
          out_r <= {1'b0, {(R_W-1){1'b1}}};
        else if (r_sh < -M_W'(signed'({1'b0, {(R_W-1){1'b1}}})) - 1)
          out_r <= {1'b1, {(R_W-1){1'b0}}};
        else
          out_r <= R_W'(r_sh);
      end
    end
  end
endmodule
