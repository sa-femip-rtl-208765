// nve: noise standard deviation estimator, one estimate per frame.
//
// Estimates the standard deviation sigma_n of additive Gaussian noise in the
// unfiltered input frame with the fast estimator of Immerkaer:
//   sigma_n = sqrt(pi/2) / (6 (W-2)(H-2)) * sum over interior pixels |I * M|
// with the 3x3 mask M = [1 -2 1; -2 4 -2; 1 -2 1]. Only an absolute value and
// an accumulator run per pixel; one constant multiplication per frame scales
// the sum, so no squaring is needed (the design description computes sigma_n
// rather than sigma_n^2 for exactly that reason). The choice of this
// estimator is this implementation's: the description only says the
// estimator follows an earlier adaptive denoising core.
// Interface: the raw input raster stream; sigma_valid pulses once per frame,
// a few cycles after the last pixel, with sigma_q4 = sigma_n in unsigned
// fixed point with 4 fractional bits, in the pixel's own units.
module nve
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W   = 1024,
  parameter int unsigned IMG_H   = 1024,
  parameter int unsigned COORD_W = femip_pkg::COORD_W,
  parameter int unsigned SIGMA_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  input  logic [PIX_W-1:0]     in_pix,
  output logic                 sigma_valid,
  output logic [SIGMA_W-1:0]   sigma_q4
);
  localparam int unsigned ACC_W   = PIX_W + 4 + $clog2(IMG_W * IMG_H);
  localparam int unsigned SCALE_SH = 40;
  // sqrt(pi/2) * 16 / (6 (W-2)(H-2)) in units of 2**-SCALE_SH
  localparam real         SCALE_R = 1.2533141373155 * 16.0 * (2.0 ** SCALE_SH)
                                    / (6.0 * real'(IMG_W - 2) * real'(IMG_H - 2));
  localparam longint unsigned SCALE = longint'(SCALE_R + 0.5);
  localparam int unsigned SCALE_W = 40;
  localparam int unsigned CONV_W  = PIX_W + 5;   // |conv| <= 16 * (2**PIX_W - 1)

  logic                              rb_valid;
  logic [COORD_W-1:0]                rb_x, rb_y;
  logic [2:0][PIX_W-1:0]             rb_col;
  logic                              sw_valid;
  logic [COORD_W-1:0]                sw_x, sw_y;
  logic [2:0][2:0][PIX_W-1:0]        w;

  row_buffer #(.K(3), .WIDTH(PIX_W), .DEPTH(IMG_W), .COORD_W(COORD_W)) u_rows (
    .clk, .rst_n,
    .in_valid(in_valid), .in_x(in_x), .in_y(in_y), .in_data(in_pix),
    .out_valid(rb_valid), .out_x(rb_x), .out_y(rb_y), .out_col(rb_col)
  );

  sliding_window #(.K(3), .WIDTH(PIX_W), .COORD_W(COORD_W), .X0(0), .Y0(0)) u_win (
    .clk, .rst_n,
    .in_valid(rb_valid), .in_x(rb_x), .in_y(rb_y), .in_col(rb_col),
    .out_valid(sw_valid), .out_x(sw_x), .out_y(sw_y), .win(w)
  );

  logic signed [CONV_W:0] conv;
  logic [CONV_W-1:0]      conv_abs;
  always_comb begin
    conv = (CONV_W+1)'(w[0][0]) + (CONV_W+1)'(w[0][2]) + (CONV_W+1)'(w[2][0]) + (CONV_W+1)'(w[2][2])
         - ((CONV_W+1)'(w[0][1]) << 1) - ((CONV_W+1)'(w[1][0]) << 1)
         - ((CONV_W+1)'(w[1][2]) << 1) - ((CONV_W+1)'(w[2][1]) << 1)
         + ((CONV_W+1)'(w[1][1]) << 2);
    conv_abs = conv[CONV_W] ? CONV_W'(-conv) : CONV_W'(conv);
  end

  logic             first_px, last_px;
  logic [ACC_W-1:0] acc, total;
  logic             total_valid;
  logic [ACC_W+SCALE_W-1:0] scaled;

  assign first_px = (sw_x == COORD_W'(1)) && (sw_y == COORD_W'(1));
  assign last_px  = (int'(sw_x) == int'(IMG_W - 2)) && (int'(sw_y) == int'(IMG_H - 2));
  assign scaled   = (ACC_W+SCALE_W)'(total) * (ACC_W+SCALE_W)'(SCALE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      total       <= '0;
      total_valid <= 1'b0;
      sigma_valid <= 1'b0;
      sigma_q4    <= '0;
    end else begin
      total_valid <= 1'b0;
      sigma_valid <= 1'b0;
      if (sw_valid) begin
        if (first_px) acc <= ACC_W'(conv_abs);
        else          acc <= acc + ACC_W'(conv_abs);
        if (last_px) begin
          total       <= acc + ACC_W'(conv_abs);
          total_valid <= 1'b1;
        end
      end
      if (total_valid) begin
        sigma_valid <= 1'b1;
        sigma_q4    <= ((scaled >> SCALE_SH) > (ACC_W+SCALE_W)'({SIGMA_W{1'b1}}))
                       ? '1 : SIGMA_W'(scaled >> SCALE_SH);
      end
    end
  end
endmodule
