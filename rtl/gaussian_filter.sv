// gaussian_filter: 7x7 Gaussian smoothing of a raster pixel stream.
//
// The input pixels are stored in a 7-row circular row buffer; every input
// pixel pushes one 7-pixel column into the 7x7 sliding window, and each full
// window is convolved with the kernel held in gauss_rm. One filtered pixel
// leaves per input pixel once the window is full; the 3-pixel border of the
// frame is not filtered and produces no output, as in the design
// description. Output coordinates are those of the window centre.
// Interface: in_valid/in_x/in_y/in_pix raster stream (one pixel per cycle at
// most, no back-pressure); out_valid/out_x/out_y/out_pix filtered stream;
// cfg_* write port of the kernel coefficients; frame_done pulses with the
// last filtered pixel of a frame (centre (IMG_W-4, IMG_H-4)).
// Latency: 4 cycles from the input pixel that completes a window.
module gaussian_filter
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W   = 1024,
  parameter int unsigned IMG_H   = 1024,
  parameter int unsigned COORD_W = femip_pkg::COORD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  input  logic [PIX_W-1:0]     in_pix,
  input  logic                 cfg_we,
  input  logic [5:0]           cfg_addr,
  input  logic [COEF_W-1:0]    cfg_data,
  output logic                 out_valid,
  output logic [COORD_W-1:0]   out_x,
  output logic [COORD_W-1:0]   out_y,
  output logic [PIX_W-1:0]     out_pix,
  output logic                 frame_done
);
  localparam int unsigned HALF = (GK - 1) / 2;

  logic                              rb_valid;
  logic [COORD_W-1:0]                rb_x, rb_y;
  logic [GK-1:0][PIX_W-1:0]          rb_col;
  logic                              sw_valid;
  logic [COORD_W-1:0]                sw_x, sw_y;
  logic [GK-1:0][GK-1:0][PIX_W-1:0]  sw_win;

  row_buffer #(.K(GK), .WIDTH(PIX_W), .DEPTH(IMG_W), .COORD_W(COORD_W)) u_rows (
    .clk, .rst_n,
    .in_valid(in_valid), .in_x(in_x), .in_y(in_y), .in_data(in_pix),
    .out_valid(rb_valid), .out_x(rb_x), .out_y(rb_y), .out_col(rb_col)
  );

  sliding_window #(.K(GK), .WIDTH(PIX_W), .COORD_W(COORD_W), .X0(0), .Y0(0)) u_win (
    .clk, .rst_n,
    .in_valid(rb_valid), .in_x(rb_x), .in_y(rb_y), .in_col(rb_col),
    .out_valid(sw_valid), .out_x(sw_x), .out_y(sw_y), .win(sw_win)
  );

  gauss_rm #(.COORD_W(COORD_W)) u_rm (
    .clk, .rst_n,
    .in_valid(sw_valid), .in_x(sw_x), .in_y(sw_y), .in_win(sw_win),
    .cfg_we, .cfg_addr, .cfg_data,
    .out_valid, .out_x, .out_y, .out_pix
  );

  assign frame_done = out_valid && (int'(out_x) == int'(IMG_W - 1 - HALF))
                                && (int'(out_y) == int'(IMG_H - 1 - HALF));
endmodule
