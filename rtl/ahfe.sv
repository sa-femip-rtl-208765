// ahfe: adaptive Harris feature extractor.
//
// Takes the filtered pixel stream (its first coordinate is (3,3), the
// Gaussian border being dropped), forms 3x3 windows, computes the Prewitt
// derivatives L_x and L_y, the Harris corner response of every pixel, and
// thresholds it with a separate adaptive threshold per image cell. Each
// corner response leaves with its coordinates and val_feat. The chain
// (L_x, L_y, corner response calculator, adaptive cell-based thresholding)
// follows the design description. Corner responses exist for coordinates
// 5 .. IMG-6 in both directions; frame_done pulses with the last one.
// Latency from a filtered pixel to its corner response: about one image row
// plus 11 cycles.
module ahfe
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W     = 1024,
  parameter int unsigned IMG_H     = 1024,
  parameter int unsigned COORD_W   = femip_pkg::COORD_W,
  parameter int unsigned CELL_LOG2 = 7,
  parameter int unsigned R_SHIFT   = 24,
  parameter int unsigned OTF       = 3000,
  parameter int unsigned TF_INIT   = 48,
  parameter logic [TH_W-1:0] TH_INIT = {1'b0, {(TH_W-1){1'b1}}}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [COORD_W-1:0]      in_x,
  input  logic [COORD_W-1:0]      in_y,
  input  logic [PIX_W-1:0]        in_pix,
  output logic                    out_valid,
  output logic [COORD_W-1:0]      out_x,
  output logic [COORD_W-1:0]      out_y,
  output logic signed [R_W-1:0]   out_r,
  output logic                    val_feat,
  output logic                    frame_done,
  output logic                    busy,
  output logic                    update_done,
  output logic [23:0]             curr_ef,
  output logic [23:0]             tf_slack,
  output logic [15:0]             lowth_events
);
  localparam int unsigned D_W = PIX_W + 3;
  localparam int unsigned X_LAST = IMG_W - 6;
  localparam int unsigned Y_LAST = IMG_H - 6;

  logic                         rb_valid, sw_valid, d_valid, dy_valid;
  logic [COORD_W-1:0]           rb_x, rb_y, sw_x, sw_y, d_x, d_y;
  logic [2:0][PIX_W-1:0]        rb_col;
  logic [2:0][2:0][PIX_W-1:0]   w;
  logic signed [D_W-1:0]        lx, ly;
  logic                         c_valid;
  logic [COORD_W-1:0]           c_x, c_y;
  logic signed [R_W-1:0]        c_r;

  row_buffer #(.K(3), .WIDTH(PIX_W), .DEPTH(IMG_W), .COORD_W(COORD_W)) u_rows (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_data(in_pix),
    .out_valid(rb_valid), .out_x(rb_x), .out_y(rb_y), .out_col(rb_col)
  );

  sliding_window #(.K(3), .WIDTH(PIX_W), .COORD_W(COORD_W), .X0(3), .Y0(3)) u_win (
    .clk, .rst_n, .in_valid(rb_valid), .in_x(rb_x), .in_y(rb_y), .in_col(rb_col),
    .out_valid(sw_valid), .out_x(sw_x), .out_y(sw_y), .win(w)
  );

  prewitt #(.DIR(0), .D_W(D_W)) u_lx (
    .clk, .rst_n, .in_valid(sw_valid), .win(w), .out_valid(d_valid), .out_d(lx)
  );

  prewitt #(.DIR(1), .D_W(D_W)) u_ly (
    .clk, .rst_n, .in_valid(sw_valid), .win(w), .out_valid(dy_valid), .out_d(ly)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_x <= '0;
      d_y <= '0;
    end else if (sw_valid) begin
      d_x <= sw_x;
      d_y <= sw_y;
    end
  end

  corner_response #(.IMG_W(IMG_W), .COORD_W(COORD_W), .D_W(D_W), .X0(4), .Y0(4),
                    .R_SHIFT(R_SHIFT)) u_crc (
    .clk, .rst_n, .in_valid(d_valid && dy_valid), .in_x(d_x), .in_y(d_y), .in_lx(lx), .in_ly(ly),
    .out_valid(c_valid), .out_x(c_x), .out_y(c_y), .out_r(c_r)
  );

  acth #(.COORD_W(COORD_W), .CELL_LOG2(CELL_LOG2), .X_LAST(X_LAST), .Y_LAST(Y_LAST),
         .OTF(OTF), .TF_INIT(TF_INIT), .TH_INIT(TH_INIT)) u_acth (
    .clk, .rst_n, .r_valid(c_valid), .r_x(c_x), .r_y(c_y), .r(c_r),
    .out_valid, .out_x, .out_y, .out_r, .val_feat,
    .busy, .update_done, .curr_ef, .tf_slack, .lowth_events
  );

  assign frame_done = out_valid && (int'(out_x) == X_LAST) && (int'(out_y) == Y_LAST);
endmodule
