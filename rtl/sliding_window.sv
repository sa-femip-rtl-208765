// sliding_window: KxK register window fed one image column per pixel.
//
// On every valid input column the window shifts one position to the left and
// the new column enters at the right (win[r][K-1], r = 0 is the top row).
// The window is complete once K columns and K rows of the stream's valid
// area have been seen: the incoming column's coordinates must satisfy
// x >= X0+K-1 and y >= Y0+K-1, where (X0,Y0) is the first coordinate
// present in the stream (non-zero after an earlier window stage dropped a
// border). Pixels whose window would leave the image are thus discarded, as
// the design description does for the border of each kernel.
// Outputs are registered: out_valid/out_x/out_y give the window centre
// (x-(K-1)/2, y-(K-1)/2) together with the updated window, one cycle after
// the column. The block follows the design description; the coordinate
// bookkeeping is this implementation's own.
module sliding_window #(
  parameter int unsigned K       = 7,
  parameter int unsigned WIDTH   = 10,
  parameter int unsigned COORD_W = 10,
  parameter int unsigned X0      = 0,
  parameter int unsigned Y0      = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [COORD_W-1:0]              in_x,
  input  logic [COORD_W-1:0]              in_y,
  input  logic [K-1:0][WIDTH-1:0]         in_col,
  output logic                            out_valid,
  output logic [COORD_W-1:0]              out_x,
  output logic [COORD_W-1:0]              out_y,
  output logic [K-1:0][K-1:0][WIDTH-1:0]  win      // win[row][col]
);
  localparam int unsigned HALF = (K - 1) / 2;

  logic full;
  assign full = (int'(in_x) >= int'(X0 + K - 1)) && (int'(in_y) >= int'(Y0 + K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      win       <= '0;
    end else begin
      out_valid <= in_valid && full;
      if (in_valid) begin
        for (int unsigned r = 0; r < K; r++) begin
          for (int unsigned c = 0; c + 1 < K; c++) win[r][c] <= win[r][c+1];
          win[r][K-1] <= in_col[r];
        end
        out_x <= in_x - COORD_W'(HALF);
        out_y <= in_y - COORD_W'(HALF);
      end
    end
  end
endmodule
