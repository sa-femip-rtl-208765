// prewitt: spatial image derivative with the 3x3 Prewitt kernel.
//
// DIR = 0 gives L_x (right column minus left column of the 3x3 window),
// DIR = 1 gives L_y (bottom row minus top row). The kernel follows the design
// description; the result is the unscaled signed sum (range +-3*(2**PIX_W-1))
// and the registered, one-cycle-latency output are this implementation's.
// Interface: in_valid with a 3x3 window win[row][col]; out_valid/out_d one
// cycle later.
module prewitt
  import femip_pkg::*;
#(
  parameter int unsigned DIR = 0,
  parameter int unsigned D_W = PIX_W + 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [2:0][2:0][PIX_W-1:0]     win,
  output logic                           out_valid,
  output logic signed [D_W-1:0]          out_d
);
  logic signed [D_W-1:0] pos, neg;

  always_comb begin
    pos = '0;
    neg = '0;
    for (int k = 0; k < 3; k++) begin
      if (DIR == 0) begin
        pos += D_W'(win[k][2]);
        neg += D_W'(win[k][0]);
      end else begin
        pos += D_W'(win[2][k]);
        neg += D_W'(win[0][k]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_d     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_d <= pos - neg;
    end
  end
endmodule
