// features_counter: per-pixel thresholding and per-cell feature counting.
//
// Every corner response R is compared with the threshold of the image cell
// that contains the pixel (th, read from the TH shifter vector): val_feat is
// high when R > th. An accumulator counts the features of the current cell
// within the current row of pixels. On the last pixel of a cell in a row
// (cell_end) the running count is handed to the NF shifter vector (nf_in,
// shifted in that cycle), and the accumulator restarts from the count that
// the NF vector then presents for the next cell (nf_out), so counts build up
// across the 128 pixel rows of a cell. Thresholding and the store/reload of
// the accumulator follow the design description; counts saturate at
// 2**NF_W-1 (this implementation's choice). val_feat and nf_in are
// combinational from the inputs of the same cycle.
module features_counter
  import femip_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      r_valid,
  input  logic signed [R_W-1:0]     r,
  input  logic [TH_W-1:0]           th,
  input  logic                      cell_end,
  input  logic [NF_W-1:0]           nf_out,
  output logic                      val_feat,
  output logic [NF_W-1:0]           nf_in
);
  logic [NF_W-1:0] acc, base;
  logic            reload;

  assign val_feat = r_valid && (r > signed'({1'b0, th[TH_W-2:0]}));
  assign base     = reload ? nf_out : acc;
  assign nf_in    = (val_feat && base != '1) ? base + 1'b1 : base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      reload <= 1'b1;
    end else if (r_valid) begin
      acc    <= nf_in;
      reload <= cell_end;
    end
  end
endmodule
