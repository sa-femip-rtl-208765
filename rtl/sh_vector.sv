// sh_vector: per-cell value store of the adaptive thresholding (TH and NF).
//
// ROWS circular shift registers of COLS positions, one register per row of
// image cells. data_out is the last position (COLS-1) of the register chosen
// by sel. When en is high the chosen register shifts one position right and
// position 0 takes either data_in (th_phase = 0) or its own data_out
// (th_phase = 1, circular rotation). Reading a full row of cells therefore
// takes COLS shifts and leaves the register as it was. Position COLS-1 holds
// cell 0 of the row at rest. clear sets every value to zero; reset loads
// RESET_VAL. The structure and the th_phase multiplexer numbering follow the
// design description's figure of the shifter vector; clear and RESET_VAL are
// this implementation's way of giving the local reset and start-up values.
module sh_vector #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned WIDTH = 32,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [$clog2(ROWS)-1:0]    sel,
  input  logic                       th_phase,
  input  logic [WIDTH-1:0]           data_in,
  input  logic                       clear,
  output logic [WIDTH-1:0]           data_out
);
  logic [WIDTH-1:0] sr [ROWS][COLS];
  logic [WIDTH-1:0] shift_in;

  assign data_out = sr[sel][COLS-1];
  assign shift_in = th_phase ? data_out : data_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) sr[r][c] <= RESET_VAL;
    end else if (clear) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) sr[r][c] <= '0;
    end else if (en) begin
      for (int c = COLS - 1; c > 0; c--) sr[sel][c] <= sr[sel][c-1];
      sr[sel][0] <= shift_in;
    end
  end
endmodule
