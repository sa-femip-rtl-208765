// row_buffer: K full-row line memories written as a circular buffer.
//
// Each valid input pixel (x,y) is written at column x of the memory that
// holds row y; the memories are used in turn, so once K rows have arrived
// row K+1 overwrites the oldest row (circular policy). For every input pixel
// the block outputs, one cycle later, the K-pixel image column ending at that
// pixel: out_col[K-1] is the input pixel itself (row y) and out_col[k] is
// the pixel of row y-(K-1)+k at the same column, read from the memories.
// The K memories (one per kernel row) follow the design description; feeding
// the newest row straight from the input instead of from its memory is this
// implementation's choice, so a window is complete on the last pixel of a
// frame and no extra row is needed to flush it.
// Interface: raster stream in_valid/in_x/in_y/in_data, registered outputs
// out_valid/out_x/out_y/out_col. Latency one cycle, one pixel per cycle.
// The memory pointer advances whenever the row coordinate changes.
module row_buffer #(
  parameter int unsigned K       = 7,
  parameter int unsigned WIDTH   = 10,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned COORD_W = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [COORD_W-1:0]           in_x,
  input  logic [COORD_W-1:0]           in_y,
  input  logic [WIDTH-1:0]             in_data,
  output logic                         out_valid,
  output logic [COORD_W-1:0]           out_x,
  output logic [COORD_W-1:0]           out_y,
  output logic [K-1:0][WIDTH-1:0]      out_col
);
  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0]   mem [K][DEPTH];
  logic [PW-1:0]      ptr;        // memory of the row currently written
  logic [COORD_W-1:0] cur_y;
  logic [PW-1:0]      wslot;      // memory written by this pixel
  logic [AW-1:0]      addr;

  assign addr = AW'(in_x);

  always_comb begin
    wslot = ptr;
    if (in_y != cur_y) wslot = (ptr == PW'(K - 1)) ? '0 : ptr + 1'b1;
  end

  // Memory index holding row y-(K-1)+k when row y goes to slot s.
  function automatic logic [PW-1:0] rd_slot(input logic [PW-1:0] s, input int unsigned k);
    int unsigned idx;
    idx = int'(s) + 1 + k;
    if (idx >= K) idx -= K;
    return PW'(idx);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      cur_y     <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ptr   <= wslot;
        cur_y <= in_y;
        out_x <= in_x;
        out_y <= in_y;
      end
    end
  end

  // Line memories: write the new pixel, read the same column of the older rows.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wslot][addr] <= in_data;
      for (int unsigned k = 0; k < K - 1; k++)
        out_col[k] <= mem[rd_slot(wslot, k)][addr];
      out_col[K-1] <= in_data;
    end
  end
endmodule
