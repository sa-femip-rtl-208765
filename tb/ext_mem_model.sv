// ext_mem_model: behavioural model of the external memory (testbench only).
//
// A word-addressed array of DEPTH 32-bit words. A write (en && we) stores
// wdata at addr; a read (en && !we) returns mem[addr] on rdata with rvalid
// exactly LAT cycles later, in request order. Testbenches preload and
// inspect the array through hierarchical references to mem.
module ext_mem_model #(
  parameter int unsigned DEPTH  = 16384,
  parameter int unsigned ADDR_W = 24,
  parameter int unsigned LAT    = 3
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [31:0]        wdata,
  output logic               rvalid,
  output logic [31:0]        rdata
);
  logic [31:0] mem [DEPTH];
  logic        v_pipe [LAT];
  logic [31:0] d_pipe [LAT];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (en && we && int'(addr) < DEPTH) mem[addr] <= wdata;
    v_pipe[0] <= en && !we;
    d_pipe[0] <= (int'(addr) < DEPTH) ? mem[addr] : 32'hDEAD_BEEF;
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
