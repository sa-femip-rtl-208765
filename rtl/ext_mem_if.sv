// ext_mem_if: shares the single external memory port among the blocks.
//
// Three clients use the external memory: the filter writes every filtered
// pixel (wr_*; a write is never delayed, because the pixel pipeline cannot
// stall), the reconfiguration manager reads bitstreams (a_*), and the
// feature matcher reads filtered pixels (b_*). Writes have priority, then
// client a, then client b. A read is accepted when its gnt is high; its data
// comes back in order, rvalid marking it, routed to the client that issued
// it through a FIFO of client tags. The memory side is a plain port:
// mem_en/mem_we/mem_addr/mem_wdata, and mem_rvalid/mem_rdata in request
// order with any latency up to TAG_DEPTH cycles. The description only says
// the three blocks reach the memory through this interface at different
// times; the arbitration and handshake are this implementation's choices.
// conflict_count counts cycles in which a read waited for another client.
module ext_mem_if
  import femip_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write client (filter)
  input  logic                 wr_valid,
  input  logic [ADDR_W-1:0]    wr_addr,
  input  logic [WORD_W-1:0]    wr_data,
  // read client a (reconfiguration manager)
  input  logic                 a_req,
  input  logic [ADDR_W-1:0]    a_addr,
  output logic                 a_gnt,
  output logic                 a_rvalid,
  output logic [WORD_W-1:0]    a_rdata,
  // read client b (feature matcher)
  input  logic                 b_req,
  input  logic [ADDR_W-1:0]    b_addr,
  output logic                 b_gnt,
  output logic                 b_rvalid,
  output logic [WORD_W-1:0]    b_rdata,
  // memory port
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,
  output logic [WORD_W-1:0]    mem_wdata,
  input  logic                 mem_rvalid,
  input  logic [WORD_W-1:0]    mem_rdata,
  output logic [31:0]          conflict_count
);
  localparam int unsigned TW = $clog2(TAG_DEPTH);

  logic          tags [TAG_DEPTH];   // 0: client a, 1: client b
  logic [TW:0]   count;
  logic [TW-1:0] wp, rp;
  logic          push, pop, full;

  assign full  = (int'(count) == TAG_DEPTH);
  assign a_gnt = a_req && !wr_valid && !full;
  assign b_gnt = b_req && !wr_valid && !a_req && !full;
  assign push  = a_gnt || b_gnt;
  assign pop   = mem_rvalid;

  always_comb begin
    mem_en    = wr_valid || push;
    mem_we    = wr_valid;
    mem_addr  = wr_valid ? wr_addr : (a_gnt ? a_addr : b_addr);
    mem_wdata = wr_data;
  end

  assign a_rvalid = mem_rvalid && (tags[rp] == 1'b0);
  assign b_rvalid = mem_rvalid && (tags[rp] == 1'b1);
  assign a_rdata  = mem_rdata;
  assign b_rdata  = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count          <= '0;
      wp             <= '0;
      rp             <= '0;
      conflict_count <= '0;
      for (int i = 0; i < TAG_DEPTH; i++) tags[i] <= 1'b0;
    end else begin
      if (push) begin
        tags[wp] <= b_gnt;
        wp       <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      count <= count + (TW+1)'(push) - (TW+1)'(pop);
      if ((a_req && !a_gnt) || (b_req && !b_gnt)) conflict_count <= conflict_count + 1;
    end
  end

  // A read response must belong to an outstanding request.
  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> count != 0)
    else $error("ext_mem_if: read data without an outstanding request");
endmodule
