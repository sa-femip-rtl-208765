// config_port: configuration port of the reconfigurable Gaussian multipliers.
//
// Stands in for the FPGA's internal configuration access port. A bitstream
// is a sequence of 32-bit words; in this implementation word n carries, in
// its low COEF_W bits, coefficient n (row-major, n = i*7+j) of the 7x7
// kernel. start clears the word counter; every in_valid word is written into
// the reconfigurable module through cfg_we/cfg_addr/cfg_data in the same
// cycle (one word per cycle, the port never stalls), and done pulses with
// the 49th word. Words beyond the 49th are ignored and counted as errors.
// The design description names the port only; the bitstream format and this
// register-level model of reconfiguration are this implementation's.
module config_port
  import femip_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  input  logic [WORD_W-1:0]   in_data,
  output logic                cfg_we,
  output logic [5:0]          cfg_addr,
  output logic [COEF_W-1:0]   cfg_data,
  output logic                done,
  output logic [7:0]          err_count
);
  localparam int unsigned NT = GK * GK;

  logic [5:0] cnt;

  assign cfg_we   = in_valid && (int'(cnt) < NT);
  assign cfg_addr = cnt;
  assign cfg_data = in_data[COEF_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      done      <= 1'b0;
      err_count <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= '0;
      end else if (in_valid) begin
        if (int'(cnt) < NT) begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == NT - 1) done <= 1'b1;
        end else if (err_count != '1) begin
          err_count <= err_count + 1'b1;
        end
      end
    end
  end
endmodule
