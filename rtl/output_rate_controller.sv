// Output rate controller of the SC-FDMA modulator.
//
// The modulator always works at 2048 samples per symbol (30.72 MHz). For
// smaller bandwidths the occupied band is narrow enough that keeping every
// D-th sample, D = 2048 / (IFFT size of the bandwidth) = 16, 8, 4, 2, 2, 1
// for 6, 15, 25, 50, 75, 100 RBs, gives the standard sampling rate (1.92,
// 3.84, 7.68, 15.36, 15.36, 30.72 MHz) without aliasing; the cyclic
// prefixes then become 10/9, 20/18, 40/36, 80/72, 80/72 and 160/144
// samples. The document gives the output rates; plain decimation is this
// design's choice. The phase of the decimation is taken from reset, and
// all symbol and CP lengths are multiples of 16, so the kept samples stay
// aligned with symbol starts. Registered, latency 1.
module output_rate_controller
  import ultx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] nrb,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data
);
  logic [4:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && cnt == '0;
      out_data  <= in_data;
      if (in_valid) cnt <= (cnt == nrb_to_decim(nrb) - 5'd1) ? '0 : cnt + 5'd1;
    end
  end
endmodule
