// Rate controller at the output of the transform-precoding FFT.
//
// The PUSCH input of 12*NRB modulated symbols is zero-stuffed up to N =
// 1200 or 1800 samples before the FFT, so the N-point transform repeats the
// wanted 12*NRB-point DFT N/(12*NRB) times. This block counts the N bins of
// each symbol and passes only the first Msc = 12*NRB of them (all of them
// for 100 RBs), dropping the valid flag on the rest. The document gives the
// function (12*NRB valid samples out of 1200/1800); keeping the first bins
// is this design's reading of it.
//
// Interface: registered, latency 1; out_valid follows in_valid for kept bins.
module tp_rate_controller
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
  logic [10:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && (12'(k) < nrb_to_msc(nrb));
      out_data  <= in_data;
      if (in_valid) k <= (k == nrb_to_nfft_tp(nrb) - 11'd1) ? '0 : k + 11'd1;
    end
  end
endmodule
