// Amplitude scaling of the modulated PUSCH samples ahead of the
// transform-precoding FFT.
//
// Each component is multiplied by 1/sqrt(Msc), Msc = 12*NRB, taken from a
// six-entry lookup table addressed by the resource-block count so that no
// square root or division is needed, and is then shifted right by SHIFT
// bits to leave headroom for the growth of the FFT. The product is rounded
// and saturated to 16 bits. The lookup table and the extra right shift are
// as the document describes; the Q1.15 table format and SHIFT = 2 are this
// design's choices (the document gives no shift amount).
//
// Interface: one sample per cycle at most; output registered, latency 1.
module amplitude_scaling
  import ultx_pkg::*;
#(
  parameter int SHIFT = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] nrb,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data
);
  logic signed [16:0] gain;
  assign gain = {1'b0, nrb_to_ampl(nrb)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid   <= in_valid;
      out_data.re <= sat16(rshift_round(48'(in_data.re) * 48'(gain), 15 + SHIFT));
      out_data.im <= sat16(rshift_round(48'(in_data.im) * 48'(gain), 15 + SHIFT));
    end
  end
endmodule
