// FFT shift performed in the time domain.
//
// Multiplies sample n of the stream by (-1)^n: odd samples are negated
// (saturating, so -32768 becomes 32767) and even samples pass. This moves
// IFFT bin N/2 to zero frequency, so the occupied band built around bin
// 1024 is centred on DC. With an even symbol length the sign pattern
// restarts with every symbol. Registered, latency 1; the counter advances
// on every valid input from reset.
module fftshift_time
  import ultx_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  logic odd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd       <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) odd <= ~odd;
      out_data.re <= odd ? sat16(-48'(in_data.re)) : in_data.re;
      out_data.im <= odd ? sat16(-48'(in_data.im)) : in_data.im;
    end
  end
endmodule
