// Half-subcarrier frequency shift in the time domain.
//
// Sample n of each N-sample symbol (n counted from 0, N = 2048) is
// multiplied by exp(j*pi*n/N), a stored Q1.14 complex constant, which
// moves every subcarrier up by half the subcarrier spacing so that DC
// falls between two subcarriers, as the LTE uplink requires. The product
// is rounded and saturated to 16 bits. The document gives the function and
// the stored-constant approach; the table format is this design's choice.
//
// Interface: one sample per cycle at most, the sample counter advances on
// every valid input and wraps every N samples (frames counted from
// reset). Registered, latency 1.
module half_subcarrier_shift
  import ultx_pkg::*;
#(
  parameter int N = NFFT_MAX
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int AW = $clog2(N);
  localparam real PI = 3.141592653589793;
  typedef logic signed [15:0] tab_t [N];

  function automatic tab_t mk(input bit is_sin);
    tab_t t;
    for (int i = 0; i < N; i++)
      t[i] = 16'($rtoi($floor((is_sin ? $sin(PI * i / N) : $cos(PI * i / N)) * 16384.0 + 0.5)));
    return t;
  endfunction
  localparam tab_t HC = mk(1'b0);
  localparam tab_t HS = mk(1'b1);

  logic [AW-1:0] n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) n <= n + 1'b1;
      out_data.re <= sat16(rshift_round(48'(in_data.re) * 48'(HC[n]) - 48'(in_data.im) * 48'(HS[n]), 14));
      out_data.im <= sat16(rshift_round(48'(in_data.re) * 48'(HS[n]) + 48'(in_data.im) * 48'(HC[n]), 14));
    end
  end
endmodule
