// Optional symbol-edge windowing of the SC-FDMA waveform.
//
// Each CP-extended symbol (Ncp + N samples, N = 2048) has an abrupt start,
// where the previous symbol ends. When enable is high, the first W samples
// of every symbol are cross-faded with the cyclic continuation of the
// previous symbol past its end, i.e. with that symbol's first W samples
// after its cyclic prefix:
//   y(i) = w(i) * x_cur(i) + w(W-1-i) * x_prev(Ncp_prev + i),  i < W,
//   w(i) = (1 - cos(pi*(i+1/2)/W)) / 2   (raised cosine, Q1.14),
// and passed through unchanged after that. The raised-cosine ramp of one
// symbol thus overlaps the tail of the previous one, and the symbol timing
// and length stay as they are. Before the first symbol after reset the
// previous symbol is taken as zero. When enable is low the block is a
// one-cycle register.
//
// The document gives the function (smooth the edges of the CP-extended
// symbols, overlap the windowed symbols, keep the time between symbols)
// and leaves the feature optional; the raised-cosine shape, the window
// length W (at the 30.72 MHz rate) and placing the overlap inside the CP
// are this design's choices. W must not exceed the shortest CP (144).
//
// Interface: in_valid/in_data/in_sym_start/in_l from the CP insertion,
// where in_sym_start marks the first (CP) sample of symbol in_l.
// Outputs are the same signals one cycle later.
module windowing
  import ultx_pkg::*;
#(
  parameter int W = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       in_valid,
  input  cplx_t      in_data,
  input  logic       in_sym_start,
  input  logic [3:0] in_l,
  output logic       out_valid,
  output cplx_t      out_data,
  output logic       out_sym_start,
  output logic [3:0] out_l
);
  localparam real PI = 3.141592653589793;
  localparam int  WA = (W > 1) ? $clog2(W) : 1;

  if (W < 1 || W > 144) begin : g_bad_w
    $error("windowing: W must be 1..144");
  end

  typedef logic signed [15:0] wtab_t [W];
  function automatic wtab_t mk_win();
    wtab_t t;
    for (int i = 0; i < W; i++)
      t[i] = 16'($rtoi($floor((1.0 - $cos(PI * (i + 0.5) / W)) / 2.0 * 16384.0 + 0.5)));
    return t;
  endfunction
  localparam wtab_t WIN = mk_win();

  // Position inside the current symbol, counted from its first CP sample.
  logic [11:0] cnt, pos;
  logic [11:0] ncp;
  assign pos = in_sym_start ? '0 : cnt;
  assign ncp = 12'(cp_len(in_l));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= pos + 12'd1;
  end

  // Cyclic continuation of the previous symbol: its first W samples after
  // the cyclic prefix, captured while it passes.
  cplx_t tail [W];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) tail[i] <= '0;
    end else if (in_valid && pos >= ncp && pos < ncp + 12'(W)) begin
      tail[WA'(pos - ncp)] <= in_data;
    end
  end

  // Cross-fade of the first W samples.
  logic        in_win;
  cplx_t       prev;
  logic signed [15:0] w_up, w_dn;
  logic signed [47:0] y_re, y_im;
  always_comb begin
    in_win = enable && pos < 12'(W);
    prev   = tail[WA'(pos)];
    w_up   = WIN[WA'(pos)];
    w_dn   = WIN[WA'(32'(W) - 1 - 32'(pos))];
    y_re   = rshift_round(48'(in_data.re) * 48'(w_up) + 48'(prev.re) * 48'(w_dn), 14);
    y_im   = rshift_round(48'(in_data.im) * 48'(w_up) + 48'(prev.im) * 48'(w_dn), 14);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_sym_start <= 1'b0;
      out_l         <= '0;
    end else begin
      out_valid     <= in_valid;
      out_sym_start <= in_valid && in_sym_start;
      out_l         <= in_l;
      if (in_win) begin
        out_data.re <= sat16(y_re);
        out_data.im <= sat16(y_im);
      end else begin
        out_data <= in_data;
      end
    end
  end
endmodule
