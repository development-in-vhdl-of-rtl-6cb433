// 1200- or 1800-point FFT for transform precoding.
//
// Cooley-Tukey decimation in frequency over seven stages. The first stage
// is either a 2-point stage on 1200-sample blocks (1200 = 2 x 600) or a
// 3-point stage on 1800-sample blocks (1800 = 3 x 600); sel1800 routes the
// input to one of them and picks its output. Both are followed by the same
// 600-point chain of stages with radices 2, 2, 2, 3, 5, 5 (block lengths
// 600, 300, 150, 75, 25, 5), and the output reorder puts the bins in
// natural order. 1200 = 2^4 x 3 x 5^2 and 1800 = 2^3 x 3^2 x 5^2, as in the
// document; the order of the radices inside the 600-point chain is this
// design's choice.
//
// Interface: 16-bit complex samples, up to one per cycle, in frames of N =
// 1200 or 1800 (sel1800). No scaling is applied, so the caller scales the
// input down to keep the unnormalised result in range; results saturate.
// Latency from the last sample of a frame to its first output is about
// 600+300+150+75+25+5 cycles of stage buffering plus the pipeline, and the
// frame leaves as N samples on consecutive cycles.
module fft_1200_1800 #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel1800,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int NS = 6;
  localparam int CHAIN_R [NS] = '{2, 2, 2, 3, 5, 5};
  localparam int CHAIN_L [NS] = '{600, 300, 150, 75, 25, 5};

  // First stage: 2-point (1200) or 3-point (1800).
  logic                v2o, v3o;
  logic signed [W-1:0] r2o, i2o, r3o, i3o;

  fft_stage #(.RADIX(2), .L(1200), .W_IN(W), .W_OUT(W)) u_first2 (
    .clk, .rst_n, .in_valid(in_valid && !sel1800), .in_re, .in_im,
    .out_valid(v2o), .out_re(r2o), .out_im(i2o));

  fft_stage #(.RADIX(3), .L(1800), .W_IN(W), .W_OUT(W)) u_first3 (
    .clk, .rst_n, .in_valid(in_valid && sel1800), .in_re, .in_im,
    .out_valid(v3o), .out_re(r3o), .out_im(i3o));

  logic                cv [NS+1];
  logic signed [W-1:0] cr [NS+1];
  logic signed [W-1:0] ci [NS+1];

  assign cv[0] = sel1800 ? v3o : v2o;
  assign cr[0] = sel1800 ? r3o : r2o;
  assign ci[0] = sel1800 ? i3o : i2o;

  for (genvar s = 0; s < NS; s++) begin : g_chain
    fft_stage #(.RADIX(CHAIN_R[s]), .L(CHAIN_L[s]), .W_IN(W), .W_OUT(W)) u_stage (
      .clk, .rst_n, .in_valid(cv[s]), .in_re(cr[s]), .in_im(ci[s]),
      .out_valid(cv[s+1]), .out_re(cr[s+1]), .out_im(ci[s+1]));
  end

  fft_data_ordering #(.W(W)) u_order (
    .clk, .rst_n, .sel1800, .in_valid(cv[NS]), .in_re(cr[NS]), .in_im(ci[NS]),
    .out_valid, .out_re, .out_im);

endmodule
