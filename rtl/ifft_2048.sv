// N-point radix-2 inverse FFT (N = 2048 by default), streaming.
//
// log2(N) decimation-in-frequency radix-2 stages (fft_stage, conjugate
// twiddles), each adding one bit of word growth so that the unnormalised
// sum x(n) = sum_i X(i) exp(+2*pi*j*i*n/N) never overflows, followed by a
// bit-reversal buffer that returns the samples in natural time order. The
// IFFT size is fixed at the largest LTE size so one piece of hardware
// serves every bandwidth, as in the document; the radix-2 pipeline is this
// design's choice.
//
// Interface: frames of N bins, up to one per cycle, inputs W_IN bits per
// component; the N outputs of a frame (W_IN + log2(N) bits) leave on N
// consecutive cycles roughly 2N cycles after the frame's last input.
module ifft_2048 #(
  parameter int N    = 2048,
  parameter int W_IN = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic signed [W_IN-1:0]             in_re,
  input  logic signed [W_IN-1:0]             in_im,
  output logic                               out_valid,
  output logic signed [W_IN+$clog2(N)-1:0]   out_re,
  output logic signed [W_IN+$clog2(N)-1:0]   out_im
);
  localparam int LG = $clog2(N);
  localparam int WO = W_IN + LG;

  logic          sv [LG+1];
  logic [WO-1:0] sr [LG+1];
  logic [WO-1:0] si [LG+1];

  assign sv[0] = in_valid;
  assign sr[0] = WO'(in_re);
  assign si[0] = WO'(in_im);

  for (genvar s = 0; s < LG; s++) begin : g_stage
    logic signed [W_IN+s:0] o_re, o_im;
    fft_stage #(.RADIX(2), .L(N >> s), .W_IN(W_IN + s), .W_OUT(W_IN + s + 1),
                .INVERSE(1'b1)) u_stage (
      .clk, .rst_n, .in_valid(sv[s]),
      .in_re(sr[s][W_IN+s-1:0]), .in_im(si[s][W_IN+s-1:0]),
      .out_valid(sv[s+1]), .out_re(o_re), .out_im(o_im));
    assign sr[s+1] = WO'(o_re);
    assign si[s+1] = WO'(o_im);
  end

  // Bit-reversal reorder: position p holds time sample bitrev(p).
  logic signed [WO-1:0] mem_re [2][N];
  logic signed [WO-1:0] mem_im [2][N];
  logic          wr_bank, blk_done, rd_active, rd_bank;
  logic [LG-1:0] wr_p, wr_a, rd_a;

  always_comb
    for (int b = 0; b < LG; b++) wr_a[b] = wr_p[LG-1-b];

  always_ff @(posedge clk) begin
    if (sv[LG]) begin
      mem_re[wr_bank][wr_a] <= sr[LG];
      mem_im[wr_bank][wr_a] <= si[LG];
    end
    out_re <= mem_re[rd_bank][rd_a];
    out_im <= mem_im[rd_bank][rd_a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      wr_p      <= '0;
      blk_done  <= 1'b0;
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_a      <= '0;
      out_valid <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      if (sv[LG]) begin
        wr_p <= wr_p + 1'b1;
        if (wr_p == LG'(N - 1)) begin
          wr_bank  <= ~wr_bank;
          blk_done <= 1'b1;
        end
      end
      if (blk_done) begin
        rd_active <= 1'b1;
        rd_bank   <= ~wr_bank;
        rd_a      <= '0;
      end else if (rd_active) begin
        rd_a <= rd_a + 1'b1;
        if (rd_a == LG'(N - 1)) rd_active <= 1'b0;
      end
      out_valid <= rd_active;
    end
  end
endmodule
