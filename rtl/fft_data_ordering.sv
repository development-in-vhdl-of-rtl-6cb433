// Output reordering of the 1200/1800-point mixed-radix FFT.
//
// The stage chain of fft_1200_1800 leaves frequency bin k at stream
// position p(k), a mixed-radix digit reversal of k. With the stage radices
// r1 (2 or 3), 2, 2, 2, 3, 5, 5 and the stage output weights 600, 300, 150,
// 75, 25, 5, 1, the digits of k are taken least significant first:
//   d1 = k mod r1, d2 = (k / r1) mod 2, ... and p(k) = sum(d_s * weight_s).
// This block writes a whole frame of N = 1200 or 1800 samples into one
// bank of a two-bank RAM in arrival order, and while the next frame is
// written reads the finished one at p(0), p(1), ... p(N-1), so the bins
// leave in natural order. It has the role of the document's data
// reordering RAMs (one matrix transpose per stage); doing all the
// transposes at once on the output is this design's choice, and the banks
// need no clearing between subframes because every location is rewritten.
//
// Interface: sel1800 selects N (hold it constant while a frame is in
// flight). Input samples may pause. The N outputs of a frame leave on N
// consecutive cycles starting 3 cycles after its last input sample.
module fft_data_ordering #(
  parameter int W    = 16,
  parameter int NMAX = 1800
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
  localparam int AW = $clog2(NMAX);

  logic signed [W-1:0] mem_re [2][NMAX];
  logic signed [W-1:0] mem_im [2][NMAX];

  logic          wr_bank, blk_done;
  logic [AW-1:0] wr_addr, n_last;

  assign n_last = sel1800 ? AW'(1799) : AW'(1199);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[wr_bank][wr_addr] <= in_re;
      mem_im[wr_bank][wr_addr] <= in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank  <= 1'b0;
      wr_addr  <= '0;
      blk_done <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      if (in_valid) begin
        if (wr_addr == n_last) begin
          wr_addr  <= '0;
          wr_bank  <= ~wr_bank;
          blk_done <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
    end
  end

  // Mixed-radix counter of k, least significant digit first.
  logic [1:0] d1;          // radix 2 or 3, weight 600
  logic       d2, d3, d4;  // radix 2, weights 300, 150, 75
  logic [1:0] d5;          // radix 3, weight 25
  logic [2:0] d6, d7;      // radix 5, weights 5, 1
  logic       rd_active, rd_bank;
  logic [AW-1:0] rd_addr;

  always_comb begin
    rd_addr = AW'(d1) * AW'(600) + AW'(d2) * AW'(300) + AW'(d3) * AW'(150)
            + AW'(d4) * AW'(75) + AW'(d5) * AW'(25) + AW'(d6) * AW'(5) + AW'(d7);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      {d1, d2, d3, d4, d5, d6, d7} <= '0;
    end else if (blk_done) begin
      rd_active <= 1'b1;
      rd_bank   <= ~wr_bank;
      {d1, d2, d3, d4, d5, d6, d7} <= '0;
    end else if (rd_active) begin
      if (d1 != (sel1800 ? 2'd2 : 2'd1)) d1 <= d1 + 1'b1;
      else begin
        d1 <= '0;
        if (!d2) d2 <= 1'b1;
        else begin
          d2 <= 1'b0;
          if (!d3) d3 <= 1'b1;
          else begin
            d3 <= 1'b0;
            if (!d4) d4 <= 1'b1;
            else begin
              d4 <= 1'b0;
              if (d5 != 2'd2) d5 <= d5 + 1'b1;
              else begin
                d5 <= '0;
                if (d6 != 3'd4) d6 <= d6 + 1'b1;
                else begin
                  d6 <= '0;
                  if (d7 != 3'd4) d7 <= d7 + 1'b1;
                  else begin
                    d7        <= '0;
                    rd_active <= 1'b0;
                  end
                end
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    out_re <= mem_re[rd_bank][rd_addr];
    out_im <= mem_im[rd_bank][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rd_active;
  end

endmodule
