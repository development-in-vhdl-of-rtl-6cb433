// Cyclic-prefix insertion.
//
// Collects each N-sample symbol (N = 2048) in one bank of a two-bank
// buffer and, once it is complete, sends out its last Ncp samples followed
// by all N samples, on N + Ncp consecutive cycles, while the next symbol is
// collected in the other bank. Ncp is 160 for the first symbol of each
// slot (symbols 0 and 7 of the subframe) and 144 for the others, counted
// from reset. These lengths are the document's (normal cyclic prefix at
// 2048 samples per symbol); the buffer organisation is this design's.
//
// Interface: symbols may arrive as a burst of N samples every N + Ncp
// cycles or slower. Output starts 2 cycles after the last input sample of
// the symbol; out_sym_start marks the first CP sample, out_l the symbol.
module cp_insertion
  import ultx_pkg::*;
#(
  parameter int N = NFFT_MAX
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output cplx_t      out_data,
  output logic       out_sym_start,
  output logic [3:0] out_l
);
  localparam int AW = $clog2(N);

  cplx_t mem [2][N];
  logic          wr_bank, blk_done, rd_active, rd_bank, first_d;
  logic [AW-1:0] wr_a, rd_a;
  logic [11:0]   rd_left;
  logic [3:0]    l_wr, l_rd;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_bank][wr_a] <= in_data;
    out_data <= mem[rd_bank][rd_a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank       <= 1'b0;
      wr_a          <= '0;
      blk_done      <= 1'b0;
      rd_active     <= 1'b0;
      rd_bank       <= 1'b0;
      rd_a          <= '0;
      rd_left       <= '0;
      l_wr          <= '0;
      l_rd          <= '0;
      first_d       <= 1'b0;
      out_valid     <= 1'b0;
      out_sym_start <= 1'b0;
      out_l         <= '0;
    end else begin
      blk_done <= 1'b0;
      if (in_valid) begin
        wr_a <= wr_a + 1'b1;
        if (wr_a == AW'(N - 1)) begin
          wr_bank  <= ~wr_bank;
          blk_done <= 1'b1;
        end
      end
      first_d <= 1'b0;
      if (blk_done) begin
        rd_active <= 1'b1;
        rd_bank   <= ~wr_bank;
        rd_a      <= AW'(N - 32'(cp_len(l_wr)));
        rd_left   <= 12'(N) + 12'(cp_len(l_wr)) - 12'd1;
        l_rd      <= l_wr;
        first_d   <= 1'b1;
        l_wr      <= (l_wr == 4'(NSYM - 1)) ? '0 : l_wr + 4'd1;
      end else if (rd_active) begin
        rd_a    <= rd_a + 1'b1;           // wraps from N-1 to 0
        rd_left <= rd_left - 12'd1;
        if (rd_left == '0) rd_active <= 1'b0;
      end
      out_valid     <= rd_active;
      out_sym_start <= first_d;
      out_l         <= l_rd;
    end
  end
endmodule
