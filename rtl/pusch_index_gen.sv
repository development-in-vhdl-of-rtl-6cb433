// PUSCH resource-element index generator.
//
// For every valid transform-precoded sample it produces the subcarrier k
// (0 .. 12*NRB-1) and the SC-FDMA symbol l of the subframe where the sample
// belongs. PUSCH fills every symbol of both slots except the DMRS symbols 3
// and 10, so the 12 data symbols map to l = 0,1,2,4,5,6,7,8,9,11,12,13.
// The allocation covers the whole bandwidth starting at subcarrier 0 (this
// design's choice; the document takes the allocation from the RB count).
// The indices come out one cycle after the sample that causes them, as the
// document states, so a one-cycle delay of the data keeps both aligned.
// sym_last marks the last sample of a symbol, sf_last the last of a subframe.
module pusch_index_gen
  import ultx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  nrb,
  input  logic        in_valid,
  output logic        out_valid,
  output logic [10:0] out_k,
  output logic [3:0]  out_l,
  output logic        sym_last,
  output logic        sf_last
);
  logic [10:0] k;
  logic [3:0]  s;
  logic        last_k;

  assign last_k = (12'(k) == nrb_to_msc(nrb) - 12'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      s         <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
      out_l     <= '0;
      sym_last  <= 1'b0;
      sf_last   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_k     <= k;
      out_l     <= pusch_sym_to_l(s);
      sym_last  <= in_valid && last_k;
      sf_last   <= in_valid && last_k && (s == 4'(NPUSCH_SYM - 1));
      if (in_valid) begin
        if (last_k) begin
          k <= '0;
          s <= (s == 4'(NPUSCH_SYM - 1)) ? '0 : s + 4'd1;
        end else begin
          k <= k + 11'd1;
        end
      end
    end
  end
endmodule
