// Self-checking test of pusch_index_gen: two subframes of 12 symbols of
// 12*NRB valid pulses (with pauses) for 6 and 25 RBs. The indices must
// run k = 0..12*NRB-1 within each symbol and l over 0,1,2,4,...,9,11,12,13,
// one cycle after each pulse, with sym_last and sf_last on the right
// samples.
module tb_pusch_index_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] nrb = 6;
  logic iv = 0, ov, sl, sfl;
  logic [10:0] k;
  logic [3:0] l;
  pusch_index_gen dut (.clk, .rst_n, .nrb, .in_valid(iv), .out_valid(ov), .out_k(k), .out_l(l),
                       .sym_last(sl), .sf_last(sfl));
  int lmap[12] = '{0, 1, 2, 4, 5, 6, 7, 8, 9, 11, 12, 13};
  int rbs[2] = '{6, 25};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rbs[r]) begin
      automatic int M = 12 * rbs[r];
      nrb = 7'(rbs[r]);
      for (int sf = 0; sf < 2; sf++)
        for (int s = 0; s < 12; s++)
          for (int i = 0; i < M; i++) begin
            @(negedge clk); iv = 1;
            @(negedge clk); iv = 0;
            checks++;
            if (!ov || k != 11'(i) || l != 4'(lmap[s]) || sl != (i == M-1) || sfl != (i == M-1 && s == 11)) begin
              failures++;
              if (failures < 10) $display("nrb %0d s %0d i %0d: v%0b k %0d l %0d", rbs[r], s, i, ov, k, l);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
