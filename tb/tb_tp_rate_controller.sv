// Self-checking test of tp_rate_controller: for every RB count, three
// symbols of 1200 or 1800 numbered samples (with random pauses) are fed;
// exactly the first 12*NRB of each symbol must come out, in order, with
// their data unchanged.
module tb_tp_rate_controller;
  import ultx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] nrb = 6;
  logic iv = 0, ov;
  cplx_t id = '0, od;
  tp_rate_controller dut (.clk, .rst_n, .nrb, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));

  int rbs[6] = '{6, 15, 25, 50, 75, 100};
  int got[$];
  always @(posedge clk) if (ov) got.push_back(int'(od.re) + 32768 * 0 + (int'(od.im) <<< 16));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rbs[r]) begin
      automatic int N = (rbs[r] == 6 || rbs[r] == 15 || rbs[r] == 75) ? 1800 : 1200;
      automatic int M = 12 * rbs[r];
      nrb = 7'(rbs[r]);
      got.delete();
      for (int s = 0; s < 3; s++)
        for (int i = 0; i < N; i++) begin
          @(negedge clk); iv = 1; id.re = 16'(i); id.im = 16'(s);
          if ($urandom_range(0, 9) == 0) begin @(negedge clk); iv = 0; end
        end
      @(negedge clk); iv = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (got.size() != 3 * M) begin failures++; $display("nrb %0d: %0d outputs, want %0d", rbs[r], got.size(), 3*M); end
      else
        for (int s = 0; s < 3; s++)
          for (int k = 0; k < M; k++) begin
            checks++;
            if (got[s*M+k] != (k | (s << 16))) begin failures++; if (failures < 10) $display("nrb %0d s %0d k %0d bad", rbs[r], s, k); end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
