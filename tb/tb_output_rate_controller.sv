// Self-checking test of output_rate_controller: for each RB count a
// numbered stream with random pauses is decimated; exactly every D-th
// valid sample (D = 16, 8, 4, 2, 2, 1), starting with the first, must be
// kept.
module tb_output_rate_controller;
  import ultx_pkg::*;
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
  logic iv = 0, ov;
  cplx_t id = '0, od;
  output_rate_controller dut (.clk, .rst_n, .nrb, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));
  int got[$];
  always @(posedge clk) if (ov) got.push_back(int'(od.re));
  int rbs[6] = '{6, 15, 25, 50, 75, 100};
  int dec[6] = '{16, 8, 4, 2, 2, 1};
  initial begin
    repeat (3) @(posedge clk);
    foreach (rbs[r]) begin
      rst_n = 0; nrb = 7'(rbs[r]);
      @(negedge clk); rst_n = 1;
      got.delete();
      for (int n = 0; n < 2208; n++) begin
        @(negedge clk); iv = 1; id.re = 16'(n);
        if ($urandom_range(0, 4) == 0) begin @(negedge clk); iv = 0; end
      end
      @(negedge clk); iv = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (got.size() != 2208 / dec[r]) begin failures++; $display("nrb %0d: %0d samples", rbs[r], got.size()); end
      foreach (got[i]) begin
        checks++;
        if (got[i] != i * dec[r]) begin failures++; if (failures < 10) $display("nrb %0d i %0d got %0d", rbs[r], i, got[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
