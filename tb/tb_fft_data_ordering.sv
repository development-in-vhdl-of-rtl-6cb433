// Self-checking test of fft_data_ordering: frames whose sample at stream
// position p carries the value p are reordered. Output k must carry the
// position where a decimation-in-frequency chain with radices r1 (2 or
// 3), 2, 2, 2, 3, 5, 5 leaves bin k, found here by peeling the digits of k
// with division and remainder. Two 1800 frames back to back, then two 1200
// frames; outputs must be contiguous.
module tb_fft_data_ordering;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic sel1800 = 1, iv = 0, ov;
  logic signed [15:0] ir = 0, ii = 0, orr, oi;
  fft_data_ordering dut (.clk, .rst_n, .sel1800, .in_valid(iv), .in_re(ir), .in_im(ii),
                         .out_valid(ov), .out_re(orr), .out_im(oi));

  function automatic int pos_of(input int k, input int r1);
    int rad[7] = '{r1, 2, 2, 2, 3, 5, 5};
    int N = r1 * 600, w = N, p = 0, rest = k;
    for (int s = 0; s < 7; s++) begin
      w = w / rad[s];
      p += (rest % rad[s]) * w;
      rest = rest / rad[s];
    end
    return p;
  endfunction

  task automatic run(input int r1);
    int N = r1 * 600;
    fork
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < N; i++) begin
          @(negedge clk); iv = 1; ir = 16'(i); ii = 16'(f);
          if (f == 1 && i == N - 1) begin @(negedge clk); iv = 0; end
        end
      for (int f = 0; f < 2; f++) begin
        int k = 0;
        while (!ov) @(posedge clk);
        while (k < N) begin
          checks++;
          if (!ov || int'(orr) != pos_of(k, r1) || int'(oi) != f) begin
            failures++;
            if (failures < 10) $display("r1 %0d f %0d k %0d: got %0d want %0d v%0b", r1, f, k, orr, pos_of(k, r1), ov);
          end
          k++;
          @(posedge clk);
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    sel1800 = 1; run(3);
    repeat (5) @(negedge clk);
    sel1800 = 0; run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
