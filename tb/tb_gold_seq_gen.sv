// Self-checking test of gold_seq_gen: for several seeds (0, 1, 541, and
// random 31-bit values) the generator must produce c(0..1999), with
// c_valid rising after the 1600 warm-up steps, equal to the sequence built
// here from the defining recursions on bit arrays.
module tb_gold_seq_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic load = 0, en = 0, c, cv;
  logic [30:0] cinit = '0;
  logic [11:0] idx;
  gold_seq_gen dut (.clk, .rst_n, .load, .c_init(cinit), .enable(en), .c, .c_valid(cv), .idx);

  bit x1[4000], x2[4000];
  task automatic ref_seq(input logic [30:0] ci);
    for (int i = 0; i < 31; i++) begin x1[i] = (i == 0); x2[i] = ci[i]; end
    for (int n = 0; n < 4000 - 31; n++) begin
      x1[n+31] = x1[n+3] ^ x1[n];
      x2[n+31] = x2[n+3] ^ x2[n+2] ^ x2[n+1] ^ x2[n];
    end
  endtask

  initial begin
    logic [30:0] seeds[5];
    seeds = '{31'd0, 31'd1, 31'd541, 31'($urandom), 31'($urandom)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (seeds[s]) begin
      ref_seq(seeds[s]);
      @(negedge clk); load = 1; cinit = seeds[s];
      @(negedge clk); load = 0; en = 1;
      for (int t = 0; t < 1600; t++) begin
        checks++;
        if (cv) begin failures++; $display("c_valid early"); end
        @(negedge clk);
      end
      for (int n = 0; n < 2000; n++) begin
        checks++;
        if (!cv || idx != 12'(n) || c != (x1[n+1600] ^ x2[n+1600])) begin
          failures++;
          if (failures < 10) $display("seed %0d n %0d: c %0b want %0b", seeds[s], n, c, x1[n+1600] ^ x2[n+1600]);
        end
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
