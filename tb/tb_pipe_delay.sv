// Self-checking test of pipe_delay: a random stream with random valid
// bits must reappear exactly 15 cycles later.
module tb_pipe_delay;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic iv = 0, ov;
  logic [46:0] id = '0, od;
  pipe_delay #(.W(47), .DEPTH(15)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));
  logic hv[$];
  logic [46:0] hd[$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      iv = 1'($urandom_range(0, 1));
      id = {15'($urandom), 32'($urandom)};
      hv.push_back(iv); hd.push_back(id);
      @(posedge clk); #1;
      if (hv.size() >= 15) begin
        logic ev;
        logic [46:0] ed;
        ev = hv.pop_front(); ed = hd.pop_front();
        checks++;
        if (ov != ev || (ev && od != ed)) begin failures++; if (failures < 10) $display("mismatch at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
