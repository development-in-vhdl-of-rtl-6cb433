// Self-checking test of cordic_rotator: 4000 random phases plus the
// quadrant boundaries, one per cycle, must give 8192*cos and 8192*sin of
// the phase within 3 LSB, with the tag, 18 cycles after the input.
module tb_cordic_rotator;
  import ultx_pkg::*;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic iv = 0, ov;
  logic [23:0] ph = 0;
  logic [15:0] tin = 0, tout;
  cplx_t od;
  cordic_rotator dut (.clk, .rst_n, .in_valid(iv), .in_phase(ph), .in_tag(tin), .out_valid(ov), .out_data(od), .out_tag(tout));

  logic [23:0] phs[$];
  int cyc = 0, in_cyc[$];
  always @(posedge clk) cyc++;
  always @(posedge clk) if (ov) begin
    automatic logic [23:0] p = phs.pop_front();
    automatic int ic = in_cyc.pop_front();
    automatic real a = 2.0 * PI * real'(p) / 16777216.0;
    automatic real er = 8192.0 * $cos(a), ei = 8192.0 * $sin(a);
    checks++;
    if ((real'(od.re) - er) ** 2 > 9.0 || (real'(od.im) - ei) ** 2 > 9.0 || tout != 16'(p) || cyc - ic != 18) begin
      failures++;
      if (failures < 10) $display("ph %h got %0d,%0d exp %f,%f lat %0d", p, od.re, od.im, er, ei, cyc - ic);
    end
  end
  initial begin
    logic [23:0] edges[8];
    edges = '{24'h000000, 24'h3fffff, 24'h400000, 24'h400001, 24'h7fffff, 24'h800000, 24'hbfffff, 24'hc00000};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4008; i++) begin
      @(negedge clk);
      iv = 1; ph = (i < 8) ? edges[i] : 24'($urandom); tin = 16'(ph);
      phs.push_back(ph); in_cyc.push_back(cyc + 1);
    end
    @(negedge clk); iv = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (phs.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
