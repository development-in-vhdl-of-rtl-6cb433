// Fixed delay line of DEPTH register stages for a W-bit bundle.
//
// Used between transform precoding and the resource grid to delay the
// PUSCH samples, their indices and their valid flag by 15 cycles, as the
// document does to match the processing delay of the DMRS generator.
// The valid bit is reset; the data bits are not.
module pipe_delay #(
  parameter int W     = 48,
  parameter int DEPTH = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  logic [W-1:0] d [DEPTH];
  logic [DEPTH-1:0] v;

  always_ff @(posedge clk) begin
    d[0] <= in_data;
    for (int i = 1; i < DEPTH; i++) d[i] <= d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[DEPTH-2:0], in_valid};
  end

  assign out_valid = v[DEPTH-1];
  assign out_data  = d[DEPTH-1];
endmodule
