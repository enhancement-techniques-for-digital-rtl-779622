// ifc_requant: fractional re-quantizer of the IFC DCO interface.
//
// Turns the 8-bit fractional code d_F (value d_F/256) into a 1-bit
// fast-rate sequence c_F whose mean is d_F/256 and whose quantization error
// is first-order high-pass shaped, so a single fractional FCE toggled at
// f_fast realises sub-step frequency resolution. Built as a first-order
// error-feedback modulator: an 8-bit accumulator adds d_F every clk_fast
// cycle and c_F is its carry out (registered).
// The function (1-bit output, first-order shaped error) follows the
// design; its multi-stage successive re-quantizer is replaced by this
// simpler circuit with the same function.
module ifc_requant #(
  parameter int unsigned W = 8
) (
  input  logic         clk_fast,
  input  logic         rst_n,
  input  logic [W-1:0] d_f,
  output logic         c_f
);
  logic [W-1:0] acc;
  logic [W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, d_f};

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      c_f <= 1'b0;
    end else begin
      acc <= sum[W-1:0];
      c_f <= sum[W];
    end
  end
endmodule
