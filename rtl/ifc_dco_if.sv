// ifc_dco_if: DCO digital interface with incremental frequency control.
//
// The 16-bit DCO control word d[n] is split into d_I (8 MSBs) for the
// unit-weighted integer FCE bank and d_F (8 LSBs) for a single fractional
// FCE. The integer bank is steered through the ISL (one +/-1 step per fast
// cycle) and the Gray-coded FSM, which need only the differential pair
// c1/c2; the fraction is re-quantized to the 1-bit sequence c_F. All
// outputs, inverted copies of c1/c2 included, leave through clk_fast
// registers so they switch together just after the fast clock edge.
// Latency from a d change: 1 cycle into the ISL, 1 cycle to m, 1 to the
// FSM state, 1 output register. t reports the FCE count the bank should
// hold. Structure follows the design; the integer-boundary avoider it
// mentions as an option is not included.
module ifc_dco_if #(
  parameter int unsigned W = 16
) (
  input  logic         clk_fast,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic         c1,
  output logic         c1_b,
  output logic         c2,
  output logic         c2_b,
  output logic         c_f,
  output logic [7:0]   t
);
  logic signed [1:0] m;
  logic              c1_i, c2_i, cf_i;
  logic signed [8:0] pending;
  logic              unused_pending;

  isl #(.W(8)) u_isl (
    .clk_fast(clk_fast), .rst_n(rst_n), .d_i(d[W-1 -: 8]), .m(m), .t(t), .pending(pending)
  );
  assign unused_pending = ^pending;

  ifc_fsm u_fsm (.clk_fast(clk_fast), .rst_n(rst_n), .m(m), .c1(c1_i), .c2(c2_i));

  ifc_requant #(.W(8)) u_rq (.clk_fast(clk_fast), .rst_n(rst_n), .d_f(d[7:0]), .c_f(cf_i));

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= 1'b0; c1_b <= 1'b1;
      c2 <= 1'b1; c2_b <= 1'b0;
      c_f <= 1'b0;
    end else begin
      c1 <= c1_i; c1_b <= ~c1_i;
      c2 <= c2_i; c2_b <= ~c2_i;
      c_f <= cf_i;
    end
  end
endmodule
