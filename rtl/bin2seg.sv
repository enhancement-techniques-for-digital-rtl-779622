// bin2seg: binary-to-segmented encoder for the integer fine-FCE bank.
//
// The 7-bit integer DCO code is split into its 3 MSBs, which select
// 0..7 large elements of weight 16 through a 7-bit thermometer code, and
// its 4 LSBs, which drive binary-weighted elements directly. Thermometer
// coding of the MSBs keeps the large elements unit-weighted, so a change of
// the upper bits switches whole elements on or off monotonically.
// Purely combinational. The 3+4 split is inferred from the widths of the
// DCO digital outputs (7 thermometer and 4 binary lines).
// The 4 binary lines are the input LSBs themselves (no logic on them);
// a synthesis tool reports them as outputs driven straight from inputs.
module bin2seg #(
  parameter int unsigned INT_W = 7
) (
  input  logic [INT_W-1:0] d_int,
  output logic [6:0]       therm,
  output logic [3:0]       bin
);
  logic [2:0] msb;
  assign msb = d_int[INT_W-1 -: 3];
  assign bin = d_int[3:0];

  always_comb begin
    for (int i = 0; i < 7; i++) therm[i] = (32'(msb) > i);
  end

  initial assert (INT_W == 7) else $error("bin2seg: segmentation fixed for 7 bits");
endmodule
