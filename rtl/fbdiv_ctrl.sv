// fbdiv_ctrl: divider modulus to pre-scaler phase counts.
//
// The multi-modulus divider is a 3/4 pre-scaler run for num_div4 counts of
// four followed by num_div3 counts of three, so divcode = 4*num_div4 +
// 3*num_div3. To keep the pre-scaler mostly in its slower divide-by-4 mode
// the split puts the majority of counts on four: with divcode = 4q + r,
// r = 0 gives (div3, div4) = (0, q) and r > 0 gives (4 - r, q + r - 3).
// If fewer than MIN_DIV4 counts of four result, the split is clamped to
// MIN_DIV4 counts of four and none of three, and debug_flag is raised; the
// divider samples its new phase counts during count-to-4 number 9 or 10,
// so at least MIN_DIV4 counts of four must remain in every period.
//
// Purely combinational: it sits on the path from the ADC capture edge to
// the divider, which must settle within about 2 ns.
// The split rule, NB = 7 and MIN_DIV4 = 10 are the design's; the reading
// of the clamp branch (div4_m1 = MIN_DIV4 - 1, flag set) is this design's.
module fbdiv_ctrl #(
  parameter int unsigned NB       = 7,
  parameter int unsigned MIN_DIV4 = 10
) (
  input  logic [NB-1:0] divcode,
  output logic [1:0]    num_div3,
  output logic [NB-3:0] num_div4,
  output logic [NB-3:0] num_div4_m1,
  output logic          debug_flag
);
  logic [NB-3:0] q;
  logic [1:0]    r;
  int            div4;   // q + r - 3 may be negative for small moduli

  assign q = divcode[NB-1:2];
  assign r = divcode[1:0];

  always_comb begin
    debug_flag = 1'b0;
    if (r == 2'd0) begin
      num_div3 = 2'd0;
      div4     = int'(q);
    end else begin
      num_div3 = 2'(3'd4 - {1'b0, r});
      div4     = int'(q) + int'(r) - 3;
    end
    if (div4 < int'(MIN_DIV4)) begin
      debug_flag  = 1'b1;
      num_div3    = 2'd0;
      num_div4    = (NB-2)'(MIN_DIV4);
      num_div4_m1 = (NB-2)'(MIN_DIV4 - 1);
    end else begin
      num_div4    = (NB-2)'(div4);
      num_div4_m1 = (NB-2)'(div4 - 1);
    end
  end
endmodule
