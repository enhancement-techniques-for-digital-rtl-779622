// dsm2_ef: second-order error-feedback Delta-Sigma modulator.
//
// Re-quantizes a signed fixed-point input x (FRAC fractional bits) to an
// integer y while shaping the quantization error by (1 - z^-1)^2:
//     w[n] = x[n] + dither*2^-FRAC + 2 e[n-1] - e[n-2]
//     y[n] = round(w[n])               (round half up, then saturated)
//     e[n] = w[n] - y[n]               (|e| <= 1/2 unless y saturates)
// so that y[n] = x[n] - (e[n] - 2e[n-1] + e[n-2]). It serves as the coarse
// quantizer Q_C of the FDC (its error e is also the quantization-noise
// cancellation and gain-calibration reference) and as the fractional
// re-quantizer of the DCO digital block.
//
// Timing: y and e are combinational from x and the two error registers,
// which update on a clock edge with en high. e_d1/e_d2 expose e[n-1] and
// e[n-2] to the user. The error-feedback form follows the design; the
// rounding rule and saturation limits are this design's choice.
module dsm2_ef #(
  parameter int unsigned IN_W    = 26,
  parameter int unsigned FRAC    = 18,
  parameter int unsigned OUT_W   = 7,
  parameter int          OUT_MIN = 0,
  parameter int          OUT_MAX = 127
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   x,
  input  logic                     dither,
  output logic        [OUT_W-1:0]  y,
  output logic signed [FRAC:0]     e,
  output logic signed [FRAC:0]     e_d1,
  output logic signed [FRAC:0]     e_d2
);
  localparam int unsigned W = IN_W + 3;   // room for the error feedback terms

  logic signed [W-1:0] w, half, wr, yint, yfull;

  always_comb begin
    w    = W'(x) + W'(signed'({1'b0, dither})) + (W'(e_d1) <<< 1) - W'(e_d2);
    half = W'(1) <<< (FRAC - 1);
    wr   = (w + half) >>> FRAC;                 // floor(w + 1/2)
    if (wr > W'(OUT_MAX))      yint = W'(OUT_MAX);
    else if (wr < W'(OUT_MIN)) yint = W'(OUT_MIN);
    else                       yint = wr;
    yfull = yint <<< FRAC;
    e     = (FRAC+1)'(w - yfull);
    y     = OUT_W'(yint);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_d1 <= '0;
      e_d2 <= '0;
    end else if (en) begin
      e_d1 <= e;
      e_d2 <= e_d1;
    end
  end
endmodule
