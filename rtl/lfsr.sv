// lfsr: pseudo-random bit source for the LSB dither of the Delta-Sigma
// modulators in the FDC and DCO digital blocks.
//
// A Fibonacci linear-feedback shift register with the maximal-length
// polynomial x^23 + x^18 + 1 (period 2^23 - 1). It shifts once per clock
// while en is high and holds otherwise (the "disable LFSR" register bit
// drives en low). bit_out is the register's MSB. The polynomial and the
// seed are this design's choice; the design only names an LFSR.
module lfsr #(
  parameter int unsigned     WIDTH = 23,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(23'h5A5A5)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic             bit_out,
  output logic [WIDTH-1:0] state
);
  logic fb;
  assign fb = state[22] ^ state[17];   // taps 23 and 18

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], fb};
  end

  assign bit_out = state[WIDTH-1];

  initial assert (WIDTH == 23) else $error("lfsr: taps are fixed for WIDTH = 23");
endmodule
