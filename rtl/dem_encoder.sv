// dem_encoder: encoder of the fractional fine-FCE code onto 4 unit elements.
//
// code (0..4) says how many of the N_EL fractional unit elements are on.
// With ena_dem = 0 the first code elements are used (thermometer code).
// With ena_dem = 1 dynamic element matching rotates the set of elements
// used: the thermometer pattern is rotated by a pointer. Shaped switching
// (dis_shaping = 0) advances the pointer by code every cycle (data-weighted
// averaging), which first-order high-pass shapes the element-mismatch
// error; dis_shaping = 1 takes a random pointer from rnd instead, which
// whitens it. el is combinational from code and the pointer register; the
// pointer updates on clock edges with en high.
// The existence of the DEM encoder and its two switches are the design's;
// the algorithms are this design's choice.
module dem_encoder #(
  parameter int unsigned N_EL = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [$clog2(N_EL+1)-1:0] code,
  input  logic                      ena_dem,
  input  logic                      dis_shaping,
  input  logic [$clog2(N_EL)-1:0]   rnd,
  output logic [N_EL-1:0]           el
);
  localparam int unsigned PW = $clog2(N_EL);
  logic [PW-1:0]     ptr;
  logic [N_EL-1:0]   therm;

  always_comb begin
    for (int i = 0; i < N_EL; i++) therm[i] = (32'(code) > i);
    // rotate left by ptr: element k is on if (k - ptr) mod N_EL < code
    for (int k = 0; k < N_EL; k++)
      el[k] = ena_dem ? therm[(k + N_EL - 32'(ptr)) % N_EL] : therm[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ptr <= '0;
    else if (en && ena_dem) ptr <= dis_shaping ? rnd : PW'(32'(ptr) + 32'(code));
  end
endmodule
