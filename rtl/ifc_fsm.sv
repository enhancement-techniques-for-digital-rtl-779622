// ifc_fsm: control-pair state machine of the incremental frequency control
// (IFC) scheme.
//
// The integer FCE bank is driven by only two 1-bit signals, c1 and c2.
// The four states are the four (c1,c2) combinations, visited in Gray
// order: each up command moves 00 -> 01 -> 11 -> 10 -> 00, each dn command
// moves the other way, noc holds. Exactly one of c1/c2 toggles per step,
// so one latched FCE in the bank changes state and no glitch can occur.
// The state is reset to (c1,c2) = (0,1), the bank's initialisation state.
// Interface: m is the ISL command (two's complement -1/0/+1); c1/c2 are
// registered on clk_fast. State diagram and reset state follow the design.
module ifc_fsm (
  input  logic              clk_fast,
  input  logic              rst_n,
  input  logic signed [1:0] m,
  output logic              c1,
  output logic              c2
);
  typedef enum logic [1:0] {S00 = 2'b00, S01 = 2'b01, S11 = 2'b11, S10 = 2'b10} st_t;
  st_t st, st_n;

  always_comb begin
    st_n = st;
    if (m == 2'sd1) begin            // up
      unique case (st)
        S00: st_n = S01;
        S01: st_n = S11;
        S11: st_n = S10;
        S10: st_n = S00;
      endcase
    end else if (m == -2'sd1) begin  // dn
      unique case (st)
        S00: st_n = S10;
        S10: st_n = S11;
        S11: st_n = S01;
        S01: st_n = S00;
      endcase
    end
  end

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) st <= S01;
    else        st <= st_n;
  end

  assign c1 = st[1];
  assign c2 = st[0];

  // one control line changes per clock at most; checked from the second
  // clock after reset release (armed is cleared with the reset)
  logic armed;
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) armed <= 1'b0;
    else        armed <= 1'b1;
  end
  a_gray: assert property (@(posedge clk_fast) armed |-> $countones({c1, c2} ^ $past({c1, c2})) <= 1);
endmodule
