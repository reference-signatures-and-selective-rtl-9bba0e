// tpg_lfsr: free-running pseudorandom test pattern generator.
//
// A PAT_W-bit Fibonacci LFSR that shifts left by one bit every clock and
// feeds the parity of the tapped bits into bit 0. The feedback is also
// inverted whenever bits [PAT_W-2:0] are all zero, which splices the all-zero
// state into the sequence: with the default taps (x^8+x^6+x^5+x^4+1) the
// generator walks through all 256 patterns before it repeats. The design
// description asks for an 8-bit pseudorandom generator that runs
// continuously like a free wheel and notes that up to 256 patterns exist; the
// polynomial and the all-zero extension are this design's choices.
//
// Interface: en advances the generator (tie high to free-run), pattern_o is
// the current state, registered. Reset loads SEED; the first pattern appears
// in the cycle after reset is released and a new one every enabled clock.
module tpg_lfsr #(
  parameter int unsigned      PAT_W = bist_pkg::PAT_W_DEF,
  parameter logic [PAT_W-1:0] TAPS  = PAT_W'(bist_pkg::TPG_TAPS_DEF),
  parameter logic [PAT_W-1:0] SEED  = PAT_W'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [PAT_W-1:0] pattern_o
);

  logic [PAT_W-1:0] state_q;
  logic             feedback;

  always_comb begin
    feedback = ^(state_q & TAPS);
    if (state_q[PAT_W-2:0] == '0) feedback = ~feedback;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= SEED;
    else if (en) state_q <= {state_q[PAT_W-2:0], feedback};
  end

  assign pattern_o = state_q;

endmodule
