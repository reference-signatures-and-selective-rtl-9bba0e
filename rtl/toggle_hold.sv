// toggle_hold: Toggle/Hold logic between the pattern generator and the CUT.
//
// In Toggle state (toggle=1) the pattern presented at pattern_i is taken over
// and driven to the CUT; in Hold state (toggle=0) the pattern already at the
// CUT stays put, so the CUT inputs do not switch while redundant patterns go
// by. The design description likens this to a latch that is transparent in
// Toggle state and opaque in Hold state; this design uses an edge-triggered
// register with a load enable instead, so the CUT input changes only on the
// clock edge and the whole BIST is one synchronous domain.
//
// Interface: pattern_i and toggle are sampled at the rising clock edge,
// cut_in_o follows one clock later. Reset clears cut_in_o to zero.
module toggle_hold #(
  parameter int unsigned PAT_W = bist_pkg::PAT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             toggle,
  input  logic [PAT_W-1:0] pattern_i,
  output logic [PAT_W-1:0] cut_in_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cut_in_o <= '0;
    else if (toggle) cut_in_o <= pattern_i;
  end

endmodule
