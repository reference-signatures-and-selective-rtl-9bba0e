// ref_sig_mem: reference signature table of the BIST.
//
// One entry per possible test pattern (2^PAT_W entries, 256 for 8-bit
// patterns). An entry holds the NRD flag (1 = non-redundant, the pattern must
// be applied to the CUT; 0 = redundant, it is skipped) and the RESP_W-bit
// reference signature, the response a fault-free CUT gives to that pattern.
// The design description derives both offline from the CUT's truth table
// before the test starts; here they are written through a load port, so the
// same RTL serves any CUT. The module also keeps the number of NRD entries,
// which the controller needs to know when every NRD pattern has been checked.
//
// Interface: wr_en/wr_addr/wr_nrd/wr_sig write one entry at the rising
// edge; rd_addr -> rd_nrd/rd_sig is a combinational read of the current
// contents (a write is seen from the next cycle on). nrd_count is registered.
// Reset clears all NRD flags and the count; signatures are not reset, since
// they are only read for entries whose NRD flag has been written.
module ref_sig_mem #(
  parameter int unsigned PAT_W  = bist_pkg::PAT_W_DEF,
  parameter int unsigned RESP_W = bist_pkg::RESP_W_DEF,
  localparam int unsigned DEPTH = 1 << PAT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              wr_en,
  input  logic [PAT_W-1:0]  wr_addr,
  input  logic              wr_nrd,
  input  logic [RESP_W-1:0] wr_sig,
  // lookup port
  input  logic [PAT_W-1:0]  rd_addr,
  output logic              rd_nrd,
  output logic [RESP_W-1:0] rd_sig,
  // number of NRD entries
  output logic [PAT_W:0]    nrd_count
);

  logic [DEPTH-1:0]  nrd_q;
  logic [RESP_W-1:0] sig_mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nrd_q     <= '0;
      nrd_count <= '0;
    end else if (wr_en) begin
      nrd_q[wr_addr] <= wr_nrd;
      if (wr_nrd && !nrd_q[wr_addr])      nrd_count <= nrd_count + 1'b1;
      else if (!wr_nrd && nrd_q[wr_addr]) nrd_count <= nrd_count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) sig_mem[wr_addr] <= wr_sig;
  end

  assign rd_nrd = nrd_q[rd_addr];
  assign rd_sig = sig_mem[rd_addr];

endmodule
