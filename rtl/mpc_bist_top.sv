// mpc_bist_top: low-power BIST with a model-predictive Test Controller.
//
// A free-running pseudorandom generator (tpg_lfsr) produces a new PAT_W-bit
// test pattern every clock. The reference signature table (ref_sig_mem),
// filled before the test from the CUT's truth table, marks each pattern as
// redundant (RD) or non-redundant (NRD) and holds the response a fault-free
// CUT gives to it. The Test Controller (test_controller) lets only NRD
// patterns through the Toggle/Hold logic (toggle_hold) to the CUT, checks
// each response against its reference signature, stops at the first mismatch
// and passes once every NRD pattern has been checked. RD patterns are held
// back, so the CUT inputs switch only for the patterns that matter, which is
// where the power saving comes from. This structure follows the design
// description; the CUT itself is outside this module: cut_in_o drives it and
// cut_resp_i returns its combinational response.
//
// Interface: load the table through tbl_wr_* while no test runs, pulse
// start, then wait for done_o; pass_o/fail_o give the verdict and, after a
// failure, cut_in_o still shows the pattern whose response was wrong.
// toggle_o shows the Toggle (1) / Hold (0) state, pattern_o the generator.
module mpc_bist_top #(
  parameter int unsigned PAT_W  = bist_pkg::PAT_W_DEF,
  parameter int unsigned RESP_W = bist_pkg::RESP_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // reference signature table load port
  input  logic              tbl_wr_en,
  input  logic [PAT_W-1:0]  tbl_wr_addr,
  input  logic              tbl_wr_nrd,
  input  logic [RESP_W-1:0] tbl_wr_sig,
  // test control and status
  input  logic              start,
  output logic              busy_o,
  output logic              done_o,
  output logic              pass_o,
  output logic              fail_o,
  // circuit under test
  output logic [PAT_W-1:0]  cut_in_o,
  input  logic [RESP_W-1:0] cut_resp_i,
  // observation
  output logic [PAT_W-1:0]  pattern_o,
  output logic              toggle_o
);

  logic [PAT_W-1:0]  pattern;
  logic              nrd;
  logic [RESP_W-1:0] sig;
  logic [PAT_W:0]    nrd_count;
  logic              toggle;

  tpg_lfsr #(.PAT_W(PAT_W)) u_tpg (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (1'b1),
    .pattern_o (pattern)
  );

  ref_sig_mem #(.PAT_W(PAT_W), .RESP_W(RESP_W)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (tbl_wr_en),
    .wr_addr   (tbl_wr_addr),
    .wr_nrd    (tbl_wr_nrd),
    .wr_sig    (tbl_wr_sig),
    .rd_addr   (pattern),
    .rd_nrd    (nrd),
    .rd_sig    (sig),
    .nrd_count (nrd_count)
  );

  test_controller #(.PAT_W(PAT_W), .RESP_W(RESP_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .nrd_i       (nrd),
    .sig_i       (sig),
    .nrd_count_i (nrd_count),
    .toggle_o    (toggle),
    .resp_i      (cut_resp_i),
    .busy_o      (busy_o),
    .done_o      (done_o),
    .pass_o      (pass_o),
    .fail_o      (fail_o)
  );

  toggle_hold #(.PAT_W(PAT_W)) u_th (
    .clk       (clk),
    .rst_n     (rst_n),
    .toggle    (toggle),
    .pattern_i (pattern),
    .cut_in_o  (cut_in_o)
  );

  assign pattern_o = pattern;
  assign toggle_o  = toggle;

endmodule
