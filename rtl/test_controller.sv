// test_controller: the Test Controller of the low-power BIST.
//
// Every clock the pattern generator offers a new pattern, and the reference
// signature table tells whether it is non-redundant (nrd_i) and which
// response a fault-free CUT gives to it (sig_i). While running, the
// controller
//   - puts the Toggle/Hold logic in Toggle state (toggle_o=1) for an NRD
//     pattern, so it reaches the CUT, and in Hold state for an RD pattern,
//     which is skipped without any switching at the CUT inputs;
//   - one clock later, when the NRD pattern sits at the CUT, compares the CUT
//     response resp_i with the reference signature it kept from the lookup;
//   - on a match counts the pattern as checked, and once the count reaches
//     the number of NRD patterns (nrd_count_i) ends in PASS;
//   - on a mismatch discontinues the test at once and ends in FAIL.
// This is the algorithm of the design description (receive a pattern, check
// RD or NRD, compare NRD responses with the reference signatures, stop on the
// first mismatch, finish when all NRD patterns are checked). The one-clock
// compare pipeline, the start/done handshake and the state encoding are this
// design's choices. Because the generator visits every pattern once per
// period, each NRD pattern is checked exactly once and the test ends within
// 2^PAT_W + 1 clocks after start.
//
// Interface: start (one clock, or held) begins a test from IDLE, PASS or
// FAIL; with no NRD pattern in the table the test passes at once. busy_o is
// high in RUN; done_o is high in PASS or FAIL, with pass_o or fail_o telling
// which. resp_i is sampled in the clock after the matching toggle_o pulse,
// so the CUT must be combinational between the Toggle/Hold register and
// resp_i. toggle_o depends combinationally on nrd_i and resp_i.
module test_controller #(
  parameter int unsigned PAT_W  = bist_pkg::PAT_W_DEF,
  parameter int unsigned RESP_W = bist_pkg::RESP_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // lookup of the pattern the generator offers in this clock
  input  logic              nrd_i,
  input  logic [RESP_W-1:0] sig_i,
  input  logic [PAT_W:0]    nrd_count_i,
  // Toggle/Hold control
  output logic              toggle_o,
  // CUT response to the pattern applied in the previous toggle
  input  logic [RESP_W-1:0] resp_i,
  // status
  output logic              busy_o,
  output logic              done_o,
  output logic              pass_o,
  output logic              fail_o
);

  import bist_pkg::*;

  ctrl_state_e       state_q, state_d;
  logic              pending_q;      // an NRD pattern is at the CUT, to be checked
  logic [RESP_W-1:0] expect_q;       // its reference signature
  logic [PAT_W:0]    checked_q;      // NRD patterns that matched so far
  logic              mismatch, last_check, finishing;

  always_comb begin
    mismatch   = pending_q && (resp_i != expect_q);
    last_check = pending_q && !mismatch && (checked_q + 1'b1 == nrd_count_i);
    finishing  = mismatch || last_check;
    toggle_o   = (state_q == ST_RUN) && nrd_i && !finishing;
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_RUN: begin
        if (mismatch)        state_d = ST_FAIL;
        else if (last_check) state_d = ST_PASS;
      end
      default: begin  // ST_IDLE, ST_PASS, ST_FAIL
        if (start) state_d = (nrd_count_i == '0) ? ST_PASS : ST_RUN;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_IDLE;
      pending_q <= 1'b0;
      expect_q  <= '0;
      checked_q <= '0;
    end else begin
      state_q   <= state_d;
      pending_q <= toggle_o;
      if (toggle_o) expect_q <= sig_i;
      if (state_q != ST_RUN)           checked_q <= '0;
      else if (pending_q && !mismatch) checked_q <= checked_q + 1'b1;
    end
  end

  assign busy_o = (state_q == ST_RUN);
  assign done_o = (state_q == ST_PASS) || (state_q == ST_FAIL);
  assign pass_o = (state_q == ST_PASS);
  assign fail_o = (state_q == ST_FAIL);

  // Patterns reach the CUT only while a test runs.
  a_toggle_only_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    toggle_o |-> state_q == ST_RUN);
  // A test never checks more patterns than the table marks NRD.
  a_checked_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    checked_q <= nrd_count_i);

endmodule
