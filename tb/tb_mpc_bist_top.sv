// tb_mpc_bist_top: end-to-end testbench of the low-power BIST, at the
// default parameters (8-bit patterns, 3-bit responses).
//
// Prepares the test offline as the BIST expects: builds the truth table of
// the example CUT (cut_pkg), runs a stuck-at fault simulation and marks a
// pattern NRD only if it detects a fault not detected by the patterns before
// it (pattern order 0..255); all other patterns are RD. The table is loaded,
// then:
//   1. the fault-free CUT must pass; the test must take exactly as many
//      clocks as the position of the last NRD pattern in the generator
//      sequence predicts, toggle only for NRD patterns, apply each NRD
//      pattern once, and switch the CUT inputs less than applying every
//      generated pattern would;
//   2. with each detectable stuck-at fault injected, the BIST must fail and
//      stop with the first NRD pattern (in generator order) that exposes the
//      fault at the CUT input;
//   3. an empty table must pass at once; a reloaded table must be used.
// It counts how often Toggle, Hold, pass, discontinue-on-mismatch and the
// empty-table pass happened and fails if one never did.
module tb_mpc_bist_top;
  import cut_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tbl_wr_en = 1'b0, tbl_wr_nrd = 1'b0, start = 1'b0;
  logic [7:0] tbl_wr_addr = '0;
  logic [2:0] tbl_wr_sig = '0;
  logic busy, done, pass, fail, toggle;
  logic [7:0] cut_in, pattern;
  logic [2:0] cut_resp;
  logic fault_en = 1'b0, fault_val = 1'b0;
  logic [4:0] fault_net = '0;

  int checks = 0, failures = 0;
  int n_toggle = 0, n_hold = 0, n_pass = 0, n_discontinue = 0, n_empty_pass = 0;

  bit       nrd_tbl [256];
  bit [2:0] golden  [256];
  int       n_nrd;

  mpc_bist_top dut (
    .clk(clk), .rst_n(rst_n),
    .tbl_wr_en(tbl_wr_en), .tbl_wr_addr(tbl_wr_addr), .tbl_wr_nrd(tbl_wr_nrd),
    .tbl_wr_sig(tbl_wr_sig),
    .start(start), .busy_o(busy), .done_o(done), .pass_o(pass), .fail_o(fail),
    .cut_in_o(cut_in), .cut_resp_i(cut_resp), .pattern_o(pattern), .toggle_o(toggle));

  cut_model u_cut (.a(cut_in), .fault_en(fault_en), .fault_net(fault_net),
                   .fault_val(fault_val), .x(cut_resp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] tpg_next(logic [7:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[4] ^ s[3];
    if (s[6:0] == 7'd0) fb = ~fb;
    return {s[6:0], fb};
  endfunction

  function automatic bit detects(logic [7:0] p, int f);
    return cut_eval(p, 1'b0, 0, 1'b0) != cut_eval(p, 1'b1, f / 2, bit'(f % 2));
  endfunction

  task automatic load_table(bit use_nrd);
    for (int p = 0; p < 256; p++) begin
      @(negedge clk);
      tbl_wr_en   = 1'b1;
      tbl_wr_addr = 8'(p);
      tbl_wr_nrd  = use_nrd && nrd_tbl[p];
      tbl_wr_sig  = golden[p];
    end
    @(negedge clk);
    tbl_wr_en = 1'b0;
  endtask

  // Runs one test; returns the number of RUN clocks, the first pattern
  // offered and the CUT input switching during the test.
  task automatic run_bist(output int run_clocks, output logic [7:0] first_pat,
                          output int cut_switch, output int all_switch,
                          output int toggles);
    logic [7:0] prev_cut, prev_pat;
    run_clocks = 0; cut_switch = 0; all_switch = 0; toggles = 0;
    first_pat = '0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    prev_cut = cut_in;
    prev_pat = pattern;
    first_pat = pattern;
    while (busy) begin
      run_clocks++;
      if (toggle) begin
        toggles++;
        n_toggle++;
        check(nrd_tbl[pattern], $sformatf("toggle for RD pattern %02h", pattern));
      end else begin
        n_hold++;
      end
      @(negedge clk);
      cut_switch += $countones(cut_in ^ prev_cut);
      all_switch += $countones(pattern ^ prev_pat);
      prev_cut = cut_in;
      prev_pat = pattern;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit covered [N_FAULTS];
    int n_detectable, run_clocks, cut_switch, all_switch, toggles, exp_clocks;
    logic [7:0] first_pat, p;

    // Offline preparation: truth table, RD/NRD split, reference signatures.
    for (int f = 0; f < N_FAULTS; f++) covered[f] = 0;
    n_nrd = 0;
    for (int q = 0; q < 256; q++) begin
      golden[q]  = cut_eval(8'(q), 1'b0, 0, 1'b0);
      nrd_tbl[q] = 0;
      for (int f = 0; f < N_FAULTS; f++)
        if (!covered[f] && detects(8'(q), f)) begin
          covered[f] = 1;
          nrd_tbl[q] = 1;
        end
      if (nrd_tbl[q]) n_nrd++;
    end
    n_detectable = 0;
    for (int f = 0; f < N_FAULTS; f++) if (covered[f]) n_detectable++;
    $display("NRD patterns: %0d of 256, detectable faults: %0d of %0d", n_nrd, n_detectable, N_FAULTS);

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load_table(1'b1);

    // 1. Fault-free CUT.
    run_bist(run_clocks, first_pat, cut_switch, all_switch, toggles);
    check(pass && !fail, "fault-free CUT passes");
    check(toggles == n_nrd, $sformatf("NRD patterns applied %0d want %0d", toggles, n_nrd));
    exp_clocks = 0;
    p = first_pat;
    for (int k = 0; k < 256; k++) begin
      if (nrd_tbl[p]) exp_clocks = k + 2;  // last NRD toggled at k, checked at k+1
      p = tpg_next(p);
    end
    check(run_clocks == exp_clocks, $sformatf("test length %0d clocks, want %0d", run_clocks, exp_clocks));
    check(cut_switch < all_switch, $sformatf("CUT input switching %0d vs %0d", cut_switch, all_switch));
    $display("fault-free run: %0d clocks, %0d patterns applied, CUT input bit switches %0d (every pattern applied: %0d)",
             run_clocks, toggles, cut_switch, all_switch);
    if (pass) n_pass++;

    // 2. Every detectable single stuck-at fault.
    for (int f = 0; f < N_FAULTS; f++) begin
      if (!covered[f]) continue;
      fault_en  = 1'b1;
      fault_net = 5'(f / 2);
      fault_val = f[0];
      run_bist(run_clocks, first_pat, cut_switch, all_switch, toggles);
      check(fail && !pass, $sformatf("fault net %0d stuck-at-%0d detected", f / 2, f % 2));
      // first NRD pattern in generator order that exposes the fault
      p = first_pat;
      for (int k = 0; k < 256; k++) begin
        if (nrd_tbl[p] && detects(p, f)) break;
        p = tpg_next(p);
      end
      check(cut_in == p, $sformatf("fault %0d stopped at %02h, want %02h", f, cut_in, p));
      if (fail) n_discontinue++;
    end
    fault_en = 1'b0;

    // 3. Empty table, then reload.
    load_table(1'b0);
    run_bist(run_clocks, first_pat, cut_switch, all_switch, toggles);
    check(pass && run_clocks == 0 && toggles == 0, "empty table passes at once");
    if (pass && run_clocks == 0) n_empty_pass++;
    load_table(1'b1);
    run_bist(run_clocks, first_pat, cut_switch, all_switch, toggles);
    check(pass && toggles == n_nrd, "reloaded table used");

    $display("toggle=%0d hold=%0d pass=%0d discontinue=%0d empty_pass=%0d",
             n_toggle, n_hold, n_pass, n_discontinue, n_empty_pass);
    check(n_toggle > 0, "Toggle state used");
    check(n_hold > 0, "Hold state used");
    check(n_pass > 0, "pass happened");
    check(n_discontinue > 0, "discontinue happened");
    check(n_empty_pass > 0, "empty-table pass happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
