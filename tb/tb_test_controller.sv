// tb_test_controller: self-checking testbench of the Test Controller.
//
// The testbench stands in for the pattern generator, the reference signature
// table and the CUT. Each clock it offers a random RD/NRD classification and
// a random reference signature; the CUT answers a Toggle one clock later with
// that signature, or with a corrupted one for the NRD pattern chosen as
// faulty. A behavioural model of the algorithm (apply NRD, hold RD, check the
// response one clock later, stop at the first mismatch, pass after the last
// NRD pattern) predicts toggle_o every clock, the verdict and the number of
// clocks from start to done. Scenarios: clean runs, failures at the first,
// a middle and the last NRD pattern, an empty table, and restarts.
module tb_test_controller;
  localparam int PAT_W = 8, RESP_W = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic nrd = 1'b0;
  logic [RESP_W-1:0] sig = '0, resp = '0;
  logic [PAT_W:0] nrd_count = '0;
  logic toggle, busy, done, pass, fail;
  int checks = 0, failures = 0;
  int n_hold = 0, n_toggle = 0, n_pass = 0, n_fail = 0;

  test_controller #(.PAT_W(PAT_W), .RESP_W(RESP_W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .nrd_i(nrd), .sig_i(sig),
    .nrd_count_i(nrd_count), .toggle_o(toggle), .resp_i(resp), .busy_o(busy),
    .done_o(done), .pass_o(pass), .fail_o(fail));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One test: n NRD patterns in the table, bad = index (1..n) of the NRD
  // pattern whose response is wrong, 0 for a fault-free CUT.
  task automatic run_test(int n, int bad);
    int applied = 0, cycles = 0, exp_cycles = -1;
    bit pending = 0, running, exp_fail = 0, exp_toggle, mism, last;
    logic [RESP_W-1:0] pend_sig = '0;
    @(negedge clk);
    nrd_count = (PAT_W+1)'(n);
    nrd = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    running = (n != 0);
    if (n == 0) exp_cycles = 1;
    while (running) begin
      cycles++;
      // CUT response to the pattern applied in the previous clock
      if (pending) resp = (applied == bad) ? pend_sig ^ RESP_W'(1) : pend_sig;
      else         resp = RESP_W'($urandom);
      nrd = ($urandom_range(0, 3) == 0);
      sig = RESP_W'($urandom);
      mism = pending && (applied == bad);
      last = pending && !mism && (applied == n);
      exp_toggle = nrd && !mism && !last;
      #1;
      check(busy, $sformatf("busy in clock %0d", cycles));
      check(toggle == exp_toggle, $sformatf("toggle clock %0d: got %0b want %0b", cycles, toggle, exp_toggle));
      if (exp_toggle) n_toggle++; else n_hold++;
      if (mism || last) begin
        running = 0;
        exp_fail = mism;
        exp_cycles = cycles + 1;
      end
      pending = exp_toggle;
      if (exp_toggle) begin applied++; pend_sig = sig; end
      @(negedge clk);
    end
    nrd = 1'b1;
    cycles++;
    #1;
    check(done, $sformatf("done after n=%0d bad=%0d", n, bad));
    check(fail == exp_fail && pass == !exp_fail, $sformatf("verdict n=%0d bad=%0d pass=%0b fail=%0b", n, bad, pass, fail));
    check(cycles == exp_cycles, $sformatf("latency %0d want %0d", cycles, exp_cycles));
    check(!toggle, "no toggle once done");
    if (pass) n_pass++;
    if (fail) n_fail++;
    repeat (3) begin
      @(negedge clk);
      #1 check(done && !toggle, "stays done");
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(!busy && !done && !toggle, "idle after reset");
    run_test(0, 0);
    run_test(1, 0);
    run_test(1, 1);
    run_test(20, 0);
    run_test(20, 1);
    run_test(20, 11);
    run_test(20, 20);
    for (int i = 0; i < 20; i++) begin
      int n;
      n = $urandom_range(1, 64);
      run_test(n, ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, n));
    end
    check(n_pass > 0 && n_fail > 0 && n_hold > 0 && n_toggle > 0, "all outcomes seen");
    $display("toggles=%0d holds=%0d passes=%0d fails=%0d", n_toggle, n_hold, n_pass, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
