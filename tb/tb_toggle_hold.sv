// tb_toggle_hold: self-checking testbench of the Toggle/Hold logic.
//
// Drives random patterns and random toggle values for 500 clocks and checks
// that the CUT input takes a new pattern one clock after a Toggle and keeps
// its value through every Hold; also checks the reset value.
module tb_toggle_hold;
  localparam int PAT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, toggle = 1'b0;
  logic [PAT_W-1:0] pat = '0, cut_in, model;
  int checks = 0, failures = 0, n_toggle = 0, n_hold = 0;

  toggle_hold #(.PAT_W(PAT_W)) dut (.clk(clk), .rst_n(rst_n), .toggle(toggle),
                                    .pattern_i(pat), .cut_in_o(cut_in));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cut_in != '0) begin failures++; $display("FAIL: reset value"); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      pat    = PAT_W'($urandom);
      toggle = ($urandom_range(0, 2) == 0);
      if (toggle) n_toggle++; else n_hold++;
      @(posedge clk);
      if (toggle) model = pat;
      #1;
      checks++;
      if (cut_in != model) begin
        failures++;
        $display("FAIL: step %0d toggle=%0b cut_in=%02h expected %02h", i, toggle, cut_in, model);
      end
    end
    checks++;
    if (n_toggle == 0 || n_hold == 0) begin failures++; $display("FAIL: a state never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
