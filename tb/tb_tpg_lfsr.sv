// tb_tpg_lfsr: self-checking testbench of the pattern generator.
//
// Checks that reset loads the seed, that every step equals the next state
// worked out here from the feedback polynomial x^8+x^6+x^5+x^4+1 with the
// all-zero extension, that the generator visits all 256 patterns exactly once
// in 256 clocks and returns to the seed (one pattern per clock), and that it
// holds its state while en is low.
module tb_tpg_lfsr;
  localparam int PAT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [PAT_W-1:0] pattern;
  int checks = 0, failures = 0;

  tpg_lfsr #(.PAT_W(PAT_W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .pattern_o(pattern));

  always #5 clk = ~clk;

  function automatic logic [7:0] next_state(logic [7:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[4] ^ s[3];
    if (s[6:0] == 7'd0) fb = ~fb;
    return {s[6:0], fb};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [255:0] seen;
    logic [7:0] prev;
    seen = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(pattern == 8'h01, "seed after reset");
    en = 1'b1;
    for (int i = 0; i < 256; i++) begin
      check(!seen[pattern], $sformatf("pattern %02h repeated at step %0d", pattern, i));
      seen[pattern] = 1'b1;
      prev = pattern;
      @(posedge clk); #1;
      check(pattern == next_state(prev), $sformatf("step %0d: %02h -> %02h", i, prev, pattern));
    end
    check(&seen, "all 256 patterns visited");
    check(pattern == 8'h01, "period of 256 clocks");
    en = 1'b0;
    prev = pattern;
    repeat (5) @(posedge clk);
    #1 check(pattern == prev, "holds while en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
