// tb_ref_sig_mem: self-checking testbench of the reference signature table.
//
// Checks that all NRD flags and the NRD count are clear after reset, writes
// random entries (including rewrites that turn NRD on and off) while keeping
// a model of the table, and checks the combinational read of every address
// and the NRD count against that model.
module tb_ref_sig_mem;
  localparam int PAT_W = 8, RESP_W = 3, DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_nrd = 1'b0;
  logic [PAT_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [RESP_W-1:0] wr_sig = '0, rd_sig;
  logic rd_nrd;
  logic [PAT_W:0] nrd_count;
  int checks = 0, failures = 0;

  bit              m_nrd [DEPTH];
  bit [RESP_W-1:0] m_sig [DEPTH];

  ref_sig_mem #(.PAT_W(PAT_W), .RESP_W(RESP_W)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_nrd(wr_nrd),
    .wr_sig(wr_sig), .rd_addr(rd_addr), .rd_nrd(rd_nrd), .rd_sig(rd_sig),
    .nrd_count(nrd_count));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    int cnt = 0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = PAT_W'(a);
      #1;
      check(rd_nrd == m_nrd[a], $sformatf("nrd of %02h", a));
      if (m_nrd[a]) begin
        cnt++;
        check(rd_sig == m_sig[a], $sformatf("sig of %02h", a));
      end
    end
    check(nrd_count == (PAT_W+1)'(cnt), $sformatf("nrd_count %0d expected %0d", nrd_count, cnt));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_all();
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        wr_en   = 1'b1;
        wr_addr = PAT_W'($urandom);
        wr_nrd  = ($urandom_range(0, 2) != 0);
        wr_sig  = RESP_W'($urandom);
        m_nrd[wr_addr] = wr_nrd;
        m_sig[wr_addr] = wr_sig;
      end
      @(negedge clk);
      wr_en = 1'b0;
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
