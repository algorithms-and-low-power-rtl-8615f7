// tb_sync_fifo: random pushes and pops against a queue model; checks the head
// word, full and empty after every cycle, including pushes while full being
// refused by the caller (full is honoured).
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  int checks = 0, failures = 0, nfull = 0;
  logic [15:0] q[$];

  sync_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == 4) || empty != (q.size() == 0)) begin
        failures++; $display("FAIL flags size=%0d full=%0d empty=%0d", q.size(), full, empty);
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata != q[0]) begin failures++; $display("FAIL head %h exp %h", rdata, q[0]); end
      end
      if (full) nfull++;
      push  = ($urandom_range(0, 99) < (i < 1500 ? 70 : 30)) && !full;
      pop   = ($urandom_range(0, 99) < (i < 1500 ? 30 : 70)) && !empty;
      wdata = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
