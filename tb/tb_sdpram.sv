// tb_sdpram: simultaneous writes and reads on the two ports of the feature
// buffer RAM, checked against an array model (a read of the address being
// written in the same cycle returns the old word).
module tb_sdpram;
  localparam int D = 1024;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [D];
  int checks = 0, failures = 0;

  sdpram #(.WIDTH(16), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] exp_d;
      @(negedge clk);
      we = 1'($urandom); waddr = 10'($urandom); wdata = 16'($urandom);
      re = 1; raddr = 10'($urandom);
      if (i % 7 == 0) raddr = waddr;
      exp_d = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk); we = 0; re = 0;
      checks++;
      if (rdata != exp_d) begin failures++; $display("FAIL r=%0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
