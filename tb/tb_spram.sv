// tb_spram: writes random words to random addresses of a single-port RAM and
// reads them back with the one-cycle latency, checking against an array
// model; also checks that rdata holds while re is low.
module tb_spram;
  localparam int D = 512;
  logic clk = 0, we = 0, re = 0;
  logic [8:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [D];
  int checks = 0, failures = 0;

  spram #(.WIDTH(16), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; addr = 9'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        we = 1; re = 0; addr = 9'($urandom); wdata = 16'($urandom); model[addr] = wdata;
      end else begin
        automatic logic [8:0] a = 9'($urandom);
        we = 0; re = 1; addr = a;
        @(negedge clk); re = 0; addr = 9'($urandom);
        checks++;
        if (rdata != model[a]) begin failures++; $display("FAIL a=%0d", a); end
        @(negedge clk);
        checks++;
        if (rdata != model[a]) begin failures++; $display("FAIL hold a=%0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
