// tb_host_ifc: address decoding, read-data return, the control word and the
// busy rule of the host port. Region memories are modelled here as RAMs that
// answer one cycle after a read.
module tb_host_ifc;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_re = 0, h_rvalid, h_err;
  logic [19:0] h_addr = 0;
  logic [15:0] h_wdata = 0, h_rdata;
  logic busy = 0, done = 0, start;
  logic [3:0] n_layers;
  logic m_we, m_re;
  logic [2:0] m_region;
  logic [16:0] m_addr;
  logic [15:0] m_wdata;
  logic [15:0] m_rdata [6];
  logic [15:0] mem [6][256];
  int checks = 0, failures = 0, nstart = 0;

  host_ifc dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (m_we) mem[m_region][m_addr[7:0]] = m_wdata;
    if (m_re) for (int r = 0; r < 6; r++) m_rdata[r] <= mem[r][m_addr[7:0]];
    if (rst_n && start) nstart++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [19:0] a, input logic [15:0] d);
    @(negedge clk); h_we = 1; h_addr = a; h_wdata = d; @(negedge clk); h_we = 0;
  endtask
  task automatic rd(input logic [19:0] a, output logic [15:0] d);
    @(negedge clk); h_re = 1; h_addr = a; @(negedge clk); h_re = 0;
    if (!h_rvalid) begin failures++; $display("FAIL no rvalid"); end
    d = h_rdata;
  endtask

  initial begin
    logic [15:0] d;
    logic [15:0] model [6][256];
    for (int r = 0; r < 6; r++) for (int a = 0; a < 256; a++) begin
      model[r][a] = '0; mem[r][a] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      automatic int reg_ = $urandom_range(0, 5), a = $urandom_range(0, 255);
      automatic logic [15:0] v = 16'($urandom);
      wr({3'(reg_), 17'(a)}, v); model[reg_][a] = v;
      rd({3'(reg_), 17'(a)}, d);
      checks++;
      if (d != v) begin failures++; $display("FAIL region %0d addr %0d", reg_, a); end
    end
    // start with 5 layers
    wr({3'd7, 17'd0}, 16'h8005);
    repeat (2) @(negedge clk);
    checks++; if (n_layers != 5 || nstart != 1) begin failures++; $display("FAIL start"); end
    // busy: weight write refused, feature write accepted, status readable
    model[0][3] = 16'h0055;
    wr({3'd0, 17'd3}, 16'h0055);
    busy = 1;
    wr({3'd0, 17'd3}, 16'h00aa);
    checks++; if (!h_err) begin failures++; $display("FAIL no error flag"); end
    checks++; if (mem[0][3] != model[0][3]) begin failures++; $display("FAIL busy write reached memory"); end
    wr({3'd2, 17'd4}, 16'h1234);
    checks++; if (mem[2][4] != 16'h1234) begin failures++; $display("FAIL feature write while busy"); end
    wr({3'd7, 17'd0}, 16'h8003);
    repeat (2) @(negedge clk);
    checks++; if (nstart != 1) begin failures++; $display("FAIL start while busy %0d", nstart); end
    done = 1;
    rd({3'd7, 17'd0}, d);
    checks++; if (d != 16'hc003) begin failures++; $display("FAIL status %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
