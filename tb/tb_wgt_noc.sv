// tb_wgt_noc: unicast of weights to all 64 PEs. For every tag (row, column)
// and random PE readiness it checks that only the addressed PE gets the
// word, that ready follows the addressed PE, and that data is held at 0 on
// all other outputs.
module tb_wgt_noc;
  logic en, rdy;
  logic [2:0] rtag, ctag;
  logic [7:0] data;
  logic [63:0] pe_rdy, pe_push;
  logic [7:0] pe_data [64];
  int checks = 0, failures = 0;

  wgt_noc #(.ROWS(8), .COLS(8), .DW(8)) dut (.*);

  initial begin
    for (int it = 0; it < 3000; it++) begin
      automatic int p = $urandom_range(0, 63);
      {rtag, ctag} = 6'(p);
      en = 1'($urandom_range(0, 3) != 0);
      data = 8'($urandom);
      pe_rdy = {$urandom, $urandom};
      #1;
      checks++;
      if (rdy != pe_rdy[p]) begin failures++; $display("FAIL rdy p=%0d", p); end
      for (int q = 0; q < 64; q++) begin
        automatic logic e = (q == p) && en && pe_rdy[p];
        checks++;
        if (pe_push[q] != e || pe_data[q] != (e ? data : 8'h00)) begin
          failures++;
          $display("FAIL tag %0d pe %0d push=%0d data=%h", p, q, pe_push[q], pe_data[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
