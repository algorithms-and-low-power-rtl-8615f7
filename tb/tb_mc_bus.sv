// tb_mc_bus: 16-receiver multicast bus with random IDs, random receiver
// readiness and random tags. Each cycle it checks that the sender sees ready
// exactly when every addressed receiver is ready, that every addressed
// receiver (and no other) gets the item in that case, and that nothing is
// delivered otherwise. It counts cycles stalled by a busy receiver.
module tb_mc_bus;
  localparam int N = 16;
  logic en, rdy;
  logic [3:0] tag;
  logic [15:0] data;
  logic [3:0] ids [N];
  logic [N-1:0] idv, rx_rdy, rx_push;
  logic [15:0] rx_data [N];
  int checks = 0, failures = 0, stalls = 0, multi = 0;

  mc_bus #(.N(N), .TAG_W(4), .DW(16)) dut (.en, .tag, .data, .rdy, .ids, .id_valid(idv), .rx_rdy, .rx_push, .rx_data);

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic all_rdy;
      automatic int naddr = 0;
      for (int i = 0; i < N; i++) begin
        ids[i] = 4'($urandom_range(0, 5));
        idv[i] = ($urandom_range(0, 9) != 0);
        rx_rdy[i] = ($urandom_range(0, 9) != 0);
      end
      tag = 4'($urandom_range(0, 6)); en = 1'($urandom); data = 16'($urandom);
      #1;
      all_rdy = 1;
      for (int i = 0; i < N; i++)
        if (idv[i] && ids[i] == tag) begin naddr++; if (!rx_rdy[i]) all_rdy = 0; end
      checks++;
      if (rdy != all_rdy) begin failures++; $display("FAIL rdy=%0d exp %0d", rdy, all_rdy); end
      if (en && !all_rdy) stalls++;
      if (en && all_rdy && naddr > 1) multi++;
      for (int i = 0; i < N; i++) begin
        automatic logic e = en && all_rdy && idv[i] && ids[i] == tag;
        checks++;
        if (rx_push[i] != e || (e && rx_data[i] != data)) begin
          failures++;
          $display("FAIL rx %0d push=%0d exp %0d", i, rx_push[i], e);
        end
      end
    end
    checks++;
    if (stalls == 0 || multi == 0) begin failures++; $display("no stall or no multicast"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
