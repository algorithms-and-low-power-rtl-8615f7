// tb_pe_array: the PE array with its networks, driven directly (no
// controller). For several layer shapes it writes the PE configuration of the
// chain mapping (g = ceil(C/4) PEs per chain, floor(64/g) chains, up to three
// channels per chain, used chains ending at PE63), unicasts the weights,
// multicasts biases or partial sums and input activations, and reads the
// results from the chain tails through the output network. Results are
// compared with an integer model. Four pixels' activations are sent while
// results are held back for 300 cycles, so the activation network must stall (counted).
module tb_pe_array;
  import kws_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [5:0] cfg_addr = 0;
  pe_cfg_t cfg_data;
  logic w_en = 0, ia_en = 0, bp_en = 0, oa_pop = 0;
  logic [5:0] w_tag = 0;
  logic [ID_W-1:0] ia_tag = 0, bp_tag = 0, oa_tag = 0;
  wgt_t w_data = 0;
  act_t ia_data = 0, bp_data = 0, oa_data;
  logic w_rdy, ia_rdy, bp_rdy, oa_valid;
  logic [N_PE-1:0] pe_busy;

  pe_array dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ia_stalls = 0, idle_pe_busy = 0;
  always @(posedge clk) if (ia_en && !ia_rdy) ia_stalls++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp(input int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction
  function automatic int prod(input logic [15:0] a, input logic [7:0] b);
    int m = (int'(a[14:0]) * int'(b[6:0]) + 64) / 128;
    return (a[15] ^ b[7]) ? -m : m;
  endfunction

  task automatic send_w(input int p, input wgt_t d);
    @(negedge clk); w_en = 1; w_tag = 6'(p); w_data = d;
    @(posedge clk); while (!w_rdy) @(posedge clk);
    @(negedge clk); w_en = 0;
  endtask
  task automatic send_ia(input int tg, input act_t d);
    @(negedge clk); ia_en = 1; ia_tag = ID_W'(tg); ia_data = d;
    @(posedge clk); while (!ia_rdy) @(posedge clk);
    @(negedge clk); ia_en = 0;
  endtask
  task automatic send_bp(input int tg, input act_t d);
    @(negedge clk); bp_en = 1; bp_tag = ID_W'(tg); bp_data = d;
    @(posedge clk); while (!bp_rdy) @(posedge clk);
    @(negedge clk); bp_en = 0;
  endtask

  // one pass: C inputs, M channels (M <= 3 * chains), init 0 zero 1 bias 2 psum
  task automatic run_pass(input int C, input int M, input int init);
    int g, chains, chu, base, cq, crm;
    logic [7:0]  W [192][256];
    logic [15:0] B [192], I [4][256], P [4][192];
    g = (C + 3) / 4; chains = 64 / g; chu = (M < chains) ? M : chains;
    base = 64 - chu * g; cq = C / g; crm = C % g;
    // configure
    for (int p = 0; p < 64; p++) begin
      int q, t, j;
      pe_cfg_t cf;
      cf = '0;
      if (p >= base) begin
        q = p - base; t = q / g; j = q % g;
        cf.en = 1; cf.n_c = 3'(cq + (j < crm ? 1 : 0));
        cf.n_m = 2'(1 + ((t + chu < M) ? 1 : 0) + ((t + 2 * chu < M) ? 1 : 0));
        cf.init = (j != 0) ? INIT_ZERO : init_e'(init);
        cf.use_spatial = (j != 0); cf.is_tail = (j == g - 1);
        cf.ia_id = ID_W'(j); cf.bias_id = ID_W'(t); cf.oa_id = ID_W'(t);
      end
      @(negedge clk); cfg_we = 1; cfg_addr = 6'(p); cfg_data = cf;
    end
    @(negedge clk); cfg_we = 0;
    for (int m = 0; m < M; m++) begin
      for (int c = 0; c < C; c++) W[m][c] = 8'($urandom);
      B[m] = 16'($urandom_range(0, 2000) - 1000);
      for (int x = 0; x < 4; x++) P[x][m] = 16'($urandom);
    end
    for (int x = 0; x < 4; x++) for (int c = 0; c < C; c++) I[x][c] = {1'($urandom), 15'($urandom_range(0, 3000))};
    // weights
    for (int p = base; p < 64; p++) begin
      int q = p - base, t, j, c0, nc;
      t = q / g; j = q % g;
      c0 = j * cq + ((j < crm) ? j : crm); nc = cq + (j < crm ? 1 : 0);
      for (int k = 0; k < 3; k++) if (t + k * chu < M)
        for (int jj = 0; jj < nc; jj++) send_w(p, W[t + k * chu][c0 + jj]);
    end
    if (init == 1)
      for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++)
        if (t + k * chu < M) send_bp(t, B[t + k * chu]);
    // four pixels back to back; results are read only after 300 cycles
    fork
    for (int x = 0; x < 4; x++) begin
      if (init == 2)
        for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++)
          if (t + k * chu < M) send_bp(t, P[x][t + k * chu]);
      for (int c = 0, j = 0, jj = 0; c < C; c++) begin
        send_ia(j, I[x][c]);
        jj++;
        if (jj == cq + (j < crm ? 1 : 0)) begin jj = 0; j++; end
      end
    end
    begin
    repeat (300) @(posedge clk);
    for (int x = 0; x < 4; x++)
      for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++) if (t + k * chu < M) begin
        int m = t + k * chu, a, prev, c;
        prev = 0; c = 0;
        for (int j = 0; j < g; j++) begin
          a = (j == 0) ? (init == 1 ? int'(signed'(B[m])) : init == 2 ? int'(signed'(P[x][m])) : 0) : 0;
          for (int jj = 0; jj < cq + (j < crm ? 1 : 0); jj++, c++) a = clamp(a + prod(I[x][c], W[m][c]));
          if (j > 0) a = clamp(a + prev);
          prev = a;
        end
        @(negedge clk); oa_tag = ID_W'(t);
        #1;
        while (!oa_valid) begin @(negedge clk); #1; end
        checks++;
        if (int'(signed'(oa_data)) != prev) begin
          failures++;
          if (failures < 10) $display("FAIL C=%0d M=%0d x=%0d m=%0d got %0d exp %0d",
                                      C, M, x, m, signed'(oa_data), prev);
        end
        oa_pop = 1; @(negedge clk); oa_pop = 0;
      end
    end
    join
    // unused PEs stayed idle
    for (int p = 0; p < base; p++) if (pe_busy[p]) idle_pe_busy++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_pass(10, 22, 1);   // 3-PE chains, PE0 idle
    run_pass(16, 40, 1);   // 4-PE chains, 2 or 3 channels per chain
    run_pass(3, 64, 2);    // single-PE chains from partial sums
    run_pass(1, 150, 0);   // C = 1
    run_pass(256, 1, 1);   // one 64-PE chain
    run_pass(22, 30, 2);
    checks++;
    if (ia_stalls == 0) begin failures++; $display("activation network never stalled"); end
    checks++;
    if (idle_pe_busy != 0) begin failures++; $display("unused PE active"); end
    $display("ia_stalls=%0d", ia_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
