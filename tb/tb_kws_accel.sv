// tb_kws_accel: end-to-end test of the accelerator at its default sizes.
//
// Through the host port it loads a four-layer network and two frames of
// random features, runs both frames and compares every output word of every
// layer with a reference computed here from the same data:
//   L0  C=1  conv 2x3, stride (1,2), bias, ReLU        feature buffer -> bank 0
//   L1  C=10 M=22 1x1 (3-PE chains, 21 chains, PE0 idle), ReLU, x0.5  -> bank 1
//   L2  C=22 M=40 conv 2x2, stride (2,1), two channel blocks, x2     -> bank 2
//   L3  FC  C=160 M=12, one 40-PE chain, four channel blocks         -> bank 0
// The reference follows the accumulation order of the array (chain head
// starts from bias or partial sum, each PE adds its products, then the result
// of the previous PE) so that saturation is reproduced exactly. It also counts
// how often each mechanism happened: partial sums, channel blocks, bias
// initialisation, multi-PE chains, saturation, ReLU clipping, feature writes
// while busy, refused host accesses while busy and network back-pressure.
`timescale 1ns/1ps
module tb_kws_accel;
  import kws_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h_we = 1'b0, h_re = 1'b0;
  logic [19:0] h_addr = '0;
  logic [15:0] h_wdata = '0, h_rdata;
  logic h_rvalid, h_err, busy, done;
  logic [31:0] n_blocks, n_psum;

  kws_accel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TIMEOUT after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_err_busy = 0, n_fwrite_busy = 0, n_wstall = 0, n_iastall = 0, n_bpstall = 0;
  int n_sat = 0, n_relu_clip = 0, n_bias_init = 0, n_chain = 0;
  always @(posedge clk) begin
    if (h_err) n_err_busy++;
    if (dut.w_en && !dut.w_rdy) n_wstall++;
    if (dut.ia_en && !dut.ia_rdy) n_iastall++;
    if (dut.bp_en && !dut.bp_rdy) n_bpstall++;
  end

  // ------------------------------------------------------------ host tasks
  task automatic hwrite(input logic [19:0] a, input logic [15:0] d);
    @(negedge clk); h_we = 1'b1; h_addr = a; h_wdata = d;
    @(negedge clk); h_we = 1'b0;
  endtask
  task automatic hread(input logic [19:0] a, output logic [15:0] d);
    @(negedge clk); h_re = 1'b1; h_addr = a;
    @(negedge clk); h_re = 1'b0;
    d = h_rdata;
  endtask

  // ------------------------------------------------------------ reference
  function automatic int sm2i(input logic [15:0] x);
    return x[15] ? -int'(x[14:0]) : int'(x[14:0]);
  endfunction
  function automatic logic [15:0] i2sm(input int v);
    int m = (v < 0) ? -v : v;
    if (m > 32767) m = 32767;
    return {v < 0 && m != 0, 15'(m)};
  endfunction
  function automatic int sat(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic int prod(input logic [15:0] a, input logic [7:0] w);
    int m = (int'(a[14:0]) * int'(w[6:0]) + 64) / 128;
    return (a[15] ^ w[7]) ? -m : m;
  endfunction

  typedef struct {
    int src, dst, c, m, h, w, r, s, u, v, relu, scale, has_bias, wbase, bbase;
  } lay_t;

  localparam int NL = 4;
  lay_t L [NL];
  logic [7:0]  wmem [WMEM_BYTES];
  logic [15:0] feat [FBUF_WORDS];
  logic [15:0] bank [3][AMEM_WORDS];

  function automatic logic [15:0] act_ref(input int x, input int relu, input int scale);
    int y = x;
    if (relu != 0 && y < 0) begin y = 0; n_relu_clip++; end
    if (scale == 1) y = y * 2;
    else if (scale == 2) y = y >>> 1;
    return i2sm(y);
  endfunction

  function automatic int addsat(input int a, input int b);
    int v = a + b;
    if (v != sat(v)) n_sat++;
    return sat(v);
  endfunction

  task automatic ref_layer(input lay_t l);
    int E = (l.h - l.r) / l.u + 1, F = (l.w - l.s) / l.v + 1;
    int g = (l.c + 3) / 4, cq, crm;
    cq = l.c / g; crm = l.c % g;
    if (g > 1) n_chain++;
    for (int m = 0; m < l.m; m++)
      for (int e = 0; e < E; e++)
        for (int f = 0; f < F; f++) begin
          int tapv = 0;
          for (int r = 0; r < l.r; r++)
            for (int s = 0; s < l.s; s++) begin
              int init, prev = 0, c = 0;
              if (r == 0 && s == 0) begin
                if (l.has_bias != 0) begin
                  init = int'(signed'({wmem[l.bbase + 2*m + 1], wmem[l.bbase + 2*m]}));
                  n_bias_init++;
                end else init = 0;
              end else init = tapv;
              for (int j = 0; j < g; j++) begin
                int a = (j == 0) ? init : 0;
                int nj = cq + ((j < crm) ? 1 : 0);
                for (int jj = 0; jj < nj; jj++, c++) begin
                  logic [15:0] x;
                  int ia_addr = ((l.u*e + r) * l.w + (l.v*f + s)) * l.c + c;
                  x = (l.src == 3) ? feat[ia_addr] : bank[l.src][ia_addr];
                  a = addsat(a, prod(x, wmem[l.wbase + ((m*l.r + r)*l.s + s)*l.c + c]));
                end
                if (j > 0) a = addsat(a, prev);
                prev = a;
              end
              tapv = prev;
            end
          bank[l.dst][(e*F + f)*l.m + m] = act_ref(tapv, l.relu, l.scale);
        end
  endtask

  function automatic logic [127:0] pack(input lay_t l);
    layer_cfg_t d;
    d = '0;
    d.src = src_e'(l.src); d.dst = 2'(l.dst); d.relu = l.relu[0]; d.scale = scale_e'(l.scale);
    d.c = 9'(l.c); d.m = 9'(l.m); d.h = 8'(l.h); d.w = 8'(l.w); d.r = 8'(l.r); d.s = 8'(l.s);
    d.u = 4'(l.u); d.v = 4'(l.v); d.has_bias = l.has_bias[0];
    d.wbase = 17'(l.wbase); d.bbase = 17'(l.bbase);
    return 128'(d);
  endfunction

  function automatic logic [15:0] rand_sm(input int maxmag);
    return {1'($urandom), 15'($urandom_range(0, maxmag))};
  endfunction

  // ------------------------------------------------------------ test
  int wptr;
  logic [15:0] rd;

  task automatic load_features(input int frame);
    for (int i = 0; i < L[0].h * L[0].w * L[0].c; i++) begin
      feat[i] = rand_sm(frame == 0 ? 6000 : 30000);
      hwrite({3'd2, 17'(i)}, feat[i]);
      if (busy) n_fwrite_busy++;
    end
  endtask

  task automatic run_and_check(input int frame);
    longint t0;
    // reference for all layers
    for (int i = 0; i < NL; i++) ref_layer(L[i]);
    hwrite({3'd7, 17'd0}, 16'h8000 | 16'(NL));
    t0 = cycles;
    // while running: a refused weight write and a feature write for the next frame
    wait (busy);
    hwrite({3'd0, 17'd0}, 16'h00ff);   // must be refused
    hwrite({3'd2, 17'd1000}, 16'h1234);
    n_fwrite_busy++;
    wait (done);
    $display("frame %0d: %0d cycles", frame, cycles - t0);
    // compare all layer outputs
    for (int i = 0; i < NL; i++) begin
      int E = (L[i].h - L[i].r) / L[i].u + 1, F = (L[i].w - L[i].s) / L[i].v + 1;
      if (i == 0 && NL > 3 && L[3].dst == L[0].dst) continue;  // overwritten by L3
      for (int a = 0; a < E * F * L[i].m; a++) begin
        hread({3'(3 + L[i].dst), 17'(a)}, rd);
        checks++;
        if (rd !== bank[L[i].dst][a]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH frame %0d layer %0d addr %0d: got %h exp %h",
                     frame, i, a, rd, bank[L[i].dst][a]);
        end
      end
    end
    // final scores
    for (int a = 0; a < L[3].m; a++) begin
      hread({3'(3 + L[3].dst), 17'(a)}, rd);
      checks++;
      if (rd !== bank[L[3].dst][a]) failures++;
    end
  endtask

  initial begin
    // network description
    L[0] = '{src:3, dst:0, c:1,  m:10, h:6, w:7, r:2, s:3, u:1, v:2, relu:1, scale:0, has_bias:1, wbase:0, bbase:0};
    L[1] = '{src:0, dst:1, c:10, m:22, h:5, w:3, r:1, s:1, u:1, v:1, relu:1, scale:2, has_bias:1, wbase:0, bbase:0};
    L[2] = '{src:1, dst:2, c:22, m:40, h:5, w:3, r:2, s:2, u:2, v:1, relu:0, scale:1, has_bias:1, wbase:0, bbase:0};
    L[3] = '{src:2, dst:0, c:160, m:12, h:1, w:1, r:1, s:1, u:1, v:1, relu:0, scale:0, has_bias:0, wbase:0, bbase:0};
    wptr = 0;
    for (int i = 0; i < NL; i++) begin
      L[i].wbase = wptr;
      wptr += L[i].m * L[i].r * L[i].s * L[i].c;
      L[i].bbase = wptr;
      wptr += 2 * L[i].m;
    end
    for (int a = 0; a < wptr; a++) wmem[a] = 8'($urandom);
    // biases: moderate values
    for (int i = 0; i < NL; i++)
      for (int m = 0; m < L[i].m; m++) begin
        logic [15:0] b;
        b = 16'($urandom_range(0, 4000) - 2000);
        wmem[L[i].bbase + 2*m] = b[7:0];
        wmem[L[i].bbase + 2*m + 1] = b[15:8];
      end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < wptr; a++) hwrite({3'd0, 17'(a)}, {8'h00, wmem[a]});
    for (int i = 0; i < NL; i++) begin
      logic [127:0] d;
      d = pack(L[i]);
      for (int w = 0; w < CFG_WORDS; w++) hwrite({3'd1, 17'(i * CFG_WORDS + w)}, d[16*w +: 16]);
    end
    // readback of a few weights
    for (int a = 0; a < 8; a++) begin
      hread({3'd0, 17'(a)}, rd);
      checks++;
      if (rd[7:0] !== wmem[a]) failures++;
    end

    load_features(0);
    run_and_check(0);
    load_features(1);     // larger features: saturation
    run_and_check(1);

    // every mechanism must have happened
    $display("psum=%0d blocks=%0d bias_init=%0d chains=%0d sat=%0d relu_clip=%0d",
             n_psum, n_blocks, n_bias_init, n_chain, n_sat, n_relu_clip);
    $display("refused=%0d feat_busy=%0d wstall=%0d iastall=%0d bpstall=%0d",
             n_err_busy, n_fwrite_busy, n_wstall, n_iastall, n_bpstall);
    checks++; if (n_psum == 0)        begin failures++; $display("no partial sums"); end
    checks++; if (n_blocks <= 2*NL)   begin failures++; $display("no channel blocking"); end
    checks++; if (n_bias_init == 0)   begin failures++; $display("no bias"); end
    checks++; if (n_chain == 0)       begin failures++; $display("no spatial chain"); end
    checks++; if (n_sat == 0)         begin failures++; $display("no saturation"); end
    checks++; if (n_relu_clip == 0)   begin failures++; $display("no relu"); end
    checks++; if (n_err_busy == 0)    begin failures++; $display("no refused access"); end
    checks++; if (n_fwrite_busy == 0) begin failures++; $display("no feature write while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
