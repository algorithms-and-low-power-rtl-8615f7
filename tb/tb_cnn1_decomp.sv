// tb_cnn1_decomp: runs the decomposed keyword-spotting network CNN-1-decomp
// on the accelerator at its default sizes and measures the frame time.
//
// The eleven layers have the shapes of the decomposed CNN-1 (input 10x49
// features, one channel):
//   conv1-1 1x10 C1 M6, conv1-2 4x1 C6 M9, conv1-3 1x1 C9 M28 (ReLU),
//   conv2-1 1x1 C28 M18, conv2-2 4x10 C18 M21 stride (2,1), conv2-3 1x1 C21
//   M30 (ReLU), lin-1 C1860 M12, lin-2 C12 M12, lin-3 C12 M16, fc1 C16 M128
//   (ReLU), fco C128 M12.
// lin-1 is run as a CONV layer whose 2x31 filter covers the whole 2x31x30
// map left by conv2-3 (no padding is applied, so its input has 1860 rather
// than 1920 values). Weights, biases and features are random. All weights
// and the configuration are loaded through the host port, one frame is run,
// and the last output of each activation bank (fco scores, lin-3 and fc1
// outputs) is compared with a reference computed here in the array's own
// accumulation order. The frame must finish within 412,500 cycles, the
// real-time budget of 16.5 ms at 25 MHz.
`timescale 1ns/1ps
module tb_cnn1_decomp;
  import kws_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic h_we = 1'b0, h_re = 1'b0;
  logic [19:0] h_addr = '0;
  logic [15:0] h_wdata = '0, h_rdata;
  logic h_rvalid, h_err, busy, done;
  logic [31:0] n_blocks, n_psum;

  kws_accel dut (.*);

  localparam longint FRAME_BUDGET = 412_500;   // 16.5 ms at 25 MHz

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

  localparam int NL = 11;
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
      feat[i] = rand_sm(8000);
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
    wait (done);
    $display("frame %0d: %0d cycles (budget %0d)", frame, cycles - t0, FRAME_BUDGET);
    checks++;
    if (cycles - t0 > FRAME_BUDGET) begin
      failures++;
      $display("frame time %0d cycles exceeds the %0d-cycle budget", cycles - t0, FRAME_BUDGET);
    end
    // the last layer written to each bank: lin-3 (bank 2), fc1 (bank 0), fco (bank 1)
    for (int i = NL - 3; i < NL; i++)
      for (int a = 0; a < L[i].m; a++) begin
        hread({3'(3 + L[i].dst), 17'(a)}, rd);
        checks++;
        if (rd !== bank[L[i].dst][a]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH layer %0d addr %0d: got %h exp %h", i, a, rd, bank[L[i].dst][a]);
        end
      end
  endtask

  initial begin
    // network description: CNN-1-decomp
    L[0]  = '{src:3, dst:0, c:1,  m:6,   h:10, w:49, r:1, s:10, u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[1]  = '{src:0, dst:1, c:6,  m:9,   h:10, w:40, r:4, s:1,  u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[2]  = '{src:1, dst:2, c:9,  m:28,  h:7,  w:40, r:1, s:1,  u:1, v:1, relu:1, scale:0, has_bias:1, wbase:0, bbase:0};
    L[3]  = '{src:2, dst:0, c:28, m:18,  h:7,  w:40, r:1, s:1,  u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[4]  = '{src:0, dst:1, c:18, m:21,  h:7,  w:40, r:4, s:10, u:2, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[5]  = '{src:1, dst:2, c:21, m:30,  h:2,  w:31, r:1, s:1,  u:1, v:1, relu:1, scale:0, has_bias:1, wbase:0, bbase:0};
    L[6]  = '{src:2, dst:0, c:30, m:12,  h:2,  w:31, r:2, s:31, u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[7]  = '{src:0, dst:1, c:12, m:12,  h:1,  w:1,  r:1, s:1,  u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[8]  = '{src:1, dst:2, c:12, m:16,  h:1,  w:1,  r:1, s:1,  u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    L[9]  = '{src:2, dst:0, c:16, m:128, h:1,  w:1,  r:1, s:1,  u:1, v:1, relu:1, scale:0, has_bias:1, wbase:0, bbase:0};
    L[10] = '{src:0, dst:1, c:128, m:12, h:1,  w:1,  r:1, s:1,  u:1, v:1, relu:0, scale:0, has_bias:1, wbase:0, bbase:0};
    wptr = 0;
    for (int i = 0; i < NL; i++) begin
      L[i].wbase = wptr;
      wptr += L[i].m * L[i].r * L[i].s * L[i].c;
      L[i].bbase = wptr;
      wptr += 2 * L[i].m;
    end
    for (int a = 0; a < wptr; a++) wmem[a] = {1'($urandom), 7'($urandom_range(0, 20))};
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
    $display("psum=%0d blocks=%0d bias_init=%0d chains=%0d sat=%0d relu_clip=%0d",
             n_psum, n_blocks, n_bias_init, n_chain, n_sat, n_relu_clip);
    checks++; if (n_psum == 0) begin failures++; $display("no partial sums"); end
    checks++; if (n_chain == 0) begin failures++; $display("no spatial chain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
