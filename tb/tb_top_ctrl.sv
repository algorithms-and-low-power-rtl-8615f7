// tb_top_ctrl: the top-level controller against memory models and a stand-in
// for the PE array that accepts items with random back-pressure and answers
// result requests with a running sequence number. The expected streams are
// built here from the mapping rules: PE configuration records (including the
// document's C=10, M=22 example: PE0 idle, PE1..PE3 first chain with 4/3/3
// elements and two channels, 21 chains), weight bytes per PE, biases, partial
// sums, input activations with their group tags, and output writes with their
// addresses. Every item the controller sends or writes is compared in order.
module tb_top_ctrl;
  import kws_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] n_layers = 2;
  logic busy, done;
  layer_cfg_t lcfg;
  logic cb_re, wm_re, src_re, dst_re, dst_we, dst_final;
  logic [8:0] cb_addr;  logic [15:0] cb_rdata;
  logic [16:0] wm_addr; logic [7:0] wm_rdata;
  logic [12:0] src_addr, dst_addr;
  act_t src_rdata, dst_wdata, dst_rdata;
  logic pc_we; logic [5:0] pc_addr; pe_cfg_t pc_data;
  logic w_en, w_rdy, ia_en, ia_rdy, bp_en, bp_rdy, oa_valid, oa_pop;
  logic [5:0] w_tag; wgt_t w_data;
  logic [ID_W-1:0] ia_tag, bp_tag, oa_tag;
  act_t ia_data, bp_data, oa_data;
  logic [31:0] n_blocks, n_psum;

  top_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_back = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- memories
  logic [15:0] cbuf [64];
  logic [15:0] srcm [2][8192];   // [0] input of layer 0 (bank 0), [1] bank 1
  logic [15:0] dstm [3][8192];
  function automatic logic [7:0] wbyte(input int a);
    return 8'(a * 37 + (a >> 5));
  endfunction
  always_ff @(posedge clk) begin
    if (cb_re) cb_rdata <= cbuf[cb_addr[5:0]];
    if (wm_re) wm_rdata <= wbyte(int'(wm_addr));
    if (src_re) src_rdata <= (lcfg.src == SRC_BANK0) ? srcm[0][src_addr] : dstm[lcfg.src][src_addr];
    if (dst_re) dst_rdata <= dstm[lcfg.dst][dst_addr];
    if (dst_we) dstm[lcfg.dst][dst_addr] <= dst_wdata;
  end

  // ---------------------------------------------------------------- array stand-in
  int seq = 0, oa_wait = 0;
  always_ff @(posedge clk) begin
    w_rdy  <= ($urandom_range(0, 3) != 0);
    ia_rdy <= ($urandom_range(0, 3) != 0);
    bp_rdy <= ($urandom_range(0, 3) != 0);
    oa_valid <= ($urandom_range(0, 2) != 0);
    if (oa_pop) seq <= seq + 1;
    if ((w_en && !w_rdy) || (ia_en && !ia_rdy) || (bp_en && !bp_rdy)) n_back++;
  end
  assign oa_data = 16'(seq * 3 + 1);

  // ---------------------------------------------------------------- expected streams
  typedef struct { int tag; int data; } item_t;
  item_t q_cfg[$], q_w[$], q_bp[$], q_ia[$], q_wr[$];

  typedef struct { int src, dst, c, m, h, w, r, s, u, v, hb, wbase, bbase; } lay_t;
  lay_t L [2];
  int eseq = 0;
  logic [15:0] emem [3][8192];

  task automatic build(input lay_t l);
    int g = (l.c + 3) / 4, chains, cq, crm, E, F;
    chains = 64 / g; cq = l.c / g; crm = l.c % g;
    E = (l.h - l.r) / l.u + 1; F = (l.w - l.s) / l.v + 1;
    for (int mlo = 0; mlo < l.m; mlo += 3 * chains) begin
      int mcnt = (l.m - mlo > 3 * chains) ? 3 * chains : l.m - mlo;
      int chu = (mcnt < chains) ? mcnt : chains;
      int base = 64 - chu * g;
      for (int r = 0; r < l.r; r++) for (int s = 0; s < l.s; s++) begin
        logic first = (r == 0 && s == 0);
        for (int p = 0; p < 64; p++) begin
          pe_cfg_t cf;
          cf = '0;
          if (p >= base) begin
            int q = p - base, t, j;
            t = q / g; j = q % g;
            cf.en = 1; cf.n_c = 3'(cq + (j < crm ? 1 : 0));
            cf.n_m = 2'(1 + ((t + chu < mcnt) ? 1 : 0) + ((t + 2 * chu < mcnt) ? 1 : 0));
            cf.init = (j != 0) ? INIT_ZERO : !first ? INIT_PSUM : (l.hb != 0) ? INIT_BIAS : INIT_ZERO;
            cf.use_spatial = (j != 0); cf.is_tail = (j == g - 1);
            cf.ia_id = ID_W'(j); cf.bias_id = ID_W'(t); cf.oa_id = ID_W'(t);
          end
          q_cfg.push_back('{p, int'(cf)});
        end
        for (int p = base; p < 64; p++) begin
          int q = p - base, t, j, c0, nc;
          t = q / g; j = q % g; c0 = j * cq + ((j < crm) ? j : crm); nc = cq + (j < crm ? 1 : 0);
          for (int k = 0; k < 3; k++) if (t + k * chu < mcnt)
            for (int jj = 0; jj < nc; jj++) begin
              int m = mlo + t + k * chu;
              q_w.push_back('{p, int'(wbyte(l.wbase + ((m * l.r + r) * l.s + s) * l.c + c0 + jj))});
            end
        end
        if (first && l.hb != 0)
          for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++) if (t + k * chu < mcnt) begin
            int m = mlo + t + k * chu;
            q_bp.push_back('{t, int'({wbyte(l.bbase + 2 * m + 1), wbyte(l.bbase + 2 * m)})});
          end
        for (int e = 0; e < E; e++) for (int f = 0; f < F; f++) begin
          if (!first)
            for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++) if (t + k * chu < mcnt) begin
              int m = mlo + t + k * chu;
              q_bp.push_back('{t, int'(emem[l.dst][(e * F + f) * l.m + m])});
            end
          for (int c = 0, j = 0, jj = 0; c < l.c; c++) begin
            int a = ((l.u * e + r) * l.w + (l.v * f + s)) * l.c + c;
            q_ia.push_back('{j, int'((l.src == 0) ? srcm[0][a] : emem[l.src][a])});
            jj++;
            if (jj == cq + (j < crm ? 1 : 0)) begin jj = 0; j++; end
          end
          for (int t = 0; t < chu; t++) for (int k = 0; k < 3; k++) if (t + k * chu < mcnt) begin
            int m = mlo + t + k * chu, a = (e * F + f) * l.m + m;
            emem[l.dst][a] = 16'(eseq * 3 + 1);
            q_wr.push_back('{a, eseq * 3 + 1});
            eseq++;
          end
        end
      end
    end
  endtask

  task automatic expect_item(ref item_t q[$], input int tag, input int data, input string what);
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL unexpected %s tag=%0d data=%0h", what, tag, data);
    end else begin
      item_t it = q.pop_front();
      if (it.tag != tag || it.data != data) begin
        failures++;
        if (failures < 15)
          $display("FAIL %s: got tag=%0d data=%0h, expected tag=%0d data=%0h", what, tag, data, it.tag, it.data);
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pc_we) expect_item(q_cfg, int'(pc_addr), int'(pc_data), "pe config");
    if (w_en && w_rdy) expect_item(q_w, int'(w_tag), int'(w_data), "weight");
    if (bp_en && bp_rdy) expect_item(q_bp, int'(bp_tag), int'(bp_data), "bias/psum");
    if (ia_en && ia_rdy) expect_item(q_ia, int'(ia_tag), int'(ia_data), "activation");
    if (dst_we) expect_item(q_wr, int'(dst_addr), int'(dst_wdata), "output write");
  end

  function automatic logic [127:0] pack(input lay_t l);
    layer_cfg_t d;
    d = '0;
    d.src = src_e'(l.src); d.dst = 2'(l.dst); d.c = 9'(l.c); d.m = 9'(l.m);
    d.h = 8'(l.h); d.w = 8'(l.w); d.r = 8'(l.r); d.s = 8'(l.s); d.u = 4'(l.u); d.v = 4'(l.v);
    d.has_bias = l.hb[0]; d.wbase = 17'(l.wbase); d.bbase = 17'(l.bbase);
    return 128'(d);
  endfunction

  initial begin
    logic [127:0] d;
    L[0] = '{src:0, dst:1, c:10, m:22, h:2, w:3, r:1, s:1, u:1, v:1, hb:1, wbase:100, bbase:5000};
    L[1] = '{src:1, dst:2, c:40, m:20, h:2, w:3, r:2, s:2, u:1, v:1, hb:0, wbase:9000, bbase:0};
    for (int i = 0; i < 2; i++) begin
      d = pack(L[i]);
      for (int w = 0; w < 8; w++) cbuf[i * 8 + w] = d[16 * w +: 16];
    end
    for (int a = 0; a < 8192; a++) begin
      srcm[0][a] = 16'($urandom);
      for (int b = 0; b < 3; b++) begin dstm[b][a] = 16'(a); emem[b][a] = 16'(a); end
    end
    build(L[0]);
    build(L[1]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    repeat (2) @(posedge clk);
    checks++;
    if (q_cfg.size() + q_w.size() + q_bp.size() + q_ia.size() + q_wr.size() != 0) begin
      failures++;
      $display("FAIL missing items: cfg %0d w %0d bp %0d ia %0d wr %0d",
               q_cfg.size(), q_w.size(), q_bp.size(), q_ia.size(), q_wr.size());
    end
    checks++;
    if (n_blocks != 3 || n_back == 0 || n_psum == 0) begin
      failures++; $display("FAIL blocks=%0d backpressure=%0d psum=%0d", n_blocks, n_back, n_psum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
