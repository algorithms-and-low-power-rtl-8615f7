// tb_pe: drives one PE through random configurations (1..4 elements, 1..3
// channels, zero / bias / partial-sum start, with or without the spatial sum)
// and several pixels each. Every output is compared with an integer model of
// the PE's accumulation order. It also checks the compute time of each pixel:
// from the last input activation to the last result it must be
// n_m * (n_c + 2 + spatial) + 1 cycles when nothing stalls.
module tb_pe;
  import kws_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  pe_cfg_t cfg_in;
  logic w_push = 0, ia_push = 0, bp_push = 0, sp_valid = 0, out_pop = 0;
  wgt_t w_data;
  act_t ia_data, bp_data, sp_data, out_data;
  logic w_rdy, ia_rdy, bp_rdy, sp_pop, out_valid, busy;
  pe_cfg_t cfg_q;

  pe dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t spv[3];
  int   spk = 0;
  always @(posedge clk) if (sp_pop) spk <= spk + 1;
  assign sp_data = spv[spk % 3];

  function automatic int clamp(input int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction
  function automatic int prod(input logic [15:0] a, input logic [7:0] b);
    int m = (int'(a[14:0]) * int'(b[6:0]) + 64) / 128;
    return (a[15] ^ b[7]) ? -m : m;
  endfunction

  task automatic put_w(input wgt_t d);
    @(negedge clk); while (!w_rdy) @(negedge clk);
    w_push = 1; w_data = d; @(negedge clk); w_push = 0;
  endtask
  task automatic put_ia(input act_t d);
    @(negedge clk); while (!ia_rdy) @(negedge clk);
    ia_push = 1; ia_data = d; @(negedge clk); ia_push = 0;
  endtask
  task automatic put_bp(input act_t d);
    @(negedge clk); while (!bp_rdy) @(negedge clk);
    bp_push = 1; bp_data = d; @(negedge clk); bp_push = 0;
  endtask

  initial begin
    int nc, nm, init, usp;
    wgt_t w[3][4];
    act_t b[3], ia[4], ps[3];
    longint t_ia, t_out;
    int timing_ref = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      nc = $urandom_range(1, 4); nm = $urandom_range(1, 3);
      init = $urandom_range(0, 2); usp = $urandom_range(0, 1);
      cfg_in = '0;
      cfg_in.en = 1; cfg_in.n_c = 3'(nc); cfg_in.n_m = 2'(nm); cfg_in.init = init_e'(init);
      cfg_in.use_spatial = 1'(usp);
      @(negedge clk); cfg_we = 1; @(negedge clk); cfg_we = 0;
      for (int k = 0; k < nm; k++) for (int j = 0; j < nc; j++) begin
        w[k][j] = 8'($urandom); put_w(w[k][j]);
      end
      if (init == 1) for (int k = 0; k < nm; k++) begin b[k] = 16'($urandom); put_bp(b[k]); end
      for (int pix = 0; pix < 3; pix++) begin
        for (int k = 0; k < nm; k++) spv[k] = 16'($urandom);
        spk = 0;
        sp_valid = 1'(usp);
        if (init == 2) for (int k = 0; k < nm; k++) begin ps[k] = 16'($urandom); put_bp(ps[k]); end
        for (int j = 0; j < nc; j++) begin ia[j] = 16'($urandom); put_ia(ia[j]); end
        t_ia = cyc;
        for (int k = 0; k < nm; k++) begin
          int a, e;
          a = (init == 1) ? int'(signed'(b[k])) : (init == 2) ? int'(signed'(ps[k])) : 0;
          for (int j = 0; j < nc; j++) a = clamp(a + prod(ia[j], w[k][j]));
          if (usp != 0) a = clamp(a + int'(signed'(spv[k])));
          e = a;
          @(negedge clk); while (!out_valid) @(negedge clk);
          t_out = cyc;
          checks++;
          if (int'(signed'(out_data)) != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL it=%0d nc=%0d nm=%0d init=%0d sp=%0d k=%0d: got %0d exp %0d",
                       it, nc, nm, init, usp, k, signed'(out_data), e);
          end
          out_pop = 1; @(negedge clk); out_pop = 0;
        end
        // timing (all items were already queued, spatial always valid)
        checks++;
        if (32'(t_out - t_ia) != nm * (nc + 2 + usp) + 1) begin
          failures++;
          $display("TIMING nc=%0d nm=%0d sp=%0d: %0d cycles", nc, nm, usp, t_out - t_ia);
        end
        sp_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
