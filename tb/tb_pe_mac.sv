// tb_pe_mac: checks the sign-magnitude multiply and the 2's complement
// add/subtract of one PE against an integer model, on corner cases (zero,
// negative zero, largest magnitudes, saturation both ways) and random data.
module tb_pe_mac;
  import kws_pkg::*;
  act_t acc, ia, sp, prod_sm, sum;
  wgt_t w;
  logic sel;
  int checks = 0, failures = 0;

  pe_mac dut (.acc(acc), .ia_sm(ia), .w_sm(w), .sel_spatial(sel), .spatial_in(sp),
              .prod_sm(prod_sm), .sum(sum));

  function automatic int ref_prod(input logic [15:0] a, input logic [7:0] b);
    int m = (int'(a[14:0]) * int'(b[6:0]) + 64) / 128;
    return (a[15] ^ b[7]) ? -m : m;
  endfunction
  function automatic int clamp(input int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  task automatic check(input act_t a, input act_t x, input wgt_t y, input logic sl, input act_t s);
    int exp_sum, p;
    acc = a; ia = x; w = y; sel = sl; sp = s;
    #1;
    p = ref_prod(x, y);
    exp_sum = clamp(int'(signed'(a)) + (sl ? int'(signed'(s)) : p));
    checks++;
    if (int'(signed'(sum)) != exp_sum) begin
      failures++;
      $display("FAIL acc=%h ia=%h w=%h sel=%0d sp=%h: sum=%0d exp=%0d", a, x, y, sl, s,
               signed'(sum), exp_sum);
    end
    if (!sl) begin
      checks++;
      if (prod_sm != {p < 0, 15'(p < 0 ? -p : p)}) begin
        failures++;
        $display("FAIL product %h x %h = %h, exp %0d", x, y, prod_sm, p);
      end
    end
  endtask

  initial begin
    check(16'd0, 16'h0000, 8'h00, 1'b0, '0);
    check(16'd100, 16'h8000, 8'h80, 1'b0, '0);        // -0 x -0
    check(16'd0, 16'h7fff, 8'h7f, 1'b0, '0);          // largest product
    check(16'd0, 16'hffff, 8'h7f, 1'b0, '0);          // most negative product
    check(16'h7000, 16'h7fff, 8'h7f, 1'b0, '0);       // positive saturation
    check(16'h9000, 16'hffff, 8'h7f, 1'b0, '0);       // negative saturation
    check(16'd5, 16'h8003, 8'h40, 1'b0, '0);          // -3 * 0.5 rounds
    check(16'd5, 16'h0001, 8'h40, 1'b0, '0);          // 0.5 rounds up to 1
    check(16'h7ff0, 16'h0000, 8'h00, 1'b1, 16'h0100); // spatial saturates
    check(16'hfff0, 16'h0000, 8'h00, 1'b1, 16'h8000);
    for (int i = 0; i < 5000; i++)
      check(16'($urandom), 16'($urandom), 8'($urandom), 1'($urandom_range(0, 3) == 0), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
