// tb_act_unit: ReLU, x1 / x2 / x0.5 scaling and conversion to sign-magnitude,
// checked against an integer model on corner values and random inputs.
module tb_act_unit;
  import kws_pkg::*;
  act_t din, dout;
  logic relu;
  scale_e scale;
  int checks = 0, failures = 0;

  act_unit dut (.din(din), .relu(relu), .scale(scale), .dout(dout));

  function automatic logic [15:0] model(input int x, input logic rl, input int sc);
    int y = x, m;
    if (rl && y < 0) y = 0;
    if (sc == 1) y = y * 2;
    else if (sc == 2) y = (y < 0) ? -((-y + 1) / 2) : y / 2;   // floor
    m = y < 0 ? -y : y;
    if (m > 32767) m = 32767;
    return {y < 0, 15'(m)};
  endfunction

  task automatic check(input logic [15:0] x, input logic rl, input int sc);
    logic [15:0] e;
    din = x; relu = rl; scale = scale_e'(sc);
    #1;
    e = model(int'(signed'(x)), rl, sc);
    checks++;
    if (dout != e) begin
      failures++;
      $display("FAIL x=%0d relu=%0d scale=%0d got %h exp %h", signed'(x), rl, sc, dout, e);
    end
  endtask

  initial begin
    for (int sc = 0; sc < 3; sc++)
      for (int rl = 0; rl < 2; rl++) begin
        check(16'h8000, 1'(rl), sc); check(16'h7fff, 1'(rl), sc); check(16'h0000, 1'(rl), sc);
        check(16'hffff, 1'(rl), sc); check(16'h0001, 1'(rl), sc); check(16'h4000, 1'(rl), sc);
        check(16'hc000, 1'(rl), sc); check(16'hfffd, 1'(rl), sc);
      end
    for (int i = 0; i < 3000; i++) check(16'($urandom), 1'($urandom), $urandom_range(0, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
