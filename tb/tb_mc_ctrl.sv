// tb_mc_ctrl: exhaustive check of the unicast/multicast controller over a
// 3-bit ID and tag: enable and data only pass when the ID is valid and equal
// to the tag, enable is in and the receiver is ready; ready goes upstream
// whenever the controller is not addressed.
module tb_mc_ctrl;
  logic [2:0] id, tag;
  logic idv, en_in, rdy_in, en_out, rdy_out;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  mc_ctrl #(.TAG_W(3), .DW(8)) dut (.id(id), .id_valid(idv), .tag(tag), .en_in(en_in),
    .data_in(din), .rdy_in(rdy_in), .en_out(en_out), .data_out(dout), .rdy_out(rdy_out));

  initial begin
    for (int v = 0; v < 2048; v++) begin
      logic match, e;
      {id, tag, idv, en_in, rdy_in} = 9'(v);
      din = 8'($urandom);
      #1;
      match = idv && (id == tag);
      e = match && en_in && rdy_in;
      checks++;
      if (en_out != e || dout != (e ? din : 8'h00) || rdy_out != (!match || rdy_in)) begin
        failures++;
        $display("FAIL id=%0d tag=%0d idv=%0d en=%0d rdy=%0d -> en=%0d d=%h r=%0d",
                 id, tag, idv, en_in, rdy_in, en_out, dout, rdy_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
