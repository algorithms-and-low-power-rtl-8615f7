// mc_ctrl: one unicast/multicast controller of the network-on-chip.
//
// It holds an ID (fixed for the weight network, configured per layer for the
// activation and bias networks) and compares it with the tag travelling with
// the data. The data is forwarded, with an enable, only when the controller is
// active, its ID equals the tag, the upstream enable is set and the receiver is
// ready; otherwise the forwarded data is held at 0. Upstream it reports ready
// when it is not addressed or when its receiver is ready, so that a multicast
// only completes when every addressed receiver can take the item. ID compare,
// enable and zeroed data follow the figure of the controller; the ready rule
// for non-addressed controllers and the id_valid input are this design's own.
// Purely combinational.
module mc_ctrl #(
  parameter int unsigned TAG_W = 6,
  parameter int unsigned DW    = 16
) (
  input  logic [TAG_W-1:0] id,
  input  logic             id_valid,  // 0: controller disabled, never matches
  input  logic [TAG_W-1:0] tag,
  input  logic             en_in,
  input  logic [DW-1:0]    data_in,
  input  logic             rdy_in,    // receiver can accept
  output logic             en_out,
  output logic [DW-1:0]    data_out,
  output logic             rdy_out    // towards the sender
);
  logic match;
  always_comb begin
    match    = id_valid && (id == tag);
    en_out   = match && en_in && rdy_in;
    data_out = en_out ? data_in : '0;
    rdy_out  = !match || rdy_in;
  end
endmodule
