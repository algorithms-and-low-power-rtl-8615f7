// mc_bus: flat multicast network built from one mc_ctrl per receiver.
//
// The sender drives a tag with each data item. Every receiver whose configured
// ID equals the tag takes the item. The item is delivered to all addressed
// receivers in the same cycle, and only when every addressed receiver is
// ready; rdy tells the sender that this happens when en is set. The array uses
// one instance for input activations (ID = which C-group a PE holds) and one
// for biases and partial sums (ID = output chain). The document configures
// these IDs per layer and does not organise them in rows and columns; this
// flat bus and its all-or-nothing delivery are this design's implementation.
module mc_bus #(
  parameter int unsigned N     = 64,
  parameter int unsigned TAG_W = 6,
  parameter int unsigned DW    = 16
) (
  input  logic             en,
  input  logic [TAG_W-1:0] tag,
  input  logic [DW-1:0]    data,
  output logic             rdy,
  input  logic [TAG_W-1:0] ids      [N],
  input  logic [N-1:0]     id_valid,
  input  logic [N-1:0]     rx_rdy,
  output logic [N-1:0]     rx_push,
  output logic [DW-1:0]    rx_data  [N]
);
  logic [N-1:0] rdy_each;
  for (genvar i = 0; i < N; i++) begin : g_ctrl
    mc_ctrl #(.TAG_W(TAG_W), .DW(DW)) u_ctrl (
      .id(ids[i]), .id_valid(id_valid[i]), .tag(tag), .en_in(en && rdy),
      .data_in(data), .rdy_in(rx_rdy[i]),
      .en_out(rx_push[i]), .data_out(rx_data[i]), .rdy_out(rdy_each[i]));
  end
  assign rdy = &rdy_each;
endmodule
