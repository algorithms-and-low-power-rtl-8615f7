// pe_array: the 8x8 PE array with its networks-on-chip.
//
// * Configuration: the top-level controller writes one pe_cfg_t per PE
//   (cfg_we with cfg_addr = PE number) before each pass.
// * Weights: unicast through wgt_noc; the tag is the PE number, split into a
//   row ID (upper 3 bits) and a column ID (lower 3 bits).
// * Input activations: multicast through mc_bus; a PE takes an item when its
//   configured IA ID (which C-group of a filter it holds) equals the tag.
// * Biases and partial sums: multicast through a second mc_bus; only the head
//   PE of each chain has a valid bias ID (the chain number).
// * Spatial sum: PE p adds the result of PE p-1 (chain PE0 -> PE63, which the
//   snake placement keeps between neighbours). A PE's output FIFO is read by
//   the next PE unless the PE is the tail of its chain.
// * Output activations: the controller selects, by OA ID, the tail PE whose
//   output FIFO it reads (oa_valid / oa_data / oa_pop, first-word fall-through).
// The document gives the row/column weight network, the configured IA/bias/OA
// IDs and the spatial chain; the ports and handshakes are this design's own.
module pe_array
  import kws_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [5:0]      cfg_addr,
  input  pe_cfg_t         cfg_data,
  input  logic            w_en,
  input  logic [5:0]      w_tag,
  input  wgt_t            w_data,
  output logic            w_rdy,
  input  logic            ia_en,
  input  logic [ID_W-1:0] ia_tag,
  input  act_t            ia_data,
  output logic            ia_rdy,
  input  logic            bp_en,
  input  logic [ID_W-1:0] bp_tag,
  input  act_t            bp_data,
  output logic            bp_rdy,
  input  logic [ID_W-1:0] oa_tag,
  output logic            oa_valid,
  output act_t            oa_data,
  input  logic            oa_pop,
  output logic [N_PE-1:0] pe_busy
);
  pe_cfg_t         cfg_q   [N_PE];
  logic [N_PE-1:0] w_push, w_prdy, ia_push, ia_prdy, bp_push, bp_prdy;
  wgt_t            w_pdata [N_PE];
  act_t            ia_pdata[N_PE], bp_pdata[N_PE];
  logic [N_PE-1:0] out_valid, out_pop, sp_pop, oa_match;
  act_t            out_data[N_PE];
  logic [ID_W-1:0] ia_ids[N_PE], bp_ids[N_PE];
  logic [N_PE-1:0] ia_idv, bp_idv;

  wgt_noc #(.ROWS(N_ROW), .COLS(N_COL), .DW(WW_D)) u_wnoc (
    .en(w_en), .rtag(w_tag[5:3]), .ctag(w_tag[2:0]), .data(w_data), .rdy(w_rdy),
    .pe_rdy(w_prdy), .pe_push(w_push), .pe_data(w_pdata));

  mc_bus #(.N(N_PE), .TAG_W(ID_W), .DW(AW_D)) u_ianoc (
    .en(ia_en), .tag(ia_tag), .data(ia_data), .rdy(ia_rdy),
    .ids(ia_ids), .id_valid(ia_idv), .rx_rdy(ia_prdy), .rx_push(ia_push), .rx_data(ia_pdata));

  mc_bus #(.N(N_PE), .TAG_W(ID_W), .DW(AW_D)) u_bpnoc (
    .en(bp_en), .tag(bp_tag), .data(bp_data), .rdy(bp_rdy),
    .ids(bp_ids), .id_valid(bp_idv), .rx_rdy(bp_prdy), .rx_push(bp_push), .rx_data(bp_pdata));

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic sp_v;
    act_t sp_d;
    if (p == 0) begin : g_head
      assign sp_v = 1'b0;
      assign sp_d = '0;
    end else begin : g_link
      assign sp_v = out_valid[p-1];
      assign sp_d = out_data[p-1];
    end

    pe #(.FIFO_DEPTH(FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_addr == 6'(p)), .cfg_in(cfg_data),
      .w_push(w_push[p]),   .w_data(w_pdata[p]),   .w_rdy(w_prdy[p]),
      .ia_push(ia_push[p]), .ia_data(ia_pdata[p]), .ia_rdy(ia_prdy[p]),
      .bp_push(bp_push[p]), .bp_data(bp_pdata[p]), .bp_rdy(bp_prdy[p]),
      .sp_valid(sp_v), .sp_data(sp_d), .sp_pop(sp_pop[p]),
      .out_valid(out_valid[p]), .out_data(out_data[p]), .out_pop(out_pop[p]),
      .busy(pe_busy[p]), .cfg_q(cfg_q[p]));

    assign ia_ids[p]   = cfg_q[p].ia_id;
    assign ia_idv[p]   = cfg_q[p].en;
    assign bp_ids[p]   = cfg_q[p].bias_id;
    assign bp_idv[p]   = cfg_q[p].en && !cfg_q[p].use_spatial;
    assign oa_match[p] = cfg_q[p].en && cfg_q[p].is_tail && (cfg_q[p].oa_id == oa_tag);

    if (p == N_PE - 1) begin : g_last
      assign out_pop[p] = oa_pop && oa_match[p];
    end else begin : g_mid
      assign out_pop[p] = cfg_q[p].is_tail ? (oa_pop && oa_match[p]) : sp_pop[p+1];
    end
  end

  // output network: OR of the selected tail's FIFO head
  always_comb begin
    oa_valid = 1'b0;
    oa_data  = '0;
    for (int p = 0; p < N_PE; p++) begin
      if (oa_match[p]) begin
        oa_valid = oa_valid | out_valid[p];
        oa_data  = oa_data | out_data[p];
      end
    end
  end
endmodule
