// pe: processing element of the 8x8 array.
//
// Weight-stationary operation (the document's WS-1 dataflow): after a
// configuration write the PE loads n_m x n_c weights (up to 3 output channels
// of up to 4 input-channel elements, in a 12-entry weight RF), and, when its
// accumulator is initialised from bias, one 16-bit bias per channel into the
// bias RF. Then, for every output pixel, it takes n_c input activations into
// the IA RF and for each of its channels k:
//   INIT  accumulator <= 0, bias RF[k] or a partial sum from the bias/psum FIFO
//   MAC   n_c cycles of acc <= acc + ia[j] * w[k][j]   (one multiply per cycle)
//   SP    if not the head of its chain: acc <= acc + result of the previous PE
//   PUSH  acc into the output FIFO (to the next PE or to the output network)
// Weights and activations are sign-magnitude, the accumulator 2's complement
// (see pe_mac). All data enters through FIFOs and leaves through one, as in the
// document. The state machine, the FIFO depths, the weight order (channel-major)
// and the cycle timing are this design's choices. A disabled PE stays idle
// (the document clock-gates it; here it simply holds its state).
//
// Timing per pixel: n_c cycles to fill the IA RF (if FIFO holds data), then per
// channel 1 (INIT) + n_c (MAC) + 1 (SP, if used) + 1 (PUSH) cycles, plus waits.
module pe
  import kws_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // configuration from the top-level controller
  input  logic    cfg_we,
  input  pe_cfg_t cfg_in,
  // weight input (unicast network)
  input  logic    w_push,
  input  wgt_t    w_data,
  output logic    w_rdy,
  // input activation input (multicast network)
  input  logic    ia_push,
  input  act_t    ia_data,
  output logic    ia_rdy,
  // bias / partial sum input (multicast network)
  input  logic    bp_push,
  input  act_t    bp_data,
  output logic    bp_rdy,
  // spatial sum from the previous PE's output FIFO
  input  logic    sp_valid,
  input  act_t    sp_data,
  output logic    sp_pop,
  // output FIFO head, to the next PE or to the output network
  output logic    out_valid,
  output act_t    out_data,
  input  logic    out_pop,
  output logic    busy,
  output pe_cfg_t cfg_q      // current configuration (IDs for the networks)
);
  typedef enum logic [2:0] {S_IDLE, S_LOADW, S_LOADB, S_IA, S_INIT, S_MAC, S_SP, S_PUSH} st_e;

  pe_cfg_t cfg;
  st_e     st;
  wgt_t    wrf  [WRF_N];
  act_t    iarf [MAX_CP];
  act_t    brf  [MAX_NM];
  act_t    acc;
  logic [1:0] k;        // channel being computed / loaded
  logic [2:0] j;        // element index

  // ------------------------------------------------------------ input FIFOs
  wgt_t w_q;  logic w_empty,  w_full,  w_pop;
  act_t ia_q; logic ia_empty, ia_full, ia_pop;
  act_t bp_q; logic bp_empty, bp_full, bp_pop;
  logic o_full, o_empty, o_push;

  sync_fifo #(.WIDTH(WW_D), .DEPTH(FIFO_DEPTH)) u_wf (
    .clk, .rst_n, .push(w_push), .wdata(w_data), .pop(w_pop),
    .rdata(w_q), .full(w_full), .empty(w_empty));
  sync_fifo #(.WIDTH(AW_D), .DEPTH(FIFO_DEPTH)) u_iaf (
    .clk, .rst_n, .push(ia_push), .wdata(ia_data), .pop(ia_pop),
    .rdata(ia_q), .full(ia_full), .empty(ia_empty));
  sync_fifo #(.WIDTH(AW_D), .DEPTH(FIFO_DEPTH)) u_bpf (
    .clk, .rst_n, .push(bp_push), .wdata(bp_data), .pop(bp_pop),
    .rdata(bp_q), .full(bp_full), .empty(bp_empty));
  sync_fifo #(.WIDTH(AW_D), .DEPTH(FIFO_DEPTH)) u_of (
    .clk, .rst_n, .push(o_push), .wdata(acc), .pop(out_pop),
    .rdata(out_data), .full(o_full), .empty(o_empty));

  assign w_rdy     = !w_full;
  assign ia_rdy    = !ia_full;
  assign bp_rdy    = !bp_full;
  assign out_valid = !o_empty;
  assign busy      = (st != S_IDLE);
  assign cfg_q     = cfg;

  // ------------------------------------------------------------ datapath
  act_t mac_sum, prod_unused;
  pe_mac u_mac (
    .acc(acc), .ia_sm(iarf[j[1:0]]), .w_sm(wrf[{k, j[1:0]}]),
    .sel_spatial(st == S_SP), .spatial_in(sp_data),
    .prod_sm(prod_unused), .sum(mac_sum));

  // ------------------------------------------------------------ control
  logic last_j, last_k;
  assign last_j = (j == cfg.n_c - 3'd1);
  assign last_k = (k == cfg.n_m - 2'd1);

  always_comb begin
    w_pop  = (st == S_LOADW) && !w_empty;
    ia_pop = (st == S_IA) && !ia_empty;
    bp_pop = ((st == S_LOADB) || (st == S_INIT && cfg.init == INIT_PSUM)) && !bp_empty;
    sp_pop = (st == S_SP) && sp_valid;
    o_push = (st == S_PUSH) && !o_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cfg <= '0;
      k   <= '0;
      j   <= '0;
      acc <= '0;
    end else if (cfg_we) begin
      cfg <= cfg_in;
      st  <= cfg_in.en ? S_LOADW : S_IDLE;
      k   <= '0;
      j   <= '0;
    end else begin
      unique case (st)
        S_IDLE: ;
        S_LOADW: if (w_pop) begin
          if (last_j) begin
            j <= '0;
            if (last_k) begin
              k  <= '0;
              st <= (cfg.init == INIT_BIAS) ? S_LOADB : S_IA;
            end else k <= k + 2'd1;
          end else j <= j + 3'd1;
        end
        S_LOADB: if (bp_pop) begin
          if (last_k) begin k <= '0; st <= S_IA; end
          else k <= k + 2'd1;
        end
        S_IA: if (ia_pop) begin
          if (last_j) begin j <= '0; k <= '0; st <= S_INIT; end
          else j <= j + 3'd1;
        end
        S_INIT: begin
          unique case (cfg.init)
            INIT_BIAS: begin acc <= brf[k]; st <= S_MAC; end
            INIT_PSUM: if (bp_pop) begin acc <= bp_q; st <= S_MAC; end
            default:   begin acc <= '0; st <= S_MAC; end
          endcase
        end
        S_MAC: begin
          acc <= mac_sum;
          if (last_j) begin
            j  <= '0;
            st <= cfg.use_spatial ? S_SP : S_PUSH;
          end else j <= j + 3'd1;
        end
        S_SP: if (sp_pop) begin acc <= mac_sum; st <= S_PUSH; end
        S_PUSH: if (o_push) begin
          if (last_k) begin k <= '0; st <= S_IA; end
          else begin k <= k + 2'd1; st <= S_INIT; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // register files: weights, bias and input activations
  always_ff @(posedge clk) begin
    if (!cfg_we) begin
      if (w_pop)                   wrf[{k, j[1:0]}] <= w_q;
      if (st == S_LOADB && bp_pop) brf[k]           <= bp_q;
      if (ia_pop)                  iarf[j[1:0]]     <= ia_q;
    end
  end

  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we && cfg_in.en |-> (cfg_in.n_c inside {[1:4]}) && (cfg_in.n_m inside {[1:3]}));
endmodule
