// top_ctrl: top-level controller of the accelerator.
//
// It runs the layers of the network one after another, following the
// weight-stationary "WS-1" loop nest of the document: output channels are
// spread over the PE array (parallel-for over M), each PE keeps a slice of the
// C input channels of up to three output channels, and the filter taps (r, s)
// and the output pixels (e, f) are walked in time:
//
//   for each layer (descriptor read from the configuration buffer)
//     for each block of output channels that fits the array
//       for r, for s                        -- one "step" per filter tap
//         write the configuration of all 64 PEs
//         send W[m][r][s][c] to each used PE (unicast)
//         first step: send the bias of each channel to the chain heads
//         for e, for f                      -- every output pixel
//           later steps: send the partial sums O[m][e][f] to the chain heads
//           multicast I[c][U*e+r][V*f+s] for c = 0..C-1 to the C-groups
//           collect O[m][e][f] from the chain tails and write it back,
//           through ReLU/Scale on the last step
//
// Mapping (document, Sec. on mapping filters): the C inputs of a channel are
// split over g = ceil(C/4) consecutive PEs, the first C mod g of them holding
// one element more (C=10 gives 4,3,3); those PEs form a chain whose results
// add up through the spatial-sum links. There are floor(64/g) chains and a
// chain holds channel t, t+chains, t+2*chains. Used chains end at PE63 so the
// lowest PEs stay idle (PE0 in the document's C=10 example). When a layer has
// more than 3*chains output channels it is run in several blocks; this block
// loop, the descriptor encoding and the memory layouts are this design's own:
//   weights  byte  wbase + ((m*R + r)*S + s)*C + c  (sign-magnitude Q1.7)
//   biases   bytes bbase + 2m (low), bbase + 2m + 1 (high), 2's complement
//   input    word  ((h*W) + w)*C + c                 (sign-magnitude)
//   output   word  ((e*F) + f)*M + m
// Partial sums of unfinished taps are kept, in 2's complement, in the output
// bank itself. All memories have a one-cycle read; each streaming phase issues
// one read per cycle while the network accepts.
module top_ctrl
  import kws_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [3:0]      n_layers,     // 1..12
  output logic            busy,
  output logic            done,         // set when the last layer ends, cleared by start
  output layer_cfg_t      lcfg,         // descriptor of the layer being run
  // configuration buffer
  output logic            cb_re,
  output logic [8:0]      cb_addr,
  input  logic [15:0]     cb_rdata,
  // weight memory
  output logic            wm_re,
  output logic [16:0]     wm_addr,
  input  logic [7:0]      wm_rdata,
  // source activations (bank or feature buffer, chosen by lcfg.src)
  output logic            src_re,
  output logic [12:0]     src_addr,
  input  act_t            src_rdata,
  // destination bank (chosen by lcfg.dst): partial-sum reads and output writes
  output logic            dst_re,
  output logic            dst_we,
  output logic [12:0]     dst_addr,
  output act_t            dst_wdata,    // 2's complement result
  output logic            dst_final,    // apply ReLU/Scale before storing
  input  act_t            dst_rdata,
  // PE array
  output logic            pc_we,
  output logic [5:0]      pc_addr,
  output pe_cfg_t         pc_data,
  output logic            w_en,
  output logic [5:0]      w_tag,
  output wgt_t            w_data,
  input  logic            w_rdy,
  output logic            ia_en,
  output logic [ID_W-1:0] ia_tag,
  output act_t            ia_data,
  input  logic            ia_rdy,
  output logic            bp_en,
  output logic [ID_W-1:0] bp_tag,
  output act_t            bp_data,
  input  logic            bp_rdy,
  output logic [ID_W-1:0] oa_tag,
  input  logic            oa_valid,
  input  act_t            oa_data,
  output logic            oa_pop,
  // activity counters for monitoring
  output logic [31:0]     n_blocks,     // channel blocks started
  output logic [31:0]     n_psum        // partial sums sent back to the array
);
  typedef enum logic [3:0] {
    P_IDLE, P_LCFG, P_SETUP, P_BLK, P_PECFG, P_WGT, P_BIAS, P_PSUM, P_IA, P_OA, P_NEXT
  } ph_e;

  ph_e        ph;
  logic [3:0] li;                // layer index
  logic [3:0] wi;                // descriptor word / read counter
  logic [127:0] lbits;

  // derived per layer
  logic [6:0] g;                 // PEs per chain, 1..64
  logic [6:0] chains;            // chains that fit, 1..64
  logic [6:0] cq, crm;           // C = g*cq + crm
  logic [7:0] ne, nf;            // output height / width
  // per block
  logic [8:0] mb_lo, mcnt;
  logic [6:0] chu;               // chains used
  logic [6:0] base;              // first used PE
  // per step
  logic [7:0] r, s;
  logic [7:0] e, f;
  // iteration
  logic [6:0] p;                 // PE number
  logic [6:0] t;                 // chain
  logic [6:0] gj;                // group within chain
  logic [8:0] c0;                // first channel of group gj
  logic [2:0] jj;                // element within group
  logic [1:0] k;                 // channel slot within a PE
  logic [8:0] c;                 // input channel (IA phase)
  logic [1:0] bsub;              // bias byte phase
  logic [7:0] blo;
  // streaming state
  logic       pend, idone;
  logic [6:0] ptag;

  assign lcfg = layer_cfg_t'(lbits);
  assign busy = (ph != P_IDLE);

  // ------------------------------------------------ combinational helpers
  logic [2:0] nc_gj;             // elements held by group gj
  logic [1:0] nm_t;              // channels held by chain t
  logic [8:0] m_cur;             // output channel of (t, k)
  logic       first_step, last_step;
  logic       last_t, last_k, last_jj, last_gj;

  always_comb begin
    nc_gj = 3'(cq) + ((gj < crm) ? 3'd1 : 3'd0);
    nm_t  = 2'd1 + ((9'(t) + 9'(chu) < mcnt) ? 2'd1 : 2'd0)
                 + ((9'(t) + 9'(2 * chu) < mcnt) ? 2'd1 : 2'd0);
    unique case (k)
      2'd0:    m_cur = mb_lo + 9'(t);
      2'd1:    m_cur = mb_lo + 9'(t) + 9'(chu);
      default: m_cur = mb_lo + 9'(t) + 9'(2 * chu);
    endcase
    first_step = (r == '0) && (s == '0);
    last_step  = (r == lcfg.r - 8'd1) && (s == lcfg.s - 8'd1);
    last_t  = (t == chu - 7'd1);
    last_k  = (k == nm_t - 2'd1);
    last_jj = (jj == nc_gj - 3'd1);
    last_gj = (gj == g - 7'd1);
  end

  // addresses
  logic [16:0] w_addr_c;
  logic [12:0] ia_addr_c, o_addr_c;
  always_comb begin
    w_addr_c  = lcfg.wbase + 17'(((32'(m_cur) * lcfg.r + 32'(r)) * lcfg.s + 32'(s)) * lcfg.c
                                 + 32'(c0) + 32'(jj));
    ia_addr_c = 13'(((32'(lcfg.u) * e + 32'(r)) * lcfg.w + (32'(lcfg.v) * f + 32'(s))) * lcfg.c
                     + 32'(c));
    o_addr_c  = 13'((32'(e) * nf + 32'(f)) * lcfg.m + 32'(m_cur));
  end


  // ------------------------------------------------ outputs
  logic stream_rdy;
  always_comb begin
    unique case (ph)
      P_WGT:   stream_rdy = w_rdy;
      P_PSUM:  stream_rdy = bp_rdy;
      P_IA:    stream_rdy = ia_rdy;
      default: stream_rdy = 1'b1;
    endcase
  end
  logic issue;
  assign issue = (ph inside {P_WGT, P_PSUM, P_IA}) && !idone && (!pend || stream_rdy);

  always_comb begin
    cb_re   = (ph == P_LCFG) && (wi < 4'(CFG_WORDS));
    cb_addr = 9'(li) * 9'(CFG_WORDS) + 9'(wi);
    wm_re   = (issue && ph == P_WGT) || (ph == P_BIAS && bsub != 2'd2);
    wm_addr = (ph == P_BIAS) ? lcfg.bbase + 17'({m_cur, 1'b0}) + 17'(bsub == 2'd1)
                             : w_addr_c;
    src_re   = issue && ph == P_IA;
    src_addr = ia_addr_c;
    dst_re   = issue && ph == P_PSUM;
    dst_we   = (ph == P_OA) && oa_valid;
    dst_addr = o_addr_c;
    dst_wdata = oa_data;
    dst_final = last_step;
    oa_tag   = ID_W'(t);
    oa_pop   = dst_we;

    pc_we   = (ph == P_PECFG);
    pc_addr = 6'(p);
    pc_data = '0;
    if (p >= base) begin
      pc_data.en          = 1'b1;
      pc_data.n_c         = nc_gj;
      pc_data.n_m         = nm_t;
      pc_data.init        = (gj != '0) ? INIT_ZERO :
                            !first_step ? INIT_PSUM :
                            lcfg.has_bias ? INIT_BIAS : INIT_ZERO;
      pc_data.use_spatial = (gj != '0);
      pc_data.is_tail     = last_gj;
      pc_data.ia_id       = ID_W'(gj);
      pc_data.bias_id     = ID_W'(t);
      pc_data.oa_id       = ID_W'(t);
    end

    w_en    = pend && ph == P_WGT;
    w_tag   = 6'(ptag);
    w_data  = wm_rdata;
    ia_en   = pend && ph == P_IA;
    ia_tag  = ID_W'(ptag);
    ia_data = src_rdata;
    bp_en   = (pend && ph == P_PSUM) || (ph == P_BIAS && bsub == 2'd2);
    bp_tag  = (ph == P_BIAS) ? ID_W'(t) : ID_W'(ptag);
    bp_data = (ph == P_BIAS) ? {wm_rdata, blo} : dst_rdata;
  end

  // ------------------------------------------------ sequencing

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE; done <= 1'b0; li <= '0; wi <= '0; lbits <= '0;
      g <= 7'd1; chains <= 7'd64; cq <= '0; crm <= '0; ne <= '0; nf <= '0;
      mb_lo <= '0; mcnt <= '0; chu <= 7'd1; base <= '0;
      r <= '0; s <= '0; e <= '0; f <= '0;
      p <= '0; t <= '0; gj <= '0; c0 <= '0; jj <= '0; k <= '0; c <= '0;
      bsub <= '0; blo <= '0; pend <= 1'b0; idone <= 1'b0; ptag <= '0;
      n_blocks <= '0; n_psum <= '0;
    end else begin
      // streaming bookkeeping shared by the WGT, PSUM and IA phases
      if (ph inside {P_WGT, P_PSUM, P_IA}) begin
        if (issue) pend <= 1'b1;
        else if (stream_rdy) pend <= 1'b0;
        if (pend && stream_rdy && ph == P_PSUM) n_psum <= n_psum + 1;
      end

      unique case (ph)
        P_IDLE: if (start) begin
          li <= '0; wi <= '0; done <= 1'b0; ph <= P_LCFG;
        end

        P_LCFG: begin
          // word wi-1 arrives while word wi is read
          if (wi != '0) lbits[16*(wi-1) +: 16] <= cb_rdata;
          wi <= wi + 4'd1;
          if (wi == 4'(CFG_WORDS)) ph <= P_SETUP;
        end

        P_SETUP: begin
          a_src_ne_dst: assert (lcfg.src == SRC_FEAT || 2'(lcfg.src) != lcfg.dst)
            else $error("layer source and destination bank are the same");
          g      <= 7'((lcfg.c + 9'd3) >> 2);
          chains <= 7'(9'd64 / ((lcfg.c + 9'd3) >> 2));
          cq     <= 7'(lcfg.c / 9'((lcfg.c + 9'd3) >> 2));
          crm    <= 7'(lcfg.c % 9'((lcfg.c + 9'd3) >> 2));
          ne     <= 8'((lcfg.h - lcfg.r) / 8'(lcfg.u) + 8'd1);
          nf     <= 8'((lcfg.w - lcfg.s) / 8'(lcfg.v) + 8'd1);
          mb_lo  <= '0;
          ph     <= P_BLK;
        end

        P_BLK: begin
          if (lcfg.m - mb_lo > 9'(3 * chains)) mcnt <= 9'(3 * chains);
          else mcnt <= lcfg.m - mb_lo;
          if (lcfg.m - mb_lo > 9'(chains)) begin
            chu  <= chains;
            base <= 7'(14'd64 - 14'(chains) * 14'(g));
          end else begin
            chu  <= 7'(lcfg.m - mb_lo);
            base <= 7'(14'd64 - 14'(lcfg.m - mb_lo) * 14'(g));
          end
          r <= '0; s <= '0;
          p <= '0; t <= '0; gj <= '0;
          n_blocks <= n_blocks + 1;
          ph <= P_PECFG;
        end

        P_PECFG: begin
          if (p >= base) begin
            if (last_gj) begin gj <= '0; t <= t + 7'd1; end
            else gj <= gj + 7'd1;
          end
          p <= p + 7'd1;
          if (p == 7'd63) begin
            p <= base; t <= '0; gj <= '0; c0 <= '0; jj <= '0; k <= '0;
            idone <= 1'b0; pend <= 1'b0;
            ph <= P_WGT;
          end
        end

        P_WGT: begin
          if (issue) begin
            ptag <= p;
            if (last_jj) begin
              jj <= '0;
              if (last_k) begin
                k <= '0;
                if (p == 7'd63) idone <= 1'b1;
                p <= p + 7'd1;
                if (last_gj) begin gj <= '0; c0 <= '0; t <= t + 7'd1; end
                else begin gj <= gj + 7'd1; c0 <= c0 + 9'(nc_gj); end
              end else k <= k + 2'd1;
            end else jj <= jj + 3'd1;
          end
          if (idone && (!pend || stream_rdy)) begin
            t <= '0; k <= '0; bsub <= '0;
            e <= '0; f <= '0;
            idone <= 1'b0; pend <= 1'b0;
            if (first_step && lcfg.has_bias) ph <= P_BIAS;
            else if (first_step)             ph <= P_IA;
            else                             ph <= P_PSUM;
            c <= '0; gj <= '0; c0 <= '0; jj <= '0;
          end
        end

        P_BIAS: begin
          unique case (bsub)
            2'd0: bsub <= 2'd1;
            2'd1: begin blo <= wm_rdata; bsub <= 2'd2; end
            default: if (bp_rdy) begin
              bsub <= 2'd0;
              if (last_k) begin
                k <= '0;
                if (last_t) begin t <= '0; ph <= P_IA; end
                else t <= t + 7'd1;
              end else k <= k + 2'd1;
            end
          endcase
        end

        P_PSUM: begin
          if (issue) begin
            ptag <= t;
            if (last_k) begin
              k <= '0;
              if (last_t) begin t <= '0; idone <= 1'b1; end
              else t <= t + 7'd1;
            end else k <= k + 2'd1;
          end
          if (idone && (!pend || stream_rdy)) begin
            idone <= 1'b0; pend <= 1'b0; ph <= P_IA;
          end
        end

        P_IA: begin
          if (issue) begin
            ptag <= gj;
            c <= c + 9'd1;
            if (last_jj) begin
              jj <= '0;
              if (last_gj) begin gj <= '0; idone <= 1'b1; end
              else gj <= gj + 7'd1;
            end else jj <= jj + 3'd1;
          end
          if (idone && (!pend || stream_rdy)) begin
            idone <= 1'b0; pend <= 1'b0; c <= '0;
            t <= '0; k <= '0;
            ph <= P_OA;
          end
        end

        P_OA: if (oa_valid) begin
          if (last_k) begin
            k <= '0;
            if (last_t) begin t <= '0; ph <= P_NEXT; end
            else t <= t + 7'd1;
          end else k <= k + 2'd1;
        end

        P_NEXT: begin
          // next pixel, next tap, next block or next layer
          if (f != nf - 8'd1) begin
            f <= f + 8'd1; ph <= first_step ? P_IA : P_PSUM;
          end else if (e != ne - 8'd1) begin
            f <= '0; e <= e + 8'd1; ph <= first_step ? P_IA : P_PSUM;
          end else begin
            f <= '0; e <= '0;
            p <= '0; t <= '0; gj <= '0;
            if (s != lcfg.s - 8'd1) begin
              s <= s + 8'd1; ph <= P_PECFG;
            end else if (r != lcfg.r - 8'd1) begin
              s <= '0; r <= r + 8'd1; ph <= P_PECFG;
            end else if (9'(mb_lo) + mcnt < lcfg.m) begin
              mb_lo <= mb_lo + mcnt; ph <= P_BLK;
            end else if (li + 4'd1 < n_layers) begin
              li <= li + 4'd1; wi <= '0; ph <= P_LCFG;
            end else begin
              done <= 1'b1; ph <= P_IDLE;
            end
          end
        end

        default: ph <= P_IDLE;
      endcase
    end
  end

endmodule
