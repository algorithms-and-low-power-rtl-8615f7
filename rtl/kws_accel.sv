// kws_accel: CNN accelerator for keyword spotting.
//
// The host loads weights (80 kB weight memory), biases and up to 12 layer
// descriptors (configuration buffer) once; it then writes a frame of speech
// features into the 2 kB feature buffer, starts the run, and the top-level
// controller processes the layers one after another on the 8x8 PE array.
// Layer outputs pass through ReLU/Scale and are written, in sign-magnitude,
// into one of three 16 kB activation banks; the next layer reads them from
// there. When the last layer ends, done is set and the host reads the scores
// from the activation memory. One clock domain, one reset (active low,
// asynchronous). The block set and sizes follow the document's system
// diagram; the host port, memory port arbitration (controller owns the
// memories while busy, the feature buffer has its own write port) and the
// layer descriptor are this design's choices.
module kws_accel
  import kws_pkg::*;
#(
  parameter int unsigned WMEM_DEPTH = WMEM_BYTES,  // weight memory, bytes
  parameter int unsigned AMEM_DEPTH = AMEM_WORDS,  // per activation bank, 16-bit words
  parameter int unsigned FBUF_DEPTH = FBUF_WORDS,  // feature buffer, 16-bit words
  parameter int unsigned CBUF_DEPTH = CBUF_WORDS,  // configuration buffer, 16-bit words
  parameter int unsigned FIFO_DEPTH = 4            // PE FIFOs
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_we,
  input  logic        h_re,
  input  logic [19:0] h_addr,
  input  logic [15:0] h_wdata,
  output logic [15:0] h_rdata,
  output logic        h_rvalid,
  output logic        h_err,
  output logic        busy,
  output logic        done,
  output logic [31:0] n_blocks,   // channel blocks processed (monitoring)
  output logic [31:0] n_psum      // partial sums re-read (monitoring)
);
  // ------------------------------------------------------------ host port
  logic        start;
  logic [3:0]  n_layers;
  logic        m_we, m_re;
  logic [2:0]  m_region;
  logic [16:0] m_addr;
  logic [15:0] m_wdata;
  logic [15:0] m_rdata [6];

  host_ifc u_host (
    .clk, .rst_n, .h_we, .h_re, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .h_err,
    .busy, .done, .start, .n_layers,
    .m_we, .m_re, .m_region, .m_addr, .m_wdata, .m_rdata);

  // ------------------------------------------------------------ controller
  layer_cfg_t lcfg;
  logic        cb_re;  logic [8:0]  cb_addr;  logic [15:0] cb_rdata;
  logic        wm_re;  logic [16:0] wm_addr;  logic [7:0]  wm_rdata;
  logic        src_re; logic [12:0] src_addr; act_t src_rdata;
  logic        dst_re, dst_we, dst_final; logic [12:0] dst_addr;
  act_t        dst_wdata, dst_rdata, act_out;
  logic        pc_we;  logic [5:0] pc_addr; pe_cfg_t pc_data;
  logic        w_en, w_rdy;   logic [5:0] w_tag; wgt_t w_data;
  logic        ia_en, ia_rdy; logic [ID_W-1:0] ia_tag; act_t ia_data;
  logic        bp_en, bp_rdy; logic [ID_W-1:0] bp_tag; act_t bp_data;
  logic [ID_W-1:0] oa_tag; logic oa_valid, oa_pop; act_t oa_data;
  logic [N_PE-1:0] pe_busy;

  top_ctrl u_ctrl (
    .clk, .rst_n, .start, .n_layers, .busy, .done, .lcfg,
    .cb_re, .cb_addr, .cb_rdata, .wm_re, .wm_addr, .wm_rdata,
    .src_re, .src_addr, .src_rdata,
    .dst_re, .dst_we, .dst_addr, .dst_wdata, .dst_final, .dst_rdata,
    .pc_we, .pc_addr, .pc_data,
    .w_en, .w_tag, .w_data, .w_rdy, .ia_en, .ia_tag, .ia_data, .ia_rdy,
    .bp_en, .bp_tag, .bp_data, .bp_rdy, .oa_tag, .oa_valid, .oa_data, .oa_pop,
    .n_blocks, .n_psum);

  pe_array #(.FIFO_DEPTH(FIFO_DEPTH)) u_array (
    .clk, .rst_n, .cfg_we(pc_we), .cfg_addr(pc_addr), .cfg_data(pc_data),
    .w_en, .w_tag, .w_data, .w_rdy, .ia_en, .ia_tag, .ia_data, .ia_rdy,
    .bp_en, .bp_tag, .bp_data, .bp_rdy, .oa_tag, .oa_valid, .oa_data, .oa_pop,
    .pe_busy);

  // ReLU / Scale on the final tap of a layer; raw partial sums otherwise
  act_unit u_act (.din(dst_wdata), .relu(lcfg.relu), .scale(lcfg.scale), .dout(act_out));

  // ------------------------------------------------------------ memories
  logic [15:0] wm_rdata16;
  spram #(.WIDTH(8), .DEPTH(WMEM_DEPTH)) u_wmem (
    .clk,
    .we(!busy && m_we && m_region == 3'd0),
    .re(busy ? wm_re : (m_re && m_region == 3'd0)),
    .addr(busy ? $clog2(WMEM_DEPTH)'(wm_addr) : $clog2(WMEM_DEPTH)'(m_addr)),
    .wdata(m_wdata[7:0]), .rdata(wm_rdata));
  assign wm_rdata16 = {8'h00, wm_rdata};

  spram #(.WIDTH(16), .DEPTH(CBUF_DEPTH)) u_cbuf (
    .clk,
    .we(!busy && m_we && m_region == 3'd1),
    .re(busy ? cb_re : (m_re && m_region == 3'd1)),
    .addr(busy ? $clog2(CBUF_DEPTH)'(cb_addr) : $clog2(CBUF_DEPTH)'(m_addr)),
    .wdata(m_wdata), .rdata(cb_rdata));

  act_t fb_rdata;
  sdpram #(.WIDTH(16), .DEPTH(FBUF_DEPTH)) u_fbuf (
    .clk,
    .we(m_we && m_region == 3'd2), .waddr($clog2(FBUF_DEPTH)'(m_addr)), .wdata(m_wdata),
    .re(busy ? (src_re && lcfg.src == SRC_FEAT) : (m_re && m_region == 3'd2)),
    .raddr(busy ? $clog2(FBUF_DEPTH)'(src_addr) : $clog2(FBUF_DEPTH)'(m_addr)),
    .rdata(fb_rdata));

  act_t bk_rdata [3];
  for (genvar b = 0; b < 3; b++) begin : g_bank
    logic is_src, is_dst;
    assign is_src = (lcfg.src != SRC_FEAT) && (2'(lcfg.src) == 2'(b));
    assign is_dst = (lcfg.dst == 2'(b));
    spram #(.WIDTH(16), .DEPTH(AMEM_DEPTH)) u_bank (
      .clk,
      .we(busy ? (dst_we && is_dst) : (m_we && m_region == 3'(3 + b))),
      .re(busy ? ((src_re && is_src) || (dst_re && is_dst)) : (m_re && m_region == 3'(3 + b))),
      .addr(busy ? (is_dst ? $clog2(AMEM_DEPTH)'(dst_addr) : $clog2(AMEM_DEPTH)'(src_addr))
                 : $clog2(AMEM_DEPTH)'(m_addr)),
      .wdata(busy ? (dst_final ? act_out : dst_wdata) : m_wdata),
      .rdata(bk_rdata[b]));
  end

  always_comb begin
    unique case (lcfg.src)
      SRC_BANK0: src_rdata = bk_rdata[0];
      SRC_BANK1: src_rdata = bk_rdata[1];
      SRC_BANK2: src_rdata = bk_rdata[2];
      default:   src_rdata = fb_rdata;
    endcase
    unique case (lcfg.dst)
      2'd1:    dst_rdata = bk_rdata[1];
      2'd2:    dst_rdata = bk_rdata[2];
      default: dst_rdata = bk_rdata[0];
    endcase
  end

  assign m_rdata[0] = wm_rdata16;
  assign m_rdata[1] = cb_rdata;
  assign m_rdata[2] = fb_rdata;
  assign m_rdata[3] = bk_rdata[0];
  assign m_rdata[4] = bk_rdata[1];
  assign m_rdata[5] = bk_rdata[2];

  a_pe_idle_when_done: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(done) |-> !oa_valid);
endmodule
