// host_ifc: the host port of the accelerator.
//
// The host loads weights, biases and layer descriptors once at start-up,
// streams speech features into the feature buffer, starts a run and reads the
// classification results from the activation memory, as the document
// describes. The port itself is this design's choice: a word-wide bus with a
// 20-bit address whose bits [19:17] select a region,
//   0  weight memory, byte address [16:0] (data bits [7:0])
//   1  configuration buffer, word address [8:0]
//   2  feature buffer, word address [9:0] (writable while the array runs)
//   3..5  activation bank 0..2, word address [12:0]
//   7  control: word 0 write = {start in bit 15, layer count in bits 3:0};
//      word 0 read = {busy, done, 10'b0, layer count}
// Reads return h_rdata with h_rvalid one cycle after h_re. While the array is
// busy only the feature buffer and the control word are accessible; other
// accesses are dropped (h_err pulses).
module host_ifc (
  input  logic        clk,
  input  logic        rst_n,
  // host side
  input  logic        h_we,
  input  logic        h_re,
  input  logic [19:0] h_addr,
  input  logic [15:0] h_wdata,
  output logic [15:0] h_rdata,
  output logic        h_rvalid,
  output logic        h_err,
  // accelerator side
  input  logic        busy,
  input  logic        done,
  output logic        start,
  output logic [3:0]  n_layers,
  output logic        m_we,        // memory write (regions 0..5)
  output logic        m_re,        // memory read  (regions 0..5)
  output logic [2:0]  m_region,
  output logic [16:0] m_addr,
  output logic [15:0] m_wdata,
  input  logic [15:0] m_rdata [6]  // read data of regions 0..5
);
  logic [2:0] rd_region;
  logic       rd_ctrl;
  logic       allowed;

  always_comb begin
    m_region = h_addr[19:17];
    m_addr   = h_addr[16:0];
    m_wdata  = h_wdata;
    allowed  = (m_region <= 3'd5) && (!busy || m_region == 3'd2);
    m_we     = h_we && allowed;
    m_re     = h_re && allowed;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      n_layers  <= 4'd1;
      h_rvalid  <= 1'b0;
      h_err     <= 1'b0;
      rd_region <= '0;
      rd_ctrl   <= 1'b0;
    end else begin
      start    <= 1'b0;
      h_err    <= (h_we || h_re) && m_region <= 3'd5 && !allowed;
      h_rvalid <= h_re;
      if (h_re) begin
        rd_region <= m_region;
        rd_ctrl   <= (m_region == 3'd7);
      end
      if (h_we && m_region == 3'd7 && h_addr[3:0] == 4'd0) begin
        n_layers <= h_wdata[3:0];
        start    <= h_wdata[15] && !busy;
      end
    end
  end

  always_comb begin
    if (rd_ctrl)              h_rdata = {busy, done, 10'b0, n_layers};
    else if (rd_region <= 3'd5) h_rdata = m_rdata[rd_region];
    else                      h_rdata = '0;
  end
endmodule
