// spram: single-port synchronous RAM with a one-cycle read latency, used for
// the weight memory, the three activation banks and the configuration buffer.
// The document names these memories and their sizes but not their ports; a
// single read/write port per memory is this design's choice. A write and a
// read cannot share a cycle; rdata holds the word read on the previous cycle
// that had re set.
module spram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we && 32'(addr) < DEPTH) mem[addr] <= wdata;
    if (re) rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end
endmodule
