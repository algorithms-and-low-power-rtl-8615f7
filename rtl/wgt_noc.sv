// wgt_noc: weight delivery network, two levels of unicast controllers.
//
// As in the document's weight network, the 64 PEs sit in 8 rows with a fixed
// row ID, and each PE's controller has a fixed column ID. The sender drives
// [data, column tag] with a row tag on the vertical bus; the row controller
// whose ID matches passes [data] and the column tag to its horizontal bus;
// there the column controller whose ID matches pushes the data into its PE's
// weight FIFO. PE number p has row ID p/8 and column ID p%8 (the array is
// placed as a snake, so odd rows run right to left, but the IDs follow the PE
// number). rdy is high when the addressed PE can take a word.
module wgt_noc #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8,
  parameter int unsigned DW   = 8
) (
  input  logic                    en,
  input  logic [$clog2(ROWS)-1:0] rtag,
  input  logic [$clog2(COLS)-1:0] ctag,
  input  logic [DW-1:0]           data,
  output logic                    rdy,
  input  logic [ROWS*COLS-1:0]    pe_rdy,
  output logic [ROWS*COLS-1:0]    pe_push,
  output logic [DW-1:0]           pe_data [ROWS*COLS]
);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned CW = $clog2(COLS);

  logic [ROWS-1:0] row_rdy;
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic            row_en;
    logic [DW-1:0]   row_data;
    logic [COLS-1:0] col_rdy;
    mc_ctrl #(.TAG_W(RW), .DW(DW)) u_row (
      .id(RW'(r)), .id_valid(1'b1), .tag(rtag), .en_in(en && rdy),
      .data_in(data), .rdy_in(&col_rdy),
      .en_out(row_en), .data_out(row_data), .rdy_out(row_rdy[r]));
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mc_ctrl #(.TAG_W(CW), .DW(DW)) u_col (
        .id(CW'(c)), .id_valid(1'b1), .tag(ctag), .en_in(row_en),
        .data_in(row_data), .rdy_in(pe_rdy[r*COLS+c]),
        .en_out(pe_push[r*COLS+c]), .data_out(pe_data[r*COLS+c]),
        .rdy_out(col_rdy[c]));
    end
  end
  assign rdy = &row_rdy;
endmodule
