// neighbor_addr: address of neighbour n_j of the cell under test c_x.
//
// The array is organised by columns: vertically adjacent cells of a column
// have consecutive addresses, so address = col*ROWS + row. The eight
// neighbours are numbered clockwise from the upper-left corner:
//
//     n0 n1 n2
//     n7 cx n3
//     n6 n5 n4
//
// giving address(cx) +/- 1 for n1/n5, +/- ROWS for n3/n7 and +/- ROWS +/- 1
// for the corners. The array is treated as a torus: the first and last
// rows are adjacent, and so are the first and last columns. c_x is given as
// (row, col), which the controller keeps as counters, so no division is
// needed. Purely combinational. The numbering, the column organisation and
// the torus follow the source design; the (row, col) interface is this
// implementation's.
module neighbor_addr #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned AW  = ((ROWS * COLS) > 1) ? $clog2(ROWS * COLS) : 1
) (
  input  logic [RW-1:0] row,
  input  logic [CW-1:0] col,
  input  logic [2:0]    j,
  output logic [AW-1:0] n_addr
);

  localparam logic [RW-1:0] LAST_ROW = RW'(ROWS - 1);
  localparam logic [CW-1:0] LAST_COL = CW'(COLS - 1);

  logic [RW-1:0] row_up, row_dn;
  logic [CW-1:0] col_lf, col_rt;
  logic [RW-1:0] n_row;
  logic [CW-1:0] n_col;

  // Toroidal wrap-around.
  assign row_up = (row == '0)       ? LAST_ROW : row - 1'b1;
  assign row_dn = (row == LAST_ROW) ? '0       : row + 1'b1;
  assign col_lf = (col == '0)       ? LAST_COL : col - 1'b1;
  assign col_rt = (col == LAST_COL) ? '0       : col + 1'b1;

  always_comb begin
    unique case (j)
      3'd0: begin n_row = row_up; n_col = col_lf; end
      3'd1: begin n_row = row_up; n_col = col;    end
      3'd2: begin n_row = row_up; n_col = col_rt; end
      3'd3: begin n_row = row;    n_col = col_rt; end
      3'd4: begin n_row = row_dn; n_col = col_rt; end
      3'd5: begin n_row = row_dn; n_col = col;    end
      3'd6: begin n_row = row_dn; n_col = col_lf; end
      default: begin n_row = row; n_col = col_lf; end
    endcase
  end

  assign n_addr = AW'(32'(n_col) * ROWS + 32'(n_row));

endmodule
