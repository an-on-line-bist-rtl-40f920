// tb_neighbor_addr: for every cell of a 32 x 32 array and every j, compares
// the neighbour address with one computed from (row, col) with modulo
// arithmetic, using the clockwise numbering n0 = upper-left .. n7 = left.
module tb_neighbor_addr;
  localparam int ROWS = 32, COLS = 32;
  localparam int RW = $clog2(ROWS), CW = $clog2(COLS), AW = $clog2(ROWS * COLS);
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [2:0] j;
  logic [AW-1:0] n_addr;
  neighbor_addr #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  int dr [8] = '{-1, -1, -1, 0, 1, 1, 1, 0};
  int dc [8] = '{-1, 0, 1, 1, 1, 0, -1, -1};

  initial begin
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        for (int jj = 0; jj < 8; jj++) begin
          int er, ec;
          row = RW'(r); col = CW'(c); j = 3'(jj);
          #1;
          er = (r + dr[jj] + ROWS) % ROWS;
          ec = (c + dc[jj] + COLS) % COLS;
          checks++;
          if (int'(n_addr) != ec * ROWS + er) begin
            failures++;
            if (failures < 10) $display("FAIL r=%0d c=%0d j=%0d got %0d", r, c, jj, n_addr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
