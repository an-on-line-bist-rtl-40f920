// tb_bistar_controller: checks the on-line test sequencer on its own.
//
// The testbench models the single-port RAM (one-cycle read latency) and the
// re-mapping CAM itself. With an 8 x 8 array of 8-bit words and 4 spares it
//   - records the accesses of the first pair and compares them with the
//     14-access sequence written out here from the algorithm,
//   - checks that every cell gets exactly 8 x 14 = 112 test accesses and
//     that each pair uses the expected toroidal neighbour and background,
//   - checks the cycle count per cell with an idle user (193 cycles:
//     3 to isolate c_x, 8 pairs of 23, 1 to end, 3 to restore, 2 to step),
//   - checks that a pass leaves the memory content unchanged,
//   - holds the test off with user_busy and checks no access is granted,
//   - injects a stuck-at bit and checks the cell is made a permanent repair.
module tb_bistar_controller;
  import bistar_pkg::*;

  localparam int N = 64, M = 8, K = 4, ROWS = 8, COLS = N / ROWS;
  localparam int NAW = $clog2(N), PAW = $clog2(N + K), IW = $clog2(K);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic mode_bistar, user_busy, user_we;
  logic [NAW-1:0] user_addr;
  logic [M-1:0] user_wdata;
  logic m_req, m_we;
  logic [PAW-1:0] m_addr;
  logic [M-1:0] m_wdata, m_rdata;
  bist_phase_e m_phase;
  logic [PAW-1:0] cam_addr, cam_alloc_addr;
  logic cam_hit, cam_free_two, cam_alloc, cam_release, cam_make_perm;
  logic [IW-1:0] cam_free_idx, cam_alloc_idx, cam_release_idx, cam_perm_idx;
  logic stop_repairing, testing, ev_cell_done, ev_pass_done, ev_fail, ev_transient, ev_repair, ev_abort;

  bistar_controller #(.N(N), .M(M), .K(K), .ROWS(ROWS)) dut (.*);

  // memory and CAM models
  logic [M-1:0] mem [N + K];
  logic [M-1:0] orig [N];
  bit           cv [K], cp [K];
  int           ca [K];
  int           stuck_cellll = -1;

  wire grant = m_req && !user_busy;

  always_comb begin
    cam_hit = 1'b0; cam_free_two = 1'b0; cam_free_idx = '0;
    begin
      int nf; nf = 0;
      for (int i = K - 1; i >= 0; i--) begin
        if (cv[i] && ca[i] == int'(cam_addr)) cam_hit = 1'b1;
        if (!cv[i]) begin cam_free_idx = IW'(i); nf++; end
      end
      cam_free_two = (nf >= 2);
    end
  end

  always @(posedge clk) begin
    if (grant) begin
      if (m_we) mem[m_addr] <= m_wdata;
      else begin
        m_rdata <= mem[m_addr];
        if (int'(m_addr) == stuck_cellll) m_rdata <= mem[m_addr] | 8'h04;
      end
    end
    if (cam_alloc)     begin cv[cam_alloc_idx] <= 1; cp[cam_alloc_idx] <= 0; ca[cam_alloc_idx] <= int'(cam_alloc_addr); end
    if (cam_release)   begin cv[cam_release_idx] <= 0; cp[cam_release_idx] <= 0; end
    if (cam_make_perm) cp[cam_perm_idx] <= 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expected pair sequence: {cell(0=cx,1=nj), write, complement}
  int exp_seq [14][3] = '{'{0,1,0}, '{1,1,0}, '{0,0,0}, '{1,1,1}, '{0,0,0}, '{1,1,0}, '{0,0,0},
                          '{0,1,1}, '{1,1,0}, '{0,0,1}, '{1,1,1}, '{0,0,1}, '{1,1,0}, '{0,0,1}};

  function automatic int neigh(input int cx, input int j);
    int r, c, dr, dc;
    r = cx % ROWS; c = cx / ROWS;
    case (j)
      0: begin dr = -1; dc = -1; end
      1: begin dr = -1; dc =  0; end
      2: begin dr = -1; dc =  1; end
      3: begin dr =  0; dc =  1; end
      4: begin dr =  1; dc =  1; end
      5: begin dr =  1; dc =  0; end
      6: begin dr =  1; dc = -1; end
      default: begin dr = 0; dc = -1; end
    endcase
    r = (r + dr + ROWS) % ROWS; c = (c + dc + COLS) % COLS;
    return c * ROWS + r;
  endfunction

  // monitor of test accesses
  int ntest = 0, cell_tests = 0, cell_start = 0, cyc = 0, last_done = 0;
  int cur_cell = 0;
  bit in_pass = 1'b0;
  int n_bad_seq = 0, n_grant_busy = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (user_busy && grant) n_grant_busy++;
    if (in_pass && grant && m_phase == PH_TEST) begin
      int k, pr, j, d, exp_addr, exp_data;
      k  = cell_tests % 14;
      pr = cell_tests / 14;
      j  = pr % 8;
      d  = 1 << (pr % M);
      exp_addr = (exp_seq[k][0] != 0) ? neigh(cur_cell, j) : cur_cell;
      exp_data = (exp_seq[k][2] != 0) ? (~d & 32'hff) : d;
      if (int'(m_addr) != exp_addr || int'(m_we) != exp_seq[k][1] ||
          (m_we && int'(m_wdata) != exp_data)) begin
        n_bad_seq++;
        if (n_bad_seq < 5)
          $display("seq mismatch cell %0d pair %0d op %0d: addr %0d/%0d we %0b data %h/%h",
                   cur_cell, pr, k, m_addr, exp_addr, m_we, m_wdata, exp_data);
      end
      cell_tests++;
      ntest++;
    end
  end

  initial begin
    mode_bistar = 1'b0; user_busy = 0; user_we = 0; user_addr = '0; user_wdata = '0;
    for (int i = 0; i < K; i++) begin cv[i] = 0; cp[i] = 0; ca[i] = 0; end
    for (int a = 0; a < N + K; a++) mem[a] = M'($urandom);
    for (int a = 0; a < N; a++) orig[a] = mem[a];
    m_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // SR_only: nothing happens
    repeat (50) @(negedge clk);
    check(!m_req && !testing, "controller active in SR_only");
    // BISTAR, one full pass with an idle user
    mode_bistar = 1'b1;
    in_pass = 1'b1;
    for (int cell_i = 0; cell_i < N; cell_i++) begin
      int start;
      cur_cell = cell_i; cell_tests = 0; start = cyc;
      @(posedge clk iff ev_cell_done);
      @(negedge clk);
      check(cell_tests == 112, $sformatf("cell %0d: %0d test accesses", cell_i, cell_tests));
      if (cell_i > 0) check(cyc - start == 193, $sformatf("cell %0d took %0d cycles", cell_i, cyc - start));
    end
    in_pass = 1'b0;
    check(n_bad_seq == 0, $sformatf("%0d accesses out of sequence", n_bad_seq));
    for (int a = 0; a < N; a++) check(mem[a] == orig[a], $sformatf("content of %0d changed", a));
    for (int i = 0; i < K; i++) check(!cv[i], "CAM line left in use");
    // hold off with a busy user
    user_busy = 1;
    repeat (200) @(negedge clk);
    check(n_grant_busy == 0, "access granted while the user is busy");
    user_busy = 0;
    // stuck-at on cell 9 (read bit 2 as 1)
    stuck_cellll = 9;
    while (!ev_repair) begin
      @(negedge clk);
      if (cyc > 400000) break;
    end
    check(ev_repair && int'(dut.cx_addr) == 9, "stuck cell not repaired");
    repeat (200) @(negedge clk);
    begin
      int np; np = 0;
      for (int i = 0; i < K; i++) if (cv[i] && cp[i]) begin np++; check(ca[i] == 9, "wrong cell re-mapped"); end
      check(np == 1, "one permanent line expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
