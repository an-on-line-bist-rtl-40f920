// tb_bistar_ram_full: the BISTAR RAM at its default size (1024 words of
// 8 bits in a 32 x 32 layout, 16 spares), taken through one complete on-line
// test pass of the whole array under random user traffic.
//
// Faults are injected through the fault-injection port: stuck-at (cell 100),
// idempotent coupling (victim 200, aggressor 232 = its right-hand
// neighbour), address fault (address 500 reaches cell 501) and a transient
// stuck-at on cell 400 that is removed after its first detection. After the
// pass, cells 100, 200 and 500 must be permanently re-mapped with one
// transient seen; Faulty_data and Repaired are checked, a MATS+ march runs
// through the user port, and the array is diagnosed in SR_only mode.
module tb_bistar_ram_full;
  import bistar_pkg::*;

  localparam int N    = 1024;
  localparam int M    = 8;
  localparam int K    = 16;
  localparam int ROWS = 32;
  localparam int NF   = 4;
  localparam int NAW  = $clog2(N);
  localparam int A_STUCK = 100;
  localparam int A_CF    = 200;
  localparam int A_TRANS = 400;
  localparam int A_MAP   = 500;
  localparam int WATCHDOG = 3_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            mode_bistar, req, we;
  logic [NAW-1:0]  addr;
  logic [M-1:0]    wdata, rdata;
  logic            faulty_data, repaired, stop_repairing, testing, bist_grant;
  logic            ev_cell_done, ev_pass_done, ev_fail, ev_transient, ev_repair, ev_abort;
  bist_phase_e     bist_phase;
  fault_t          f0, f1, f2, f3;
  fault_t [NF-1:0] faults;
  assign faults = {f3, f2, f1, f0};

  bistar_ram dut (.*);

  int checks = 0, failures = 0;
  logic [M-1:0] refm [N];
  bit           excl [N];
  int unsigned  act_pct = 40;

  // mechanism counters
  int n_suspend = 0, n_hit_test = 0, n_snoop = 0, n_fail = 0, n_trans = 0;
  int n_repair = 0, n_abort = 0, n_pass = 0, n_cells = 0, n_faulty = 0, n_grant = 0;
  bit trans_arm = 1'b0, trans_done = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (req && dut.c_req)                        n_suspend++;
    if (req && dut.cam_u_hit && !dut.cam_u_perm) n_hit_test++;
    if (dut.u_ctrl.snoop && (bist_phase == PH_ISOLATE || bist_phase == PH_RESTORE)) n_snoop++;
    if (ev_fail)      n_fail++;
    if (ev_transient) n_trans++;
    if (ev_repair)    n_repair++;
    if (ev_abort)     n_abort++;
    if (ev_pass_done) n_pass++;
    if (ev_cell_done) n_cells++;
    if (bist_grant)   n_grant++;
    // transient fault: present only during the first test of A_TRANS
    if (trans_arm && !trans_done) begin
      if (f2.kind == FLT_NONE && 32'(dut.u_ctrl.cx_addr) == A_TRANS && bist_phase == PH_TEST)
        f2 <= '{kind: FLT_STUCK, victim: 16'(A_TRANS), bit_idx: 6'd5, value: 1'b1,
                agg: '0, agg_bit: '0, agg_val: 1'b0};
      else if (f2.kind != FLT_NONE && ev_fail) begin
        f2         <= '0;
        trans_done <= 1'b1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One user access: request for one cycle, results sampled a cycle later.
  task automatic access(input bit w, input int a, input logic [M-1:0] d,
                        output logic [M-1:0] q, output bit fd, output bit rp);
    req   = 1'b1;
    we    = w;
    addr  = NAW'(a);
    wdata = d;
    @(negedge clk);
    req = 1'b0;
    we  = 1'b0;
    q   = rdata;
    fd  = faulty_data;
    rp  = repaired;
  endtask

  task automatic wr(input int a, input logic [M-1:0] d);
    logic [M-1:0] q; bit fd, rp;
    access(1'b1, a, d, q, fd, rp);
    refm[a] = d;
  endtask

  task automatic rd_check(input int a);
    logic [M-1:0] q; bit fd, rp;
    access(1'b0, a, '0, q, fd, rp);
    check(q == refm[a], $sformatf("read %0d got %h expected %h", a, q, refm[a]));
  endtask

  // One cycle of random traffic over the cells that are not excluded.
  task automatic rnd_cycle();
    int a;
    if (($urandom % 100) < act_pct) begin
      do a = $urandom % N; while (excl[a]);
      if (($urandom % 2) != 0) wr(a, M'($urandom));
      else              rd_check(a);
    end else begin
      @(negedge clk);
    end
  endtask

  function automatic bit expect_repaired(input int a);
    return (a == A_STUCK) || (a == A_CF) || (a == A_MAP);
  endfunction

  initial begin
    logic [M-1:0] q; bit fd, rp;
    int g0, nrep;
    mode_bistar = 1'b1;
    req = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    f0 = '0; f1 = '0; f2 = '0; f3 = '0;
    for (int a = 0; a < N; a++) excl[a] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // fill the memory
    for (int a = 0; a < N; a++) wr(a, M'($urandom));

    // permanent faults (physical address = user address for user cells)
    f0 = '{kind: FLT_STUCK, victim: 16'(A_STUCK), bit_idx: 6'd3, value: 1'b1,
           agg: '0, agg_bit: '0, agg_val: 1'b0};
    f1 = '{kind: FLT_CF_ID, victim: 16'(A_CF), bit_idx: 6'd0, value: 1'b1,
           agg: 16'(A_CF + ROWS), agg_bit: 6'd0, agg_val: 1'b1};
    f3 = '{kind: FLT_ADDR_MAP, victim: 16'(A_MAP), bit_idx: '0, value: 1'b0,
           agg: 16'(A_MAP + 1), agg_bit: '0, agg_val: 1'b0};
    excl[A_STUCK] = 1'b1; excl[A_CF] = 1'b1; excl[A_MAP] = 1'b1; excl[A_MAP + 1] = 1'b1;
    // user writes to the aggressor would trigger the coupling at random
    // times and could show up as extra transients
    excl[A_CF + ROWS] = 1'b1;
    trans_arm = 1'b1;

    // one full pass of the on-line test under random traffic
    while (n_pass < 1) rnd_cycle();
    // finish the pass the faults were injected in, if it began before
    if (n_repair < 3) while (n_pass < 2) rnd_cycle();
    check(n_repair == 3, $sformatf("permanent repairs %0d, expected 3", n_repair));
    check(n_trans == 1, $sformatf("transients %0d, expected 1", n_trans));

    // repaired cells: spare not yet written by the user -> Faulty_data
    for (int a = 0; a < N; a++) if (expect_repaired(a)) begin
      access(1'b0, a, '0, q, fd, rp);
      check(rp && fd, $sformatf("cell %0d: repaired=%0b faulty_data=%0b", a, rp, fd));
      if (fd) n_faulty++;
      wr(a, M'($urandom));
      access(1'b0, a, '0, q, fd, rp);
      check(rp && !fd && q == refm[a], $sformatf("cell %0d after write", a));
      excl[a] = 1'b0;
    end
    wr(A_MAP + 1, M'($urandom));
    excl[A_MAP + 1] = 1'b0;
    excl[A_CF + ROWS] = 1'b0;

    // MATS+ through the user port, with idle gaps for the on-line test
    for (int a = 0; a < N; a++) begin wr(a, '0); repeat ($urandom % 3) @(negedge clk); end
    for (int a = 0; a < N; a++) begin
      rd_check(a); wr(a, '1); repeat ($urandom % 3) @(negedge clk);
    end
    for (int a = N - 1; a >= 0; a--) begin
      rd_check(a); wr(a, '0); repeat ($urandom % 3) @(negedge clk);
    end

    // SR_only: the test stops at a pair boundary, re-mapping stays
    mode_bistar = 1'b0;
    while (testing) rnd_cycle();
    g0 = n_grant;
    repeat (2000) rnd_cycle();
    check(n_grant == g0, "controller accessed the array in SR_only");
    // diagnosis: read every cell and look at Repaired
    nrep = 0;
    for (int a = 0; a < N; a++) begin
      access(1'b0, a, '0, q, fd, rp);
      check(q == refm[a], $sformatf("diagnosis read %0d", a));
      check(rp == expect_repaired(a), $sformatf("diagnosis: cell %0d repaired=%0b", a, rp));
      nrep += int'(rp);
    end
    check(nrep == 3, "diagnosis count");

    mode_bistar = 1'b1;
    repeat (2000) rnd_cycle();
    check(!stop_repairing, "stop_repairing raised with free spares");
    for (int a = 0; a < N; a++) rd_check(a);

    // every mechanism must have happened
    check(n_suspend  > 0, "test never suspended by a user access");
    check(n_hit_test > 0, "no user access to a cell under test");
    check(n_snoop    > 0, "no user write snooped during a copy");
    check(n_fail     > 0, "no failing pair");
    check(n_abort    > 0, "no SR_only abort");
    check(n_faulty   > 0, "Faulty_data never seen");
    check(n_pass     > 0, "no complete pass");
    $display("mechanisms: suspend=%0d hit_test=%0d snoop=%0d fail=%0d transient=%0d repair=%0d abort=%0d faulty=%0d pass=%0d cells=%0d",
             n_suspend, n_hit_test, n_snoop, n_fail, n_trans, n_repair, n_abort, n_faulty, n_pass, n_cells);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
