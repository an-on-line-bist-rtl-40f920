// tb_bistar_ram_wide: the BISTAR RAM with 32-bit words (256 words in a
// 16 x 16 layout, 8 spares), the word width of the largest area points.
//
// With 32 backgrounds and 8 neighbours each cell gets 32 pair tests, the
// neighbour pairs being repeated four times, so 32 x 14 = 448 test accesses
// per cell; the testbench counts them for every cell of one pass. It injects
// an intra-word inversion coupling (a rising bit 20 inverts bit 21 of the
// same word, cell 77), a stuck-at 0 on bit 31 of cell 150 and an address
// fault where the address of cell 201 also reaches cell 200, runs random
// user traffic against a reference model throughout, and expects exactly
// cells 77, 150 and 200 to end up permanently re-mapped.
module tb_bistar_ram_wide;
  import bistar_pkg::*;

  localparam int N = 256, M = 32, K = 8, ROWS = 16, NF = 4;
  localparam int NAW = $clog2(N);
  localparam int A_CFW = 77, A_SA = 150, A_MUL = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            mode_bistar, req, we;
  logic [NAW-1:0]  addr;
  logic [M-1:0]    wdata, rdata;
  logic            faulty_data, repaired, stop_repairing, testing, bist_grant;
  logic            ev_cell_done, ev_pass_done, ev_fail, ev_transient, ev_repair, ev_abort;
  bist_phase_e     bist_phase;
  fault_t [NF-1:0] faults;

  bistar_ram #(.N(N), .M(M), .K(K), .ROWS(ROWS), .NF(NF)) dut (.*);

  int checks = 0, failures = 0;
  logic [M-1:0] refm [N];
  bit           excl [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // test accesses per cell
  int tcount = 0, n_pass = 0, n_repair = 0, n_cells = 0, n_badcount = 0;
  bit counting = 1'b0;
  bit ev_repair_seen = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (bist_grant && bist_phase == PH_TEST) tcount++;
    if (ev_repair) n_repair++;
    if (ev_cell_done) begin
      // a repaired cell stops early; a cell next to a repaired one skips the
      // four pairs with that neighbour (4 x 14 accesses)
      if (counting && !ev_repair_seen &&
          tcount != (adjacent_repaired(int'(dut.u_ctrl.cx_addr)) ? 448 - 56 : 448)) begin
        n_badcount++;
        $display("cell %0d: %0d test accesses", dut.u_ctrl.cx_addr, tcount);
      end
      if (counting) n_cells++;
      tcount = 0;
      ev_repair_seen = 1'b0;
    end
    if (ev_repair) ev_repair_seen = 1'b1;
    if (ev_pass_done) begin n_pass++; counting = 1'b1; end
  end

  function automatic bit is_neighbour(input int a, input int b);
    int dr, dc;
    dr = ((a % ROWS) - (b % ROWS) + ROWS) % ROWS;
    dc = ((a / ROWS) - (b / ROWS) + N / ROWS) % (N / ROWS);
    return (a != b) && (dr <= 1 || dr == ROWS - 1) && (dc <= 1 || dc == N / ROWS - 1);
  endfunction

  // A neighbour counts once it has been made a permanent repair, which is
  // the case when it comes earlier in the pass.
  function automatic bit adjacent_repaired(input int a);
    return (faults[0].kind != FLT_NONE) &&
           ((is_neighbour(a, A_CFW) && A_CFW < a) || (is_neighbour(a, A_SA) && A_SA < a) ||
            (is_neighbour(a, A_MUL) && A_MUL < a));
  endfunction

  task automatic access(input bit w, input int a, input logic [M-1:0] d,
                        output logic [M-1:0] q, output bit rp);
    req = 1'b1; we = w; addr = NAW'(a); wdata = d;
    @(negedge clk);
    req = 1'b0; we = 1'b0;
    q = rdata; rp = repaired;
  endtask

  task automatic rnd_cycle();
    logic [M-1:0] q; bit rp; int a;
    if (($urandom % 100) < 30) begin
      do a = $urandom % N; while (excl[a]);
      if (($urandom % 2) != 0) begin
        refm[a] = M'($urandom);
        access(1'b1, a, refm[a], q, rp);
      end else begin
        access(1'b0, a, '0, q, rp);
        check(q == refm[a], $sformatf("read %0d", a));
      end
    end else @(negedge clk);
  endtask

  initial begin
    logic [M-1:0] q; bit rp;
    mode_bistar = 1'b1; req = 0; we = 0; addr = '0; wdata = '0; faults = '0;
    for (int a = 0; a < N; a++) excl[a] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N; a++) begin refm[a] = M'($urandom); access(1'b1, a, refm[a], q, rp); end
    // wait for the start of a pass, then inject and run one whole pass
    while (n_pass < 1) rnd_cycle();
    faults[0] = '{kind: FLT_CF_IN, victim: 16'(A_CFW), bit_idx: 6'd21, value: 1'b0,
                  agg: 16'(A_CFW), agg_bit: 6'd20, agg_val: 1'b1};
    faults[1] = '{kind: FLT_STUCK, victim: 16'(A_SA), bit_idx: 6'd31, value: 1'b0,
                  agg: '0, agg_bit: '0, agg_val: 1'b0};
    faults[2] = '{kind: FLT_ADDR_MULTI, victim: 16'(A_MUL), bit_idx: '0, value: 1'b0,
                  agg: 16'(A_MUL + 1), agg_bit: '0, agg_val: 1'b0};
    excl[A_CFW] = 1'b1; excl[A_SA] = 1'b1; excl[A_MUL] = 1'b1;
    while (n_pass < 2) rnd_cycle();
    check(n_cells == N, $sformatf("%0d cells in the pass", n_cells));
    check(n_badcount == 0, $sformatf("%0d cells without 448 test accesses", n_badcount));
    check(n_repair == 3, $sformatf("%0d permanent repairs, expected 3", n_repair));
    for (int a = 0; a < N; a++) begin
      access(1'b0, a, '0, q, rp);
      check(rp == (a == A_CFW || a == A_SA || a == A_MUL), $sformatf("repaired flag of %0d", a));
      if (!excl[a]) check(q == refm[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
