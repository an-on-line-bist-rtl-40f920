// tb_remap_cam: random allocate / release / make-permanent / mark-written
// commands against a reference model of the K lines; after each command
// checks both look-up ports for random and stored addresses, and the free
// line outputs (lowest free line, at least two free).
module tb_remap_cam;
  localparam int K = 16, AW = 11, IW = $clog2(K);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [AW-1:0] u_addr, b_addr, alloc_addr;
  logic u_hit, u_perm, u_written, b_hit, free_two;
  logic [IW-1:0] u_idx, free_idx, alloc_idx, release_idx, perm_idx, written_idx;
  logic alloc, release_line, make_perm, mark_written;
  remap_cam #(.K(K), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  bit v [K], p [K], w [K];
  int a [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic probe(input int x);
    int ei; bit eh;
    eh = 0; ei = 0;
    for (int i = K - 1; i >= 0; i--) if (v[i] && a[i] == x) begin eh = 1; ei = i; end
    u_addr = AW'(x); b_addr = AW'(x);
    #1;
    check(u_hit == eh && b_hit == eh, $sformatf("hit for %0d", x));
    if (eh) check(int'(u_idx) == ei && u_perm == p[ei] && u_written == w[ei],
                  $sformatf("line data for %0d", x));
  endtask

  initial begin
    alloc = 0; release_line = 0; make_perm = 0; mark_written = 0;
    alloc_idx = '0; release_idx = '0; perm_idx = '0; written_idx = '0; alloc_addr = '0;
    u_addr = '0; b_addr = '0;
    for (int i = 0; i < K; i++) begin v[i] = 0; p[i] = 0; w[i] = 0; a[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int nf, lf, x;
      // free line outputs
      @(negedge clk);
      nf = 0; lf = 0;
      for (int i = K - 1; i >= 0; i--) if (!v[i]) begin nf++; lf = i; end
      #1;
      check(free_two == (nf >= 2), "free_two");
      if (nf > 0) check(int'(free_idx) == lf, "free_idx");
      // one command
      case ($urandom % 4)
        0: if (nf > 0) begin
             // allocate an address not yet stored
             do x = $urandom % 1040; while (stored(x));
             alloc = 1; alloc_idx = IW'(lf); alloc_addr = AW'(x);
             v[lf] = 1; p[lf] = 0; w[lf] = 0; a[lf] = x;
           end
        1: begin
             int i; i = $urandom % K;
             release_line = 1; release_idx = IW'(i); v[i] = 0; p[i] = 0;
           end
        2: begin
             int i; i = $urandom % K;
             make_perm = 1; perm_idx = IW'(i); p[i] = 1;
           end
        default: begin
             int i; i = $urandom % K;
             mark_written = 1; written_idx = IW'(i); w[i] = 1;
           end
      endcase
      @(posedge clk);
      #1;
      alloc = 0; release_line = 0; make_perm = 0; mark_written = 0;
      probe($urandom % 1040);
      for (int i = 0; i < K; i++) if (v[i]) probe(a[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit stored(input int x);
    for (int i = 0; i < K; i++) if (v[i] && a[i] == x) return 1;
    return 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
