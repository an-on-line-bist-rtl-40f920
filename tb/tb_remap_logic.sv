// tb_remap_logic: drives random user and controller requests and CAM
// look-up results, and checks the arbitration (user first), the spare
// address N + line on a hit, the direct address on a miss, the written mark
// and the Repaired / Faulty_data decode.
module tb_remap_logic;
  localparam int N = 1024, M = 8, K = 16;
  localparam int NAW = $clog2(N), PAW = $clog2(N + K), IW = $clog2(K);
  logic u_req, u_we, cam_u_hit, cam_u_perm, cam_u_written, c_req, c_we;
  logic [NAW-1:0] u_addr;
  logic [M-1:0] u_wdata, c_wdata, ram_wdata;
  logic [PAW-1:0] cam_u_addr, c_addr, ram_addr;
  logic [IW-1:0] cam_u_idx, cam_written_idx;
  logic cam_mark_written, user_busy, ram_en, ram_we, u_repaired, u_faulty;
  remap_logic #(.N(N), .M(M), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int ea;
      u_req = 1'($urandom); u_we = 1'($urandom); u_addr = NAW'($urandom); u_wdata = M'($urandom);
      cam_u_hit = 1'($urandom); cam_u_perm = 1'($urandom); cam_u_written = 1'($urandom);
      cam_u_idx = IW'($urandom);
      c_req = 1'($urandom); c_we = 1'($urandom); c_addr = PAW'($urandom % (N + K)); c_wdata = M'($urandom);
      #1;
      check(int'(cam_u_addr) == int'(u_addr), "look-up address");
      check(user_busy == u_req, "user_busy");
      ea = cam_u_hit ? N + int'(cam_u_idx) : int'(u_addr);
      if (u_req) begin
        check(ram_en && ram_we == u_we && int'(ram_addr) == ea && ram_wdata == u_wdata,
              $sformatf("user access to %0d, got %0d", ea, ram_addr));
      end else begin
        check(ram_en == c_req, "controller enable");
        if (c_req) check(ram_we == c_we && ram_addr == c_addr && ram_wdata == c_wdata, "controller access");
      end
      check(cam_mark_written == (u_req && u_we && cam_u_hit), "written mark");
      if (cam_mark_written) check(cam_written_idx == cam_u_idx, "written line");
      check(u_repaired == (cam_u_hit && cam_u_perm), "repaired");
      check(u_faulty == (cam_u_hit && cam_u_perm && !cam_u_written), "faulty_data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
