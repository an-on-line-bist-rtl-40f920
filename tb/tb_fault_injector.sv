// tb_fault_injector: puts the wrapper in front of a plain RAM model and
// checks each fault model on hand-worked cases: transparency with no fault,
// stuck-at, transition fault, idempotent and inversion coupling between two
// words, intra-word coupling, an unconnected cell and an address mapped onto
// another cell, and one address reaching two cells.
module tb_fault_injector;
  import bistar_pkg::*;
  localparam int WORDS = 64, WIDTH = 8, NF = 4, AW = $clog2(WORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  fault_t [NF-1:0] faults;
  logic en, we, ram_en, ram_we;
  logic [AW-1:0] addr, ram_addr;
  logic [WIDTH-1:0] wdata, rdata, ram_wdata, ram_rdata;
  fault_injector #(.WORDS(WORDS), .WIDTH(WIDTH), .NF(NF)) dut (.*);

  logic [WIDTH-1:0] mem [WORDS];
  always @(posedge clk) if (ram_en) begin
    if (ram_we) mem[ram_addr] <= ram_wdata;
    else        ram_rdata <= mem[ram_addr];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic wr(input int a, input logic [WIDTH-1:0] d);
    en = 1; we = 1; addr = AW'(a); wdata = d;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  task automatic rd(input int a, input logic [WIDTH-1:0] exp, input string what);
    en = 1; we = 0; addr = AW'(a);
    @(negedge clk);
    en = 0;
    check(rdata == exp, $sformatf("%s: read %0d got %h expected %h", what, a, rdata, exp));
  endtask

  function automatic fault_t mk(input fault_kind_e k, input int v, input int b, input bit val,
                                input int g, input int gb, input bit gv);
    return '{kind: k, victim: 16'(v), bit_idx: 6'(b), value: val, agg: 16'(g), agg_bit: 6'(gb), agg_val: gv};
  endfunction

  initial begin
    faults = '0; en = 0; we = 0; addr = '0; wdata = '0; ram_rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no fault: transparent
    for (int a = 0; a < WORDS; a++) wr(a, WIDTH'(a * 3));
    for (int a = 0; a < WORDS; a++) rd(a, WIDTH'(a * 3), "no fault");

    faults[0] = mk(FLT_STUCK, 5, 2, 1'b1, 0, 0, 1'b0);
    faults[1] = mk(FLT_TRANS, 6, 1, 1'b1, 0, 0, 1'b0);          // bit 1 cannot rise
    faults[2] = mk(FLT_CF_ID, 7, 0, 1'b1, 8, 4, 1'b1);          // 8.4 rising sets 7.0
    faults[3] = mk(FLT_CF_IN, 9, 3, 1'b0, 10, 0, 1'b0);         // 10.0 falling inverts 9.3
    @(negedge clk);
    wr(5, 8'h00); rd(5, 8'h04, "stuck-at 1");
    wr(5, 8'hff); rd(5, 8'hff, "stuck-at 1, ones");
    wr(6, 8'h00); wr(6, 8'h02); rd(6, 8'h00, "transition 0->1 blocked");
    wr(6, 8'hf0); rd(6, 8'hf0, "transition, other bits");
    wr(7, 8'h00); wr(8, 8'h00); wr(8, 8'h10); rd(7, 8'h01, "CFid triggered");
    wr(8, 8'h00); rd(7, 8'h01, "CFid, other direction no effect");
    wr(7, 8'h00); rd(7, 8'h00, "CFid cleared by write");
    wr(9, 8'h08); wr(10, 8'h01); wr(10, 8'h00); rd(9, 8'h00, "CFin first");
    wr(10, 8'h01); wr(10, 8'h00); rd(9, 8'h08, "CFin second");
    rd(10, 8'h00, "aggressor itself");

    faults = '0;
    @(negedge clk);
    faults[0] = mk(FLT_CF_ID, 11, 7, 1'b0, 11, 0, 1'b1);        // intra-word
    faults[1] = mk(FLT_ADDR_NC, 12, 0, 1'b0, 0, 0, 1'b0);
    faults[2] = mk(FLT_ADDR_MAP, 13, 0, 1'b0, 14, 0, 1'b0);
    @(negedge clk);
    wr(11, 8'h80); wr(11, 8'h81); rd(11, 8'h01, "intra-word CFid");
    wr(12, 8'h55); rd(12, 8'h00, "no access: read");
    check(mem[12] == WIDTH'(12 * 3), "no access: write lost");
    wr(13, 8'h33); rd(14, 8'h33, "address map: write lands on 14");
    check(mem[13] == WIDTH'(13 * 3), "address map: 13 untouched");
    wr(14, 8'h44); rd(13, 8'h44, "address map: read of 13 gives 14");
    rd(15, WIDTH'(15 * 3), "unrelated cell");

    faults = '0;
    @(negedge clk);
    faults[3] = mk(FLT_ADDR_MULTI, 20, 0, 1'b0, 21, 0, 1'b0);   // address 21 also reaches 20
    @(negedge clk);
    wr(20, 8'h11); wr(21, 8'h22); rd(20, 8'h22, "multi: write to 21 lands in 20");
    rd(21, 8'h22, "multi: 21 itself");
    wr(20, 8'h33); rd(20, 8'h33, "multi: own write restores 20");
    rd(21, 8'h22, "multi: 21 unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
