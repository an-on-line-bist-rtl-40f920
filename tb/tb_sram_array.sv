// tb_sram_array: random reads and writes against a reference array; checks
// the one-cycle read latency and that rdata holds on write and idle cycles.
module tb_sram_array;
  localparam int WORDS = 1040, WIDTH = 8, AW = $clog2(WORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  sram_array #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] refm [WORDS];
  logic [WIDTH-1:0] last;

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      en = 1; we = 1; addr = AW'(a); wdata = WIDTH'($urandom); refm[a] = wdata;
      @(negedge clk);
    end
    en = 0; we = 0;
    last = rdata;
    for (int i = 0; i < 20000; i++) begin
      int a;
      a = $urandom % WORDS;
      case ($urandom % 3)
        0: begin
          en = 1; we = 0; addr = AW'(a);
          @(negedge clk);
          checks++;
          if (rdata !== refm[a]) begin failures++; $display("FAIL read %0d", a); end
          last = rdata;
        end
        1: begin
          en = 1; we = 1; addr = AW'(a); wdata = WIDTH'($urandom); refm[a] = wdata;
          @(negedge clk);
          checks++;
          if (rdata !== last) begin failures++; $display("FAIL rdata changed on write"); end
        end
        default: begin
          en = 0; we = 0; addr = AW'(a);
          @(negedge clk);
          checks++;
          if (rdata !== last) begin failures++; $display("FAIL rdata changed when idle"); end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
