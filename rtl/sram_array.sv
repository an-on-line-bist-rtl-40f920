// sram_array: single-port synchronous RAM of WORDS words of WIDTH bits.
//
// Stands for the embedded SRAM macro around which the BISTAR logic is built.
// The physical array holds the N user words followed by the K spare words.
// A write (en & we) stores wdata at the rising clock edge. A read (en & !we)
// loads the addressed word into the output register at the rising edge, so
// rdata is valid in the cycle after the read; rdata holds its value on
// write and idle cycles. The array has no reset, as an SRAM has none; the
// output register resets to zero. Being one port, one access per cycle, is
// what makes the controller yield to the user. The N + K organisation follows
// the source design; the port timing and reset are this implementation's.
module sram_array #(
  parameter int unsigned WORDS = 1040,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && we && (32'(addr) < WORDS)) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               rdata <= '0;
    else if (en && !we)       rdata <= (32'(addr) < WORDS) ? mem[addr] : '0;
  end

endmodule
