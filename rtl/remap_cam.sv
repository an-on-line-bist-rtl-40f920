// remap_cam: K-line content-addressable memory for cell-only re-mapping.
//
// Line i holds the address of a cell that is currently replaced by spare
// cell s_i; the line-to-spare association is fixed by the line position, so
// no spare address is stored. As in the source design the CAM is a register
// array with match/encoding logic rather than a CAM macro.
//
// Each line carries:
//   valid   - the line re-maps 'addr'
//   perm    - the cell was found permanently faulty (otherwise it is only
//             isolated for the running test)
//   written - the user has written the spare since the line was allocated
//             (drives the Faulty_data flag)
//
// Two combinational look-up ports: one for the user address, one for the
// controller. Updates from the controller (alloc, release, make_perm) and
// the user-write mark take effect at the next rising edge. Reset clears all
// lines (a volatile CAM; a non-volatile one would keep the map).
// Free-line information (lowest free line, at least two free) lets the
// controller pick spares for a test.
module remap_cam #(
  parameter int unsigned K  = 16,
  parameter int unsigned AW = 11,
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // user look-up
  input  logic [AW-1:0] u_addr,
  output logic          u_hit,
  output logic [IW-1:0] u_idx,
  output logic          u_perm,
  output logic          u_written,
  // controller look-up
  input  logic [AW-1:0] b_addr,
  output logic          b_hit,
  // free lines
  output logic          free_two,
  output logic [IW-1:0] free_idx,
  // updates
  input  logic          alloc,
  input  logic [IW-1:0] alloc_idx,
  input  logic [AW-1:0] alloc_addr,
  input  logic          release_line,
  input  logic [IW-1:0] release_idx,
  input  logic          make_perm,
  input  logic [IW-1:0] perm_idx,
  input  logic          mark_written,
  input  logic [IW-1:0] written_idx
);

  logic [AW-1:0] line_addr    [K];
  logic [K-1:0]  line_valid;
  logic [K-1:0]  line_perm;
  logic [K-1:0]  line_written;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_valid   <= '0;
      line_perm    <= '0;
      line_written <= '0;
      for (int i = 0; i < K; i++) line_addr[i] <= '0;
    end else begin
      if (mark_written) line_written[written_idx] <= 1'b1;
      if (make_perm)    line_perm[perm_idx]       <= 1'b1;
      if (release_line) begin
        line_valid[release_idx] <= 1'b0;
        line_perm[release_idx]  <= 1'b0;
      end
      if (alloc) begin
        line_valid[alloc_idx]   <= 1'b1;
        line_perm[alloc_idx]    <= 1'b0;
        line_written[alloc_idx] <= 1'b0;
        line_addr[alloc_idx]    <= alloc_addr;
      end
    end
  end

  // Match and priority-encode (lowest matching line wins; the controller
  // never stores one address twice).
  always_comb begin
    u_hit = 1'b0; u_idx = '0; u_perm = 1'b0; u_written = 1'b0;
    b_hit = 1'b0;
    for (int i = K - 1; i >= 0; i--) begin
      if (line_valid[i] && line_addr[i] == u_addr) begin
        u_hit     = 1'b1;
        u_idx     = IW'(i);
        u_perm    = line_perm[i];
        u_written = line_written[i];
      end
      if (line_valid[i] && line_addr[i] == b_addr) b_hit = 1'b1;
    end
  end

  always_comb begin
    int unsigned nfree;
    nfree    = 0;
    free_idx = '0;
    for (int i = K - 1; i >= 0; i--) begin
      if (!line_valid[i]) begin
        free_idx = IW'(i);
        nfree    = nfree + 1;
      end
    end
    free_two = (nfree >= 2);
  end

endmodule
