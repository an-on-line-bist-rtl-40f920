// bistar_pkg: types and helper functions shared by the BISTAR RAM blocks.
//
// The memory seen by the user has N words of M bits; the physical array
// holds N+K words, the K spare words sitting at physical addresses N..N+K-1
// (spare s_i is at N+i, hardwired to CAM line i). The on-line test pairs a
// cell under test c_x with each of its eight neighbours n_0..n_7 and applies
// a fixed 14-access sequence per pair. The sequence and the neighbour
// numbering follow the source design; the encodings here are this
// implementation's own.
package bistar_pkg;

  // Number of accesses in the per-pair coupling-fault sequence.
  localparam int unsigned PAIR_OPS = 14;
  // Number of neighbours of a cell (type-2 neighbourhood).
  localparam int unsigned NUM_NEIGH = 8;

  // One access of the pair sequence: which cell, read or write, and which
  // polarity of the background D.
  typedef struct packed {
    logic on_nj;   // 0: base cell c_x, 1: neighbour n_j
    logic write;   // 1: write, 0: read-and-compare
    logic inv;     // 1: complement of D
  } pair_op_t;

  // { wD(cx), wD(nj), rD(cx), w~D(nj), rD(cx), wD(nj), rD(cx), w~D(cx),
  //   wD(nj), r~D(cx), w~D(nj), r~D(cx), wD(nj), r~D(cx) }
  function automatic pair_op_t pair_op(input logic [3:0] k);
    unique case (k)
      4'd0:    return '{on_nj: 1'b0, write: 1'b1, inv: 1'b0};
      4'd1:    return '{on_nj: 1'b1, write: 1'b1, inv: 1'b0};
      4'd2:    return '{on_nj: 1'b0, write: 1'b0, inv: 1'b0};
      4'd3:    return '{on_nj: 1'b1, write: 1'b1, inv: 1'b1};
      4'd4:    return '{on_nj: 1'b0, write: 1'b0, inv: 1'b0};
      4'd5:    return '{on_nj: 1'b1, write: 1'b1, inv: 1'b0};
      4'd6:    return '{on_nj: 1'b0, write: 1'b0, inv: 1'b0};
      4'd7:    return '{on_nj: 1'b0, write: 1'b1, inv: 1'b1};
      4'd8:    return '{on_nj: 1'b1, write: 1'b1, inv: 1'b0};
      4'd9:    return '{on_nj: 1'b0, write: 1'b0, inv: 1'b1};
      4'd10:   return '{on_nj: 1'b1, write: 1'b1, inv: 1'b1};
      4'd11:   return '{on_nj: 1'b0, write: 1'b0, inv: 1'b1};
      4'd12:   return '{on_nj: 1'b1, write: 1'b1, inv: 1'b0};
      default: return '{on_nj: 1'b0, write: 1'b0, inv: 1'b1};
    endcase
  endfunction

  // Phase of a controller memory access, reported for monitoring.
  typedef enum logic [1:0] {
    PH_NONE    = 2'd0,
    PH_ISOLATE = 2'd1,   // copying a cell into its spare
    PH_TEST    = 2'd2,   // one of the 14 pair-sequence accesses
    PH_RESTORE = 2'd3    // copying a spare back into its cell
  } bist_phase_e;

  // Fault models of the validation wrapper.
  typedef enum logic [2:0] {
    FLT_NONE     = 3'd0,
    FLT_STUCK    = 3'd1,  // bit of cell stuck at value
    FLT_TRANS    = 3'd2,  // bit of cell cannot make the transition to value
    FLT_CF_ID    = 3'd3,  // aggressor bit transition to agg_val forces victim bit to value
    FLT_CF_IN    = 3'd4,  // aggressor bit transition to agg_val inverts victim bit
    FLT_ADDR_NC  = 3'd5,  // cell not connected: writes lost, reads return 0
    FLT_ADDR_MAP = 3'd6,  // address of cell reaches the aggressor cell instead
    FLT_ADDR_MULTI = 3'd7 // address of the aggressor cell reaches the cell too
  } fault_kind_e;

  // One fault descriptor. Address fields are physical-array addresses.
  typedef struct packed {
    fault_kind_e kind;
    logic [15:0] victim;    // victim cell
    logic [5:0]  bit_idx;  // victim bit
    logic        value;    // stuck value / blocked transition target / forced value
    logic [15:0] agg;      // aggressor cell (coupling faults, ADDR_MAP target)
    logic [5:0]  agg_bit;  // aggressor bit
    logic        agg_val;  // aggressor transition target that triggers the fault
  } fault_t;

endpackage
