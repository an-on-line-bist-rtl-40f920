// bistar_controller: on-line transparent BIST and self-repair sequencer.
//
// The controller walks the N user cells in address order (row counter inside
// column counter). For each cell under test c_x it
//   1. isolates c_x: copies it into a free spare s_a and enters its address
//      in CAM line a, so every user access to c_x now lands on s_a;
//   2. for each pair index t = 0 .. NPAIR-1 takes neighbour n_j (j = t mod 8)
//      and background D = walking one at bit (t mod M), isolates n_j into a
//      second spare s_b, and applies the 14-access sequence of bistar_pkg
//      to the physical cells c_x and n_j, comparing every read of c_x;
//   3. on a mismatch repeats the same pair once: a second failure makes the
//      re-mapping of c_x permanent (the CAM line stays, marked perm) and the
//      controller moves to the next cell; a pass on the repeat counts the
//      first failure as transient;
//   4. after each passing pair copies s_b back to n_j and frees line b;
//      after the last pair copies s_a back to c_x and frees line a.
// NPAIR = max(8, M): when M > 8 the neighbour pairs are repeated, when
// M < 8 the backgrounds are. With M = 8 a cell costs 8 x 14 = 112 test
// accesses. Cells already re-mapped permanently are skipped, and so are
// pairs whose neighbour is re-mapped permanently.
//
// The memory has one port and the user always has priority: a controller
// request (m_req) is carried out only in a cycle with no user access
// (user_busy low), so the test is suspended, not the user. Read data arrive
// one cycle after the granted read. A copy is read / capture / write; the
// spare write and the CAM allocate (or the cell write and the CAM release)
// happen in the same granted cycle. User writes to the address being copied
// in between are snooped into the capture register, so no update is lost.
//
// mode_bistar low (SR_only) stops testing at the next pair boundary, after
// c_x has been restored; re-mapping stays active. When fewer than two CAM
// lines are free at the start of a cell, stop_repairing is raised and
// stays high until reset: the controller no longer tests (SR_only).
//
// The sequence, neighbour order, repeat-on-fail rule and spare use are from
// the source design; the abort point, the snooping, the skip rules and the
// state encoding are this implementation's choices.
module bistar_controller
  import bistar_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned M    = 8,
  parameter int unsigned K    = 16,
  parameter int unsigned ROWS = 32,
  localparam int unsigned COLS  = N / ROWS,
  localparam int unsigned NAW   = $clog2(N),
  localparam int unsigned PAW   = $clog2(N + K),
  localparam int unsigned IW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned RW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW    = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned NPAIR = (M > NUM_NEIGH) ? M : NUM_NEIGH,
  localparam int unsigned TW    = $clog2(NPAIR + 1),
  localparam int unsigned PW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mode_bistar,     // 1: BISTAR, 0: SR_only
  // user activity, for arbitration and snooping
  input  logic           user_busy,
  input  logic           user_we,
  input  logic [NAW-1:0] user_addr,
  input  logic [M-1:0]   user_wdata,
  // memory request (physical addresses)
  output logic           m_req,
  output logic           m_we,
  output logic [PAW-1:0] m_addr,
  output logic [M-1:0]   m_wdata,
  output bist_phase_e    m_phase,
  input  logic [M-1:0]   m_rdata,
  // CAM
  output logic [PAW-1:0] cam_addr,
  input  logic           cam_hit,
  input  logic           cam_free_two,
  input  logic [IW-1:0]  cam_free_idx,
  output logic           cam_alloc,
  output logic [IW-1:0]  cam_alloc_idx,
  output logic [PAW-1:0] cam_alloc_addr,
  output logic           cam_release,
  output logic [IW-1:0]  cam_release_idx,
  output logic           cam_make_perm,
  output logic [IW-1:0]  cam_perm_idx,
  // status and events
  output logic           stop_repairing,
  output logic           testing,         // a cell is isolated
  output logic           ev_cell_done,    // a cell finished (passed or repaired)
  output logic           ev_pass_done,    // the last cell of the array finished
  output logic           ev_fail,         // a pair sequence failed
  output logic           ev_transient,    // a repeated pair passed
  output logic           ev_repair,       // a cell was made a permanent repair
  output logic           ev_abort         // test left because of SR_only
);

  typedef enum logic [3:0] {
    S_IDLE, S_CP_RD, S_CP_WAIT, S_CP_WR, S_PAIR_START, S_TEST, S_TEST_END,
    S_PAIR_NEXT, S_CELL_NEXT
  } state_e;

  state_e         state, cp_ret;
  logic [RW-1:0]  row;
  logic [CW-1:0]  col;
  logic [TW-1:0]  t;          // pair index
  logic [2:0]     jn;         // neighbour index, t mod 8
  logic [PW-1:0]  pb;         // background bit, t mod M
  logic [3:0]     k;          // access within the pair sequence
  logic           retry, fail, stop_q;
  logic           rd_pend;
  logic [M-1:0]   rd_exp;
  logic [IW-1:0]  line_a, line_b;
  // copy engine
  logic           cp_isolate;
  logic [PAW-1:0] cp_src, cp_dst;
  logic [NAW-1:0] cp_logical;
  logic [IW-1:0]  cp_line;
  logic [M-1:0]   cap;

  logic [NAW-1:0] cx_addr, nj_addr;
  logic           grant, snoop, mismatch, fail_now;
  pair_op_t       op;
  logic [M-1:0]   bg;

  assign cx_addr = NAW'(32'(col) * ROWS + 32'(row));

  neighbor_addr #(.ROWS(ROWS), .COLS(COLS)) u_neigh (
    .row(row), .col(col), .j(jn), .n_addr(nj_addr)
  );

  assign grant    = m_req && !user_busy;
  assign snoop    = user_busy && user_we && (user_addr == cp_logical);
  assign mismatch = rd_pend && (m_rdata != rd_exp);
  assign fail_now = fail || mismatch;
  assign op       = pair_op(k);
  assign bg       = M'(1) << pb;
  assign cam_addr = (state == S_PAIR_START) ? PAW'(nj_addr) : PAW'(cx_addr);
  assign stop_repairing = stop_q;

  // Memory request.
  always_comb begin
    m_req   = 1'b0;
    m_we    = 1'b0;
    m_addr  = cp_src;
    m_wdata = cap;
    m_phase = PH_NONE;
    unique case (state)
      S_CP_RD: begin
        m_req   = 1'b1;
        m_phase = cp_isolate ? PH_ISOLATE : PH_RESTORE;
      end
      S_CP_WR: begin
        m_req   = 1'b1;
        m_we    = 1'b1;
        m_addr  = cp_dst;
        m_phase = cp_isolate ? PH_ISOLATE : PH_RESTORE;
      end
      S_TEST: begin
        m_req   = 1'b1;
        m_we    = op.write;
        m_addr  = op.on_nj ? PAW'(nj_addr) : PAW'(cx_addr);
        m_wdata = op.inv ? ~bg : bg;
        m_phase = PH_TEST;
      end
      default: ;
    endcase
  end

  // CAM updates happen together with the granted copy write.
  always_comb begin
    cam_alloc       = (state == S_CP_WR) && grant && cp_isolate;
    cam_alloc_idx   = cp_line;
    cam_alloc_addr  = PAW'(cp_logical);
    cam_release     = (state == S_CP_WR) && grant && !cp_isolate;
    cam_release_idx = cp_line;
    cam_make_perm   = (state == S_TEST_END) && fail_now && retry;
    cam_perm_idx    = line_a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cp_ret     <= S_IDLE;
      row        <= '0;
      col        <= '0;
      t          <= '0;
      jn         <= '0;
      pb         <= '0;
      k          <= '0;
      retry      <= 1'b0;
      fail       <= 1'b0;
      stop_q     <= 1'b0;
      rd_pend    <= 1'b0;
      rd_exp     <= '0;
      line_a     <= '0;
      line_b     <= '0;
      cp_isolate <= 1'b0;
      cp_src     <= '0;
      cp_dst     <= '0;
      cp_logical <= '0;
      cp_line    <= '0;
      cap        <= '0;
      testing    <= 1'b0;
    end else begin
      // Read-compare pipeline: data of a granted read arrive next cycle.
      rd_pend <= grant && !m_we && (state == S_TEST);
      if (grant && !m_we) rd_exp <= m_wdata;
      if (mismatch) fail <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (mode_bistar && !stop_q) begin
            if (!cam_free_two) begin
              stop_q <= 1'b1;
            end else if (cam_hit) begin
              state <= S_CELL_NEXT;           // already repaired: skip
            end else begin
              line_a     <= cam_free_idx;
              cp_isolate <= 1'b1;
              cp_src     <= PAW'(cx_addr);
              cp_dst     <= PAW'(N) + PAW'(cam_free_idx);
              cp_logical <= cx_addr;
              cp_line    <= cam_free_idx;
              cp_ret     <= S_PAIR_START;
              t          <= '0;
              jn         <= '0;
              pb         <= '0;
              testing    <= 1'b1;
              state      <= S_CP_RD;
            end
          end
        end

        S_CP_RD: if (grant) state <= S_CP_WAIT;

        S_CP_WAIT: begin
          cap   <= snoop ? user_wdata : m_rdata;
          state <= S_CP_WR;
        end

        S_CP_WR: begin
          if (snoop) cap <= user_wdata;
          if (grant) begin
            if (cp_ret == S_IDLE || cp_ret == S_CELL_NEXT) testing <= 1'b0;
            state <= cp_ret;
          end
        end

        S_PAIR_START: begin
          if (!mode_bistar || 32'(t) == NPAIR) begin
            // restore c_x (end of cell, or leaving for SR_only)
            cp_isolate <= 1'b0;
            cp_src     <= PAW'(N) + PAW'(line_a);
            cp_dst     <= PAW'(cx_addr);
            cp_logical <= cx_addr;
            cp_line    <= line_a;
            cp_ret     <= mode_bistar ? S_CELL_NEXT : S_IDLE;
            state      <= S_CP_RD;
          end else if (cam_hit) begin
            state <= S_PAIR_NEXT;             // neighbour already repaired
          end else begin
            line_b     <= cam_free_idx;
            cp_isolate <= 1'b1;
            cp_src     <= PAW'(nj_addr);
            cp_dst     <= PAW'(N) + PAW'(cam_free_idx);
            cp_logical <= nj_addr;
            cp_line    <= cam_free_idx;
            cp_ret     <= S_TEST;
            k          <= '0;
            retry      <= 1'b0;
            fail       <= 1'b0;
            state      <= S_CP_RD;
          end
        end

        S_TEST: begin
          if (grant) begin
            if (32'(k) == PAIR_OPS - 1) state <= S_TEST_END;
            else                        k <= k + 1'b1;
          end
        end

        S_TEST_END: begin
          if (fail_now && !retry) begin
            retry <= 1'b1;
            fail  <= 1'b0;
            k     <= '0;
            state <= S_TEST;
          end else begin
            // restore n_j; on a permanent fault c_x keeps its spare
            cp_isolate <= 1'b0;
            cp_src     <= PAW'(N) + PAW'(line_b);
            cp_dst     <= PAW'(nj_addr);
            cp_logical <= nj_addr;
            cp_line    <= line_b;
            cp_ret     <= fail_now ? S_CELL_NEXT : S_PAIR_NEXT;
            if (fail_now) testing <= 1'b0;
            state      <= S_CP_RD;
          end
        end

        S_PAIR_NEXT: begin
          t     <= t + 1'b1;
          jn    <= jn + 1'b1;
          pb    <= (32'(pb) == M - 1) ? '0 : pb + 1'b1;
          state <= S_PAIR_START;
        end

        S_CELL_NEXT: begin
          if (32'(row) == ROWS - 1) begin
            row <= '0;
            col <= (32'(col) == COLS - 1) ? '0 : col + 1'b1;
          end else begin
            row <= row + 1'b1;
          end
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign ev_cell_done = (state == S_CELL_NEXT);
  assign ev_pass_done = (state == S_CELL_NEXT) && (32'(row) == ROWS - 1) && (32'(col) == COLS - 1);
  assign ev_fail      = (state == S_TEST_END) && fail_now;
  assign ev_transient = (state == S_TEST_END) && !fail_now && retry;
  assign ev_repair    = cam_make_perm;
  assign ev_abort     = (state == S_PAIR_START) && !mode_bistar;

  // A controller access is never granted while the user owns the port
  // (m_req is low during reset, so this holds then too).
  a_user_priority: assert property (@(posedge clk) user_busy |-> !grant);

  // The toroidal layout needs whole columns and at least 3 x 3 cells.
  if ((N % ROWS) != 0 || ROWS < 3 || COLS < 3) begin : g_bad_layout
    $error("bistar_controller: N must be a multiple of ROWS, with ROWS >= 3 and N/ROWS >= 3");
  end

endmodule
