// bistar_ram: RAM with on-line built-in self-test and self-repair (BISTAR).
//
// To the user this is an ordinary single-port synchronous RAM of N words of
// M bits: drive req/we/addr/wdata for one cycle; read data appear on rdata
// in the next cycle. There is no stall and no handshake. Inside, the array
// has N+K words; the K spares replace faulty cells one word at a time
// through a K-line re-mapping CAM (remap_cam) looked up on every user access
// (remap_logic). While the user is idle, bistar_controller tests the cells
// one after another on-line and transparently: the cell under test and its
// neighbour are first moved to spares, tested, and then moved back, or kept
// re-mapped for good when the test fails twice.
//
// mode_bistar = 1 selects BISTAR (test and repair); 0 selects SR_only
// (re-mapping only). Status outputs, valid with rdata in the cycle after a
// read:
//   faulty_data    - the word read comes from a spare that replaced a faulty
//                    cell and has not been written by the user since
//   repaired       - the address read is permanently re-mapped
// and, at any time,
//   stop_repairing - fewer than two spares were free to start a test; the
//                    RAM has fallen back to SR_only for good (until reset)
//
// fault_injector sits between the address path and the array so that faults
// can be emulated for validation; tie 'faults' to all FLT_NONE for normal
// use. Structure and outputs follow the source design; the port timing,
// reset behaviour and fault-injection port are this implementation's.
module bistar_ram
  import bistar_pkg::*;
#(
  parameter int unsigned N    = 1024,  // user words
  parameter int unsigned M    = 8,     // word width
  parameter int unsigned K    = 16,    // spare words
  parameter int unsigned ROWS = 32,    // rows of the array layout (N/ROWS columns)
  parameter int unsigned NF   = 4,     // fault-injection slots
  localparam int unsigned NAW = $clog2(N),
  localparam int unsigned PAW = $clog2(N + K),
  localparam int unsigned IW  = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mode_bistar,
  input  logic            req,
  input  logic            we,
  input  logic [NAW-1:0]  addr,
  input  logic [M-1:0]    wdata,
  output logic [M-1:0]    rdata,
  output logic            faulty_data,
  output logic            repaired,
  output logic            stop_repairing,
  input  fault_t [NF-1:0] faults,
  // monitoring
  output logic            testing,
  output bist_phase_e     bist_phase,
  output logic            bist_grant,
  output logic            ev_cell_done,
  output logic            ev_pass_done,
  output logic            ev_fail,
  output logic            ev_transient,
  output logic            ev_repair,
  output logic            ev_abort
);

  // CAM signals
  logic [PAW-1:0] cam_u_addr, cam_b_addr, cam_alloc_addr;
  logic           cam_u_hit, cam_u_perm, cam_u_written, cam_b_hit;
  logic [IW-1:0]  cam_u_idx, cam_free_idx, cam_alloc_idx;
  logic [IW-1:0]  cam_release_idx, cam_perm_idx, cam_written_idx;
  logic           cam_free_two, cam_alloc, cam_release;
  logic           cam_make_perm, cam_mark_written;
  // controller request
  logic           c_req, c_we;
  logic [PAW-1:0] c_addr;
  logic [M-1:0]   c_wdata;
  logic           user_busy;
  // array port
  logic           p_en, p_we, r_en, r_we;
  logic [PAW-1:0] p_addr, r_addr;
  logic [M-1:0]   p_wdata, r_wdata, r_rdata, p_rdata;
  logic           u_repaired, u_faulty;

  remap_cam #(.K(K), .AW(PAW)) u_cam (
    .clk, .rst_n,
    .u_addr(cam_u_addr), .u_hit(cam_u_hit), .u_idx(cam_u_idx),
    .u_perm(cam_u_perm), .u_written(cam_u_written),
    .b_addr(cam_b_addr), .b_hit(cam_b_hit),
    .free_two(cam_free_two), .free_idx(cam_free_idx),
    .alloc(cam_alloc), .alloc_idx(cam_alloc_idx), .alloc_addr(cam_alloc_addr),
    .release_line(cam_release), .release_idx(cam_release_idx),
    .make_perm(cam_make_perm), .perm_idx(cam_perm_idx),
    .mark_written(cam_mark_written), .written_idx(cam_written_idx)
  );

  remap_logic #(.N(N), .M(M), .K(K)) u_logic (
    .u_req(req), .u_we(we), .u_addr(addr), .u_wdata(wdata),
    .cam_u_addr, .cam_u_hit, .cam_u_idx, .cam_u_perm, .cam_u_written,
    .cam_mark_written, .cam_written_idx,
    .c_req, .c_we, .c_addr, .c_wdata, .user_busy,
    .ram_en(p_en), .ram_we(p_we), .ram_addr(p_addr), .ram_wdata(p_wdata),
    .u_repaired, .u_faulty
  );

  bistar_controller #(.N(N), .M(M), .K(K), .ROWS(ROWS)) u_ctrl (
    .clk, .rst_n, .mode_bistar,
    .user_busy, .user_we(we), .user_addr(addr), .user_wdata(wdata),
    .m_req(c_req), .m_we(c_we), .m_addr(c_addr), .m_wdata(c_wdata),
    .m_phase(bist_phase), .m_rdata(p_rdata),
    .cam_addr(cam_b_addr), .cam_hit(cam_b_hit), .cam_free_two,
    .cam_free_idx, .cam_alloc, .cam_alloc_idx, .cam_alloc_addr,
    .cam_release, .cam_release_idx, .cam_make_perm, .cam_perm_idx,
    .stop_repairing, .testing,
    .ev_cell_done, .ev_pass_done, .ev_fail, .ev_transient, .ev_repair, .ev_abort
  );

  fault_injector #(.WORDS(N + K), .WIDTH(M), .NF(NF)) u_fi (
    .clk, .rst_n, .faults,
    .en(p_en), .we(p_we), .addr(p_addr), .wdata(p_wdata), .rdata(p_rdata),
    .ram_en(r_en), .ram_we(r_we), .ram_addr(r_addr), .ram_wdata(r_wdata),
    .ram_rdata(r_rdata)
  );

  sram_array #(.WORDS(N + K), .WIDTH(M)) u_ram (
    .clk, .rst_n, .en(r_en), .we(r_we), .addr(r_addr), .wdata(r_wdata), .rdata(r_rdata)
  );

  assign rdata      = p_rdata;
  assign bist_grant = c_req && !user_busy;

  // Status flags travel with the read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      faulty_data <= 1'b0;
      repaired    <= 1'b0;
    end else if (req && !we) begin
      faulty_data <= u_faulty;
      repaired    <= u_repaired;
    end
  end

endmodule
