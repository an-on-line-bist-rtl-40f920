// remap_logic: address path between the user port, the controller and the
// RAM array (the "combinational logic" box next to the CAM register array).
//
// A user access always owns the single RAM port in its cycle; otherwise the
// controller's request, if any, is passed through. A user address that hits
// a CAM line i is replaced by the hardwired spare address N + i; a miss goes
// straight to the array. Controller addresses are already physical and are
// not looked up, so the controller can reach a cell even while its address
// is re-mapped. The block also decodes the user-side status of the access:
//   repaired - the user address is permanently re-mapped
//   faulty   - ... and its spare has not been written since it was allocated
// and marks a CAM line as written when the user writes through it.
// Purely combinational; the only delay it adds is on the address path.
// Hit/miss routing and the meaning of the two flags follow the source
// design; bypassing the CAM for controller accesses and the written-flag
// bookkeeping are this implementation's.
module remap_logic #(
  parameter int unsigned N  = 1024,
  parameter int unsigned M  = 8,
  parameter int unsigned K  = 16,
  localparam int unsigned NAW = $clog2(N),
  localparam int unsigned PAW = $clog2(N + K),
  localparam int unsigned IW  = (K > 1) ? $clog2(K) : 1
) (
  // user port
  input  logic           u_req,
  input  logic           u_we,
  input  logic [NAW-1:0] u_addr,
  input  logic [M-1:0]   u_wdata,
  // CAM user look-up
  output logic [PAW-1:0] cam_u_addr,
  input  logic           cam_u_hit,
  input  logic [IW-1:0]  cam_u_idx,
  input  logic           cam_u_perm,
  input  logic           cam_u_written,
  output logic           cam_mark_written,
  output logic [IW-1:0]  cam_written_idx,
  // controller request
  input  logic           c_req,
  input  logic           c_we,
  input  logic [PAW-1:0] c_addr,
  input  logic [M-1:0]   c_wdata,
  output logic           user_busy,
  // RAM port
  output logic           ram_en,
  output logic           ram_we,
  output logic [PAW-1:0] ram_addr,
  output logic [M-1:0]   ram_wdata,
  // status of the user access
  output logic           u_repaired,
  output logic           u_faulty
);

  logic [PAW-1:0] u_phys;

  assign cam_u_addr = PAW'(u_addr);
  assign u_phys     = cam_u_hit ? (PAW'(N) + PAW'(cam_u_idx)) : PAW'(u_addr);
  assign user_busy  = u_req;

  always_comb begin
    if (u_req) begin
      ram_en    = 1'b1;
      ram_we    = u_we;
      ram_addr  = u_phys;
      ram_wdata = u_wdata;
    end else begin
      ram_en    = c_req;
      ram_we    = c_we;
      ram_addr  = c_addr;
      ram_wdata = c_wdata;
    end
  end

  assign cam_mark_written = u_req && u_we && cam_u_hit;
  assign cam_written_idx  = cam_u_idx;
  assign u_repaired       = cam_u_hit && cam_u_perm;
  assign u_faulty         = cam_u_hit && cam_u_perm && !cam_u_written;

endmodule
