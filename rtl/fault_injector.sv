// fault_injector: memory wrapper that emulates faults of the RAM array.
//
// It sits between the address/data path and the RAM array and changes the
// traffic according to NF fault descriptors (bistar_pkg::fault_t), one
// modular fault slot each. With every slot set to FLT_NONE it is a plain
// wire. The fault models are the ones the on-line test targets:
//   FLT_STUCK    bit of a cell reads and stores 'value'
//   FLT_TRANS    bit of a cell cannot change to 'value' (transition fault)
//   FLT_CF_ID    a write that moves aggressor bit to 'agg_val' forces the
//                victim bit to 'value' (idempotent coupling; the aggressor
//                may be the victim's own word: intra-word coupling)
//   FLT_CF_IN    same trigger, the victim bit is inverted (inversion coupling)
//   FLT_ADDR_NC  the cell is not connected: writes are lost, reads give 0
//   FLT_ADDR_MAP the cell's address reaches cell 'agg' instead
//   FLT_ADDR_MULTI the address of cell 'agg' reaches the cell as well: a
//                write to 'agg' is also stored in the cell (combine with
//                FLT_ADDR_NC on the cell for a cell its own address misses)
// Because the array has a single port, the wrapper cannot rewrite a victim
// cell itself. Each slot instead keeps a one-bit shadow of the bit whose
// transitions matter (learnt from writes) and an override of the victim bit
// that is applied to reads until the victim is written again. Seen from the
// port this is the same as a faulty cell. FLT_ADDR_MULTI likewise keeps a
// word override of the cell, loaded by writes to 'agg'. Addresses in the descriptors are
// physical array addresses. Read data are modified in the cycle after the
// read, when the array returns them.
// The fault models are those the source design injects in its validation
// wrapper; the shadow/override mechanism is this implementation's.
module fault_injector
  import bistar_pkg::*;
#(
  parameter int unsigned WORDS = 1040,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NF    = 4,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned BW   = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fault_t [NF-1:0]     faults,
  // from the address/data path
  input  logic                en,
  input  logic                we,
  input  logic [AW-1:0]       addr,
  input  logic [WIDTH-1:0]    wdata,
  output logic [WIDTH-1:0]    rdata,
  // to the RAM array
  output logic                ram_en,
  output logic                ram_we,
  output logic [AW-1:0]       ram_addr,
  output logic [WIDTH-1:0]    ram_wdata,
  input  logic [WIDTH-1:0]    ram_rdata
);

  logic [NF-1:0] sh, sh_valid;       // shadow of the tracked bit
  logic [NF-1:0] ov_act, ov_val;     // victim bit override
  logic [NF-1:0] vic_last;           // last value written to the victim bit
  logic [NF-1:0] ovw_act;            // victim word override (FLT_ADDR_MULTI)
  logic [WIDTH-1:0] ovw_val [NF];
  logic          rd_q;
  logic [AW-1:0] rd_addr_q;

  function automatic logic hit(input logic [AW-1:0] a, input logic [15:0] c);
    return 32'(a) == 32'(c);
  endfunction

  // Write and address path.
  always_comb begin
    ram_en    = en;
    ram_we    = we;
    ram_addr  = addr;
    ram_wdata = wdata;
    for (int f = 0; f < NF; f++) begin
      unique case (faults[f].kind)
        FLT_ADDR_MAP: if (hit(addr, faults[f].victim)) ram_addr = AW'(faults[f].agg);
        FLT_ADDR_NC:  if (hit(addr, faults[f].victim) && we) ram_en = 1'b0;
        FLT_STUCK:    if (hit(addr, faults[f].victim))
                        ram_wdata[BW'(faults[f].bit_idx)] = faults[f].value;
        FLT_TRANS:    if (hit(addr, faults[f].victim) && sh_valid[f] &&
                          sh[f] != faults[f].value &&
                          wdata[BW'(faults[f].bit_idx)] == faults[f].value)
                        ram_wdata[BW'(faults[f].bit_idx)] = sh[f];
        default: ;
      endcase
    end
  end

  // Shadows and overrides.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      sh_valid  <= '0;
      ov_act    <= '0;
      ov_val    <= '0;
      rd_q      <= 1'b0;
      rd_addr_q <= '0;
      ovw_act   <= '0;
      for (int f = 0; f < NF; f++) ovw_val[f] <= '0;
    end else begin
      rd_q <= en && !we;
      if (en && !we) rd_addr_q <= addr;
      for (int f = 0; f < NF; f++) begin
        if (faults[f].kind == FLT_NONE) begin
          sh_valid[f] <= 1'b0;
          ov_act[f]   <= 1'b0;
          ovw_act[f]  <= 1'b0;
        end else if (en && we) begin
          unique case (faults[f].kind)
            FLT_ADDR_MULTI: begin
              if (hit(addr, faults[f].victim)) ovw_act[f] <= 1'b0;
              if (hit(addr, faults[f].agg)) begin
                ovw_act[f] <= 1'b1;
                ovw_val[f] <= ram_wdata;
              end
            end
            FLT_TRANS: if (hit(addr, faults[f].victim)) begin
              sh[f]       <= ram_wdata[BW'(faults[f].bit_idx)];
              sh_valid[f] <= 1'b1;
            end
            FLT_CF_ID, FLT_CF_IN: begin
              // a write to the victim cell overwrites any earlier coupling
              if (hit(addr, faults[f].victim)) ov_act[f] <= 1'b0;
              if (hit(addr, faults[f].agg)) begin
                sh[f]       <= wdata[BW'(faults[f].agg_bit)];
                sh_valid[f] <= 1'b1;
                if (sh_valid[f] && sh[f] != faults[f].agg_val &&
                    wdata[BW'(faults[f].agg_bit)] == faults[f].agg_val) begin
                  ov_act[f] <= 1'b1;
                  if (faults[f].kind == FLT_CF_ID)
                    ov_val[f] <= faults[f].value;
                  else if (hit(addr, faults[f].victim))
                    ov_val[f] <= ~wdata[BW'(faults[f].bit_idx)];
                  else
                    ov_val[f] <= ~(ov_act[f] ? ov_val[f] : vic_last[f]);
                end
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  // Last value written to the victim bit, used as the stored value when an
  // inversion coupling hits a victim that is not overridden.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vic_last <= '0;
    else for (int f = 0; f < NF; f++) begin
      if (en && we && hit(addr, faults[f].victim))
        vic_last[f] <= ram_wdata[BW'(faults[f].bit_idx)];
    end
  end

  // Read path.
  always_comb begin
    rdata = ram_rdata;
    for (int f = 0; f < NF; f++) begin
      if (rd_q && hit(rd_addr_q, faults[f].victim)) begin
        unique case (faults[f].kind)
          FLT_STUCK:            rdata[BW'(faults[f].bit_idx)] = faults[f].value;
          FLT_CF_ID, FLT_CF_IN: if (ov_act[f]) rdata[BW'(faults[f].bit_idx)] = ov_val[f];
          FLT_ADDR_NC:          rdata = '0;
          FLT_ADDR_MULTI:       if (ovw_act[f]) rdata = ovw_val[f];
          default: ;
        endcase
      end
    end
  end

endmodule
