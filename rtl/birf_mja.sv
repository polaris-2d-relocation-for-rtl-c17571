// birf_mja: frame-address (FAR) calculation unit of the BiRF Square filter.
//
// Builds the 32-bit frame address that replaces the FAR parameter of a
// partial bitstream, from the 14-bit relocation destination (top/bottom flag,
// 5-bit row, 8-bit major column).  The layout follows the FAR of each family:
//   Virtex-4: [22] top/bottom, [21:19] block type, [18:14] row,
//             [13:6] column, [5:0] minor
//   Virtex-5: [23:21] block type, [20] top/bottom, [19:15] row,
//             [14:7] column, [6:0] minor
// Block type and minor address are written as zero (CLB/IO/CLK block, first
// frame) and the unused upper bits as zero, as the relocation formula of the
// filter prescribes.  The family is a parameter.
//
// This design's choice: the address is held in a register that follows
// `dest` while `load` is high (the filter raises it until the Sync word has
// been seen) and keeps its value while the bitstream body passes, so a
// change of `dest` cannot corrupt a relocation in progress and the FAR
// does not sit on a combinational path into the output multiplexer.  `frame_addr`
// is valid one cycle after `load`.
module birf_mja
  import birf_pkg::*;
#(
  parameter family_e FAMILY = FAMILY_V4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  dest_t       dest,
  output logic [31:0] frame_addr
);

  logic [31:0] far_d;

  always_comb begin
    far_d = '0;
    if (FAMILY == FAMILY_V4) begin
      far_d[22]    = dest.top_bottom;
      far_d[21:19] = 3'b000;
      far_d[18:14] = dest.row;
      far_d[13:6]  = dest.col;
      far_d[5:0]   = '0;
    end else begin
      far_d[23:21] = 3'b000;
      far_d[20]    = dest.top_bottom;
      far_d[19:15] = dest.row;
      far_d[14:7]  = dest.col;
      far_d[6:0]   = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    frame_addr <= '0;
    else if (load) frame_addr <= far_d;
  end

endmodule
