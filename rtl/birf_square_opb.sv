// birf_square_opb: the BiRF Square relocation filter as a slave on the OPB
// (On-chip Peripheral Bus) of a soft-processor system.
//
// The processor relocates a partial bitstream held in memory by first
// writing the destination, then writing each bitstream word to DIN and
// reading the relocated word back from DOUT, which it stores in place of
// the original.  A write to CTRL restarts the filter before a new bitstream.
//
// Register map (word offsets from C_BASEADDR; this design's own):
//   0x00 DEST    R/W [13] top/bottom, [12:8] row, [7:0] major column
//   0x04 DIN     W   bitstream word into the filter
//   0x08 DOUT    R   last word out of the filter
//   0x0C STATUS  R   [0] DOUT holds a word not yet read, [6:4] parser state
//   0x10 CTRL    W   [0] restart the filter (parser to DUMMY, CRC cleared)
//
// Bus timing (this design's choice): an access is decoded in the first cycle
// that OPB_select is high with an address in [C_BASEADDR, C_HIGHADDR];
// writes take effect in that cycle and Sl_xferAck is raised for one cycle in
// the next, together with the read data on Sl_DBus (zero otherwise, as the
// OPB data bus is an OR of all slaves).  Byte enables are ignored: all
// registers are accessed as whole 32-bit words.  The slave never retries,
// never signals an error and never suppresses the time-out, so those outputs
// are held low.  A word written to DIN can be read from DOUT by the very
// next access, since the filter latency is one cycle.
module birf_square_opb
  import birf_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h7E00_0000,
  parameter logic [31:0] C_HIGHADDR = 32'h7E00_00FF,
  parameter family_e     FAMILY     = FAMILY_V4,
  parameter bit          CRC_CALC   = 1'b1,
  parameter logic [31:0] LITE_CRC   = 32'h0000_DEFC
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  input  logic        OPB_seqAddr,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_toutSup,
  output logic        Sl_retry
);

  localparam logic [7:0] OFS_DEST   = 8'h00;
  localparam logic [7:0] OFS_DIN    = 8'h04;
  localparam logic [7:0] OFS_DOUT   = 8'h08;
  localparam logic [7:0] OFS_STATUS = 8'h0C;
  localparam logic [7:0] OFS_CTRL   = 8'h10;

  logic          rst_n;
  logic          hit, req;
  logic [7:0]    ofs;
  logic          ack_q;
  logic [31:0]   rdata_q;
  dest_t         dest_q;
  logic          fresh_q;
  logic          f_in_valid, f_restart, f_out_valid;
  logic [31:0]   f_out_word;
  parser_state_e f_state;
  logic [31:0]   rdata_d;

  assign rst_n = ~OPB_Rst;
  assign hit   = OPB_select && (OPB_ABus >= C_BASEADDR) && (OPB_ABus <= C_HIGHADDR);
  assign req   = hit && !ack_q;
  assign ofs   = 8'(OPB_ABus - C_BASEADDR);

  assign f_in_valid = req && !OPB_RNW && (ofs == OFS_DIN);
  assign f_restart  = req && !OPB_RNW && (ofs == OFS_CTRL) && OPB_DBus[0];

  birf_square #(
    .FAMILY  (FAMILY),
    .CRC_CALC(CRC_CALC),
    .LITE_CRC(LITE_CRC)
  ) u_filter (
    .clk      (OPB_Clk),
    .rst_n    (rst_n),
    .restart  (f_restart),
    .dest     (dest_q),
    .in_valid (f_in_valid),
    .in_word  (OPB_DBus),
    .out_valid(f_out_valid),
    .out_word (f_out_word),
    .state    (f_state)
  );

  always_comb begin
    rdata_d = '0;
    unique case (ofs)
      OFS_DEST:   rdata_d = 32'(dest_q);
      OFS_DOUT:   rdata_d = f_out_word;
      OFS_STATUS: rdata_d = {25'b0, f_state, 3'b0, fresh_q};
      default:    rdata_d = '0;
    endcase
  end

  always_ff @(posedge OPB_Clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
      dest_q  <= '0;
      fresh_q <= 1'b0;
    end else begin
      ack_q   <= req;
      rdata_q <= (req && OPB_RNW) ? rdata_d : '0;
      if (req && !OPB_RNW && ofs == OFS_DEST) dest_q <= dest_t'(OPB_DBus[13:0]);
      if (f_out_valid)                              fresh_q <= 1'b1;
      else if (req && OPB_RNW && ofs == OFS_DOUT)   fresh_q <= 1'b0;
      else if (f_restart)                           fresh_q <= 1'b0;
    end
  end

  assign Sl_xferAck = ack_q;
  assign Sl_DBus    = ack_q ? rdata_q : '0;
  assign Sl_errAck  = 1'b0;
  assign Sl_toutSup = 1'b0;
  assign Sl_retry   = 1'b0;

  // Bus rules: the acknowledge lasts one cycle and answers a selected access.
  a_ack_single : assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
                                  Sl_xferAck |=> !Sl_xferAck);
  a_ack_selected : assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
                                    Sl_xferAck |-> OPB_select);

endmodule
