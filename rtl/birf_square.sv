// birf_square: BiRF Square, a bitstream relocation filter for Virtex-4 and
// Virtex-5 partial bitstreams.
//
// A partial bitstream placed at one location of the device is streamed
// through the filter word by word together with a 14-bit destination (top/
// bottom flag, row, major column).  The filter emits the same bitstream,
// relocated: the parameter of the "write 1 word to FAR" command is replaced
// by the frame address of the destination, and the parameter of the "write 1
// word to CRC" command is replaced by a checksum that matches the modified
// stream.  Every other word passes unchanged.
//
// Three units do the work: the parser FSM (birf_parser) finds the two words
// to change, the FAR unit (birf_mja) builds the new frame address, and the
// CRC unit (birf_crc) recomputes the checksum over the words as they leave
// the filter.  An output multiplexer selects among the incoming word, the new
// FAR and the CRC.
//
// Two versions, chosen by CRC_CALC:
//   1 general-purpose version: the CRC is computed.
//   0 "Lite" version: no CRC unit; the CRC parameter is replaced by the fixed
//     value LITE_CRC, a value the device accepts without checking.  The
//     default of LITE_CRC is this design's assumption and must be set to the
//     value of the target family.
//
// Timing: one word per clock cycle; the output word appears, registered, one
// cycle after the input word (out_valid follows in_valid by one cycle), so
// the relocated bitstream is complete one cycle after the last input word.
// `restart` (synchronous) prepares the filter for a new bitstream: the
// parser returns to DUMMY and the CRC is cleared.  `dest` is sampled on
// every cycle until the Sync word has been accepted (it must be set before
// the Sync word) and is ignored for the rest of the bitstream.
module birf_square
  import birf_pkg::*;
#(
  parameter family_e     FAMILY   = FAMILY_V4,
  parameter bit          CRC_CALC = 1'b1,
  parameter logic [31:0] LITE_CRC = 32'h0000_DEFC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  dest_t         dest,
  input  logic          in_valid,
  input  logic [31:0]   in_word,
  output logic          out_valid,
  output logic [31:0]   out_word,
  output parser_state_e state
);

  out_sel_e    sel;
  logic        crc_en, crc_clear;
  logic [4:0]  crc_reg;
  logic [31:0] new_far;
  logic [31:0] crc_value;
  logic [31:0] word_d;

  birf_parser u_parser (
    .clk      (clk),
    .rst_n    (rst_n),
    .restart  (restart),
    .in_valid (in_valid),
    .in_word  (in_word),
    .state    (state),
    .sel      (sel),
    .crc_en   (crc_en),
    .crc_clear(crc_clear),
    .crc_reg  (crc_reg)
  );

  // The destination is captured until the Sync word has been accepted.
  birf_mja #(.FAMILY(FAMILY)) u_mja (
    .clk  (clk),
    .rst_n(rst_n),
    .load (state == ST_DUMMY || state == ST_SYNC),
    .dest (dest),
    .frame_addr(new_far)
  );

  // Output selection.
  always_comb begin
    unique case (sel)
      SEL_FAR: word_d = new_far;
      SEL_CRC: word_d = crc_value;
      default: word_d = in_word;
    endcase
  end

  if (CRC_CALC) begin : g_crc
    logic [31:0] crc_unused;
    // The CRC follows the outgoing words, so the relocated FAR is included.
    birf_crc u_crc (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (restart | (in_valid & crc_clear)),
      .en      (in_valid & crc_en),
      .reg_addr(crc_reg),
      .data    (word_d),
      .crc     (crc_value),
      .crc_next(crc_unused)
    );
  end else begin : g_lite
    assign crc_value = LITE_CRC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= in_valid & ~restart;
      if (in_valid) out_word <= word_d;
    end
  end

endmodule
