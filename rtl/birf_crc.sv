// birf_crc: configuration CRC unit of the BiRF Square filter.
//
// Keeps the running 32-bit CRC that a Virtex-4 / Virtex-5 device computes
// while it is configured, so that the filter can write the correct value
// after it has changed the frame address.  Each word that is written to a
// register in the checked set updates the CRC with 37 bits: the 5-bit
// register address above the 32-bit data word.  The polynomial is
// x^32+x^28+x^27+x^26+x^25+x^23+x^22+x^20+x^19+x^18+x^14+x^13+x^11+x^10+x^9
// +x^8+x^6+1.  The 37 bits are folded in at once by an unrolled (parallel)
// XOR network, so one word is absorbed per clock cycle.
//
// This design's choices: the bits enter least-significant first into a
// reflected shift register starting from zero, with no final inversion,
// which is how the later Xilinx families define their configuration CRC;
// the device-side bit order is not otherwise specified.
//
// Interface: `clear` (synchronous, wins over `en`) sets the CRC to zero, as
// the RCRC command does; `en` folds {reg_addr, data} in at the clock edge.
// `crc` is the registered value including every word accepted so far;
// `crc_next` is what it becomes at the next edge.
module birf_crc
  import birf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [4:0]  reg_addr,
  input  logic [31:0] data,
  output logic [31:0] crc,
  output logic [31:0] crc_next
);

  // One parallel update step: 37 input bits, LSB first.
  function automatic logic [31:0] crc_step(input logic [31:0] c_in,
                                           input logic [CRC_IN_BITS-1:0] val);
    logic [31:0] c;
    c = c_in;
    for (int i = 0; i < CRC_IN_BITS; i++) begin
      if (c[0] ^ val[i]) c = (c >> 1) ^ CRC_POLY_REV;
      else               c = c >> 1;
    end
    return c;
  endfunction

  always_comb begin
    if (clear)   crc_next = '0;
    else if (en) crc_next = crc_step(crc, {reg_addr, data});
    else         crc_next = crc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc <= '0;
    else        crc <= crc_next;
  end

endmodule
