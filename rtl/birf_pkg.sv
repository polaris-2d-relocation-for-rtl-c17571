// birf_pkg: constants and types shared by the BiRF Square relocation filter.
//
// Holds the fixed words of a Virtex-4 / Virtex-5 configuration bitstream
// (Dummy and Sync words, the two Type 1 headers the parser looks for), the
// packet header layouts, the configuration register and command codes, the
// CRC polynomial, the 14-bit relocation destination and the parser states.
// All numeric values are those of the Virtex-4/Virtex-5 configuration
// interface; the enum encodings of states and families are this design's own.
package birf_pkg;

  // ---------------------------------------------------------------- words
  localparam logic [31:0] DUMMY_WORD    = 32'hFFFF_FFFF;
  localparam logic [31:0] SYNC_WORD     = 32'hAA99_5566;
  // Type 1, write, 1 word, to the CRC register and to the FAR register.
  localparam logic [31:0] HDR_WRITE_CRC = 32'h3000_0001;
  localparam logic [31:0] HDR_WRITE_FAR = 32'h3000_2001;

  // ------------------------------------------------------- packet headers
  localparam logic [2:0] HDR_TYPE1 = 3'b001;
  localparam logic [2:0] HDR_TYPE2 = 3'b010;

  typedef enum logic [1:0] {
    OP_NOP   = 2'b00,
    OP_READ  = 2'b01,
    OP_WRITE = 2'b10,
    OP_RSVD  = 2'b11
  } opcode_e;

  // Type 1: [31:29] type, [28:27] opcode, [26:13] register, [12:11]
  // reserved, [10:0] word count.  Only the low five register bits are used.
  typedef struct packed {
    logic [2:0]  htype;
    opcode_e     op;
    logic [8:0]  reg_unused;
    logic [4:0]  reg_addr;
    logic [1:0]  rsvd;
    logic [10:0] wc;
  } type1_hdr_t;

  // Type 2: [31:29] type, [28:27] opcode/reserved, [26:0] word count.
  typedef struct packed {
    logic [2:0]  htype;
    logic [1:0]  op;
    logic [26:0] wc;
  } type2_hdr_t;

  localparam int unsigned WC_BITS = 27;

  // --------------------------------------------- configuration registers
  localparam logic [4:0] REG_CRC    = 5'b00000;
  localparam logic [4:0] REG_FAR    = 5'b00001;
  localparam logic [4:0] REG_FDRI   = 5'b00010;
  localparam logic [4:0] REG_FDRO   = 5'b00011;
  localparam logic [4:0] REG_CMD    = 5'b00100;
  localparam logic [4:0] REG_CTL0   = 5'b00101;
  localparam logic [4:0] REG_MASK   = 5'b00110;
  localparam logic [4:0] REG_STAT   = 5'b00111;
  localparam logic [4:0] REG_LOUT   = 5'b01000;
  localparam logic [4:0] REG_COR0   = 5'b01001;
  localparam logic [4:0] REG_MFWR   = 5'b01010;
  localparam logic [4:0] REG_CBC    = 5'b01011;
  localparam logic [4:0] REG_IDCODE = 5'b01100;

  // ------------------------------------------------------------ commands
  localparam logic [4:0] CMD_NULL = 5'b00000;
  localparam logic [4:0] CMD_WCFG = 5'b00001;
  localparam logic [4:0] CMD_RCRC = 5'b00111;

  // ----------------------------------------------------------------- CRC
  // x^32+x^28+x^27+x^26+x^25+x^23+x^22+x^20+x^19+x^18+x^14+x^13+x^11+x^10
  //    +x^9+x^8+x^6+1, written MSB-first (0x1EDC6F41) and bit-reversed for
  // the LSB-first shift register.
  localparam logic [31:0] CRC_POLY     = 32'h1EDC_6F41;
  localparam logic [31:0] CRC_POLY_REV = 32'h82F6_3B78;
  localparam int unsigned CRC_IN_BITS  = 37;   // 5-bit register + 32-bit data

  // -------------------------------------------------- relocation target
  // 14 bits: top/bottom flag, 5-bit row, 8-bit major column.
  typedef struct packed {
    logic       top_bottom;
    logic [4:0] row;
    logic [7:0] col;
  } dest_t;

  typedef enum logic [0:0] {
    FAMILY_V4 = 1'b0,
    FAMILY_V5 = 1'b1
  } family_e;

  // ------------------------------------------------------- parser states
  typedef enum logic [2:0] {
    ST_DUMMY = 3'd0,
    ST_SYNC  = 3'd1,
    ST_WAIT  = 3'd2,
    ST_CRC   = 3'd3,
    ST_FAR   = 3'd4,
    ST_CMD   = 3'd5
  } parser_state_e;

  // What the filter puts on its output for the current word.
  typedef enum logic [1:0] {
    SEL_PASS = 2'd0,
    SEL_FAR  = 2'd1,
    SEL_CRC  = 2'd2
  } out_sel_e;

endpackage
