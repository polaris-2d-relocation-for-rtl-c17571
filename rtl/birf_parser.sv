// birf_parser: bitstream parser FSM of the BiRF Square relocation filter.
//
// Follows a Virtex-4 / Virtex-5 configuration bitstream word by word and
// tells the filter which words must be changed.  States:
//   DUMMY  waits for the Dummy word FFFFFFFF; any other word keeps it here.
//   SYNC   the Dummy word was seen; the Sync word AA995566 moves to WAIT,
//          another Dummy word stays here, any other word returns to DUMMY.
//   WAIT   expects a packet header.  30000001 (Type 1, write 1 word to CRC)
//          goes to CRC, 30002001 (Type 1, write 1 word to FAR) goes to FAR,
//          any other write header with a word count above zero goes to CMD.
//   CRC    the current word is the CRC parameter; back to WAIT.
//   FAR    the current word is the FAR parameter; back to WAIT.
//   CMD    the current word is a parameter of a generic command; the
//          remaining word count is decremented and the FSM returns to WAIT
//          when it reaches zero.
// Commands with one and with several parameters are handled alike.  A Type 1
// header with a zero word count stays in WAIT and records its register, so
// that a following Type 2 header (27-bit word count) continues the same
// write.
//
// This design's choices: read and NOP headers, padding and any word that is
// not a header leave the FSM in WAIT (a read carries no parameter words in
// the incoming stream); a Type 2 header inherits its write/read sense from
// the Type 1 header before it.
//
// Interface: one word is consumed on each cycle with `in_valid` high.  All
// outputs other than `state` are combinational and describe the word now on
// `in_word`: `sel` says whether it is kept, replaced by the new FAR, or
// replaced by the CRC; `crc_en` says it must enter the CRC with register
// address `crc_reg`; `crc_clear` says it resets the CRC (the RCRC command,
// and the CRC check itself).  `restart` returns the FSM to DUMMY.
module birf_parser
  import birf_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          in_valid,
  input  logic [31:0]   in_word,
  output parser_state_e state,
  output out_sel_e      sel,
  output logic          crc_en,
  output logic          crc_clear,
  output logic [4:0]    crc_reg
);

  parser_state_e        state_q, state_d;
  logic [WC_BITS-1:0]   cnt_q, cnt_d;        // parameters still to come in CMD
  logic [4:0]           reg_q, reg_d;        // register of the current packet
  logic                 wr_q, wr_d;          // current packet is a write

  type1_hdr_t h1;
  type2_hdr_t h2;
  assign h1 = type1_hdr_t'(in_word);
  assign h2 = type2_hdr_t'(in_word);

  assign state = state_q;

  // Registers whose writes enter the configuration CRC: every register but
  // the CRC register itself and the daisy-chain output register.
  function automatic logic crc_checked(input logic [4:0] r);
    return (r != REG_CRC) && (r != REG_LOUT);
  endfunction

  always_comb begin
    state_d   = state_q;
    cnt_d     = cnt_q;
    reg_d     = reg_q;
    wr_d      = wr_q;
    sel       = SEL_PASS;
    crc_en    = 1'b0;
    crc_clear = 1'b0;
    crc_reg   = reg_q;

    if (in_valid) begin
      unique case (state_q)
        ST_DUMMY: begin
          if (in_word == DUMMY_WORD) state_d = ST_SYNC;
        end

        ST_SYNC: begin
          if (in_word == SYNC_WORD)       state_d = ST_WAIT;
          else if (in_word != DUMMY_WORD) state_d = ST_DUMMY;
        end

        ST_WAIT: begin
          if (in_word == HDR_WRITE_CRC) begin
            state_d = ST_CRC;
            reg_d   = REG_CRC;
            wr_d    = 1'b1;
          end else if (in_word == HDR_WRITE_FAR) begin
            state_d = ST_FAR;
            reg_d   = REG_FAR;
            wr_d    = 1'b1;
          end else if (h1.htype == HDR_TYPE1) begin
            reg_d = h1.reg_addr;
            wr_d  = (h1.op == OP_WRITE);
            if (h1.op == OP_WRITE && h1.wc != '0) begin
              state_d = ST_CMD;
              cnt_d   = WC_BITS'(h1.wc);
            end
          end else if (h2.htype == HDR_TYPE2) begin
            if (wr_q && h2.wc != '0) begin
              state_d = ST_CMD;
              cnt_d   = h2.wc;
            end
          end
        end

        ST_CRC: begin
          sel       = SEL_CRC;
          crc_clear = 1'b1;
          state_d   = ST_WAIT;
        end

        ST_FAR: begin
          sel     = SEL_FAR;
          crc_en  = 1'b1;
          crc_reg = REG_FAR;
          state_d = ST_WAIT;
        end

        ST_CMD: begin
          crc_en    = crc_checked(reg_q);
          crc_clear = (reg_q == REG_CMD) && (in_word == 32'(CMD_RCRC));
          if (cnt_q == WC_BITS'(1)) state_d = ST_WAIT;
          cnt_d = cnt_q - 1'b1;
        end

        default: state_d = ST_DUMMY;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_DUMMY;
      cnt_q   <= '0;
      reg_q   <= '0;
      wr_q    <= 1'b0;
    end else if (restart) begin
      state_q <= ST_DUMMY;
      cnt_q   <= '0;
      reg_q   <= '0;
      wr_q    <= 1'b0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      reg_q   <= reg_d;
      wr_q    <= wr_d;
    end
  end

  // A parameter count never runs out while the FSM is still in CMD.
  a_cnt_nonzero : assert property (@(posedge clk) disable iff (!rst_n)
                                   state_q == ST_CMD |-> cnt_q != '0);

endmodule
