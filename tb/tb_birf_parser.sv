// tb_birf_parser: checks the parser FSM transition by transition.
// Each step applies one word, checks the combinational decisions for that
// word (output select, CRC enable/clear and register) and the state after the
// clock edge.  Covers: DUMMY holding on other words, DUMMY->SYNC, SYNC
// holding on further Dummy words, SYNC->DUMMY on another word, SYNC->WAIT,
// the CRC and FAR headers, generic writes with one and several parameters,
// a Type 1 + Type 2 pair, NOP, read and padding words in WAIT, a LOUT write
// (outside the CRC), the RCRC command, idle cycles and restart.
module tb_birf_parser;
  import birf_pkg::*;

  int checks = 0, failures = 0;
  logic          clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [31:0]   in_word = '0;
  parser_state_e state;
  out_sel_e      sel;
  logic          crc_en, crc_clear;
  logic [4:0]    crc_reg;

  birf_parser dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: word=%h state=%s sel=%s en=%b clr=%b reg=%0d",
               what, in_word, state.name(), sel.name(), crc_en, crc_clear, crc_reg);
    end
  endtask

  // Apply word w; expect the decisions, then the state after the edge.
  task automatic step(input logic [31:0] w, input out_sel_e e_sel, input bit e_en,
                      input bit e_clr, input logic [4:0] e_reg,
                      input parser_state_e e_next, input string what);
    @(negedge clk);
    in_valid = 1; in_word = w;
    #1;
    check(sel == e_sel, {what, " sel"});
    check(crc_en == e_en, {what, " crc_en"});
    check(crc_clear == e_clr, {what, " crc_clear"});
    if (e_en) check(crc_reg == e_reg, {what, " crc_reg"});
    @(posedge clk);
    #1;
    in_valid = 0;
    check(state == e_next, {what, " next state"});
  endtask

  function automatic logic [31:0] wr(input logic [4:0] r, input int wc);
    return {3'b001, 2'b10, 9'b0, r, 2'b00, 11'(wc)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_DUMMY, "reset state");
    step(32'h1234_5678, SEL_PASS, 0, 0, 0, ST_DUMMY, "dummy other");
    step(32'hAA99_5566, SEL_PASS, 0, 0, 0, ST_DUMMY, "sync without dummy");
    step(32'hFFFF_FFFF, SEL_PASS, 0, 0, 0, ST_SYNC,  "dummy word");
    step(32'hFFFF_FFFF, SEL_PASS, 0, 0, 0, ST_SYNC,  "second dummy");
    step(32'h0000_00BB, SEL_PASS, 0, 0, 0, ST_DUMMY, "sync other");
    step(32'hFFFF_FFFF, SEL_PASS, 0, 0, 0, ST_SYNC,  "dummy again");
    // idle cycles keep the state
    repeat (3) @(posedge clk);
    #1 check(state == ST_SYNC, "idle holds");
    step(32'hAA99_5566, SEL_PASS, 0, 0, 0, ST_WAIT,  "sync word");
    step(32'h2000_0000, SEL_PASS, 0, 0, 0, ST_WAIT,  "nop");
    step(32'hFFFF_FFFF, SEL_PASS, 0, 0, 0, ST_WAIT,  "padding in wait");
    step(wr(5'd4, 1),   SEL_PASS, 0, 0, 0, ST_CMD,   "cmd header");
    step(32'h0000_0007, SEL_PASS, 1, 1, 5'd4, ST_WAIT, "rcrc");
    step(32'h3000_2001, SEL_PASS, 0, 0, 0, ST_FAR,   "far header");
    step(32'h0040_0000, SEL_FAR,  1, 0, 5'd1, ST_WAIT, "far word");
    step(wr(5'd4, 1),   SEL_PASS, 0, 0, 0, ST_CMD,   "wcfg header");
    step(32'h0000_0001, SEL_PASS, 1, 0, 5'd4, ST_WAIT, "wcfg");
    step(wr(5'd2, 3),   SEL_PASS, 0, 0, 0, ST_CMD,   "fdri 3 words");
    step(32'h1111_1111, SEL_PASS, 1, 0, 5'd2, ST_CMD, "fdri w1");
    step(32'h3000_2001, SEL_PASS, 1, 0, 5'd2, ST_CMD, "fdri w2 looks like far hdr");
    step(32'h3000_0001, SEL_PASS, 1, 0, 5'd2, ST_WAIT, "fdri w3 looks like crc hdr");
    step(32'h2800_E001, SEL_PASS, 0, 0, 0, ST_WAIT,  "read header");
    step(wr(5'd2, 0),   SEL_PASS, 0, 0, 0, ST_WAIT,  "type1 wc0");
    step({3'b010, 2'b10, 27'd4}, SEL_PASS, 0, 0, 0, ST_CMD, "type2 4 words");
    for (int k = 0; k < 4; k++)
      step(32'hFFFF_FFFF - k, SEL_PASS, 1, 0, 5'd2, (k == 3) ? ST_WAIT : ST_CMD, "type2 data");
    step({3'b010, 2'b10, 27'd0}, SEL_PASS, 0, 0, 0, ST_WAIT, "type2 wc0");
    step(32'h2800_0000, SEL_PASS, 0, 0, 0, ST_WAIT,  "read type1 wc0");
    step({3'b010, 2'b01, 27'd9}, SEL_PASS, 0, 0, 0, ST_WAIT, "type2 after read");
    step(wr(5'd8, 2),   SEL_PASS, 0, 0, 0, ST_CMD,   "lout header");
    step(32'h0000_0007, SEL_PASS, 0, 0, 0, ST_CMD,   "lout w1 not crc");
    step(32'hABCD_0000, SEL_PASS, 0, 0, 0, ST_WAIT,  "lout w2");
    step(32'h3000_0001, SEL_PASS, 0, 0, 0, ST_CRC,   "crc header");
    step(32'hDEAD_BEEF, SEL_CRC,  0, 1, 0, ST_WAIT,  "crc word");
    step(wr(5'd4, 1),   SEL_PASS, 0, 0, 0, ST_CMD,   "desynch header");
    // restart in the middle of a packet
    @(negedge clk);
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    check(state == ST_DUMMY, "restart");
    step(32'hFFFF_FFFF, SEL_PASS, 0, 0, 0, ST_SYNC,  "dummy after restart");
    step(32'hAA99_5566, SEL_PASS, 0, 0, 0, ST_WAIT,  "sync after restart");
    // long Type 1 count: 2047 parameters
    step(wr(5'd2, 2047), SEL_PASS, 0, 0, 0, ST_CMD,  "fdri 2047");
    for (int k = 0; k < 2047; k++) begin
      @(negedge clk); in_valid = 1; in_word = $urandom();
      @(posedge clk); #1; in_valid = 0;
      if (k < 2046) check(state == ST_CMD, "long packet stays");
    end
    check(state == ST_WAIT, "long packet ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
