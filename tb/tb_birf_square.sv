// tb_birf_square: end-to-end check of the relocation filter core.
// Three instances run side by side on the same input: the Virtex-4
// general-purpose filter (defaults), a Virtex-5 one, and a Virtex-4 Lite one
// (fixed CRC word).  Several synthetic partial bitstreams, each with its own
// destination, are streamed with random idle cycles and a restart before
// each; every output word is compared with the reference relocation model,
// and each output must appear exactly one cycle after its input word.
module tb_birf_square;
  import birf_pkg::*;
  import birf_tb_pkg::*;

  localparam logic [31:0] LITE = 32'h1357_9BDF;

  int checks = 0, failures = 0;
  logic          clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [31:0]   in_word = '0;
  dest_t         dest = '0;
  logic          ov4, ov5, ovl;
  logic [31:0]   ow4, ow5, owl;
  parser_state_e st4, st5, stl;

  birf_square u_v4 (.clk, .rst_n, .restart, .dest, .in_valid, .in_word,
                    .out_valid(ov4), .out_word(ow4), .state(st4));
  birf_square #(.FAMILY(FAMILY_V5)) u_v5 (.clk, .rst_n, .restart, .dest, .in_valid,
                    .in_word, .out_valid(ov5), .out_word(ow5), .state(st5));
  birf_square #(.CRC_CALC(1'b0), .LITE_CRC(LITE)) u_lite (.clk, .rst_n, .restart,
                    .dest, .in_valid, .in_word, .out_valid(ovl), .out_word(owl),
                    .state(stl));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  word_q_t got4, got5, gotl;
  logic    prev_valid = 0;

  // Output capture and the one-cycle latency rule.
  always @(posedge clk) begin
    if (rst_n) begin
      check(ov4 == prev_valid && ov5 == prev_valid && ovl == prev_valid,
            "out_valid one cycle after in_valid");
      if (ov4) got4.push_back(ow4);
      if (ov5) got5.push_back(ow5);
      if (ovl) gotl.push_back(owl);
    end
    prev_valid <= in_valid && !restart;
  end

  task automatic run(input word_q_t bs, input logic [13:0] d);
    word_q_t    e4, e5, el;
    ref_stats_t s4, s5, sl;
    e4 = ref_relocate(bs, 1'b0, d, 1'b1, '0, s4);
    e5 = ref_relocate(bs, 1'b1, d, 1'b1, '0, s5);
    el = ref_relocate(bs, 1'b0, d, 1'b0, LITE, sl);
    got4 = {}; got5 = {}; gotl = {};
    @(negedge clk);
    restart = 1; dest = dest_t'(d);
    @(negedge clk);
    restart = 0;
    foreach (bs[k]) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_word = bs[k];
      @(negedge clk);
      in_valid = 0;
    end
    @(negedge clk);
    check(got4.size() == bs.size(), "v4 word count");
    check(got5.size() == bs.size(), "v5 word count");
    check(gotl.size() == bs.size(), "lite word count");
    foreach (e4[k]) begin
      check(got4[k] == e4[k], $sformatf("v4 word %0d got %h exp %h", k, got4[k], e4[k]));
      check(got5[k] == e5[k], $sformatf("v5 word %0d got %h exp %h", k, got5[k], e5[k]));
      check(gotl[k] == el[k], $sformatf("lite word %0d got %h exp %h", k, gotl[k], el[k]));
    end
    check(s4.far_replaced == 1 && s4.crc_replaced == 1, "stream had FAR and CRC");
    // The relocated stream must really differ from the input in the FAR word.
    check(e4 != bs, "relocation changed the stream");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(gen_bitstream(16, 1'b1), {1'b0, 5'd2, 8'd10});
    run(gen_bitstream(41, 1'b0), {1'b1, 5'd0, 8'd33});
    run(gen_bitstream(300, 1'b1), 14'($urandom()));
    run(gen_bitstream(1, 1'b1), 14'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
