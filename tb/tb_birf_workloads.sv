// tb_birf_workloads: relocation of ten partial bitstreams whose sizes are
// those of the published relocation-time measurements (1.45 KB to
// 1026.89 KB, 1 KB = 1024 bytes, 4 bytes per word), through the filter core
// at its default parameters.  Each bitstream is synthetic (random frame
// data behind real command packets), streamed at one word per cycle without
// gaps; every output word is compared with the reference model, and the
// relocated stream must be complete exactly one cycle after the last input
// word (cycles = words + 1).  The measured cycles are printed with the time
// they would take at 160 MHz.
module tb_birf_workloads;
  import birf_pkg::*;
  import birf_tb_pkg::*;

  int checks = 0, failures = 0;
  logic          clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [31:0]   in_word = '0;
  dest_t         dest = '0;
  logic          out_valid;
  logic [31:0]   out_word;
  parser_state_e state;

  birf_square dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  word_q_t exp_q;
  int      n_out, n_bad;
  longint  cyc, last_out_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      if (n_out >= exp_q.size() || out_word != exp_q[n_out]) n_bad++;
      n_out++;
      last_out_cyc <= cyc;
    end
  end

  // Sizes in hundredths of a KB.
  int sizes[10] = '{145, 314, 1061, 6591, 9412, 13968, 14879, 18956, 57044, 102689};

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int overhead;
    cyc = 0;
    overhead = gen_bitstream(0, 1'b0).size();
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sizes[b]) begin
      word_q_t    bs;
      ref_stats_t st;
      int         words;
      longint     first_cyc;
      logic [13:0] d;
      words = (sizes[b] * 256 + 50) / 100;
      bs = gen_bitstream(words - overhead, 1'b0);
      d = 14'($urandom());
      exp_q = ref_relocate(bs, 1'b0, d, 1'b1, '0, st);
      n_out = 0; n_bad = 0;
      @(negedge clk);
      restart = 1; dest = dest_t'(d);
      @(negedge clk);
      restart = 0;
      first_cyc = cyc;
      foreach (bs[k]) begin
        in_valid = 1; in_word = bs[k];
        @(negedge clk);
      end
      in_valid = 0;
      repeat (3) @(negedge clk);
      check(bs.size() == words, "bitstream size");
      check(n_out == words, "all words out");
      check(n_bad == 0, $sformatf("bitstream %0d: %0d words differ", b + 1, n_bad));
      check(st.far_replaced == 1 && st.crc_replaced == 1, "FAR and CRC present");
      check(last_out_cyc - first_cyc + 1 == longint'(words) + 1,
            $sformatf("bitstream %0d: %0d cycles for %0d words", b + 1,
                      last_out_cyc - first_cyc + 1, words));
      $display("bitstream %0d: %0d words, %0d cycles, %0.3f ms at 160 MHz",
               b + 1, words, last_out_cyc - first_cyc + 1,
               real'(last_out_cyc - first_cyc + 1) / 160.0e3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
