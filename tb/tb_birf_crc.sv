// tb_birf_crc: checks the CRC unit.  The reference model is first checked
// against the standard CRC-32C value of "123456789" (E3069283), then random
// sequences of updates, idle cycles and clears are applied to the unit and
// its registered CRC is compared with the model after every clock edge.  A
// single update must be absorbed in one cycle.
module tb_birf_crc;
  import birf_tb_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        clear = 0, en = 0;
  logic [4:0]  reg_addr = '0;
  logic [31:0] data = '0;
  logic [31:0] crc, crc_next;
  word_t       model;

  birf_crc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s[];
    s = new[9];
    foreach (s[k]) s[k] = 8'h31 + 8'(k);
    check(ref_crc32c_bytes(s), 32'hE306_9283, "model check value");

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(crc, 32'h0, "after reset");
    model = '0;
    for (int t = 0; t < 3000; t++) begin
      int k;
      k = int'($urandom_range(0, 9));
      clear    = (k == 0);
      en       = (k >= 3);
      reg_addr = 5'($urandom());
      data     = $urandom();
      #1;
      if (clear)   check(crc_next, 32'h0, "crc_next on clear");
      else if (en) check(crc_next, ref_crc_update(model, reg_addr, data), "crc_next");
      if (clear)   model = '0;
      else if (en) model = ref_crc_update(model, reg_addr, data);
      @(posedge clk);
      @(negedge clk);
      check(crc, model, "crc");
    end
    // Known sequence: FAR write then a data word, from zero.
    clear = 1; en = 0; @(posedge clk); @(negedge clk);
    clear = 0; en = 1; reg_addr = 5'd1; data = 32'h0040_CA80;
    @(posedge clk); @(negedge clk);
    en = 0;
    check(crc, ref_crc_update(32'h0, 5'd1, 32'h0040_CA80), "single word latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
