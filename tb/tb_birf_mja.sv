// tb_birf_mja: checks the FAR calculation unit for both device families.
// Destinations (a sweep plus random ones) are loaded into a Virtex-4 and a
// Virtex-5 instance and the registered frame addresses are compared with the
// field concatenation of the relocation formula (reference in birf_tb_pkg)
// and with a few addresses worked out by hand.  The address must appear one
// cycle after loading and must hold while `load` is low.
module tb_birf_mja;
  import birf_pkg::*;
  import birf_tb_pkg::*;

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, load = 0;
  dest_t       d = '0;
  logic [31:0] far4, far5;

  birf_mja #(.FAMILY(FAMILY_V4)) u_v4 (.clk, .rst_n, .load, .dest(d), .frame_addr(far4));
  birf_mja #(.FAMILY(FAMILY_V5)) u_v5 (.clk, .rst_n, .load, .dest(d), .frame_addr(far5));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s dest=%h got=%h exp=%h", what, d, got, exp);
    end
  endtask

  task automatic apply(input logic [13:0] v);
    logic [31:0] e4, e5;
    e4 = far4; e5 = far5;
    @(negedge clk);
    d = dest_t'(v); load = 1;
    #1;
    check(far4, e4, "v4 before edge");
    @(negedge clk);
    load = 0;
    check(far4, ref_far(1'b0, v), "v4");
    check(far5, ref_far(1'b1, v), "v5");
    d = dest_t'(~v);                       // must not reach the output
    @(negedge clk);
    check(far4, ref_far(1'b0, v), "v4 hold");
    check(far5, ref_far(1'b1, v), "v5 hold");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Hand-worked: bottom half (1), row 3, column 0x2A.
    apply({1'b1, 5'd3, 8'h2A});
    check(far4, 32'h0040_CA80, "v4 hand");
    check(far5, 32'h0011_9500, "v5 hand");
    // Top half, row 9, column 55.
    apply({1'b0, 5'd9, 8'd55});
    check(far4, 32'h0002_4DC0, "v4 hand2");
    check(far5, 32'h0004_9B80, "v5 hand2");
    for (int i = 0; i < 16384; i += 37) apply(14'(i));
    repeat (200) apply(14'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
