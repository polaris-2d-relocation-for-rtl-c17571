// tb_birf_square_opb: end-to-end test of the OPB-attached relocation filter
// at its default parameters (Virtex-4, CRC computed).
//
// A bus-functional OPB master does what the processor of a self-
// reconfiguring system does: it writes the destination, restarts the filter,
// then for every word of a partial bitstream writes DIN and reads DOUT,
// storing the relocated word.  The stored stream is compared with the
// reference relocation model.  The bus handshake (one acknowledge per
// access, data only during the acknowledge), the DEST read-back and the
// STATUS register are checked too.  The test counts how often each filter
// mechanism happened and fails if one never did: aborted synchronisation,
// repeated Dummy words, FAR replacement, CRC replacement, generic parameters
// passed through, Type 2 packets, RCRC resets, words kept out of the CRC,
// restarts.
module tb_birf_square_opb;
  import birf_pkg::*;
  import birf_tb_pkg::*;

  localparam logic [31:0] BASE = 32'h7E00_0000;

  int checks = 0, failures = 0;
  logic        OPB_Clk = 0, OPB_Rst = 1;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0;
  logic [3:0]  OPB_BE = 4'hF;
  logic        OPB_RNW = 0, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] Sl_DBus;
  logic        Sl_xferAck, Sl_errAck, Sl_toutSup, Sl_retry;

  birf_square_opb dut (.*);

  always #5 OPB_Clk = ~OPB_Clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------- bus master
  int bus_cycles = 0;

  task automatic opb_access(input logic [31:0] addr, input bit rnw,
                            input logic [31:0] wdata, output logic [31:0] rdata);
    int wait_cycles;
    @(negedge OPB_Clk);
    OPB_select = 1; OPB_ABus = addr; OPB_RNW = rnw; OPB_DBus = rnw ? '0 : wdata;
    wait_cycles = 0;
    do begin
      @(negedge OPB_Clk);
      wait_cycles++;
      if (!Sl_xferAck) check(Sl_DBus == '0, "data bus idle without acknowledge");
    end while (!Sl_xferAck && wait_cycles < 16);
    check(Sl_xferAck, "acknowledge received");
    check(wait_cycles == 1, "acknowledge after one cycle");
    check(!Sl_errAck && !Sl_retry && !Sl_toutSup, "no error, retry or time-out suppress");
    rdata = Sl_DBus;
    bus_cycles += wait_cycles + 1;
    // The master holds select to the end of the acknowledge cycle.
    @(posedge OPB_Clk);
    #1;
    OPB_select = 0; OPB_ABus = '0; OPB_DBus = '0; OPB_RNW = 0;
  endtask

  task automatic opb_write(input logic [7:0] ofs, input logic [31:0] d);
    logic [31:0] unused;
    opb_access(BASE + 32'(ofs), 1'b0, d, unused);
  endtask

  task automatic opb_read(input logic [7:0] ofs, output logic [31:0] d);
    opb_access(BASE + 32'(ofs), 1'b1, '0, d);
  endtask

  // ------------------------------------------------- mechanism counters
  int n_sync_abort = 0, n_dummy_repeat = 0, n_far = 0, n_crc = 0, n_generic = 0;
  int n_type2 = 0, n_rcrc = 0, n_excluded = 0, n_restart = 0;

  // Counted from the bus side: the parser state read from STATUS before and
  // after each word, and the register of the last packet header written.
  logic [4:0] last_reg = '0;

  task automatic count(input logic [2:0] st_prev, input logic [2:0] st_now,
                       input logic [31:0] w);
    case (st_prev)
      3'(ST_SYNC): begin
        if (w == 32'hFFFF_FFFF) n_dummy_repeat++;
        else if (st_now == 3'(ST_DUMMY)) n_sync_abort++;
      end
      3'(ST_WAIT): begin
        if (w[31:29] == 3'b001) last_reg = w[17:13];
        if (w[31:29] == 3'b010 && st_now == 3'(ST_CMD)) n_type2++;
      end
      3'(ST_FAR): n_far++;
      3'(ST_CRC): n_crc++;
      3'(ST_CMD): begin
        n_generic++;
        if (last_reg == 5'd4 && w == 32'h7) n_rcrc++;
        if (last_reg == 5'd8) n_excluded++;
      end
      default: ;
    endcase
  endtask

  // ------------------------------------------------------------ relocate
  task automatic relocate(input word_q_t bs, input logic [13:0] d);
    word_q_t     exp, mem;
    ref_stats_t  st;
    logic [31:0] r;
    exp = ref_relocate(bs, 1'b0, d, 1'b1, '0, st);
    opb_write(8'h00, 32'(d));
    opb_read(8'h00, r);
    check(r == 32'(d), "DEST read-back");
    opb_write(8'h10, 32'h1);                 // restart
    opb_read(8'h0C, r);
    check(r == 32'h0, "STATUS after restart: DUMMY, no word");
    if (r == 32'h0) n_restart++;
    mem = {};
    foreach (bs[k]) begin
      logic [2:0] st_prev;
      st_prev = r[6:4];
      opb_write(8'h04, bs[k]);
      opb_read(8'h0C, r);
      check(r[0] == 1'b1, "STATUS: relocated word ready");
      count(st_prev, r[6:4], bs[k]);
      opb_read(8'h08, r);
      mem.push_back(r);
      opb_read(8'h0C, r);
      check(r[0] == 1'b0, "STATUS: ready cleared by DOUT read");
    end
    check(r[6:4] == 3'(ST_WAIT), "STATUS: parser in WAIT at end of bitstream");
    check(mem.size() == exp.size(), "word count");
    foreach (exp[k])
      check(mem[k] == exp[k], $sformatf("word %0d got %h exp %h", k, mem[k], exp[k]));
  endtask

  initial begin
    repeat (2_000_000) @(posedge OPB_Clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge OPB_Clk);
    OPB_Rst = 0;
    // An access outside the address window is not acknowledged.
    @(negedge OPB_Clk);
    OPB_select = 1; OPB_ABus = BASE + 32'h100; OPB_RNW = 1;
    repeat (3) begin
      @(negedge OPB_Clk);
      check(!Sl_xferAck && Sl_DBus == '0, "no answer outside the window");
    end
    OPB_select = 0;
    // Small bitstream with every kind of packet, then one of the size of
    // the smallest evaluated bitstream (1.45 KB, about 371 words).
    relocate(gen_bitstream(24, 1'b1), {1'b1, 5'd1, 8'd23});
    relocate(gen_bitstream(300, 1'b1), {1'b0, 5'd4, 8'd45});
    opb_read(8'h0C, r);
    $display("mechanisms: sync_abort=%0d dummy_repeat=%0d far=%0d crc=%0d generic=%0d type2=%0d rcrc=%0d excluded=%0d restart=%0d",
             n_sync_abort, n_dummy_repeat, n_far, n_crc, n_generic, n_type2, n_rcrc,
             n_excluded, n_restart);
    check(n_sync_abort > 0,   "mechanism: aborted synchronisation");
    check(n_dummy_repeat > 0, "mechanism: repeated Dummy word");
    check(n_far == 2,         "mechanism: FAR replaced once per bitstream");
    check(n_crc == 2,         "mechanism: CRC replaced once per bitstream");
    check(n_generic > 0,      "mechanism: generic parameters passed");
    check(n_type2 == 2,       "mechanism: Type 2 packet");
    check(n_rcrc == 2,        "mechanism: RCRC reset");
    check(n_excluded > 0,     "mechanism: word kept out of the CRC");
    check(n_restart == 2,     "mechanism: restart");
    $display("bus cycles: %0d", bus_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
