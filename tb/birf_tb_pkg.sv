// birf_tb_pkg: reference models and stimulus generators for the BiRF Square
// testbenches.
//
// The models are written independently of the RTL:
//  * ref_far builds the relocated frame address by concatenating the fields
//    in the order of the relocation formula.
//  * ref_crc_update computes the configuration CRC with an MSB-first shift
//    register on bit-reversed values, which is equivalent to the LSB-first
//    reflected register of the RTL.
//  * ref_relocate walks a whole bitstream packet by packet (not as an FSM)
//    and returns the relocated stream.
//  * gen_bitstream builds a synthetic Virtex-style partial bitstream: padding,
//    bus-width words, Dummy/Sync, RCRC, IDCODE, FAR, WCFG, a frame written with
//    a Type 1 packet, a long FDRI write with a Type 1 + Type 2 header pair,
//    a read header, a LOUT write, the CRC check and trailing commands.
package birf_tb_pkg;

  typedef logic [31:0] word_t;
  typedef word_t       word_q_t[$];

  localparam word_t POLY = 32'h1EDC_6F41;

  function automatic word_t rev32(input word_t v);
    word_t r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  // Frame address of the destination d = {top/bottom, row[4:0], col[7:0]}.
  function automatic word_t ref_far(input bit v5, input logic [13:0] d);
    if (!v5) return {9'b0, d[13], 3'b000, d[12:0], 6'b0};
    else     return {8'b0, 3'b000, d[13], d[12:0], 7'b0};
  endfunction

  // One CRC step over the 37-bit value {reg, data}, bit 0 entering first.
  function automatic word_t ref_crc_update(input word_t crc, input logic [4:0] r,
                                           input word_t data);
    logic [36:0] v;
    word_t       c;
    v = {r, data};
    c = rev32(crc);
    for (int i = 0; i < 37; i++) begin
      logic fb;
      fb = c[31] ^ v[i];
      c  = {c[30:0], 1'b0};
      if (fb) c = c ^ POLY;
    end
    return rev32(c);
  endfunction

  // Standard CRC-32C of a byte string (init and final XOR all ones), with
  // the same shift-register form; used to validate the model itself.
  function automatic word_t ref_crc32c_bytes(input byte unsigned b[]);
    word_t c;
    c = '1;
    c = rev32(c);
    foreach (b[k]) begin
      for (int i = 0; i < 8; i++) begin
        logic fb;
        fb = c[31] ^ b[k][i];
        c  = {c[30:0], 1'b0};
        if (fb) c = c ^ POLY;
      end
    end
    return rev32(c) ^ 32'hFFFF_FFFF;
  endfunction

  // Counts of what a relocation run exercised.
  typedef struct {
    int far_replaced;
    int crc_replaced;
    int generic_words;
    int type2_packets;
    int rcrc_resets;
    int excluded_words;
    int sync_aborts;
  } ref_stats_t;

  function automatic logic crc_checked(input logic [4:0] r);
    return (r != 5'd0) && (r != 5'd8);
  endfunction

  // Relocate a bitstream; returns the expected output stream.
  function automatic word_q_t ref_relocate(input word_q_t in, input bit v5,
                                           input logic [13:0] d, input bit crc_calc,
                                           input word_t lite_crc,
                                           output ref_stats_t st);
    word_q_t    out;
    int         i, n;
    word_t      crc;
    logic [4:0] last_reg;
    bit         last_wr;
    st = '{default: 0};
    out = in;
    n = in.size();
    crc = '0;
    last_reg = '0;
    last_wr = 0;
    // Synchronisation: a run of Dummy words immediately followed by Sync.
    i = 0;
    while (i < n) begin
      if (in[i] == 32'hFFFF_FFFF) begin
        int j;
        j = i;
        while (j < n && in[j] == 32'hFFFF_FFFF) j++;
        if (j < n && in[j] == 32'hAA99_5566) begin i = j + 1; break; end
        if (j < n) st.sync_aborts++;
        i = j + 1;
      end else i++;
    end
    // Packets.
    while (i < n) begin
      word_t w;
      int    cnt;
      logic [4:0] r;
      w = in[i];
      cnt = 0;
      if (w == 32'h3000_0001) begin
        if (i + 1 < n) begin
          out[i+1] = crc_calc ? crc : lite_crc;
          st.crc_replaced++;
        end
        crc = '0;
        last_reg = 5'd0;
        last_wr  = 1;
        i += 2;
        continue;
      end
      if (w == 32'h3000_2001) begin
        if (i + 1 < n) begin
          out[i+1] = ref_far(v5, d);
          crc = ref_crc_update(crc, 5'd1, out[i+1]);
          st.far_replaced++;
        end
        last_reg = 5'd1;
        last_wr  = 1;
        i += 2;
        continue;
      end
      if (w[31:29] == 3'b001) begin
        last_reg = w[17:13];
        last_wr  = (w[28:27] == 2'b10);
        if (last_wr) cnt = int'(w[10:0]);
      end else if (w[31:29] == 3'b010) begin
        if (last_wr) begin
          cnt = int'(w[26:0]);
          if (cnt > 0) st.type2_packets++;
        end
      end
      r = last_reg;
      i++;
      for (int k = 0; k < cnt && i < n; k++, i++) begin
        st.generic_words++;
        if (r == 5'd4 && in[i] == 32'h0000_0007) begin
          crc = '0;
          st.rcrc_resets++;
        end else if (crc_checked(r)) crc = ref_crc_update(crc, r, in[i]);
        else st.excluded_words++;
      end
    end
    return out;
  endfunction

  function automatic word_t t1_write(input logic [4:0] r, input int wc);
    return {3'b001, 2'b10, 9'b0, r, 2'b00, 11'(wc)};
  endfunction

  // Synthetic partial bitstream with n_fdri words in the long FDRI write.
  function automatic word_q_t gen_bitstream(input int n_fdri, input bit extras);
    word_q_t q;
    q = {};
    repeat (4) q.push_back(32'hFFFF_FFFF);
    q.push_back(32'h0000_00BB);          // bus-width detection pattern
    q.push_back(32'h1122_0044);
    q.push_back(32'hFFFF_FFFF);
    q.push_back(32'hFFFF_FFFF);
    q.push_back(32'hAA99_5566);          // sync
    q.push_back(32'h2000_0000);          // NOP
    q.push_back(t1_write(5'd4, 1)); q.push_back(32'h0000_0007);   // RCRC
    q.push_back(32'h2000_0000);
    q.push_back(t1_write(5'd12, 1)); q.push_back(32'h0165_8093);  // IDCODE
    q.push_back(t1_write(5'd4, 1)); q.push_back(32'h0000_0001);   // WCFG
    q.push_back(32'h3000_2001); q.push_back($urandom());          // FAR
    q.push_back(t1_write(5'd4, 1)); q.push_back(32'h0000_0001);   // WCFG
    q.push_back(32'h2000_0000);
    if (extras) begin
      q.push_back(t1_write(5'd2, 41));                             // one frame
      repeat (41) q.push_back($urandom());
      q.push_back(32'h2800_E001);                                  // read STAT
      q.push_back(32'hFFFF_FFFF);                                  // padding
      q.push_back(t1_write(5'd8, 2));                              // LOUT
      q.push_back($urandom()); q.push_back($urandom());
    end
    q.push_back(t1_write(5'd2, 0));                                // FDRI, wc 0
    q.push_back({3'b010, 2'b10, 27'(n_fdri)});                     // Type 2
    repeat (n_fdri) q.push_back($urandom());
    q.push_back(32'h3000_0001); q.push_back($urandom());           // CRC
    q.push_back(t1_write(5'd4, 1)); q.push_back(32'h0000_000D);   // DESYNCH
    repeat (4) q.push_back(32'h2000_0000);
    return q;
  endfunction

endpackage
