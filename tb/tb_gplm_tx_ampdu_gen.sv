// tb_gplm_tx_ampdu_gen: self-checking testbench of the Tx A-MPDU generator.
//
// A behavioural Tx RAM (one-cycle read latency) is filled with random bytes. Random PPDUs
// (legacy frames and A-MPDUs of 1..5 subframes with random lengths, EOF bits and empty
// delimiter counts) are described by descriptors fed to the generator. A byte-level
// reference model, written independently of the RTL, builds the expected PSDU: delimiter
// (length, EOF, CRC-8 computed bit by bit, signature 0x4E), MPDU bytes, FCS, zero padding
// to 4 octets and empty delimiters. The stream is compared byte by byte, tkeep and tlast
// included, first under random PHY back-pressure and then at full speed, where the cycle
// count of a 5 x 4000-byte A-MPDU is checked against one word per cycle plus a small
// per-descriptor overhead (at least 16 bits per cycle, i.e. 1.6 Gbit/s at 100 MHz).
module tb_gplm_tx_ampdu_gen;
  import gplm_pkg::*;

  localparam int ADDR_W = 14;
  localparam int NWORDS = 2**ADDR_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              desc_valid, desc_ready;
  tx_desc_t          desc;
  logic              ram_en;
  logic [ADDR_W-1:0] ram_addr;
  logic [31:0]       ram_rdata;
  logic              tvalid, tready, tlast;
  logic [31:0]       tdata;
  logic [3:0]        tkeep;
  logic              busy;

  gplm_tx_ampdu_gen #(.ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .desc_valid, .desc_ready, .desc,
    .ram_en, .ram_addr, .ram_rdata,
    .phy_tvalid(tvalid), .phy_tready(tready), .phy_tdata(tdata), .phy_tkeep(tkeep),
    .phy_tlast(tlast), .busy);

  // behavioural Tx RAM
  logic [31:0] mem [NWORDS];
  always_ff @(posedge clk) if (ram_en) ram_rdata <= mem[ram_addr];

  function automatic logic [7:0] mem_byte(int a);
    return mem[(a / 4) % NWORDS][8*(a%4) +: 8];
  endfunction

  // ---------------- reference model ----------------
  typedef byte unsigned bq_t[$];
  function automatic logic [31:0] ref_crc32(byte unsigned q[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (q[i]) begin
      for (int b = 0; b < 8; b++) begin
        logic bit_in;
        bit_in = q[i][b] ^ c[0];
        c = c >> 1;
        if (bit_in) c = c ^ 32'hEDB88320;
      end
    end
    return ~c;
  endfunction

  // delimiter as 4 bytes, CRC-8 (x^8+x^2+x+1) over bits B0..B15, MSB-first register
  function automatic bq_t ref_delim(int len, bit eof);
    bq_t q;
    bit hdr [16];
    bit [7:0] r = 8'hFF;
    byte unsigned b0, b1, c;
    hdr[0] = eof; hdr[1] = 0;
    hdr[2] = len[12]; hdr[3] = len[13];
    for (int i = 0; i < 12; i++) hdr[4+i] = len[i];
    for (int i = 0; i < 16; i++) begin
      bit f = hdr[i] ^ r[7];
      r = {r[6:0], 1'b0};
      if (f) r = r ^ 8'h07;
    end
    r = ~r;
    b0 = 0; b1 = 0; c = 0;
    for (int i = 0; i < 8; i++) begin
      b0[i] = hdr[i]; b1[i] = hdr[8+i]; c[i] = r[7-i];
    end
    q.push_back(b0); q.push_back(b1); q.push_back(c); q.push_back(8'h4E);
    return q;
  endfunction

  typedef struct {
    byte unsigned bytes[$];
  } ppdu_t;

  ppdu_t    exp_q[$];
  tx_desc_t desc_q[$];

  // Append the expected bytes of one descriptor.
  function automatic bq_t ref_desc(tx_desc_t dd);
    bq_t q, mpdu;
    logic [31:0] fcs;
    int start = 0;
    for (int i = 0; i < int'(dd.flen); i++) mpdu.push_back(mem_byte(int'(dd.addr) * 4 + i));
    fcs = ref_crc32(mpdu);
    if (dd.ampdu) q = ref_delim(int'(dd.flen) + 4, dd.eof);
    foreach (mpdu[i]) q.push_back(mpdu[i]);
    for (int i = 0; i < 4; i++) q.push_back(fcs[8*i +: 8]);
    if (dd.ampdu) begin
      while ((q.size() - start) % 4 != 0) q.push_back(8'h00);
      for (int i = 0; i < int'(dd.padcnt); i++) q = {q, ref_delim(0, 1'b0)};
    end
    return q;
  endfunction

  int next_addr = 0;

  function automatic tx_desc_t mk_desc(int flen, bit ampdu, bit eof, int padcnt, bit last);
    tx_desc_t dd = '0;
    dd.addr = 16'(next_addr);
    dd.flen = 14'(flen);
    dd.ampdu = ampdu; dd.eof = eof; dd.padcnt = 8'(padcnt); dd.last = last;
    next_addr = (next_addr + (flen + 3) / 4 + 1) % (NWORDS - 1100);
    return dd;
  endfunction

  // Queue one PPDU made of n descriptors with lengths chosen by the caller (0: random).
  task automatic add_ppdu(bit ampdu, int n, int fixed_len);
    ppdu_t p;
    for (int k = 0; k < n; k++) begin
      int flen = (fixed_len != 0) ? fixed_len : 1 + int'($urandom_range(0, 300));
      tx_desc_t dd = mk_desc(flen, ampdu, ampdu && n == 1, ampdu ? int'($urandom_range(0, 2)) : 0, k == n - 1);
      p.bytes = {p.bytes, ref_desc(dd)};
      desc_q.push_back(dd);
    end
    exp_q.push_back(p);
  endtask

  // ---------------- drivers and monitor ----------------
  bit random_ready = 1'b1;
  always_ff @(posedge clk) tready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      desc_valid <= 1'b0;
    end else begin
      if (desc_valid && desc_ready) begin
        void'(desc_q.pop_front());
        desc_valid <= 1'b0;
      end else if (!desc_valid && desc_q.size() != 0) begin
        desc_valid <= 1'b1;
        desc       <= desc_q[0];
      end
    end
  end

  byte unsigned got[$];
  int ppdus_done = 0;
  int first_cycle = 0, last_cycle = 0, last_dur = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && tvalid && tready) begin
      if (got.size() == 0) first_cycle = cycle;
      for (int i = 0; i < 4; i++) if (tkeep[i]) got.push_back(tdata[8*i +: 8]);
      if (!tlast && tkeep != 4'hF) begin
        failures++; $display("FAIL: partial tkeep %h before tlast", tkeep);
      end
      if (tlast) begin
        ppdu_t e;
        last_cycle = cycle;
        last_dur   = last_cycle - first_cycle + 1;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL: unexpected PPDU");
        end else begin
          e = exp_q.pop_front();
          if (e.bytes != got) begin
            failures++;
            $display("FAIL: PPDU %0d mismatch: got %0d bytes, expected %0d", ppdus_done, got.size(), e.bytes.size());
            for (int i = 0; i < e.bytes.size() && i < got.size(); i++)
              if (e.bytes[i] != got[i]) begin
                $display("  first difference at byte %0d: got %h expected %h", i, got[i], e.bytes[i]);
                break;
              end
          end
        end
        got.delete();
        ppdus_done++;
      end
    end
  end

  task automatic wait_done(int n);
    while (ppdus_done < n) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    byte unsigned v[$];
    // the FCS reference itself: CRC-32 of "123456789" is CBF43926
    v = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    checks++;
    if (ref_crc32(v) != 32'hCBF43926) begin failures++; $display("FAIL: reference CRC-32"); end

    foreach (mem[i]) mem[i] = $urandom();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // phase 1: random mix under back-pressure
    for (int p = 0; p < 40; p++) add_ppdu(p % 3 != 0, (p % 3 != 0) ? 1 + int'($urandom_range(0, 4)) : 1, 0);
    // short lengths that exercise every flen mod 4 case
    for (int l = 1; l <= 8; l++) begin add_ppdu(1'b1, 2, l); add_ppdu(1'b0, 1, l); end
    wait_done(56);

    // phase 2: full speed, 5 x 4000-byte A-MPDU
    random_ready = 1'b0;
    repeat (3) @(posedge clk);
    next_addr = 0;
    add_ppdu(1'b1, 5, 4000);
    wait_done(57);
    begin
      int words, cyc;
      words = 5 * (1 + 1000 + 1);  // delimiter + data + FCS word per subframe
      cyc   = last_dur;
      checks++;
      $display("5 x 4000-byte A-MPDU: %0d words in %0d cycles", words, cyc);
      if (cyc > words + 5 * 2 || words * 32 < 16 * cyc) begin
        failures++; $display("FAIL: throughput below one word per cycle");
      end
    end
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("FAIL: generator not drained"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
