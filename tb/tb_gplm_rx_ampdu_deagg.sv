// tb_gplm_rx_ampdu_deagg: self-checking testbench of the Rx A-MPDU deaggregator.
//
// The testbench builds PSDUs itself, byte by byte, with its own CRC-32 and delimiter
// CRC-8 code: legacy frames, A-MPDUs with empty delimiters, an A-MPDU whose second
// delimiter is corrupted (the engine must resynchronise on the third), subframes with a
// bad FCS, a PPDU cut off inside an MPDU, and a burst sent while the descriptor queue is
// full (MPDUs must be dropped and their space reused). Every descriptor is compared with
// the expected one (address in the ring, length, flags) and every stored MPDU is read
// back from a behavioural Rx RAM and compared byte by byte. The error and drop counters
// are checked at the end.
module tb_gplm_rx_ampdu_deagg;
  import gplm_pkg::*;

  localparam int ADDR_W = 10;   // small ring so that it wraps during the test
  localparam int NW     = 2**ADDR_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              tvalid = 1'b0, tlast = 1'b0, tuser = 1'b0;
  logic [31:0]       tdata = '0;
  logic [3:0]        tkeep = '0;
  logic              ram_en;
  logic [3:0]        ram_we;
  logic [ADDR_W-1:0] ram_addr;
  logic [31:0]       ram_wdata;
  logic              desc_valid;
  logic              desc_ready = 1'b1;
  rx_desc_t          desc;
  logic [15:0]       mpdu_cnt, fcs_err_cnt, delim_err_cnt, drop_cnt;

  gplm_rx_ampdu_deagg #(.ADDR_W(ADDR_W)) dut (
    .clk, .rst_n,
    .phy_tvalid(tvalid), .phy_tdata(tdata), .phy_tkeep(tkeep), .phy_tlast(tlast),
    .phy_tuser_ampdu(tuser),
    .ram_en, .ram_we, .ram_addr, .ram_wdata,
    .desc_valid, .desc_ready, .desc,
    .mpdu_cnt, .fcs_err_cnt, .delim_err_cnt, .drop_cnt);

  logic [31:0] mem [NW];
  always @(posedge clk)
    if (ram_en) for (int i = 0; i < 4; i++) if (ram_we[i]) mem[ram_addr][8*i +: 8] <= ram_wdata[8*i +: 8];

  typedef byte unsigned bq_t[$];

  function automatic logic [31:0] ref_crc32(bq_t q);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (q[i])
      for (int b = 0; b < 8; b++) begin
        logic f;
        f = q[i][b] ^ c[0];
        c = c >> 1;
        if (f) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction

  function automatic bq_t ref_delim(int len, bit eof);
    bq_t q;
    bit hdr [16];
    bit [7:0] r = 8'hFF;
    byte unsigned b0 = 0, b1 = 0, c = 0;
    hdr[0] = eof; hdr[1] = 0; hdr[2] = len[12]; hdr[3] = len[13];
    for (int i = 0; i < 12; i++) hdr[4+i] = len[i];
    for (int i = 0; i < 16; i++) begin
      bit f = hdr[i] ^ r[7];
      r = {r[6:0], 1'b0};
      if (f) r = r ^ 8'h07;
    end
    r = ~r;
    for (int i = 0; i < 8; i++) begin b0[i] = hdr[i]; b1[i] = hdr[8+i]; c[i] = r[7-i]; end
    q.push_back(b0); q.push_back(b1); q.push_back(c); q.push_back(8'h4E);
    return q;
  endfunction

  // MPDU of n bytes (FCS included), FCS good or corrupted
  function automatic bq_t make_mpdu(int n, bit good);
    bq_t q;
    logic [31:0] f;
    for (int i = 0; i < n - 4; i++) q.push_back(8'($urandom_range(0, 255)));
    f = ref_crc32(q);
    if (!good) f[5] = ~f[5];
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
    return q;
  endfunction

  typedef struct {
    bq_t  bytes;
    int   len;
    bit   fcs_ok, ampdu, eof, ppdu_end, truncated, dropped;
  } exp_t;

  exp_t exp_q[$];
  int   exp_wptr = 0;

  // ---------------- stream driver ----------------
  task automatic send(bq_t psdu, bit ampdu);
    int n = psdu.size();
    for (int w = 0; w * 4 < n; w++) begin
      @(posedge clk);
      tvalid <= 1'b1;
      tuser  <= ampdu;
      tlast  <= (w * 4 + 4 >= n);
      for (int i = 0; i < 4; i++) begin
        tdata[8*i +: 8] <= (w*4 + i < n) ? psdu[w*4 + i] : 8'h00;
        tkeep[i]        <= (w*4 + i < n);
      end
    end
    @(posedge clk);
    tvalid <= 1'b0;
    tlast  <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  function automatic void expect_mpdu(bq_t b, bit ok, bit ampdu, bit eof, bit pend, bit trunc, bit drop);
    exp_t e;
    e.bytes = b; e.len = b.size(); e.fcs_ok = ok; e.ampdu = ampdu; e.eof = eof;
    e.ppdu_end = pend; e.truncated = trunc; e.dropped = drop;
    exp_q.push_back(e);
  endfunction

  // A-MPDU of the given MPDUs; bad_delim marks a subframe whose delimiter is corrupted
  task automatic send_ampdu(int n, int bad_delim, int bad_fcs, int npad, bit drop);
    bq_t psdu, m, dl;
    for (int k = 0; k < n; k++) begin
      int len = 14 + int'($urandom_range(0, 200));
      bit eof = (n == 1);
      m = make_mpdu(len, k != bad_fcs);
      dl = ref_delim(len, eof);
      if (k == bad_delim) dl[2] = dl[2] ^ 8'h10;
      psdu = {psdu, dl, m};
      while (psdu.size() % 4 != 0) psdu.push_back(8'h00);
      for (int p = 0; p < npad; p++) psdu = {psdu, ref_delim(0, 1'b0)};
      if (k != bad_delim) expect_mpdu(m, k != bad_fcs, 1'b1, eof, (k == n - 1) && npad == 0, 1'b0, drop);
    end
    send(psdu, 1'b1);
  endtask

  // ---------------- descriptor monitor ----------------
  int ndesc = 0;
  // sampled at the falling edge, when the RAM write of the last word has landed
  always @(negedge clk) begin
    if (rst_n && desc_valid) begin
      exp_t e;
      bit ok;
      while (exp_q.size() != 0 && exp_q[0].dropped) void'(exp_q.pop_front());
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected descriptor");
      end else begin
        e = exp_q.pop_front();
        ok = (int'(desc.addr) == exp_wptr) && (int'(desc.len) == e.len) && (desc.fcs_ok == e.fcs_ok) &&
             (desc.ampdu == e.ampdu) && (desc.eof == e.eof) && (desc.ppdu_end == e.ppdu_end) &&
             (desc.truncated == e.truncated);
        if (!ok) begin
          failures++;
          $display("FAIL: desc %0d addr=%0d/%0d len=%0d/%0d ok=%b/%b ampdu=%b/%b eof=%b/%b end=%b/%b trunc=%b/%b",
                   ndesc, desc.addr, exp_wptr, desc.len, e.len, desc.fcs_ok, e.fcs_ok, desc.ampdu, e.ampdu,
                   desc.eof, e.eof, desc.ppdu_end, e.ppdu_end, desc.truncated, e.truncated);
        end
        // stored bytes
        checks++;
        for (int i = 0; i < e.len; i++)
          if (mem[(int'(desc.addr) + i / 4) % NW][8*(i%4) +: 8] != e.bytes[i]) begin
            failures++; $display("FAIL: desc %0d byte %0d differs in Rx RAM", ndesc, i); break;
          end
        exp_wptr = (exp_wptr + (e.len + 3) / 4) % NW;
      end
      ndesc++;
    end
  end

  initial begin
    bq_t m;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // legacy frames, good and bad
    for (int i = 0; i < 6; i++) begin
      m = make_mpdu(20 + i * 37, i != 3);
      expect_mpdu(m, i != 3, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0);
      send(m, 1'b0);
    end
    // A-MPDUs: plain, with empty delimiters, single-MPDU (EOF), bad FCS
    send_ampdu(4, -1, -1, 0, 1'b0);
    send_ampdu(3, -1, -1, 2, 1'b0);
    send_ampdu(1, -1, -1, 0, 1'b0);
    send_ampdu(5, -1, 2, 1, 1'b0);
    // corrupted delimiter: second subframe lost, third recovered
    send_ampdu(3, 1, -1, 0, 1'b0);
    // ring wrap
    for (int i = 0; i < 8; i++) send_ampdu(4, -1, -1, 0, 1'b0);
    // truncated PPDU: A-MPDU whose last MPDU is cut short
    begin
      bq_t psdu, m2;
      m  = make_mpdu(40, 1'b1);
      m2 = make_mpdu(100, 1'b1);
      psdu = {ref_delim(40, 1'b0), m, ref_delim(100, 1'b0)};
      for (int i = 0; i < 48; i++) psdu.push_back(m2[i]);
      expect_mpdu(m, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0);
      m2 = m2[0:47];
      begin
        exp_t e;
        e.bytes = m2; e.len = 48; e.fcs_ok = 0; e.ampdu = 1; e.eof = 0; e.ppdu_end = 1;
        e.truncated = 1; e.dropped = 0;
        exp_q.push_back(e);
      end
      send(psdu, 1'b1);
    end
    // descriptor queue full: the whole A-MPDU is dropped and its space reused
    desc_ready <= 1'b0;
    send_ampdu(3, -1, -1, 0, 1'b1);
    desc_ready <= 1'b1;
    send_ampdu(2, -1, -1, 0, 1'b0);
    repeat (10) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d descriptors missing", exp_q.size()); end
    checks++;
    if (fcs_err_cnt != 16'd3) begin failures++; $display("FAIL: fcs_err_cnt=%0d expected 3", fcs_err_cnt); end
    checks++;
    if (drop_cnt != 16'd3) begin failures++; $display("FAIL: drop_cnt=%0d expected 3", drop_cnt); end
    checks++;
    if (delim_err_cnt == 16'd0) begin failures++; $display("FAIL: corrupted delimiter not counted"); end
    $display("descriptors=%0d mpdus=%0d fcs_err=%0d delim_err=%0d drops=%0d",
             ndesc, mpdu_cnt, fcs_err_cnt, delim_err_cnt, drop_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
