// tb_gplm_workloads: the frame sizes of the throughput evaluation, run through the whole
// Low-MAC with a loopback PHY at default parameters.
//
// Legacy frames of 1000, 1500, 2000, 3000 and 4000 bytes, then A-MPDUs of 3, 4 and 5
// MPDUs of 1000, 2000 and 4000 bytes each. Every MPDU must come back intact through the
// Rx side, and the transmit time of each PPDU must stay within one 32-bit word per cycle
// plus one cycle per subframe (the generator's rate, above the 1.6 Gbit/s at 100 MHz
// reported for the reference implementation). The processor and loopback models are the
// same as in the end-to-end testbench; the Rx ring wraps during the run.
module tb_gplm_workloads;
  import gplm_pkg::*;

  localparam int TX_AW = 14, RX_AW = 14, RXQ = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // DUT signals
  logic             txram_en = 0;
  logic [3:0]       txram_we = 0;
  logic [TX_AW-1:0] txram_addr = 0;
  logic [31:0]      txram_wdata = 0, txram_rdata;
  logic             txq_valid = 0, txq_ready;
  tx_desc_t         txq_desc = '0;
  logic [6:0]       txq_count;
  logic             phy_tx_tvalid, phy_tx_tready, phy_tx_tlast, tx_busy;
  logic [31:0]      phy_tx_tdata;
  logic [3:0]       phy_tx_tkeep;
  logic             phy_rx_tvalid = 0, phy_rx_tlast = 0, phy_rx_tuser_ampdu = 0;
  logic [31:0]      phy_rx_tdata = 0;
  logic [3:0]       phy_rx_tkeep = 0;
  logic             rxram_en = 0;
  logic [3:0]       rxram_we = 0;
  logic [RX_AW-1:0] rxram_addr = 0;
  logic [31:0]      rxram_wdata = 0, rxram_rdata;
  logic             rxq_valid, rxq_ready = 0;
  rx_desc_t         rxq_desc;
  logic [6:0]       rxq_count;
  logic [15:0]      rx_mpdu_cnt, rx_fcs_err_cnt, rx_delim_err_cnt, rx_drop_cnt;
  logic             cca_busy = 0, bo_start = 0, bo_grant_ack = 0;
  logic [9:0]       bo_cw = 10'd15;
  logic [3:0]       bo_aifsn = 4'd2;
  logic             bo_grant, bo_active;
  logic [9:0]       bo_slots_left;
  logic [15:0]      bo_freeze_cnt;

  gplm_low_mac dut (.*);

  // ---------------- reference ----------------
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

  typedef struct {
    bq_t bytes;      // MPDU with FCS
    bit  fcs_ok, ampdu, eof, dropped;
  } exp_t;
  exp_t exp_q[$];

  // mechanisms seen
  int n_legacy = 0, n_ampdu = 0, n_empty_delim = 0, n_tx_stall = 0, n_fcs_err = 0,
      n_resync = 0, n_bo_freeze = 0, n_drop = 0, n_rx_mpdu = 0;

  // ---------------- loopback PHY ----------------
  bit ready_random = 0;
  int corrupt_word = -1;        // word index in the next PPDU to corrupt, -1: none
  bit ampdu_q[$];
  int word_idx = 0;

  always @(posedge clk) phy_tx_tready <= ready_random ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    phy_rx_tvalid <= 1'b0;
    if (phy_tx_tvalid && !phy_tx_tready) n_tx_stall++;
    if (phy_tx_tvalid && phy_tx_tready) begin
      phy_rx_tvalid      <= 1'b1;
      phy_rx_tdata       <= (word_idx == corrupt_word) ? (phy_tx_tdata ^ 32'h0001_0000) : phy_tx_tdata;
      phy_rx_tkeep       <= phy_tx_tkeep;
      phy_rx_tlast       <= phy_tx_tlast;
      phy_rx_tuser_ampdu <= (ampdu_q.size() != 0) ? ampdu_q[0] : 1'b0;
      word_idx++;
      if (phy_tx_tlast) begin
        word_idx = 0;
        corrupt_word = -1;
        if (ampdu_q.size() != 0) void'(ampdu_q.pop_front());
      end
    end
  end

  // transmit timing of each PPDU
  int cycle = 0, ppdu_first = 0, ppdu_cycles = 0, in_ppdu = 0, ppdus_sent = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (phy_tx_tvalid && phy_tx_tready) begin
      if (!in_ppdu) begin ppdu_first = cycle; in_ppdu = 1; end
      if (phy_tx_tlast) begin ppdu_cycles = cycle - ppdu_first + 1; in_ppdu = 0; ppdus_sent++; end
    end
  end

  // ---------------- processor / host side ----------------
  int tx_wptr = 0;

  task automatic txram_write(int addr, logic [31:0] w);
    @(negedge clk);
    txram_en = 1; txram_we = 4'hF; txram_addr = TX_AW'(addr); txram_wdata = w;
    @(negedge clk);
    txram_en = 0; txram_we = 0;
  endtask

  task automatic push_desc(tx_desc_t d);
    @(negedge clk);
    txq_valid = 1; txq_desc = d;
    @(posedge clk);
    while (!txq_ready) @(posedge clk);
    @(negedge clk);
    txq_valid = 0;
  endtask

  // Backoff before each PPDU; make_busy makes the medium busy during the countdown.
  task automatic channel_access(bit make_busy);
    int f0;
    f0 = bo_freeze_cnt;
    @(negedge clk); bo_start = 1;
    @(negedge clk); bo_start = 0;
    if (make_busy) begin
      int n0;
      // need a draw of at least two slots to interrupt the countdown
      while (bo_slots_left < 2 && !bo_grant) begin
        @(negedge clk); bo_start = 1;
        @(negedge clk); bo_start = 0;
      end
      n0 = bo_slots_left;
      while (!bo_grant && bo_slots_left == 10'(n0)) @(negedge clk);  // first slot counted
      if (!bo_grant) begin
        cca_busy = 1; repeat (500) @(negedge clk); cca_busy = 0;
      end
    end
    while (!bo_grant) @(negedge clk);
    @(negedge clk); bo_grant_ack = 1;
    @(negedge clk); bo_grant_ack = 0;
    if (bo_freeze_cnt != f0) n_bo_freeze++;
  endtask

  // Build and send one PPDU. lens: MPDU lengths without FCS. bad_fcs / bad_delim: subframe
  // index to corrupt (-1 none). drop_from: subframes from this index on are expected to be
  // dropped by the Rx queue (-1 none).
  task automatic send_ppdu(int lens[$], bit ampdu, int padcnt, int bad_fcs, int bad_delim,
                           int drop_from, bit busy);
    tx_desc_t descs[$];
    int word_off = 0;
    for (int k = 0; k < lens.size(); k++) begin
      bq_t b;
      logic [31:0] fcs;
      tx_desc_t d;
      exp_t e;
      int nw = (lens[k] + 3) / 4;
      if (tx_wptr + nw >= 2**TX_AW) tx_wptr = 0;
      for (int w = 0; w < nw; w++) begin
        logic [31:0] v;
        v = $urandom();
        for (int i = 0; i < 4; i++) if (w*4 + i < lens[k]) b.push_back(v[8*i +: 8]);
        txram_write(tx_wptr + w, v);
      end
      fcs = ref_crc32(b);
      for (int i = 0; i < 4; i++) b.push_back(fcs[8*i +: 8]);
      d = '0;
      d.addr = 16'(tx_wptr); d.flen = 14'(lens[k]); d.ampdu = ampdu;
      d.eof = ampdu && lens.size() == 1; d.padcnt = ampdu ? 8'(padcnt) : 8'd0;
      d.last = (k == lens.size() - 1);
      descs.push_back(d);
      tx_wptr += nw;
      // corruption points inside the PSDU
      if (k == bad_delim) corrupt_word = word_off;
      if (k == bad_fcs)   corrupt_word = word_off + (ampdu ? 1 : 0);
      word_off += (ampdu ? 1 : 0) + (lens[k] + 4 + 3) / 4 + (ampdu ? padcnt : 0);
      if (k != bad_delim) begin
        e.bytes = b; e.fcs_ok = (k != bad_fcs); e.ampdu = ampdu; e.eof = d.eof;
        e.dropped = (drop_from >= 0 && k >= drop_from);
        exp_q.push_back(e);
      end
    end
    if (ampdu) n_ampdu++; else n_legacy++;
    if (ampdu && padcnt > 0) n_empty_delim++;
    if (bad_fcs >= 0) n_fcs_err++;
    channel_access(busy);
    ampdu_q.push_back(ampdu);
    foreach (descs[i]) push_desc(descs[i]);
  endtask

  // ---------------- Rx consumer ----------------
  bit consume = 1;
  int ndesc = 0;

  task automatic rxram_read(int addr, output logic [31:0] w);
    @(negedge clk);
    rxram_en = 1; rxram_addr = RX_AW'(addr);
    @(negedge clk);
    rxram_en = 0;
    w = rxram_rdata;
  endtask

  initial begin : consumer
    forever begin
      @(negedge clk);
      if (consume && rxq_valid) begin
        rx_desc_t d;
        exp_t e;
        bit bad;
        d = rxq_desc;
        rxq_ready = 1;
        @(negedge clk);
        rxq_ready = 0;
        while (exp_q.size() != 0 && exp_q[0].dropped) void'(exp_q.pop_front());
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL: unexpected Rx descriptor");
        end else begin
          e = exp_q.pop_front();
          if (int'(d.len) != e.bytes.size() || d.fcs_ok != e.fcs_ok || d.ampdu != e.ampdu ||
              d.eof != e.eof || d.truncated) begin
            failures++;
            $display("FAIL: Rx desc %0d len=%0d/%0d ok=%b/%b ampdu=%b/%b eof=%b/%b trunc=%b", ndesc,
                     d.len, e.bytes.size(), d.fcs_ok, e.fcs_ok, d.ampdu, e.ampdu, d.eof, e.eof, d.truncated);
          end
          if (e.fcs_ok) begin
            checks++;
            bad = 0;
            for (int w = 0; w * 4 < e.bytes.size() && !bad; w++) begin
              logic [31:0] v;
              rxram_read(int'(d.addr) + w, v);
              for (int i = 0; i < 4; i++)
                if (w*4 + i < e.bytes.size() && v[8*i +: 8] != e.bytes[w*4 + i]) bad = 1;
            end
            if (bad) begin failures++; $display("FAIL: Rx desc %0d: MPDU bytes differ", ndesc); end
            n_rx_mpdu++;
          end
        end
        ndesc++;
      end
    end
  end

  task automatic settle();
    repeat (50) @(negedge clk);
    while (tx_busy || rxq_valid || txq_count != 0) @(negedge clk);
    repeat (50) @(negedge clk);
  endtask

  int legacy_len[5] = '{1000, 1500, 2000, 3000, 4000};
  int ampdu_len[3]  = '{1000, 2000, 4000};

  // words on the PHY interface for n MPDUs of len bytes, against the cycles taken
  task automatic check_rate(int n, int len, bit ampdu);
    int words;
    words = n * ((ampdu ? 1 : 0) + (len + 4 + 3) / 4);
    checks++;
    $display("%s %0d x %0d bytes: %0d words in %0d cycles", ampdu ? "A-MPDU" : "legacy", n, len, words, ppdu_cycles);
    if (ppdu_cycles > words + n || words * 32 < 16 * ppdu_cycles) begin
      failures++; $display("FAIL: Tx rate below one word per cycle");
    end
  endtask

  task automatic check_mech(int n, string name);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", name); end
  endtask

  initial begin
    int lens[$];
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    foreach (legacy_len[i]) begin
      lens = '{legacy_len[i]};
      send_ppdu(lens, 0, 0, -1, -1, -1, 0);
      settle();
      check_rate(1, legacy_len[i], 0);
    end
    foreach (ampdu_len[i])
      for (int n = 3; n <= 5; n++) begin
        lens.delete();
        for (int k = 0; k < n; k++) lens.push_back(ampdu_len[i]);
        send_ppdu(lens, 1, 0, -1, -1, -1, 0);
        settle();
        check_rate(n, ampdu_len[i], 1);
      end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d MPDUs never received", exp_q.size()); end
    checks++;
    if (rx_fcs_err_cnt != 0 || rx_delim_err_cnt != 0 || rx_drop_cnt != 0) begin
      failures++; $display("FAIL: Rx errors on a clean channel");
    end
    $display("MPDUs received intact: %0d", n_rx_mpdu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
