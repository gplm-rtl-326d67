// gplm_tx_ampdu_gen: Tx A-MPDU generation engine.
//
// The microprocessor decides which MPDUs go into a PPDU and writes one tx_desc_t per
// legacy frame or per A-MPDU subframe into the Tx descriptor queue. This engine pops the
// descriptors in order and, for each one:
//   1. (A-MPDU only) emits a 4-octet delimiter carrying the MPDU length (flen + 4 for
//      the FCS), the EOF bit, the CRC-8 and the 0x4E signature;
//   2. streams the flen MPDU bytes out of the Tx RAM, one 32-bit word per cycle, running
//      the CRC-32 over them;
//   3. appends the FCS right after the last MPDU byte (which may be in the middle of a
//      word) and, for A-MPDU subframes, zero-pads to the next 4-octet boundary;
//   4. (A-MPDU only) emits padcnt empty delimiters (length 0).
// The descriptor with last=1 closes the PPDU: its final word carries tlast. This is the
// loop of the architecture's generator (read descriptor, delimiter, data words with CRC,
// tail with CRC, empty delimiters, until the last descriptor) built as a two-stage
// pipeline: stage 0 is a state machine that issues one operation per cycle (a RAM read or
// a generated word); stage 1 receives the RAM word a cycle later, updates the CRC and
// forms the output word, which is written into a 4-entry output FIFO. Stage 0 only issues
// while the FIFO has room for everything in flight, so PHY back-pressure (tready low)
// stalls the engine without losing data.
//
// Timing: one output word per cycle while data flows, plus one idle cycle per descriptor
// to fetch it: an MPDU of flen bytes costs ceil(flen/4) + 3 cycles (A-MPDU) at 32 bits
// each, above the 1.6 Gbit/s at 100 MHz reported for the reference implementation.
// Legacy frames (ampdu=0) get no delimiter and no padding; their final word has a
// partial tkeep. Words, byte order and descriptor layout are defined in gplm_pkg.
// padcnt is ignored for legacy frames, which carry no delimiters. Assumes flen + 4 < 2**14.
module gplm_tx_ampdu_gen
  import gplm_pkg::*;
#(
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  // descriptor queue side
  input  logic              desc_valid,
  output logic              desc_ready,
  input  tx_desc_t          desc,
  // Tx RAM port B (read only)
  output logic              ram_en,
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [31:0]       ram_rdata,
  // PSDU stream to the PHY
  output logic              phy_tvalid,
  input  logic              phy_tready,
  output logic [31:0]       phy_tdata,
  output logic [3:0]        phy_tkeep,
  output logic              phy_tlast,
  // status
  output logic              busy
);
  typedef enum logic [2:0] {S_IDLE, S_DELIM, S_DATA, S_FCS, S_PAD} state_e;
  typedef enum logic [1:0] {OP_GEN, OP_DATA, OP_FCS} op_kind_e;

  typedef struct packed {
    op_kind_e    kind;
    logic [31:0] word;     // OP_GEN: the word to emit
    logic [2:0]  nbytes;   // OP_DATA: MPDU bytes in this word
    logic [1:0]  rem;      // OP_FCS: flen mod 4 (0: FCS fills a whole word)
    logic        first;    // first word of the MPDU: preset the CRC
    logic        fin;      // OP_DATA: last MPDU word
    logic        ampdu;
    logic        last;     // final word of the PPDU
  } op_t;

  localparam int unsigned OUT_DEPTH = 4;

  state_e                      state;
  tx_desc_t                    d;
  logic [LEN_W-3:0]            widx, nwords;
  logic [7:0]                  padleft;
  logic                        issue;
  op_t                         op0, s1_op;
  logic                        s1_valid;
  logic [31:0]                 crc_q, fcs_hold;
  logic                        out_push;
  stream_word_t                out_w, fifo_out;
  logic [$clog2(OUT_DEPTH):0]  fifo_count;
  logic                        fifo_in_ready;

  // ---------------- stage 0: descriptor walk ----------------
  assign desc_ready = (state == S_IDLE);
  assign issue      = (state != S_IDLE) &&
                      ((32'(fifo_count) + 32'(s1_valid)) < OUT_DEPTH);
  assign busy       = (state != S_IDLE) || s1_valid || (fifo_count != '0);

  always_comb begin
    op0        = '0;
    op0.ampdu  = d.ampdu;
    op0.rem    = d.flen[1:0];
    unique case (state)
      S_DELIM: begin
        op0.kind = OP_GEN;
        op0.word = make_delim(d.flen + LEN_W'(4), d.eof);
      end
      S_DATA: begin
        op0.kind   = OP_DATA;
        op0.first  = (widx == '0);
        op0.fin    = (widx == nwords - 1'b1);
        op0.nbytes = (op0.fin && d.flen[1:0] != 2'd0) ? {1'b0, d.flen[1:0]} : 3'd4;
      end
      S_FCS: begin
        op0.kind  = OP_FCS;
        op0.first = (nwords == '0);
        op0.last  = d.last && (!d.ampdu || d.padcnt == 8'd0);
      end
      S_PAD: begin
        op0.kind = OP_GEN;
        op0.word = make_delim('0, 1'b0);
        op0.last = d.last && (padleft == 8'd1);
      end
      default: ;
    endcase
  end

  assign ram_en   = issue && (state == S_DATA);
  assign ram_addr = ADDR_W'(d.addr) + ADDR_W'(widx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      d       <= '0;
      widx    <= '0;
      nwords  <= '0;
      padleft <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (desc_valid) begin
          d       <= desc;
          widx    <= '0;
          nwords  <= (LEN_W-2)'((desc.flen + LEN_W'(3)) >> 2);
          padleft <= desc.padcnt;
          if (desc.ampdu)            state <= S_DELIM;
          else if (desc.flen == '0)  state <= S_FCS;
          else                       state <= S_DATA;
        end
        S_DELIM: if (issue) state <= (d.flen == '0) ? S_FCS : S_DATA;
        S_DATA: if (issue) begin
          widx <= widx + 1'b1;
          if (widx == nwords - 1'b1) state <= S_FCS;
        end
        S_FCS: if (issue) state <= (d.ampdu && padleft != 8'd0) ? S_PAD : S_IDLE;
        S_PAD: if (issue) begin
          padleft <= padleft - 1'b1;
          if (padleft == 8'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- stage 1: CRC and word assembly ----------------
  logic [31:0] crc_in, crc_nx, fcs_now;

  always_comb begin
    crc_in   = s1_op.first ? 32'hFFFF_FFFF : crc_q;
    crc_nx   = crc32_word(crc_in, ram_rdata, s1_op.nbytes);
    fcs_now  = ~crc_nx;
    out_w    = '0;
    out_w.keep = 4'hF;
    out_w.last = s1_op.last;
    unique case (s1_op.kind)
      OP_GEN:  out_w.data = s1_op.word;
      OP_DATA: begin
        if (s1_op.fin && s1_op.nbytes != 3'd4)
          // last MPDU bytes followed by the first FCS bytes
          out_w.data = (ram_rdata & keep_bits(keep_mask(s1_op.nbytes[1:0])))
                     | (fcs_now << (8 * s1_op.nbytes));
        else
          out_w.data = ram_rdata;
      end
      OP_FCS: begin
        if (s1_op.rem == 2'd0) begin
          out_w.data = ~crc_in;
        end else begin
          // remaining FCS bytes, then zero padding
          out_w.data = fcs_hold >> (8 * (3'd4 - {1'b0, s1_op.rem}));
          if (!s1_op.ampdu) out_w.keep = keep_mask(s1_op.rem);
        end
      end
      default: ;
    endcase
  end

  assign out_push = s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_op    <= '0;
      crc_q    <= '1;
      fcs_hold <= '0;
    end else begin
      s1_valid <= issue;
      if (issue) s1_op <= op0;
      if (s1_valid && s1_op.kind == OP_DATA) begin
        crc_q    <= crc_nx;
        fcs_hold <= fcs_now;
      end
    end
  end

  // ---------------- output buffer ----------------
  gplm_desc_fifo #(.WIDTH($bits(stream_word_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (out_push),
    .in_ready (fifo_in_ready),
    .in_data  (out_w),
    .out_valid(phy_tvalid),
    .out_ready(phy_tready),
    .out_data (fifo_out),
    .count    (fifo_count)
  );

  assign phy_tdata = fifo_out.data;
  assign phy_tkeep = fifo_out.keep;
  assign phy_tlast = fifo_out.last;

  // The issue rule keeps room for every word in flight.
  assert property (@(posedge clk) disable iff (!rst_n) out_push |-> fifo_in_ready)
    else $error("gplm_tx_ampdu_gen: output buffer overflow");

endmodule
