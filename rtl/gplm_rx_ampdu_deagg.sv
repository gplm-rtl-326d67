// gplm_rx_ampdu_deagg: Rx A-MPDU deaggregation engine.
//
// Takes the PSDU delivered by the PHY, one 32-bit word per cycle, splits it into MPDUs,
// checks each one, writes the MPDU bytes (FCS included) into the Rx RAM and posts one
// rx_desc_t per MPDU into the Rx descriptor queue, where the microprocessor picks it up
// (for instance to build a Block Ack from the fcs_ok bits of one A-MPDU).
//
// phy_tuser_ampdu, valid with every word, tells whether the PPDU is an A-MPDU (the PHY
// knows this from its signal field). A legacy PSDU is one MPDU running to tlast. In an
// A-MPDU the engine expects a delimiter at every 4-octet boundary between subframes:
//   * a word with the 0x4E signature and a good CRC-8 and length 0 is an empty delimiter
//     and is skipped;
//   * a good delimiter with length L starts an MPDU of L bytes; the subframe padding up to
//     the next 4-octet boundary falls in its last word and is discarded;
//   * a word that is not a good delimiter is counted in delim_err and skipped, so the
//     engine resynchronises on the next good delimiter 4 octets further on.
// The FCS of each MPDU is checked by running the CRC-32 over MPDU and FCS and comparing
// with the residue. If the PPDU ends (tlast) inside an MPDU the descriptor is posted with
// truncated=1 and fcs_ok=0. The Rx RAM is used as a ring: MPDUs are written at
// consecutive word addresses starting on a word boundary and wrapping at the end; the
// processor must consume descriptors before the ring wraps over them. If the descriptor
// queue is full when an MPDU ends, the MPDU is dropped, its RAM space is reused and
// drop_cnt counts it. Only this engine pushes into the queue, so a queue that has room
// when the MPDU ends still has room a cycle later when the descriptor is pushed.
//
// The architecture specifies what the engine does (split, check each subframe, write the
// MPDU into Rx RAM and its descriptor into the queue); the word-level details above (input
// register, ring buffer, resynchronisation step, counters) are this design's choices.
// Timing: the PHY is never stalled (no tready); each input word is registered, then
// processed in one cycle, in which it is also written to Rx RAM; the descriptor is pushed
// in the next cycle, so the MPDU is complete in RAM before its descriptor is queued.
module gplm_rx_ampdu_deagg
  import gplm_pkg::*;
#(
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  // PSDU stream from the PHY
  input  logic              phy_tvalid,
  input  logic [31:0]       phy_tdata,
  input  logic [3:0]        phy_tkeep,
  input  logic              phy_tlast,
  input  logic              phy_tuser_ampdu,
  // Rx RAM port B (write only)
  output logic              ram_en,
  output logic [3:0]        ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [31:0]       ram_wdata,
  // descriptor queue side
  output logic              desc_valid,
  input  logic              desc_ready,
  output rx_desc_t          desc,
  // statistics
  output logic [15:0]       mpdu_cnt,
  output logic [15:0]       fcs_err_cnt,
  output logic [15:0]       delim_err_cnt,
  output logic [15:0]       drop_cnt
);
  typedef enum logic [1:0] {S_START, S_HDR, S_BODY, S_LEG} state_e;

  // input register
  logic        iv, ilast, iampdu;
  logic [31:0] idata;
  logic [3:0]  ikeep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv <= 1'b0; ilast <= 1'b0; iampdu <= 1'b0; idata <= '0; ikeep <= '0;
    end else begin
      iv <= phy_tvalid;
      if (phy_tvalid) begin
        ilast  <= phy_tlast;
        iampdu <= phy_tuser_ampdu;
        idata  <= phy_tdata;
        ikeep  <= phy_tkeep;
      end
    end
  end

  state_e            state;
  logic [ADDR_W-1:0] wptr, fstart;
  logic [LEN_W-1:0]  remaining, flen;
  logic [31:0]       crc;
  logic              feof;

  // per-word decisions
  logic              hdr_word, legacy_first, write_word, fin;
  logic [2:0]        nb;
  logic [31:0]       crc_base, crc_nx;
  logic [LEN_W-1:0]  flen_nx;
  logic              dvalid;
  logic [LEN_W-1:0]  dlen;
  rx_desc_t          d;

  always_comb begin
    hdr_word     = iv && (state == S_HDR || (state == S_START && iampdu));
    legacy_first = iv && state == S_START && !iampdu;
    dvalid       = delim_valid(idata);
    dlen         = delim_len(idata[15:0]);
    write_word   = legacy_first || (iv && (state == S_BODY || state == S_LEG));
    // bytes of this word that belong to the MPDU
    if (state == S_BODY) nb = (remaining >= LEN_W'(4)) ? 3'd4 : 3'(remaining);
    else                 nb = keep_count(ikeep);
    crc_base = legacy_first ? 32'hFFFF_FFFF : crc;
    crc_nx   = crc32_word(crc_base, idata, nb);
    flen_nx  = (legacy_first ? '0 : flen) + LEN_W'(nb);
    // MPDU complete (or cut short by the end of the PPDU)
    fin = write_word && ((state == S_BODY && (remaining <= LEN_W'(4) || ilast)) ||
                         (state != S_BODY && ilast));
    d           = '0;
    d.addr      = 16'(legacy_first ? wptr : fstart);
    d.len       = flen_nx;
    d.ampdu     = (state == S_BODY);
    d.eof       = (state == S_BODY) && feof;
    d.ppdu_end  = ilast;
    d.truncated = (state == S_BODY) && remaining > LEN_W'(4);
    d.fcs_ok    = !d.truncated && (crc_nx == FCS_RESIDUE);
  end

  // the word is written to Rx RAM in the cycle it is processed
  assign ram_en    = write_word;
  assign ram_we    = write_word ? 4'hF : 4'h0;
  assign ram_addr  = wptr;
  assign ram_wdata = idata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_START; wptr <= '0; fstart <= '0; remaining <= '0; flen <= '0;
      crc <= '1; feof <= 1'b0;
      desc_valid <= 1'b0; desc <= '0;
      mpdu_cnt <= '0; fcs_err_cnt <= '0; delim_err_cnt <= '0; drop_cnt <= '0;
    end else begin
      if (write_word) begin
        wptr <= wptr + 1'b1;
        crc  <= crc_nx;
        flen <= flen_nx;
      end
      if (legacy_first) fstart <= wptr;

      // descriptor push happens one cycle after fin
      desc_valid <= 1'b0;
      if (fin) begin
        mpdu_cnt <= mpdu_cnt + 1'b1;
        if (!d.fcs_ok) fcs_err_cnt <= fcs_err_cnt + 1'b1;
        desc <= d;
        if (desc_ready) begin
          desc_valid <= 1'b1;
        end else begin
          // queue full: drop the MPDU and reuse its space
          drop_cnt <= drop_cnt + 1'b1;
          wptr     <= ADDR_W'(d.addr);
        end
      end

      if (hdr_word) begin
        if (!dvalid) begin
          delim_err_cnt <= delim_err_cnt + 1'b1;
        end else if (dlen != '0) begin
          remaining <= dlen;
          flen      <= '0;
          crc       <= '1;
          fstart    <= wptr;
          feof      <= idata[0];
        end
        state <= ilast ? S_START : ((dvalid && dlen != '0) ? S_BODY : S_HDR);
      end else if (write_word) begin
        if (state == S_BODY) remaining <= remaining - LEN_W'(nb);
        if (fin) state <= ilast ? S_START : S_HDR;
        else if (legacy_first) state <= S_LEG;
        if (fin && !d.ampdu) state <= S_START;
      end else if (iv && ilast) begin
        state <= S_START;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) desc_valid |-> desc_ready)
    else $error("gplm_rx_ampdu_deagg: descriptor pushed into a full queue");

endmodule
