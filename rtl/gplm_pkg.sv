// gplm_pkg: types, constants and checksum functions shared by the Low-MAC blocks.
//
// The Low-MAC moves frame data as 32-bit words in little-endian byte order: byte 0 of a
// word is bits [7:0] and is the first byte on air. Two descriptor formats carry control
// between the microprocessor and the A-MPDU engines: tx_desc_t (one legacy frame or one
// A-MPDU subframe to send) and rx_desc_t (one received MPDU that sits in the Rx RAM).
// The field layouts are this design's own; the content of each field follows the
// descriptor-queue scheme of the architecture (one descriptor per legacy frame or per
// A-MPDU subframe).
//
// Checksums follow IEEE 802.11:
//   * FCS: CRC-32 (polynomial 0x04C11DB7, bit-reflected, preset to all ones, sent
//     complemented, least significant byte first). Running the CRC over an MPDU and its
//     FCS leaves FCS_RESIDUE in the register.
//   * A-MPDU delimiter: 4 octets. Bit 0 EOF, bit 1 reserved, bits 3:2 the two high bits
//     and bits 15:4 the low twelve bits of the 14-bit VHT MPDU length, bits 23:16 a CRC-8
//     (x^8+x^2+x+1, preset to ones, over bits 0..15, complemented, first CRC bit in bit 16),
//     bits 31:24 the signature 0x4E.
package gplm_pkg;

  localparam logic [7:0]  DELIM_SIG   = 8'h4E;
  localparam logic [31:0] FCS_RESIDUE = 32'hDEBB20E3;
  localparam int unsigned LEN_W       = 14;   // VHT MPDU length field width

  // One Tx descriptor: a legacy frame, or one subframe of an A-MPDU.
  typedef struct packed {
    logic [22:0]      rsvd;    // reserved, write zero
    logic             last;    // last descriptor of this PPDU: ends the stream (tlast)
    logic [7:0]       padcnt;  // empty delimiters appended after the subframe (A-MPDU only)
    logic             eof;     // EOF bit of the delimiter (VHT single MPDU)
    logic             ampdu;   // 1: subframe of an A-MPDU (delimiter + padding), 0: legacy frame
    logic [LEN_W-1:0] flen;    // MPDU length in bytes held in Tx RAM, FCS excluded
    logic [15:0]      addr;    // word address of the first MPDU byte in Tx RAM
  } tx_desc_t;

  // One Rx descriptor: a received MPDU stored in Rx RAM (FCS included).
  typedef struct packed {
    logic [10:0]      rsvd;
    logic             truncated; // PPDU ended before the delimiter length was reached
    logic             ppdu_end;  // this MPDU ended the PPDU
    logic             eof;       // EOF bit of its delimiter
    logic             ampdu;     // came from an A-MPDU
    logic             fcs_ok;    // FCS check passed
    logic [LEN_W-1:0] len;       // MPDU length in bytes, FCS included
    logic [15:0]      addr;      // word address of the first MPDU byte in Rx RAM
  } rx_desc_t;

  // One word on a PSDU stream (Tx: to the PHY, Rx: from the PHY).
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  keep;   // valid bytes, only the final word of a PPDU may be partial
    logic        last;   // final word of the PPDU
  } stream_word_t;

  // Reflected CRC-32 over one byte.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'd0, b};
    for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

  // Reflected CRC-32 over the first nbytes (0..4) bytes of a little-endian word.
  function automatic logic [31:0] crc32_word(logic [31:0] crc, logic [31:0] w, logic [2:0] nbytes);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 4; i++)
      if (3'(i) < nbytes) c = crc32_byte(c, w[8*i +: 8]);
    return c;
  endfunction

  // CRC-8 of the delimiter's first 16 bits, as placed in bits 23:16.
  function automatic logic [7:0] delim_crc8(logic [15:0] hdr);
    logic [7:0] c;
    logic       fb;
    logic [7:0] r;
    c = 8'hFF;
    for (int k = 0; k < 16; k++) begin
      fb = hdr[k] ^ c[7];
      c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    c = ~c;
    for (int k = 0; k < 8; k++) r[k] = c[7-k];
    return r;
  endfunction

  // Build an A-MPDU delimiter word for an MPDU of len bytes (FCS included).
  function automatic logic [31:0] make_delim(logic [LEN_W-1:0] len, logic eof);
    logic [15:0] hdr;
    hdr = {len[11:0], len[13:12], 1'b0, eof};
    return {DELIM_SIG, delim_crc8(hdr), hdr};
  endfunction

  // MPDU length carried by a delimiter word.
  function automatic logic [LEN_W-1:0] delim_len(logic [15:0] w);
    return {w[3:2], w[15:4]};
  endfunction

  // True when a word carries a delimiter with a good signature and CRC-8.
  function automatic logic delim_valid(logic [31:0] w);
    return (w[31:24] == DELIM_SIG) && (w[23:16] == delim_crc8(w[15:0]));
  endfunction

  // Byte-enable mask for n (0..4) leading bytes; 0 means a full word.
  function automatic logic [3:0] keep_mask(logic [1:0] n);
    case (n)
      2'd1:    return 4'b0001;
      2'd2:    return 4'b0011;
      2'd3:    return 4'b0111;
      default: return 4'b1111;
    endcase
  endfunction

  // Bit mask covering the bytes set in keep.
  function automatic logic [31:0] keep_bits(logic [3:0] keep);
    logic [31:0] m;
    for (int i = 0; i < 4; i++) m[8*i +: 8] = {8{keep[i]}};
    return m;
  endfunction

  function automatic logic [2:0] keep_count(logic [3:0] keep);
    return 3'(keep[0]) + 3'(keep[1]) + 3'(keep[2]) + 3'(keep[3]);
  endfunction

endpackage
