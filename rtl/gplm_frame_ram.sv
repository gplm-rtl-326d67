// gplm_frame_ram: dual-port frame buffer of the Low-MAC memory subsystem.
//
// The Tx and the Rx side each hold one of these. Frames are kept in a random access memory
// rather than a FIFO so that the processor can build and edit frames in place (Block Ack
// and other control frames are written like ordinary memory). Port A belongs to the bus
// side: the host DMA engine and the microprocessor reach it through a bus-to-RAM adaptor.
// Port B belongs exclusively to the A-MPDU engine of that side (the generator reads it,
// the deaggregator writes it).
//
// Both ports are 32 bits wide with per-byte write enables and are synchronous to one clock:
// a read issued with en=1 in cycle n returns data in cycle n+1 (read-first: a write in the
// same cycle returns the old word). If both ports write the same word in the same cycle,
// port B wins; this collision rule is this design's choice. DEPTH_WORDS words of 4 bytes;
// the default 16384 words (64 KiB) is this design's choice, sized to hold the largest
// aggregate evaluated for the architecture (5 x 4000-byte MPDUs).
module gplm_frame_ram #(
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  // port A: bus side (host DMA / microprocessor)
  input  logic              a_en,
  input  logic [3:0]        a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [31:0]       a_wdata,
  output logic [31:0]       a_rdata,
  // port B: A-MPDU engine side
  input  logic              b_en,
  input  logic [3:0]        b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [31:0]       b_wdata,
  output logic [31:0]       b_rdata
);
  logic [31:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i] && !(b_en && b_we[i] && b_addr == a_addr)) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

endmodule
