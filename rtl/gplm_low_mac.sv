// gplm_low_mac: programmable-logic part of the GPLM 802.11ac Low-MAC.
//
// The Low-MAC pairs a microprocessor (control flow, frame building, Block Ack) with
// accelerators for what software cannot do fast enough. This module holds the
// accelerators and the memory subsystem; the processor, the host DMA engine and the PHY
// are outside and connect through the ports below.
//
//   Tx side: frame RAM (port A to the bus, port B to the generator) -> descriptor queue
//            -> A-MPDU generator -> PSDU stream to the PHY.
//   Rx side: PSDU stream from the PHY -> A-MPDU deaggregator -> frame RAM (port B) and
//            descriptor queue -> processor; port A of the Rx RAM is on the bus.
//   Channel access: carrier-sense / backoff accelerator driven by the processor.
//
// Software writes MPDUs into the Tx RAM (through the bus port), then one descriptor per
// legacy frame or A-MPDU subframe into the Tx queue, usually after the backoff block has
// granted the medium. Received MPDUs appear in the Rx RAM with one descriptor each in the
// Rx queue. The bus ports are plain synchronous RAM ports (one-cycle read latency); in a
// full system they sit behind a bus-to-RAM adaptor, and the queue ports behind a bus
// stream FIFO interface. All logic runs on one clock (100 MHz in the reference system).
// Parameter defaults: 64 KiB per frame RAM, 64-entry queues, 802.11 OFDM slot and SIFS at
// 100 MHz; none of these sizes is fixed by the architecture.
module gplm_low_mac
  import gplm_pkg::*;
#(
  parameter int unsigned TX_ADDR_W   = 14,
  parameter int unsigned RX_ADDR_W   = 14,
  parameter int unsigned TXQ_DEPTH   = 64,
  parameter int unsigned RXQ_DEPTH   = 64,
  parameter int unsigned SLOT_CYCLES = 900,
  parameter int unsigned SIFS_CYCLES = 1600
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Tx RAM, bus side
  input  logic                     txram_en,
  input  logic [3:0]               txram_we,
  input  logic [TX_ADDR_W-1:0]     txram_addr,
  input  logic [31:0]              txram_wdata,
  output logic [31:0]              txram_rdata,
  // Tx descriptor queue, processor side
  input  logic                     txq_valid,
  output logic                     txq_ready,
  input  tx_desc_t                 txq_desc,
  output logic [$clog2(TXQ_DEPTH):0] txq_count,
  // PSDU to the PHY
  output logic                     phy_tx_tvalid,
  input  logic                     phy_tx_tready,
  output logic [31:0]              phy_tx_tdata,
  output logic [3:0]               phy_tx_tkeep,
  output logic                     phy_tx_tlast,
  output logic                     tx_busy,
  // PSDU from the PHY
  input  logic                     phy_rx_tvalid,
  input  logic [31:0]              phy_rx_tdata,
  input  logic [3:0]               phy_rx_tkeep,
  input  logic                     phy_rx_tlast,
  input  logic                     phy_rx_tuser_ampdu,
  // Rx RAM, bus side
  input  logic                     rxram_en,
  input  logic [3:0]               rxram_we,
  input  logic [RX_ADDR_W-1:0]     rxram_addr,
  input  logic [31:0]              rxram_wdata,
  output logic [31:0]              rxram_rdata,
  // Rx descriptor queue, processor side
  output logic                     rxq_valid,
  input  logic                     rxq_ready,
  output rx_desc_t                 rxq_desc,
  output logic [$clog2(RXQ_DEPTH):0] rxq_count,
  // Rx statistics
  output logic [15:0]              rx_mpdu_cnt,
  output logic [15:0]              rx_fcs_err_cnt,
  output logic [15:0]              rx_delim_err_cnt,
  output logic [15:0]              rx_drop_cnt,
  // channel access
  input  logic                     cca_busy,
  input  logic                     bo_start,
  input  logic [9:0]               bo_cw,
  input  logic [3:0]               bo_aifsn,
  input  logic                     bo_grant_ack,
  output logic                     bo_grant,
  output logic                     bo_active,
  output logic [9:0]               bo_slots_left,
  output logic [15:0]              bo_freeze_cnt
);
  // ---------------- Tx ----------------
  logic                 gen_desc_valid, gen_desc_ready;
  tx_desc_t             gen_desc;
  logic                 txb_en;
  logic [TX_ADDR_W-1:0] txb_addr;
  logic [31:0]          txb_rdata, txb_wdata_unused;

  assign txb_wdata_unused = '0;

  gplm_frame_ram #(.ADDR_W(TX_ADDR_W)) u_tx_ram (
    .clk,
    .a_en(txram_en), .a_we(txram_we), .a_addr(txram_addr), .a_wdata(txram_wdata), .a_rdata(txram_rdata),
    .b_en(txb_en), .b_we(4'h0), .b_addr(txb_addr), .b_wdata(txb_wdata_unused), .b_rdata(txb_rdata));

  gplm_desc_fifo #(.WIDTH($bits(tx_desc_t)), .DEPTH(TXQ_DEPTH)) u_tx_queue (
    .clk, .rst_n,
    .in_valid(txq_valid), .in_ready(txq_ready), .in_data(txq_desc),
    .out_valid(gen_desc_valid), .out_ready(gen_desc_ready), .out_data(gen_desc),
    .count(txq_count));

  gplm_tx_ampdu_gen #(.ADDR_W(TX_ADDR_W)) u_tx_gen (
    .clk, .rst_n,
    .desc_valid(gen_desc_valid), .desc_ready(gen_desc_ready), .desc(gen_desc),
    .ram_en(txb_en), .ram_addr(txb_addr), .ram_rdata(txb_rdata),
    .phy_tvalid(phy_tx_tvalid), .phy_tready(phy_tx_tready), .phy_tdata(phy_tx_tdata),
    .phy_tkeep(phy_tx_tkeep), .phy_tlast(phy_tx_tlast), .busy(tx_busy));

  // ---------------- Rx ----------------
  logic                 rxb_en;
  logic [3:0]           rxb_we;
  logic [RX_ADDR_W-1:0] rxb_addr;
  logic [31:0]          rxb_wdata, rxb_rdata;
  logic                 dq_valid, dq_ready;
  rx_desc_t             dq_desc;

  gplm_rx_ampdu_deagg #(.ADDR_W(RX_ADDR_W)) u_rx_deagg (
    .clk, .rst_n,
    .phy_tvalid(phy_rx_tvalid), .phy_tdata(phy_rx_tdata), .phy_tkeep(phy_rx_tkeep),
    .phy_tlast(phy_rx_tlast), .phy_tuser_ampdu(phy_rx_tuser_ampdu),
    .ram_en(rxb_en), .ram_we(rxb_we), .ram_addr(rxb_addr), .ram_wdata(rxb_wdata),
    .desc_valid(dq_valid), .desc_ready(dq_ready), .desc(dq_desc),
    .mpdu_cnt(rx_mpdu_cnt), .fcs_err_cnt(rx_fcs_err_cnt), .delim_err_cnt(rx_delim_err_cnt),
    .drop_cnt(rx_drop_cnt));

  gplm_frame_ram #(.ADDR_W(RX_ADDR_W)) u_rx_ram (
    .clk,
    .a_en(rxram_en), .a_we(rxram_we), .a_addr(rxram_addr), .a_wdata(rxram_wdata), .a_rdata(rxram_rdata),
    .b_en(rxb_en), .b_we(rxb_we), .b_addr(rxb_addr), .b_wdata(rxb_wdata), .b_rdata(rxb_rdata));

  gplm_desc_fifo #(.WIDTH($bits(rx_desc_t)), .DEPTH(RXQ_DEPTH)) u_rx_queue (
    .clk, .rst_n,
    .in_valid(dq_valid), .in_ready(dq_ready), .in_data(dq_desc),
    .out_valid(rxq_valid), .out_ready(rxq_ready), .out_data(rxq_desc),
    .count(rxq_count));

  // ---------------- channel access ----------------
  gplm_backoff #(.SLOT_CYCLES(SLOT_CYCLES), .SIFS_CYCLES(SIFS_CYCLES)) u_backoff (
    .clk, .rst_n, .cca_busy, .start(bo_start), .cw(bo_cw), .aifsn(bo_aifsn),
    .grant_ack(bo_grant_ack), .grant(bo_grant), .active(bo_active),
    .slots_left(bo_slots_left), .freeze_cnt(bo_freeze_cnt));

endmodule
