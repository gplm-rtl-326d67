// gplm_desc_fifo: synchronous first-in first-out queue with a valid/ready handshake on
// both sides.
//
// It serves as the A-MPDU descriptor queue between the microprocessor and the A-MPDU
// engines (the Tx queue carries tx_desc_t words from the processor to the generator, the
// Rx queue carries rx_desc_t words from the deaggregator to the processor), and as the
// small output buffer inside the Tx generator. The architecture only asks for a
// stream FIFO here; the storage style is this design's choice: a register array with
// read and write pointers one bit wider than the index, so full and empty are told
// apart without a separate flag.
//
// Interface: in_valid/in_ready/in_data push, out_valid/out_ready/out_data pop (first-word
// fall-through: out_data is the oldest entry while out_valid is high). count is the
// number of entries held. A push and a pop may happen in the same cycle, also when full
// only the pop side is free (in_ready is low while full). Timing: an entry pushed in
// cycle n is visible on out_data in cycle n+1.
module gplm_desc_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 64   // power of two
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign count     = wptr - rptr;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("gplm_desc_fifo: DEPTH must be a power of two");
  end

endmodule
