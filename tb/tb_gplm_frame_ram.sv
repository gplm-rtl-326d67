// tb_gplm_frame_ram: self-checking testbench of the dual-port frame RAM.
//
// Random reads and byte-masked writes on both ports are compared with a word-array model:
// read data one cycle after the request, read-first behaviour when a port reads and
// writes the same word, writes from one port visible to the other, and port B winning a
// same-cycle write collision on the same bytes.
module tb_gplm_frame_ram;
  localparam int ADDR_W = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              a_en = 0, b_en = 0;
  logic [3:0]        a_we = 0, b_we = 0;
  logic [ADDR_W-1:0] a_addr = 0, b_addr = 0;
  logic [31:0]       a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;

  gplm_frame_ram #(.ADDR_W(ADDR_W)) dut (.*);

  logic [31:0] model [2**ADDR_W];
  logic [31:0] exp_a, exp_b;
  bit          chk_a, chk_b;
  int          collisions = 0;

  initial begin
    // initialise through port A
    for (int i = 0; i < 2**ADDR_W; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = ADDR_W'(i); a_wdata = $urandom(); b_en = 0;
      model[i] = a_wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_rdata != exp_a) begin failures++; $display("FAIL: port A read %h expected %h", a_rdata, exp_a); end end
      if (chk_b) begin checks++; if (b_rdata != exp_b) begin failures++; $display("FAIL: port B read %h expected %h", b_rdata, exp_b); end end
      a_en = $urandom_range(0, 3) != 0; b_en = $urandom_range(0, 3) != 0;
      a_we = ($urandom_range(0, 1) != 0) ? 4'($urandom()) : 4'h0;
      b_we = ($urandom_range(0, 1) != 0) ? 4'($urandom()) : 4'h0;
      a_addr = ADDR_W'($urandom_range(0, 7)); b_addr = ADDR_W'($urandom_range(0, 7));
      a_wdata = $urandom(); b_wdata = $urandom();
      chk_a = a_en; chk_b = b_en;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (a_en && b_en && a_addr == b_addr && (a_we & b_we) != 0) collisions++;
      if (a_en) for (int i = 0; i < 4; i++) if (a_we[i]) model[a_addr][8*i +: 8] = a_wdata[8*i +: 8];
      if (b_en) for (int i = 0; i < 4; i++) if (b_we[i]) model[b_addr][8*i +: 8] = b_wdata[8*i +: 8];
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL: no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
