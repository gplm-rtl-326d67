// tb_gplm_desc_fifo: self-checking testbench of the descriptor queue.
//
// Random pushes and pops (including simultaneous ones, and pushes against a full queue)
// are checked against a queue model: order and content of every popped entry, the count
// output, in_ready low exactly when full and out_valid low exactly when empty. A second
// phase fills the queue completely and drains it.
module tb_gplm_desc_fifo;
  localparam int WIDTH = 64;
  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             in_valid = 1'b0, out_ready = 1'b0;
  logic             in_ready, out_valid;
  logic [WIDTH-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH):0] count;

  gplm_desc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] model[$];
  int fulls = 0;

  task automatic step(bit push, bit pop);
    in_valid  <= push;
    in_data   <= {$urandom(), $urandom()};
    out_ready <= pop;
    @(negedge clk);
    checks++;
    if (count != ($clog2(DEPTH)+1)'(model.size()) || in_ready != (model.size() < DEPTH) ||
        out_valid != (model.size() != 0)) begin
      failures++;
      $display("FAIL: count=%0d model=%0d in_ready=%b out_valid=%b", count, model.size(), in_ready, out_valid);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != model[0]) begin failures++; $display("FAIL: data %h expected %h", out_data, model[0]); end
    end
    if (!in_ready) fulls++;
    @(posedge clk);
    if (out_valid && out_ready) void'(model.pop_front());
    if (in_valid && in_ready) model.push_back(in_data);
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 99) < 60, $urandom_range(0, 99) < 45);
    for (int i = 0; i < DEPTH + 2; i++) step(1'b1, 1'b0);
    for (int i = 0; i < DEPTH + 2; i++) step(1'b0, 1'b1);
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: queue never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
