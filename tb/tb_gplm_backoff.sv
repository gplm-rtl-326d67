// tb_gplm_backoff: self-checking testbench of the carrier-sense / backoff accelerator.
//
// Short slot and SIFS lengths keep the run brief. Checked: the drawn count lies within the
// contention window; on an idle medium grant rises exactly SIFS + aifsn*slot + n*slot
// cycles after start; a busy period during the countdown freezes the remaining count and
// the grant then comes exactly AIFS + remaining*slot cycles after the medium clears; a
// zero window grants right after AIFS; grant holds until acknowledged.
module tb_gplm_backoff;
  localparam int SLOT = 5;
  localparam int SIFS = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cca_busy = 0, start = 0, grant_ack = 0;
  logic [9:0] cw = 0;
  logic [3:0] aifsn = 0;
  logic       grant, active;
  logic [9:0] slots_left;
  logic [15:0] freeze_cnt;

  gplm_backoff #(.SLOT_CYCLES(SLOT), .SIFS_CYCLES(SIFS)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // start an attempt and return the drawn count
  task automatic do_start(int w, int a, output int n);
    @(negedge clk);
    cw = 10'(w); aifsn = 4'(a); start = 1;
    @(negedge clk);
    start = 0;
    n = slots_left;
  endtask

  task automatic wait_grant(output int cyc);
    cyc = 0;
    while (!grant && cyc < 100000) begin @(negedge clk); cyc++; end
  endtask

  task automatic ack();
    @(negedge clk); grant_ack = 1;
    @(negedge clk); grant_ack = 0;
    check(!grant && !active, "grant not released by ack");
  endtask

  initial begin
    int n, cyc, rem, nonzero;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nonzero = 0;
    // idle medium, several draws
    for (int t = 0; t < 20; t++) begin
      int w, a;
      w = (t % 2) ? 15 : 63;
      a = 2 + t % 3;
      do_start(w, a, n);
      check(n <= w, "count outside the window");
      if (n != 0) nonzero++;
      wait_grant(cyc);
      check(cyc == SIFS + a * SLOT + n * SLOT, $sformatf("idle grant after %0d cycles, n=%0d a=%0d", cyc, n, a));
      repeat (3) @(negedge clk);
      check(grant, "grant dropped before ack");
      ack();
    end
    check(nonzero > 0, "backoff count always zero");

    // busy medium during the countdown
    for (int t = 0; t < 10; t++) begin
      int f0;
      f0 = freeze_cnt;
      n = 0;
      while (n < 4) do_start(63, 3, n);
      // wait into the countdown
      while (slots_left > n - 2) @(negedge clk);
      repeat (2) @(negedge clk);
      rem = slots_left;
      cca_busy = 1;
      repeat (20 + t) begin
        @(negedge clk);
        check(slots_left == rem && !grant, "count moved while busy");
      end
      cca_busy = 0;
      wait_grant(cyc);
      check(cyc == SIFS + 3 * SLOT + rem * SLOT, $sformatf("grant %0d cycles after busy, expected %0d", cyc, SIFS + 3*SLOT + rem*SLOT));
      check(freeze_cnt == 16'(f0 + 1), "freeze not counted");
      ack();
    end

    // zero window: grant right after AIFS
    do_start(0, 2, n);
    check(n == 0, "zero window drew a count");
    wait_grant(cyc);
    check(cyc == SIFS + 2 * SLOT, "zero-window grant time");
    ack();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
