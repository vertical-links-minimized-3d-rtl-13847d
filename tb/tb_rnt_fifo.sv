// tb_rnt_fifo: random push/pop check of the flit buffer against a queue.
//
// Drives random pushes and pops (including push and pop while full and
// while empty), compares dout, full, empty and count with a reference queue
// every cycle, and checks that full and empty were both reached.
module tb_rnt_fifo;

  localparam int W = 82, D = 4;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  logic         clk = 0, reset = 1, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic         full, empty;
  logic [2:0]   count;
  logic [W-1:0] q[$];

  rnt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(q.size()) || full != (q.size() == D) || empty != (q.size() == 0) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d model=%0d", t, count, q.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      push = ($urandom % 100) < ((t / 500) % 2 ? 70 : 35);
      pop  = ($urandom % 100) < ((t / 500) % 2 ? 35 : 70);
      // Keep the pushes and pops legal, as the switch does.
      if (push && full && !pop) push = 0;
      if (pop && empty) pop = 0;
      din  = {$urandom, $urandom, $urandom};
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full=%0d empty=%0d cycles", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
