// tb_ppa_arbiter: clocked check of the 16-port Programmable Prefix Arbiter.
//
// Checks the reset priority, the combinational grant against a reference
// ring search from the current pointer, gating by active, pointer
// programming, and the round-robin pointer update. Also checks fairness:
// with all sixteen inputs requesting, sixteen consecutive grants visit every
// input once.
module tb_ppa_arbiter;

  localparam int N = 16;

  int checks = 0, failures = 0;

  logic          clk = 0, reset = 1, active = 0, update = 0, prio_load = 0;
  logic [3:0]    prio_in = '0, prio_ptr;
  logic [N-1:0]  req_pr = '0, grt_pr, grt;
  int            model_ptr;

  ppa_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_grant(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) begin
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    end
    return '0;
  endfunction

  function automatic int idx(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return -1;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: req=%h ptr=%0d grt_pr=%h grt=%h", what, $time, req_pr, prio_ptr, grt_pr, grt);
    end
  endtask

  initial begin
    logic [N-1:0] seen;
    repeat (2) @(posedge clk);
    reset <= 0;
    @(negedge clk);
    check("reset pointer", prio_ptr == 0);
    model_ptr = 0;

    // Inactive: no issued grant, pointer does not move.
    req_pr = 16'h0F00; active = 0; update = 1;
    #1 check("inactive grt", grt == 0 && grt_pr == 16'h0100);
    @(negedge clk);
    check("inactive holds pointer", prio_ptr == 0);

    // Programming the pointer.
    prio_load = 1; prio_in = 4'd10;
    @(negedge clk);
    prio_load = 0;
    model_ptr = 10;
    check("programmed pointer", prio_ptr == 10);
    req_pr = 16'h0308; active = 1; update = 0;
    #1 check("wrap grant", grt == 16'h0008);
    @(negedge clk);
    check("no update holds", prio_ptr == 10);

    // Random traffic with round-robin update.
    active = 1; update = 1;
    for (int t = 0; t < 500; t++) begin
      req_pr = N'($urandom) & N'($urandom);
      active = ($urandom % 8) != 0;
      #1;
      check("grant", grt_pr == ref_grant(req_pr, model_ptr));
      check("issued", grt == (active ? grt_pr : '0));
      if (active && req_pr != 0) model_ptr = (idx(grt_pr) + 1) % N;
      @(negedge clk);
      check("pointer", int'(prio_ptr) == model_ptr);
    end

    // Fairness: all requesting, 16 grants cover all inputs.
    req_pr = '1; active = 1; seen = '0;
    for (int t = 0; t < N; t++) begin
      #1 seen |= grt;
      @(negedge clk);
    end
    check("fair", seen == '1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
