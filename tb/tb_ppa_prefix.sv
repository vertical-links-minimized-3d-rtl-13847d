// tb_ppa_prefix: exhaustive check of the PPA prefix network.
//
// For N = 2 every request vector and every priority position is applied and
// compared with the two-bit circuit written out gate by gate
// (x1 = p1 | ~r0 & p0, x0 = p0 | ~r1 & p1, gr = r & x). For N = 16 random
// request vectors and every priority position are compared with a reference
// that walks the ring from the priority position to the first request.
module tb_ppa_prefix;

  int checks = 0, failures = 0;

  logic [1:0]  req2, prio2, x2, gnt2;
  logic [15:0] req16, prio16, x16, gnt16;

  ppa_prefix #(.N(2))  dut2  (.req(req2),  .prio(prio2),  .x(x2),  .gnt(gnt2));
  ppa_prefix #(.N(16)) dut16 (.req(req16), .prio(prio16), .x(x16), .gnt(gnt16));

  function automatic logic [15:0] ref_grant(input logic [15:0] r, input int p);
    for (int k = 0; k < 16; k++) begin
      if (r[(p + k) % 16]) return 16'(1) << ((p + k) % 16);
    end
    return '0;
  endfunction

  initial begin
    logic [1:0] ex, eg;
    for (int p = 0; p < 2; p++) begin
      for (int r = 0; r < 4; r++) begin
        req2  = 2'(r);
        prio2 = 2'(1) << p;
        #1;
        ex[1] = prio2[1] | (~req2[0] & prio2[0]);
        ex[0] = prio2[0] | (~req2[1] & prio2[1]);
        eg    = req2 & ex;
        checks++;
        if (x2 !== ex || gnt2 !== eg) begin
          failures++;
          $display("FAIL N=2 p=%0d r=%b: x=%b gnt=%b, expected x=%b gnt=%b", p, req2, x2, gnt2, ex, eg);
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int p;
      p      = t % 16;
      req16  = 16'($urandom);
      if (t % 7 == 0) req16 = 16'(1) << ($urandom % 16);
      if (t % 11 == 0) req16 = '0;
      prio16 = 16'(1) << p;
      #1;
      checks++;
      if (gnt16 !== ref_grant(req16, p)) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=16 p=%0d r=%h: gnt=%h expected %h", p, req16, gnt16, ref_grant(req16, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
