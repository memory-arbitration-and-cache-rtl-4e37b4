// tb_fcfs_arb: self-checking test of the first-come-first-serve arbiter
// with 20 streams.
//
// Streams raise requests at random and hold them until granted; the parent
// grants at random. A queue in the testbench records the arrival order
// (same-cycle arrivals by stream number) and every grant must go to the
// stream at its front. A directed case checks that a stream that requested
// first is served first even when a lower-numbered stream arrives later.
module tb_fcfs_arb;
  localparam int NREQ = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NREQ-1:0] req = '0;
  logic gnt_in = 0;
  logic req_out;
  logic [NREQ-1:0] gnt;
  logic [4:0] gnt_id;
  int checks = 0, failures = 0;
  int q[$];
  int ngrants = 0;

  fcfs_arb #(.NREQ(NREQ)) dut (.clk, .rst_n, .req, .gnt_in, .req_out, .gnt, .gnt_id);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // directed: 7 first, then 2, then 15 and 3 together
    req[7] = 1; @(posedge clk); #1;
    req[2] = 1; @(posedge clk); #1;
    req[15] = 1; req[3] = 1; @(posedge clk); #1;
    gnt_in = 1;
    #1;
    for (int k = 0; k < 4; k++) begin
      int exp_id;
      exp_id = (k == 0) ? 7 : (k == 1) ? 2 : (k == 2) ? 3 : 15;
      check(gnt == (NREQ'(1) << exp_id) && gnt_id == 5'(exp_id),
            $sformatf("directed grant %0d: got id %0d gnt %b, expected %0d", k, gnt_id, gnt, exp_id));
      @(posedge clk); #1;
      req[exp_id] = 0;   // a stream drops its request after the grant edge
    end
    check(!req_out, "all served");
    gnt_in = 0;
    @(posedge clk); #1;
    // random: one iteration per cycle, driven 1 time unit after the edge
    begin
      int drop;
      drop = -1;
      for (int c = 0; c < 5000; c++) begin
        logic [NREQ-1:0] arrive;
        if (drop >= 0) req[drop] = 0;       // drop the request granted at the last edge
        arrive = '0;
        for (int i = 0; i < NREQ; i++)
          if (!req[i] && i != drop && $urandom_range(0, 15) == 0) arrive[i] = 1;
        req = req | arrive;
        gnt_in = ($urandom_range(0, 3) == 0);
        #1;
        drop = -1;
        if (q.size() > 0 && gnt_in) begin
          check(gnt == (NREQ'(1) << q[0]) && gnt_id == 5'(q[0]),
                $sformatf("grant to %0d, expected %0d", gnt_id, q[0]));
          ngrants++;
          drop = q.pop_front();
        end else begin
          check(gnt == '0, "no grant expected");
        end
        check(req_out == (q.size() > 0 || drop >= 0), "req_out");
        for (int i = 0; i < NREQ; i++) if (arrive[i]) q.push_back(i);
        @(posedge clk); #1;
      end
    end
    check(ngrants > 100, $sformatf("enough grants (%0d)", ngrants));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
