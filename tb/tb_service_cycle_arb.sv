// tb_service_cycle_arb: self-checking test of the service cycle arbiter.
//
// Runs with N = 16, M = 8 (R = 8) and checks:
//  1. both classes always requesting, one-cycle bursts: every service cycle
//     gives exactly R grants to random and M to periodic, random first;
//  2. the critical instance: random and periodic requests both start at
//     N - R; random then gets 2R grants in a row across the boundary, and
//     the first periodic grant comes 2R cycles after its request;
//  3. only one class requesting: it gets every cycle (no idle memory);
//  4. random requests and bursts of 1..4 cycles, compared cycle by cycle
//     with a reference model kept in the testbench.
module tb_service_cycle_arb;
  localparam int unsigned N = 16;
  localparam int unsigned M = 8;
  localparam int unsigned R = N - M;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_r = 1'b0, req_p = 1'b0, mem_ready = 1'b1;
  logic req_out, gnt_r, gnt_p, sc_start;
  logic [$clog2(N+1)-1:0] rand_used;
  int checks = 0, failures = 0;

  service_cycle_arb #(.N(N), .M(M)) dut (
    .clk, .rst_n, .req_r, .req_p, .gnt_in(1'b1), .mem_ready,
    .req_out, .gnt_r, .gnt_p, .sc_start, .rand_used
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int ref_pos, ref_used, ref_busy_left;
  bit ref_owner_r;

  initial begin
    int nr, np, run, wait_p, l;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // the arbiter is now at position 0 of a service cycle
    // ---- 1: saturated
    req_r = 1; req_p = 1;
    for (int sc = 0; sc < 3; sc++) begin
      nr = 0; np = 0;
      for (int c = 0; c < N; c++) begin
        #1;
        if (c == 0) check(sc_start, "sc_start at cycle 0");
        check(gnt_r == (c < R), $sformatf("saturated: random grant at pos %0d", c));
        nr += gnt_r; np += gnt_p;
        @(posedge clk);
      end
      check(nr == R && np == M, $sformatf("saturated split %0d/%0d", nr, np));
    end
    // ---- 2: critical instance
    #1 req_r = 0; req_p = 0;
    for (int c = 0; c < N - R; c++) @(posedge clk);   // now at tau_x = N - R
    #1 req_r = 1; req_p = 1;
    run = 0; wait_p = 0;
    while (1) begin
      #1;
      if (gnt_p) break;
      if (gnt_r) run++;
      wait_p++;
      @(posedge clk);
    end
    check(run == 2 * R, $sformatf("critical instance: %0d random grants in a row, expected %0d", run, 2 * R));
    check(wait_p == 2 * R, $sformatf("critical instance: periodic waited %0d cycles, expected %0d", wait_p, 2 * R));
    @(posedge clk);
    // ---- 3: one class only
    #1 req_r = 0; req_p = 1;
    repeat (2 * N) begin #1; check(gnt_p && !gnt_r, "periodic alone always granted"); @(posedge clk); end
    #1 req_r = 1; req_p = 0;
    repeat (2 * N) begin #1; check(gnt_r && !gnt_p, "random alone always granted"); @(posedge clk); end
    req_r = 0;
    // ---- 4: random traffic against a reference model
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    ref_pos = 0; ref_used = 0; ref_busy_left = 0; ref_owner_r = 0;
    for (int c = 0; c < 3000; c++) begin
      bit exp_r, exp_p, busy_r;
      #1;
      req_r = ($urandom_range(0, 2) != 0);
      req_p = ($urandom_range(0, 2) != 0);
      mem_ready = (ref_busy_left == 0);
      #1;
      exp_r = mem_ready && req_r && ((ref_used < R) || !req_p);
      exp_p = mem_ready && req_p && !exp_r;
      check(gnt_r == exp_r && gnt_p == exp_p,
            $sformatf("model: pos %0d used %0d r%0d p%0d got %0d%0d", ref_pos, ref_used, req_r, req_p, gnt_r, gnt_p));
      busy_r = mem_ready ? exp_r : (ref_owner_r && ref_busy_left > 0);
      if (mem_ready) begin
        ref_owner_r = exp_r;
        l = $urandom_range(1, 4);
        ref_busy_left = (exp_r || exp_p) ? l - 1 : 0;
      end else begin
        ref_busy_left--;
      end
      if (ref_pos == N - 1) begin ref_pos = 0; ref_used = 0; end
      else begin ref_pos++; if (busy_r) ref_used++; end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
