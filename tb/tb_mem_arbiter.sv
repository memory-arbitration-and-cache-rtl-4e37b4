// tb_mem_arbiter: self-checking test of the three-level arbiter.
//
// Runs with N1 = 32, M1 = 16, N2 = 16, M2 = 8 and one-cycle bursts, and
// counts grants per requester over whole service cycles:
//  a) debugger, CPU and GFX always requesting: all grants to the debugger;
//  b) CPU and GFX with gfx_priority = 2: CPU, CPU, GFX, repeating;
//  c) streams and both control kinds: level 2b gives R2 = 8 of every 16
//     cycles to configuration-time control and 8 to the streams;
//  d) streams and run-time control only: 8 and 8;
//  e) everything: per 32 cycles 16 to the debugger (random side first),
//     then 8 to configuration-time control and 8 to the streams;
//  f) no grant and SRC_NONE while mem_ready is low.
module tb_mem_arbiter;
  import cpa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, mem_ready = 1;
  logic [3:0] gfx_priority = '0;
  logic req_dbg = 0, req_cpu = 0, req_gfx = 0, req_stream = 0, req_cfg = 0, req_rtc = 0;
  logic gnt_dbg, gnt_cpu, gnt_gfx, gnt_stream, gnt_cfg, gnt_rtc;
  mem_src_e gnt_src;
  logic l1_sc_start, l2b_sc_start;
  logic [5:0] l1_rand_used;
  logic [4:0] l2b_rand_used;
  int checks = 0, failures = 0;
  int cnt [7];

  mem_arbiter #(.N1(32), .M1(16), .N2(16), .M2(8), .PRIO_W(4)) dut (.*);
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

  // restart both service cycles, then count grants over n cycles
  task automatic run(input int n);
    rst_n = 0; #1 rst_n = 1;
    foreach (cnt[i]) cnt[i] = 0;
    for (int c = 0; c < n; c++) begin
      #1;
      check($onehot0({gnt_dbg, gnt_cpu, gnt_gfx, gnt_stream, gnt_cfg, gnt_rtc}), "one grant at a time");
      cnt[int'(gnt_src)]++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // a
    req_dbg = 1; req_cpu = 1; req_gfx = 1;
    run(64);
    check(cnt[SRC_DBG] == 64, $sformatf("a: debugger got %0d of 64", cnt[SRC_DBG]));
    // b
    req_dbg = 0; gfx_priority = 2;
    run(60);
    check(cnt[SRC_CPU] == 40 && cnt[SRC_GFX] == 20,
          $sformatf("b: cpu %0d gfx %0d, expected 40/20", cnt[SRC_CPU], cnt[SRC_GFX]));
    // c
    req_cpu = 0; req_gfx = 0; req_stream = 1; req_cfg = 1; req_rtc = 1;
    run(64);
    check(cnt[SRC_CFG] == 32 && cnt[SRC_STREAM] == 32 && cnt[SRC_RTC] == 0,
          $sformatf("c: cfg %0d stream %0d rtc %0d", cnt[SRC_CFG], cnt[SRC_STREAM], cnt[SRC_RTC]));
    // d
    req_cfg = 0;
    run(64);
    check(cnt[SRC_RTC] == 32 && cnt[SRC_STREAM] == 32,
          $sformatf("d: rtc %0d stream %0d", cnt[SRC_RTC], cnt[SRC_STREAM]));
    // e
    req_dbg = 1; req_cpu = 1; req_gfx = 1; req_cfg = 1;
    run(96);
    check(cnt[SRC_DBG] == 48 && cnt[SRC_CFG] == 24 && cnt[SRC_STREAM] == 24,
          $sformatf("e: dbg %0d cfg %0d stream %0d", cnt[SRC_DBG], cnt[SRC_CFG], cnt[SRC_STREAM]));
    // f
    mem_ready = 0;
    #1 check(gnt_src == SRC_NONE && !gnt_dbg && !gnt_stream, "f: no grant without mem_ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
