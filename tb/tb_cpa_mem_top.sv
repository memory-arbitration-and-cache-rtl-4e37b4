// tb_cpa_mem_top: end-to-end self-checking test of the complete stream
// cache and memory arbiter, with every parameter at its default
// (80 lines, 20 streams, 5 ports, N1 = 1024, M1 = 512, N2 = 1024,
// M2 = 896).
//
// Six streams run through the cache to and from the SDRAM model, as in the
// stream cache test, while a CPU, a graphics unit, a debugger and the two
// kinds of control traffic compete for the SDRAM. Phase 1 has the CPU
// asking for bursts back to back (an overloaded random side) with GFX
// traffic; there the longest wait of a stream request, from its entry in
// the FCFS unit to its grant, must stay within the worst-case response time
// W = c*|P| + (ceil(c*|P|/(N-R)) + 1)*R plus three bursts (one running
// when the request arrives, one overrun of each random budget, as bursts
// are never cut).
// Phase 1 also stages the critical instance: the CPU keeps silent until
// N - R cycles into a service cycle and then asks back to back (GFX keeps
// silent meanwhile), and must
// get close to 2R cycles in a row, but never more than 2R plus two bursts.
// Phase 2 adds the debugger and the control traffic. All stream data are
// checked word by word, and every arbitration and buffering mechanism must
// have happened at least once (counted below, a failure for each that
// never did).
module tb_cpa_mem_top;
  import cpa_pkg::*;
  localparam int WORDS = 2048;         // 16-bit words per stream
  localparam int NP = 5, NS = 20;
  localparam int PHASE1 = 12000;       // cycles
  localparam int N = 1024, R = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_valid = 0, cfg_ready, cfg_prepend = 0, cfg_done, cfg_err;
  cfg_op_e cfg_op = CFG_OPEN;
  logic [4:0] cfg_stream = '0;
  stream_dir_e cfg_dir = DIR_TO_MEM;
  logic [6:0] cfg_nlines = '0;
  logic [25:0] cfg_base = '0;
  logic wr_valid [NP], wr_ready [NP], rd_req [NP], rd_valid [NP], rd_ready [NP];
  logic [4:0] wr_stream [NP], rd_req_stream [NP], rd_stream [NP];
  logic [15:0] wr_data [NP], rd_data [NP];
  logic [3:0] gfx_priority = 4'd3;
  logic req_dbg = 0, req_cpu = 0, req_gfx = 0, req_cfgc = 0, req_rtc = 0;
  logic gnt_dbg, gnt_cpu, gnt_gfx, gnt_cfgc, gnt_rtc;
  logic [25:0] ext_addr [5];
  logic ext_write [5];
  logic mem_ready, mc_valid, mc_write, sd_wvalid, sd_wready, sd_rvalid, eng_busy;
  mem_src_e mc_src;
  logic [25:0] mc_addr;
  logic [31:0] sd_wdata, sd_rdata;
  logic [6:0] free_count, free_head, free_tail;
  logic [6:0] stream_lines [NS];
  logic l1_sc_start, l2b_sc_start;
  logic [10:0] l1_rand_used, l2b_rand_used;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit phase2 = 0;
  bit done_all = 0;
  bit crit_done = 0;

  cpa_mem_top dut (.*);
  sdram_model u_sd (
    .clk, .rst_n, .cmd_valid(mc_valid), .cmd_stream(mc_src == SRC_STREAM),
    .cmd_write(mc_write), .cmd_addr(mc_addr), .ready(mem_ready),
    .wvalid(sd_wvalid), .wready(sd_wready), .wdata(sd_wdata),
    .rvalid(sd_rvalid), .rdata(sd_rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] f(input int s, input int k);
    return 16'(s * 4099 + k * 7 + (k >> 4));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ event counters
  typedef enum int {
    EV_RANDOM_FIRST,      // random granted while periodic traffic waited
    EV_PERIODIC_PRIO,     // periodic granted while random waited (budget used up)
    EV_CRITICAL_2R,       // more than R random cycles in a row across a boundary
    EV_DBG_OVER_CPU,      // level 2a
    EV_GFX_CLAIM,         // level 3a: GFX granted while the CPU waited
    EV_CFG_OVER_RTC,      // level 3b
    EV_CTRL_OVER_STREAM,  // level 2b random side first
    EV_STREAM_OVER_CTRL,  // level 2b periodic side first
    EV_FCFS_QUEUE,        // two or more streams waiting in the FCFS unit
    EV_WRITE_BURST,
    EV_PREFETCH_BURST,
    EV_WRITER_HELD,       // a full stream held its writer back
    EV_SC_WRAP,           // service cycle boundary
    EV_ENGINE_HOLD,       // memory held while the burst engine stores a line
    EV_LL_ALLOC,
    EV_LL_APPEND,
    EV_LL_PREPEND,
    EV_LL_REFUSED,
    EV_COUNT
  } ev_e;
  int ev [EV_COUNT];
  string ev_name [EV_COUNT] = '{"random first", "periodic priority", "critical 2R burst",
    "debugger over CPU", "GFX claim", "config over run-time control",
    "control over stream", "stream over control", "FCFS queue", "write burst",
    "prefetch burst", "writer held", "service cycle wrap", "memory held for engine", "line allocation",
    "release append", "release prepend", "allocation refused"};

  int t_arr [NS];
  int max_lat1 = 0, max_lat2 = 0;
  int rand_run = 0, max_rand_run = 0;
  int burst_len = 0, max_burst = 0, burst_start = 0;

  always @(posedge clk) if (rst_n) begin
    logic rnd_req, per_req, rnd_gnt;
    cyc++;
    rnd_req = req_dbg | req_cpu | req_gfx;
    per_req = dut.u_arb.req_stream | req_cfgc | req_rtc;
    rnd_gnt = gnt_dbg | gnt_cpu | gnt_gfx;
    if (rnd_gnt && per_req) ev[EV_RANDOM_FIRST]++;
    if ((dut.u_arb.gnt_stream | gnt_cfgc | gnt_rtc) && rnd_req) ev[EV_PERIODIC_PRIO]++;
    if (gnt_dbg && req_cpu) ev[EV_DBG_OVER_CPU]++;
    if (gnt_gfx && req_cpu) ev[EV_GFX_CLAIM]++;
    if (gnt_cfgc && req_rtc) ev[EV_CFG_OVER_RTC]++;
    if ((gnt_cfgc | gnt_rtc) && dut.u_arb.req_stream) ev[EV_CTRL_OVER_STREAM]++;
    if (dut.u_arb.gnt_stream && (req_cfgc | req_rtc)) ev[EV_STREAM_OVER_CTRL]++;
    if ($countones(dut.u_cache.u_fcfs.live) >= 2) ev[EV_FCFS_QUEUE]++;
    if (mc_valid && mc_src == SRC_STREAM && mc_write) ev[EV_WRITE_BURST]++;
    if (mc_valid && mc_src == SRC_STREAM && !mc_write) ev[EV_PREFETCH_BURST]++;
    if (l1_sc_start) ev[EV_SC_WRAP]++;
    if (mem_ready && dut.st_wait) ev[EV_ENGINE_HOLD]++;
    // longest stretch of memory cycles owned by random traffic
    if (dut.u_arb.u_l1.busy_r) rand_run++; else rand_run = 0;
    if (rand_run > max_rand_run) max_rand_run = rand_run;
    // longest burst occupation of the memory
    if (mc_valid) burst_start = cyc;
    if (!mem_ready && cyc - burst_start + 1 > max_burst) max_burst = cyc - burst_start + 1;
    // waiting time of stream requests in the FCFS unit
    for (int s = 0; s < NS; s++) begin
      if (dut.u_cache.u_fcfs.arrive[s]) t_arr[s] = cyc;
      if (dut.u_cache.u_fcfs.gnt[s]) begin
        if (!phase2 && cyc - t_arr[s] > max_lat1) max_lat1 = cyc - t_arr[s];
        if (phase2 && cyc - t_arr[s] > max_lat2) max_lat2 = cyc - t_arr[s];
      end
    end
  end

  // ------------------------------------------------------------ requesters
  // hold a request until granted; the CPU asks in bursts of requests
  task automatic requester(input int which);
    while (!done_all) begin
      int gap;
      case (which)
        0: gap = phase2 ? $urandom_range(50, 400) : 100000;     // debugger
        1: gap = phase2 ? $urandom_range(0, 150) : 0;           // CPU
        2: gap = $urandom_range(0, 60);                          // GFX
        3: gap = phase2 ? $urandom_range(100, 600) : 100000;    // configuration
        default: gap = phase2 ? $urandom_range(20, 200) : 100000; // run-time control
      endcase
      while (gap > 0 && !done_all) begin
        @(posedge clk); #1;
        gap--;
        if (!phase2 && (which == 0 || which >= 3) && gap > 1000) gap = 1000;
      end
      if (done_all) break;
      if (!phase2 && (which == 0 || which >= 3)) continue;
      // GFX keeps out of the way of the critical instance
      if (which == 2 && cyc >= 2000 && cyc < 6000) continue;
      // critical instance: the CPU keeps silent for a service cycle up to
      // N - R cycles into the next one, then asks back to back
      if (which == 1 && !crit_done && cyc >= 3000) begin
        @(posedge clk iff l1_sc_start);
        @(posedge clk iff dut.u_arb.u_l1.pos_q == 11'(N - R));
        #1;
        crit_done = 1;
      end
      case (which)
        0: req_dbg = 1; 1: req_cpu = 1; 2: req_gfx = 1; 3: req_cfgc = 1; default: req_rtc = 1;
      endcase
      ext_addr[which] = 26'($urandom) & ~26'h3F;
      ext_write[which] = 1'($urandom_range(0, 1));
      forever begin
        logic g;
        #1;
        case (which)
          0: g = gnt_dbg; 1: g = gnt_cpu; 2: g = gnt_gfx; 3: g = gnt_cfgc; default: g = gnt_rtc;
        endcase
        @(posedge clk);
        if (g) break;
      end
      #1;
      case (which)
        0: req_dbg = 0; 1: req_cpu = 0; 2: req_gfx = 0; 3: req_cfgc = 0; default: req_rtc = 0;
      endcase
    end
  endtask

  // ------------------------------------------------------------ streams
  task automatic cfg(input cfg_op_e op, input int s, input stream_dir_e d, input int n,
                     input int base, input bit pre, output bit e);
    @(posedge clk); #1;
    cfg_op = op; cfg_stream = 5'(s); cfg_dir = d; cfg_nlines = 7'(n);
    cfg_base = 26'(base); cfg_prepend = pre; cfg_valid = 1;
    #1;
    while (!cfg_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 cfg_valid = 0;
    while (!cfg_done) begin @(posedge clk); #1; end
    e = cfg_err;
    if (!e) begin
      if (op == CFG_OPEN) ev[EV_LL_ALLOC]++;
      else if (pre) ev[EV_LL_PREPEND]++;
      else ev[EV_LL_APPEND]++;
    end else ev[EV_LL_REFUSED]++;
  endtask

  task automatic writer(input int p, input int s);
    for (int k = 0; k < WORDS; k++) begin
      wr_valid[p] = 1; wr_stream[p] = 5'(s); wr_data[p] = f(s, k);
      #1;
      while (!wr_ready[p]) begin
        ev[EV_WRITER_HELD]++;
        @(posedge clk); #1;
      end
      @(posedge clk); #1;
      wr_valid[p] = 0;
      if ($urandom_range(0, 1) == 0) begin @(posedge clk); #1; end
    end
  endtask

  task automatic reader(input int p, input int s);
    int k = 0;
    rd_req[p] = 1; rd_req_stream[p] = 5'(s);
    while (k < WORDS) begin
      rd_ready[p] = 1'($urandom_range(0, 2) != 0);
      #1;
      if (k >= WORDS - 8 && rd_valid[p]) rd_req[p] = 0;
      if (rd_valid[p] && rd_ready[p]) begin
        check(rd_data[p] == f(s, k) && rd_stream[p] == 5'(s),
              $sformatf("port %0d stream %0d word %0d: %h, expected %h", p, s, k, rd_data[p], f(s, k)));
        k++;
      end
      @(posedge clk); #1;
    end
    rd_ready[p] = 0;
  endtask

  initial begin
    bit e;
    int base [NS];
    int c_max, w_bound, np;
    for (int p = 0; p < NP; p++) begin
      wr_valid[p] = 0; wr_stream[p] = '0; wr_data[p] = '0;
      rd_req[p] = 0; rd_req_stream[p] = '0; rd_ready[p] = 0;
    end
    for (int i = 0; i < 5; i++) begin ext_addr[i] = '0; ext_write[i] = 0; end
    for (int s = 0; s < NS; s++) base[s] = 32'h10000 * (s + 1);
    foreach (base[s]) if (s == 1 || s == 3 || s == 5)
      for (int j = 0; j < WORDS / 2 + 128; j++)
        u_sd.poke(base[s] / 4 + j, {f(s, 2 * j + 1), f(s, 2 * j)});
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cfg(CFG_OPEN, 0, DIR_TO_MEM,   4, base[0], 0, e); check(!e, "open stream 0");
    cfg(CFG_OPEN, 1, DIR_FROM_MEM, 4, base[1], 0, e); check(!e, "open stream 1");
    cfg(CFG_OPEN, 2, DIR_TO_MEM,   2, base[2], 0, e); check(!e, "open stream 2");
    cfg(CFG_OPEN, 3, DIR_FROM_MEM, 3, base[3], 0, e); check(!e, "open stream 3");
    cfg(CFG_OPEN, 4, DIR_TO_MEM,   4, base[4], 0, e); check(!e, "open stream 4");
    cfg(CFG_OPEN, 5, DIR_FROM_MEM, 4, base[5], 0, e); check(!e, "open stream 5");
    cfg(CFG_OPEN, 6, DIR_TO_MEM,  60, base[6], 0, e); check(e, "too many lines refused");
    check(free_count == 59, "59 lines left free");
    fork
      requester(0); requester(1); requester(2); requester(3); requester(4);
      begin
        repeat (PHASE1) @(posedge clk);
        phase2 = 1;
      end
      begin
        fork
          writer(0, 0); writer(2, 2); writer(4, 4);
          reader(1, 1); reader(3, 3); reader(4, 5);
        join
        repeat (400) @(posedge clk);
        done_all = 1;
      end
    join
    #1;
    req_dbg = 0; req_cpu = 0; req_gfx = 0; req_cfgc = 0; req_rtc = 0;
    foreach (base[s]) if (s == 0 || s == 2 || s == 4) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < WORDS / 2; j++)
        if (u_sd.peek(base[s] / 4 + j) != {f(s, 2 * j + 1), f(s, 2 * j)}) ok = 0;
      check(ok, $sformatf("SDRAM contents of stream %0d", s));
    end
    check(phase2, "phase 2 reached");
    // worst-case response time of a stream request, equation of the design
    // description, with c the longest burst seen and |P| = 6 streams
    np = 6;
    c_max = max_burst;
    w_bound = c_max * np + ((c_max * np + (N - R) - 1) / (N - R) + 1) * R;
    // bursts are never cut: each of the two random budgets of the critical
    // instance can be overrun by one burst, and one burst may be running
    // when the request arrives, hence three bursts beyond W
    check(max_lat1 <= w_bound + 3 * c_max,
          $sformatf("phase 1 stream wait %0d within W %0d + three bursts of %0d", max_lat1, w_bound, c_max));
    if (max_rand_run >= 2 * R - c_max) ev[EV_CRITICAL_2R]++;
    check(max_rand_run <= 2 * R + 2 * c_max,
          $sformatf("random run %0d within 2R plus two bursts", max_rand_run));
    $display("phase 1: longest stream wait %0d cycles, W = %0d, longest burst %0d; phase 2 wait %0d; longest random run %0d",
             max_lat1, w_bound, c_max, max_lat2, max_rand_run);
    for (int s = 0; s < 5; s++) begin
      cfg(CFG_CLOSE, s, DIR_TO_MEM, 0, 0, 0, e); check(!e, $sformatf("close stream %0d", s));
    end
    cfg(CFG_CLOSE, 5, DIR_TO_MEM, 0, 0, 1, e); check(!e, "close stream 5 (prepend)");
    check(free_count == 80, "all lines free again");
    for (int i = 0; i < EV_COUNT; i++) begin
      $display("  %-30s %0d", ev_name[i], ev[i]);
      check(ev[i] > 0, $sformatf("mechanism '%s' never happened", ev_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
