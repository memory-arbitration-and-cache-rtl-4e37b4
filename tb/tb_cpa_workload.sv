// tb_cpa_workload: the full example load of the design, 20 streams sharing
// the 5 kB cache, run through cpa_mem_top at its default parameters.
//
// The example sizes every stream for the average buffering of 256 bytes,
// i.e. 4 lines of 64 bytes, so 20 streams take all 80 lines. Here ten
// streams write towards the SDRAM and ten are prefetched from it. Each of
// the 5 bus ports carries two of each: its writer alternates between its
// two streams in groups of 8 words (one cache word), and its reader
// alternates its read request between its two streams, checking every word
// by the stream tag it arrives with. The random side is overloaded the
// whole time (the CPU asks for bursts back to back, GFX often), so the
// streams only get the cycles the service cycle guarantees them.
//
// Checks:
//  * all 20 x 1024 stream words arrive in order, in the SDRAM for the
//    writing streams and at the bus port for the prefetched ones;
//  * all 80 lines are allocated, and a 21st stream is refused;
//  * the longest wait of a stream burst request in the FCFS unit stays
//    within the worst-case response time
//        W = c*|P| + (ceil(c*|P|/(N-R)) + 1)*R
//    with |P| = 20, N = 1024, R = 512, plus three bursts (one burst that is
//    running when the request arrives, and one overrun of each of the two
//    random budgets of the critical instance, as bursts are never cut).
//    c is measured: the longest time one stream burst keeps the next stream
//    burst from starting (memory occupation plus the cycles the memory is
//    held while the burst engine stores a prefetched line), which is the
//    per-burst cost this implementation has;
//  * the random side never gets more than 2R cycles in a row (plus two
//    bursts), and the streams get at least the share M = N - R (less two
//    bursts) of every complete service cycle in which they were waiting
//    throughout;
//  * all lines are free again after all streams are closed.
module tb_cpa_workload;
  import cpa_pkg::*;
  localparam int WORDS = 1024;         // 16-bit words per stream
  localparam int NP = 5, NS = 20;
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
  logic [3:0] gfx_priority = 4'd2;
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
  bit done_all = 0;

  cpa_mem_top dut (.*);
  sdram_model u_sd (
    .clk, .rst_n, .cmd_valid(mc_valid), .cmd_stream(mc_src == SRC_STREAM),
    .cmd_write(mc_write), .cmd_addr(mc_addr), .ready(mem_ready),
    .wvalid(sd_wvalid), .wready(sd_wready), .wdata(sd_wdata),
    .rvalid(sd_rvalid), .rdata(sd_rdata)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] f(input int s, input int k);
    return 16'(s * 7919 + k * 13 + (k >> 5));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ measurements
  int t_arr [NS];
  int max_lat = 0, max_queue = 0;
  int rand_run = 0, max_rand_run = 0;
  int burst_start = 0, max_burst = 0;
  int sgnt_last = -1, max_stream_gap = 0;
  int sc_stream = 0, min_sc_stream = N;
  bit sc_starved = 0, sc_first = 1;
  int sc_count = 0;

  always @(posedge clk) if (rst_n) begin
    int q;
    cyc++;
    // memory occupation of one burst
    if (mc_valid) burst_start = cyc;
    if (!mem_ready && cyc - burst_start + 1 > max_burst) max_burst = cyc - burst_start + 1;
    // stream burst to stream burst spacing while streams kept waiting and
    // nobody else was granted in between
    if (mc_valid && mc_src != SRC_STREAM) sgnt_last = -1;
    if (dut.u_arb.gnt_stream) begin
      if (sgnt_last >= 0 && cyc - sgnt_last > max_stream_gap) max_stream_gap = cyc - sgnt_last;
      sgnt_last = cyc;
    end
    if (!dut.u_cache.fcfs_req) sgnt_last = -1;
    // longest run of memory cycles owned by random traffic
    if (dut.u_arb.u_l1.busy_r) rand_run++; else rand_run = 0;
    if (rand_run > max_rand_run) max_rand_run = rand_run;
    // waiting time of stream requests in the FCFS unit
    q = $countones(dut.u_cache.u_fcfs.live);
    if (q > max_queue) max_queue = q;
    for (int s = 0; s < NS; s++) begin
      if (dut.u_cache.u_fcfs.arrive[s]) t_arr[s] = cyc;
      if (dut.u_cache.u_fcfs.gnt[s] && cyc - t_arr[s] > max_lat) max_lat = cyc - t_arr[s];
    end
    // periodic share of each service cycle in which streams waited throughout
    if (l1_sc_start) begin
      if (!sc_first && !sc_starved && !done_all) begin
        sc_count++;
        if (sc_stream < min_sc_stream) min_sc_stream = sc_stream;
      end
      sc_first = 0; sc_stream = 0; sc_starved = 0;
    end
    // cycles the memory is busy with, or held for, stream bursts
    if ((!mem_ready || dut.st_wait) && !dut.u_arb.u_l1.busy_r) sc_stream++;
    if (mem_ready && !dut.u_cache.fcfs_req) sc_starved = 1;
  end

  // ------------------------------------------------------------ random side
  task automatic requester(input int which);
    while (!done_all) begin
      int gap;
      gap = (which == 1) ? 0 : $urandom_range(0, 40);
      while (gap > 0 && !done_all) begin @(posedge clk); #1; gap--; end
      if (done_all) break;
      if (which == 1) req_cpu = 1; else req_gfx = 1;
      ext_addr[which] = 26'($urandom) & ~26'h3F;
      ext_write[which] = 1'($urandom_range(0, 1));
      forever begin
        logic g;
        #1;
        g = (which == 1) ? gnt_cpu : gnt_gfx;
        @(posedge clk);
        if (g) break;
      end
      #1;
      if (which == 1) req_cpu = 0; else req_gfx = 0;
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
  endtask

  // writer of port p: streams p and p + 5, alternating every 8 words
  task automatic writer(input int p);
    int k [2];
    k[0] = 0; k[1] = 0;
    for (int g = 0; g < 2 * WORDS / 8; g++) begin
      int s;
      s = p + 5 * (g % 2);
      for (int w = 0; w < 8; w++) begin
        wr_valid[p] = 1; wr_stream[p] = 5'(s); wr_data[p] = f(s, k[g % 2]);
        #1;
        while (!wr_ready[p]) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        wr_valid[p] = 0;
        k[g % 2]++;
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
    end
  endtask

  // reader of port p: streams 10 + p and 15 + p; asks for the one that is
  // further behind and checks each word against the stream it is tagged with
  task automatic reader(input int p);
    int k [2];
    k[0] = 0; k[1] = 0;
    rd_req[p] = 1; rd_req_stream[p] = 5'(10 + p);
    while (k[0] < WORDS || k[1] < WORDS) begin
      rd_req_stream[p] = (k[0] < WORDS && (k[0] <= k[1] || k[1] >= WORDS)) ? 5'(10 + p) : 5'(15 + p);
      rd_ready[p] = 1'($urandom_range(0, 3) != 0);
      #1;
      if (rd_valid[p] && rd_ready[p]) begin
        int j, s;
        s = int'(rd_stream[p]);
        j = (s == 15 + p) ? 1 : 0;
        check(s == 10 + p || s == 15 + p, $sformatf("port %0d tag %0d", p, s));
        if (k[j] < WORDS) begin
          check(rd_data[p] == f(s, k[j]),
                $sformatf("port %0d stream %0d word %0d: %h, expected %h", p, s, k[j], rd_data[p], f(s, k[j])));
          k[j]++;
        end
      end
      @(posedge clk); #1;
    end
    rd_req[p] = 0;
    // drain what was prefetched beyond the end
    rd_ready[p] = 1;
    repeat (40) @(posedge clk);
    #1 rd_ready[p] = 0;
  endtask

  initial begin
    bit e;
    int base [NS];
    int c, w_bound;
    for (int p = 0; p < NP; p++) begin
      wr_valid[p] = 0; wr_stream[p] = '0; wr_data[p] = '0;
      rd_req[p] = 0; rd_req_stream[p] = '0; rd_ready[p] = 0;
    end
    for (int i = 0; i < 5; i++) begin ext_addr[i] = '0; ext_write[i] = 0; end
    for (int s = 0; s < NS; s++) base[s] = 32'h20000 * (s + 1);
    for (int s = 10; s < NS; s++)
      for (int j = 0; j < WORDS / 2 + 256; j++)
        u_sd.poke(base[s] / 4 + j, {f(s, 2 * j + 1), f(s, 2 * j)});
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 20 streams of 4 lines (256 bytes) each: the whole 5 kB cache
    for (int s = 0; s < NS; s++) begin
      cfg(CFG_OPEN, s, (s < 10) ? DIR_TO_MEM : DIR_FROM_MEM, 4, base[s], 0, e);
      check(!e, $sformatf("open stream %0d", s));
    end
    check(free_count == 0, "all 80 lines allocated");
    cfg(CFG_OPEN, 0, DIR_TO_MEM, 1, 0, 0, e);
    check(e, "no line left for one more allocation");
    fork
      requester(1); requester(2);
      begin
        fork
          writer(0); writer(1); writer(2); writer(3); writer(4);
          reader(0); reader(1); reader(2); reader(3); reader(4);
        join
        repeat (600) @(posedge clk);
        done_all = 1;
      end
    join
    #1;
    req_cpu = 0; req_gfx = 0;
    for (int s = 0; s < 10; s++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < WORDS / 2; j++)
        if (u_sd.peek(base[s] / 4 + j) != {f(s, 2 * j + 1), f(s, 2 * j)}) ok = 0;
      check(ok, $sformatf("SDRAM contents of stream %0d", s));
    end
    c = (max_stream_gap > max_burst) ? max_stream_gap : max_burst;
    w_bound = c * NS + ((c * NS + (N - R) - 1) / (N - R) + 1) * R;
    $display("20 streams: longest FCFS wait %0d cycles, W(c=%0d, |P|=20) = %0d, longest burst %0d, most requests queued %0d",
             max_lat, c, w_bound, max_burst, max_queue);
    $display("longest random run %0d, least stream cycles in a waiting service cycle %0d over %0d service cycles",
             max_rand_run, min_sc_stream, sc_count);
    check(max_queue >= 10, "FCFS unit saw a long queue");
    check(max_lat <= w_bound + 3 * c,
          $sformatf("stream wait %0d within W %0d + three bursts of %0d", max_lat, w_bound, c));
    check(max_rand_run <= 2 * R + 2 * c, $sformatf("random run %0d within 2R plus two bursts", max_rand_run));
    check(sc_count > 0, "service cycles with streams waiting throughout");
    check(min_sc_stream >= (N - R) - 2 * c,
          $sformatf("streams got %0d cycles of a service cycle, at least M less two bursts", min_sc_stream));
    for (int s = 0; s < NS; s++) begin
      cfg(CFG_CLOSE, s, DIR_TO_MEM, 0, 0, s % 2 == 1, e);
      check(!e, $sformatf("close stream %0d", s));
    end
    check(free_count == 80, "all lines free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
