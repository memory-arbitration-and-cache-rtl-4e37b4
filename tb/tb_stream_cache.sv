// tb_stream_cache: end-to-end self-checking test of the stream cache at its
// full size (80 lines, 20 streams, 5 ports) against the SDRAM model.
//
// Six streams are opened: three towards memory (written by ports 0, 2 and
// 4) and three from memory (read by ports 1, 3 and 4). Each stream moves
// WORDS 16-bit words whose values follow a per-stream formula; the SDRAM
// is preloaded with the same formula for the streams from memory. The test
// checks: line allocation (heads and free count), every word read on a
// port, every SDRAM word written, that the FCFS unit had several streams
// waiting at once, that a full stream back-pressured its writer, the
// burst cost on the memory side, and the return of all lines on close
// (append and prepend).
module tb_stream_cache;
  import cpa_pkg::*;
  localparam int WORDS = 512;          // 16-bit words per stream = 16 bursts
  localparam int NP = 5, NS = 20;

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
  logic mem_req, mem_gnt, mem_write, mem_wait, sd_wvalid, sd_wready, sd_rvalid, sd_ready, eng_busy;
  logic [25:0] mem_addr;
  logic [31:0] sd_wdata, sd_rdata;
  logic [6:0] free_count, free_head, free_tail;
  logic [6:0] stream_lines [NS];
  int checks = 0, failures = 0;
  int max_waiting = 0, wr_stalls = 0, gnts = 0;
  int t_first_gnt = -1, t_last_gnt = 0, cyc = 0;

  stream_cache dut (.*);
  sdram_model u_sd (
    .clk, .rst_n, .cmd_valid(mem_gnt), .cmd_stream(1'b1), .cmd_write(mem_write),
    .cmd_addr(mem_addr), .ready(sd_ready), .wvalid(sd_wvalid), .wready(sd_wready),
    .wdata(sd_wdata), .rvalid(sd_rvalid), .rdata(sd_rdata)
  );
  assign mem_gnt = mem_req && sd_ready;

  always #5 clk = ~clk;

  function automatic logic [15:0] f(input int s, input int k);
    return 16'(s * 4099 + k * 7 + (k >> 4));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int s = 0; s < 6; s++) $display("DBG s%0d fill %0d cap %0d active %0d", s, dut.st_fill[s], dut.st_cap[s], dut.st_active[s]);
    $display("DBG estate %0d live %b pend %b sd st %0d", dut.estate_q, dut.u_fcfs.live, dut.u_fcfs.pend_q, u_sd.st);
    for (int p = 0; p < 5; p++) $display("DBG p%0d wv %0d wr %0d rq %0d rv %0d s2pv %0d", p, wr_valid[p], wr_ready[p], rd_req[p], rd_valid[p], dut.s2p_valid[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    int w;
    cyc++;
    w = $countones(dut.u_fcfs.live);
    if (w > max_waiting) max_waiting = w;
    if (mem_gnt) begin
      gnts++;
      if (t_first_gnt < 0) t_first_gnt = cyc;
      t_last_gnt = cyc;
    end
  end

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

  task automatic writer(input int p, input int s);
    for (int k = 0; k < WORDS; k++) begin
      wr_valid[p] = 1; wr_stream[p] = 5'(s); wr_data[p] = f(s, k);
      #1;
      while (!wr_ready[p]) begin
        wr_stalls++;
        @(posedge clk); #1;
      end
      @(posedge clk); #1;
      wr_valid[p] = 0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
  endtask

  task automatic reader(input int p, input int s);
    int k = 0;
    rd_req[p] = 1; rd_req_stream[p] = 5'(s);
    while (k < WORDS) begin
      rd_ready[p] = 1'($urandom_range(0, 3) != 0);
      #1;
      // the last cache word is in the converter: stop fetching
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
    for (int p = 0; p < NP; p++) begin
      wr_valid[p] = 0; wr_stream[p] = '0; wr_data[p] = '0;
      rd_req[p] = 0; rd_req_stream[p] = '0; rd_ready[p] = 0;
    end
    for (int s = 0; s < NS; s++) base[s] = 32'h10000 * (s + 1);
    // preload the streams from memory (1, 3, 5), with 8 lines of slack
    foreach (base[s]) if (s == 1 || s == 3 || s == 5)
      for (int j = 0; j < WORDS / 2 + 128; j++)
        u_sd.poke(base[s] / 4 + j, {f(s, 2 * j + 1), f(s, 2 * j)});
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(free_count == 80, "80 free lines after reset");
    cfg(CFG_OPEN, 0, DIR_TO_MEM,   4, base[0], 0, e); check(!e && dut.u_ll.done_head == 0, "stream 0 at line 0");
    cfg(CFG_OPEN, 1, DIR_FROM_MEM, 4, base[1], 0, e); check(!e && dut.u_ll.done_head == 4, "stream 1 at line 4");
    cfg(CFG_OPEN, 2, DIR_TO_MEM,   2, base[2], 0, e); check(!e, "open stream 2");
    cfg(CFG_OPEN, 3, DIR_FROM_MEM, 3, base[3], 0, e); check(!e, "open stream 3");
    cfg(CFG_OPEN, 4, DIR_TO_MEM,   4, base[4], 0, e); check(!e, "open stream 4");
    cfg(CFG_OPEN, 5, DIR_FROM_MEM, 4, base[5], 0, e); check(!e, "open stream 5");
    check(free_count == 80 - 21 && free_head == 21, $sformatf("free list after opening: %0d lines from %0d", free_count, free_head));
    cfg(CFG_OPEN, 6, DIR_TO_MEM, 60, base[6], 0, e); check(e, "too many lines refused");
    fork
      writer(0, 0);
      writer(2, 2);
      writer(4, 4);
      reader(1, 1);
      reader(3, 3);
      reader(4, 5);
    join
    // wait until the last lines reach the SDRAM
    repeat (200) @(posedge clk);
    #1;
    foreach (base[s]) if (s == 0 || s == 2 || s == 4) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < WORDS / 2; j++)
        if (u_sd.peek(base[s] / 4 + j) != {f(s, 2 * j + 1), f(s, 2 * j)}) ok = 0;
      check(ok, $sformatf("SDRAM contents of stream %0d", s));
      check(dut.st_fill[s] == 0, $sformatf("stream %0d drained", s));
    end
    check(u_sd.bursts_w == 3 * WORDS / 32, $sformatf("%0d write bursts", u_sd.bursts_w));
    check(u_sd.bursts_r >= 3 * WORDS / 32, $sformatf("%0d read bursts", u_sd.bursts_r));
    check(max_waiting >= 2, $sformatf("FCFS had %0d streams waiting at once", max_waiting));
    check(wr_stalls > 0, "a writer was held back");
    // each burst costs at least 16 data + 2 turnaround cycles
    check((t_last_gnt - t_first_gnt) >= 18 * (gnts - 1), "bursts are at least 18 cycles apart");
    // close: append 0..4, prepend 5
    for (int s = 0; s < 5; s++) begin
      cfg(CFG_CLOSE, s, DIR_TO_MEM, 0, 0, 0, e); check(!e, $sformatf("close stream %0d", s));
    end
    cfg(CFG_CLOSE, 5, DIR_TO_MEM, 0, 0, 1, e); check(!e, "close stream 5 (prepend)");
    check(free_count == 80, "all lines free again");
    check(free_head == 17, $sformatf("prepended lines at the head (head %0d)", free_head));
    cfg(CFG_CLOSE, 5, DIR_TO_MEM, 0, 0, 0, e); check(e, "closing a closed stream refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
