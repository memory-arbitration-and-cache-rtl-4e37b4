// tb_addr_gen: self-checking test of the per-stream address generator.
//
// Uses 8 lines, 4 streams and 4 words per line. The testbench plays the
// linked list with its own next-pointer table: stream 1 owns the ring
// 5 -> 2 -> 7 -> 5, stream 3 the ring 0 -> 6 -> 0. Random writes and reads
// on both streams (never beyond full or empty) must produce the cache word
// addresses line*4 + word along each ring, for the write and the read
// pointer separately, and the right fill counts; bursts must step the
// background memory address by 64 bytes; close must clear active.
module tb_addr_gen;
  import cpa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init_valid = 0, close_valid = 0, acc_valid = 0, acc_write = 0, burst_valid = 0;
  logic [1:0] init_stream = '0, close_stream = '0, acc_stream = '0, burst_stream = '0;
  logic [2:0] init_head = '0, lk_line, lk_next;
  logic [3:0] init_nlines = '0;
  stream_dir_e init_dir = DIR_TO_MEM;
  logic [25:0] init_base = '0;
  logic [4:0] acc_addr;
  logic active [4];
  stream_dir_e dir [4];
  logic [5:0] fill [4], cap [4];
  logic [25:0] maddr [4];
  int checks = 0, failures = 0;
  int nxt [8];

  addr_gen #(.NLINES(8), .NSTREAMS(4), .WPL(4), .AW_MEM(26)) dut (.*);
  assign lk_next = 3'(nxt[lk_line]);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sequence of cache word addresses for a ring
  function automatic int ring_addr(input int ring[$], input int n);
    int w = n % (ring.size() * 4);
    return ring[w / 4] * 4 + (w % 4);
  endfunction

  initial begin
    int ring1[$];
    int ring3[$];
    int wr_n[4], rd_n[4];
    ring1 = '{5, 2, 7};
    ring3 = '{0, 6};
    foreach (nxt[i]) nxt[i] = 0;
    nxt[5] = 2; nxt[2] = 7; nxt[7] = 5;
    nxt[0] = 6; nxt[6] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // open streams 1 and 3
    init_valid = 1; init_stream = 1; init_head = 5; init_nlines = 3;
    init_dir = DIR_FROM_MEM; init_base = 26'h100000;
    @(posedge clk); #1;
    init_stream = 3; init_head = 0; init_nlines = 2; init_dir = DIR_TO_MEM; init_base = 26'h200040;
    @(posedge clk); #1;
    init_valid = 0;
    check(active[1] && active[3] && !active[0], "streams 1 and 3 active");
    check(cap[1] == 12 && cap[3] == 8 && fill[1] == 0, "capacities");
    check(dir[1] == DIR_FROM_MEM && dir[3] == DIR_TO_MEM, "directions");
    wr_n = '{default: 0}; rd_n = '{default: 0};
    for (int i = 0; i < 2000; i++) begin
      int s, f, c, exp;
      bit w;
      s = ($urandom_range(0, 1) != 0) ? 1 : 3;
      c = (s == 1) ? 12 : 8;
      f = wr_n[s] - rd_n[s];
      w = 1'($urandom_range(0, 1));
      if (f == 0) w = 1;
      if (f == c) w = 0;
      acc_valid = 1; acc_stream = 2'(s); acc_write = w;
      #1;
      exp = (s == 1) ? ring_addr(ring1, w ? wr_n[s] : rd_n[s])
                     : ring_addr(ring3, w ? wr_n[s] : rd_n[s]);
      check(int'(acc_addr) == exp, $sformatf("stream %0d %s access %0d: addr %0d, expected %0d",
            s, w ? "write" : "read", w ? wr_n[s] : rd_n[s], acc_addr, exp));
      @(posedge clk); #1;
      if (w) wr_n[s]++; else rd_n[s]++;
      check(int'(fill[s]) == wr_n[s] - rd_n[s], "fill count");
    end
    acc_valid = 0;
    // bursts
    burst_valid = 1; burst_stream = 1;
    repeat (3) @(posedge clk);
    #1 burst_valid = 0;
    check(maddr[1] == 26'h100000 + 3 * 64, "three bursts of 64 bytes");
    check(maddr[3] == 26'h200040, "other stream's address unchanged");
    close_valid = 1; close_stream = 1;
    @(posedge clk); #1 close_valid = 0;
    check(!active[1] && active[3], "stream 1 closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
