// tb_linked_list: self-checking test of the cache line allocator.
//
// Part 1 (8 lines, 4 streams) replays the textbook example: the initial
// free list 0..7, five lines assigned to stream 0 (its list 0..4 closed into
// a ring, free list 5..7), and the release of those lines appended to the
// free list (5,6,7,0,1,2,3,4). It then prepends a released stream, checks
// the error cases and the allocation latency of n+1 cycles.
// Part 2 (80 lines, 20 streams) runs random open/close commands against a
// queue model of the free list and walks the whole free list and every
// stream ring through the lookup port after each command.
module tb_linked_list;
  import cpa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- small
  logic s_rst_n = 0, s_valid = 0, s_ready, s_done, s_err;
  ll_op_e s_op = LL_ALLOC;
  logic [1:0] s_stream = '0;
  logic [3:0] s_n = '0;
  logic [2:0] s_head, s_lk_line = '0, s_lk_next, s_fh, s_ft;
  logic [3:0] s_fc;
  logic [3:0] s_sc [4];

  linked_list #(.NLINES(8), .NSTREAMS(4)) u_small (
    .clk, .rst_n(s_rst_n), .cmd_valid(s_valid), .cmd_ready(s_ready), .cmd_op(s_op),
    .cmd_stream(s_stream), .cmd_nlines(s_n), .done(s_done), .err(s_err),
    .done_head(s_head), .lk_line(s_lk_line), .lk_next(s_lk_next),
    .free_head(s_fh), .free_tail(s_ft), .free_count(s_fc), .stream_count(s_sc)
  );

  task automatic s_cmd(input ll_op_e op, input int st, input int n, output bit e, output int cyc);
    @(posedge clk); #1;
    s_op = op; s_stream = 2'(st); s_n = 4'(n); s_valid = 1;
    cyc = 0;
    @(posedge clk); #1 s_valid = 0;
    cyc = 1;
    while (!s_done) begin @(posedge clk); #1; cyc++; end
    e = s_err;
  endtask

  task automatic s_list(input int start, input int len, output string r);
    int l;
    r = "";
    l = start;
    for (int k = 0; k < len; k++) begin
      r = {r, $sformatf("%0d", l)};
      s_lk_line = 3'(l);
      #1;
      l = int'(s_lk_next);
    end
  endtask

  // ---------------------------------------------------------------- large
  localparam int NL = 80, NS = 20;
  logic b_rst_n = 0, b_valid = 0, b_ready, b_done, b_err;
  ll_op_e b_op = LL_ALLOC;
  logic [4:0] b_stream = '0;
  logic [6:0] b_n = '0;
  logic [6:0] b_head, b_lk_line = '0, b_lk_next, b_fh, b_ft;
  logic [6:0] b_fc;
  logic [6:0] b_sc [NS];

  linked_list u_big (
    .clk, .rst_n(b_rst_n), .cmd_valid(b_valid), .cmd_ready(b_ready), .cmd_op(b_op),
    .cmd_stream(b_stream), .cmd_nlines(b_n), .done(b_done), .err(b_err),
    .done_head(b_head), .lk_line(b_lk_line), .lk_next(b_lk_next),
    .free_head(b_fh), .free_tail(b_ft), .free_count(b_fc), .stream_count(b_sc)
  );

  int mfree[$];
  int mstr[NS][$];

  initial begin
    bit e;
    int cyc;
    string r;
    repeat (2) @(posedge clk);
    #1 s_rst_n = 1; b_rst_n = 1;
    #1;
    // Initial state
    check(s_fh == 0 && s_ft == 7 && s_fc == 8, "initial head 0, tail 7, 8 lines");
    s_list(0, 8, r);
    check(r == "01234567", {"initial free list ", r});
    // Five lines to stream 0
    s_cmd(LL_ALLOC, 0, 5, e, cyc);
    check(!e && s_head == 0, "stream 0 allocated at line 0");
    check(cyc == 6, $sformatf("allocation of 5 lines took %0d cycles, expected 6", cyc));
    check(s_fh == 5 && s_ft == 7 && s_fc == 3 && s_sc[0] == 5, "free list after allocation");
    s_list(0, 6, r);
    check(r == "012340", {"stream 0 ring ", r});
    s_list(5, 3, r);
    check(r == "567", {"remaining free list ", r});
    // Release appended
    s_cmd(LL_APPEND, 0, 0, e, cyc);
    check(!e && cyc == 1, "append in one cycle");
    check(s_fh == 5 && s_ft == 4 && s_fc == 8 && s_sc[0] == 0, "head 5 tail 4 after append");
    s_list(5, 8, r);
    check(r == "56701234", {"free list after append ", r});
    // Two lines to stream 1 (5,6), then prepend them back
    s_cmd(LL_ALLOC, 1, 2, e, cyc);
    check(!e && s_head == 5 && s_fh == 7 && s_fc == 6, "stream 1 gets lines 5,6");
    s_cmd(LL_PREPEND, 1, 0, e, cyc);
    check(!e && s_fh == 5 && s_ft == 4 && s_fc == 8, "prepend restores head 5");
    s_list(5, 8, r);
    check(r == "56701234", {"free list after prepend ", r});
    // Errors
    s_cmd(LL_ALLOC, 2, 9, e, cyc);
    check(e && s_fc == 8, "allocating more lines than free is refused");
    s_cmd(LL_ALLOC, 2, 0, e, cyc);
    check(e, "allocating zero lines is refused");
    s_cmd(LL_APPEND, 3, 0, e, cyc);
    check(e, "releasing a stream without lines is refused");
    s_cmd(LL_ALLOC, 2, 8, e, cyc);
    check(!e && s_fc == 0, "all 8 lines to one stream");
    s_cmd(LL_ALLOC, 2, 1, e, cyc);
    check(e, "second allocation to the same stream is refused");
    s_cmd(LL_PREPEND, 2, 0, e, cyc);
    check(!e && s_fc == 8, "release into an empty free list");
    s_list(int'(s_fh), 8, r);
    check(r == "56701234", {"free list after release into empty list ", r});

    // ---------------------------------------------------------- random, 80 lines
    for (int i = 0; i < NL; i++) mfree.push_back(i);
    for (int it = 0; it < 400; it++) begin
      int st, n;
      ll_op_e op;
      st = $urandom_range(0, NS - 1);
      if (mstr[st].size() == 0) begin
        op = LL_ALLOC;
        n = $urandom_range(1, 12);
      end else begin
        op = ($urandom_range(0, 1) == 0) ? LL_APPEND : LL_PREPEND;
        n = 0;
      end
      @(posedge clk); #1;
      b_op = op; b_stream = 5'(st); b_n = 7'(n); b_valid = 1;
      @(posedge clk); #1 b_valid = 0;
      while (!b_done) begin @(posedge clk); #1; end
      if (op == LL_ALLOC) begin
        if (n > mfree.size()) begin
          check(b_err, "refused allocation");
        end else begin
          check(!b_err && int'(b_head) == mfree[0], "allocation head");
          for (int k = 0; k < n; k++) mstr[st].push_back(mfree.pop_front());
        end
      end else if (op == LL_APPEND) begin
        check(!b_err, "append");
        while (mstr[st].size() > 0) mfree.push_back(mstr[st].pop_front());
      end else begin
        check(!b_err, "prepend");
        while (mstr[st].size() > 0) mfree.push_front(mstr[st].pop_back());
      end
      // walk the free list and the stream ring
      check(int'(b_fc) == mfree.size(), "free count");
      if (mfree.size() > 0) begin
        int l;
        bit ok;
        ok = (int'(b_fh) == mfree[0]) && (int'(b_ft) == mfree[mfree.size() - 1]);
        l = mfree[0];
        for (int k = 0; k < mfree.size(); k++) begin
          if (l != mfree[k]) ok = 0;
          b_lk_line = 7'(l); #1; l = int'(b_lk_next);
        end
        check(ok, "free list order");
      end
      if (mstr[st].size() > 0) begin
        int l;
        bit ok;
        ok = 1;
        l = mstr[st][0];
        for (int k = 0; k <= mstr[st].size(); k++) begin
          if (l != mstr[st][k % mstr[st].size()]) ok = 0;
          b_lk_line = 7'(l); #1; l = int'(b_lk_next);
        end
        check(ok && int'(b_sc[st]) == mstr[st].size(), "stream ring order");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
