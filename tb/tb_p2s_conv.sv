// tb_p2s_conv: self-checking test of the 128-to-16-bit parallel-to-serial
// buffer. Random 128-bit words with random stream numbers are loaded when
// the buffer is ready; the 16-bit words must come out lowest first, eight
// per cache word, with the stream number, under random backpressure. With
// the reader always ready, a word leaves every cycle.
module tb_p2s_conv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [4:0] in_stream = '0, out_stream;
  logic [127:0] in_data = '0;
  logic [15:0] out_data;
  int checks = 0, failures = 0;
  logic [15:0] exp_q[$];
  logic [4:0]  exp_s[$];
  int outs = 0;

  p2s_conv #(.IN_W(128), .OUT_W(16), .SID_W(5)) dut (.*);
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

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    outs++;
    check(exp_q.size() > 0, "unexpected output word");
    if (exp_q.size() > 0) begin
      check(out_data == exp_q[0] && out_stream == exp_s[0], "output word and stream");
      void'(exp_q.pop_front()); void'(exp_s.pop_front());
    end
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int g = 0; g < 400; g++) begin
      logic [127:0] w;
      logic [4:0] sid;
      w = {$urandom, $urandom, $urandom, $urandom};
      sid = 5'($urandom_range(0, 19));
      out_ready = (g >= 200) ? 1'b1 : 1'($urandom_range(0, 1));
      #1;
      while (!in_ready) begin
        @(posedge clk); #1;
        out_ready = (g >= 200) ? 1'b1 : 1'($urandom_range(0, 1));
        #1;
      end
      in_valid = 1; in_stream = sid; in_data = w;
      for (int k = 0; k < 8; k++) begin exp_q.push_back(w[k*16 +: 16]); exp_s.push_back(sid); end
      @(posedge clk); #1;
      in_valid = 0;
      if (g == 300) begin
        // one cache word must leave in exactly 8 cycles
        t0 = outs;
        repeat (8) @(posedge clk);
        #1;
        check(outs - t0 == 8, $sformatf("8 words in 8 cycles, got %0d", outs - t0));
      end
    end
    out_ready = 1;
    repeat (10) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
