// tb_s2p_conv: self-checking test of the 16-to-128-bit serial-to-parallel
// buffer. Random 16-bit words in groups of eight, each group for a random
// stream, are sent with random gaps while the output side is ready at
// random; every 128-bit word must hold its group in order (word 0 in the
// low bits) with the right stream number. With the output always ready
// the buffer must accept one word per cycle without a stall.
module tb_s2p_conv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [4:0] in_stream = '0, out_stream;
  logic [15:0] in_data = '0;
  logic [127:0] out_data;
  int checks = 0, failures = 0;
  logic [127:0] exp_q[$];
  logic [4:0]   exp_s[$];
  int stalls = 0;

  s2p_conv #(.IN_W(16), .OUT_W(128), .SID_W(5)) dut (.*);
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

  // output side
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(exp_q.size() > 0, "unexpected output word");
    if (exp_q.size() > 0) begin
      check(out_data == exp_q[0] && out_stream == exp_s[0], "output word and stream");
      void'(exp_q.pop_front()); void'(exp_s.pop_front());
    end
  end

  initial begin
    bit always_ready;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      always_ready = (phase == 1);
      for (int g = 0; g < 300; g++) begin
        logic [127:0] w;
        logic [4:0] sid;
        sid = 5'($urandom_range(0, 19));
        for (int k = 0; k < 8; k++) begin
          w[k*16 +: 16] = 16'($urandom);
          in_valid = 1; in_stream = sid; in_data = w[k*16 +: 16];
          out_ready = always_ready ? 1'b1 : 1'($urandom_range(0, 1));
          #1;
          while (!in_ready) begin
            stalls += always_ready;
            @(posedge clk); #1;
            out_ready = always_ready ? 1'b1 : 1'($urandom_range(0, 1));
            #1;
          end
          @(posedge clk); #1;
          if (!always_ready && $urandom_range(0, 3) == 0) begin
            in_valid = 0; @(posedge clk); #1;
          end
        end
        exp_q.push_back(w); exp_s.push_back(sid);
      end
      in_valid = 0;
      out_ready = 1;
      repeat (5) @(posedge clk);
      #1;
      check(exp_q.size() == 0, "all groups delivered");
    end
    check(stalls == 0, $sformatf("%0d stalls with the output always ready", stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
