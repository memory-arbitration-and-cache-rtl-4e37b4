// tb_cache_ram: self-checking test of the single-port cache memory at its
// full size (320 x 128 bits). Writes a pattern to every word, reads every
// word back with one cycle of latency, then runs random reads and writes
// against a copy kept in the testbench.
module tb_cache_ram;
  localparam int D = 320;
  logic clk = 1'b0;
  logic en = 0, we = 0;
  logic [8:0] addr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] model [D];
  int checks = 0, failures = 0;

  cache_ram dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [127:0] pat(input int a);
    return {4{32'(a * 32'h9E3779B1 + 7)}};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < D; a++) begin
      en = 1; we = 1; addr = 9'(a); wdata = pat(a); model[a] = pat(a);
      @(posedge clk); #1;
    end
    for (int a = 0; a < D; a++) begin
      en = 1; we = 0; addr = 9'(a);
      @(posedge clk); #1;
      check(rdata == pat(a), $sformatf("read back word %0d", a));
    end
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom_range(0, D - 1);
      en = 1; addr = 9'(a);
      we = 1'($urandom_range(0, 1));
      if (we) begin
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata;
        @(posedge clk); #1;
      end else begin
        @(posedge clk); #1;
        check(rdata == model[a], $sformatf("random read word %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
