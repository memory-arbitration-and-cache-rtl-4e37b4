// tb_gfx_prio_arb: self-checking test of the level-3a CPU/GFX arbiter.
//
// With both units requesting all the time the grant sequence must be
// gfx_priority CPU grants, then one GFX grant, repeating; with
// gfx_priority = 0 the CPU gets every grant; a lone GFX request is always
// granted; without gnt_in nothing is granted.
module tb_gfx_prio_arb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] gfx_priority = '0;
  logic req_cpu = 0, req_gfx = 0, gnt_in = 0;
  logic req_out, gnt_cpu, gnt_gfx;
  int checks = 0, failures = 0;

  gfx_prio_arb #(.PRIO_W(4)) dut (.clk, .rst_n, .gfx_priority, .req_cpu, .req_gfx,
                                   .gnt_in, .req_out, .gnt_cpu, .gnt_gfx);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p <= 5; p++) begin
      rst_n = 0; #1 rst_n = 1;
      gfx_priority = 4'(p); req_cpu = 1; req_gfx = 1; gnt_in = 1;
      for (int g = 0; g < 24; g++) begin
        bit exp_gfx;
        exp_gfx = (p != 0) && ((g % (p + 1)) == p);
        #1;
        check(gnt_gfx == exp_gfx && gnt_cpu == !exp_gfx,
              $sformatf("prio %0d grant %0d: cpu %0d gfx %0d", p, g, gnt_cpu, gnt_gfx));
        @(posedge clk); #1;
      end
    end
    req_cpu = 0; req_gfx = 1; gfx_priority = 0;
    #1 check(gnt_gfx && !gnt_cpu && req_out, "lone GFX request granted");
    gnt_in = 0;
    #1 check(!gnt_gfx && !gnt_cpu && req_out, "no grant without gnt_in");
    req_gfx = 0;
    #1 check(!req_out, "no request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
