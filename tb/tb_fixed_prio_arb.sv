// tb_fixed_prio_arb: exhaustive self-checking test of the two-input
// fixed-priority arbiter node (all 8 input combinations).
module tb_fixed_prio_arb;
  logic req_hi, req_lo, gnt_in, req_out, gnt_hi, gnt_lo;
  int checks = 0, failures = 0;

  fixed_prio_arb dut (.req_hi, .req_lo, .gnt_in, .req_out, .gnt_hi, .gnt_lo);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {gnt_in, req_hi, req_lo} = 3'(v);
      #1;
      checks++;
      // expected values written out per case
      case (v)
        0, 4:    if ({req_out, gnt_hi, gnt_lo} !== 3'b000) failures++;
        1:       if ({req_out, gnt_hi, gnt_lo} !== 3'b100) failures++;
        2, 3:    if ({req_out, gnt_hi, gnt_lo} !== 3'b100) failures++;
        5:       if ({req_out, gnt_hi, gnt_lo} !== 3'b101) failures++;
        6, 7:    if ({req_out, gnt_hi, gnt_lo} !== 3'b110) failures++;
        default: failures++;
      endcase
      if (failures != 0) $display("FAIL at input %0d: %b", v, {req_out, gnt_hi, gnt_lo});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
