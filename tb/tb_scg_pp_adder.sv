// Self-checking testbench for scg_pp_adder.
//
// Drives all 65536 patterns of the 16 partial-product inputs, not only
// those a real multiplication produces, and compares p with the weighted
// sum of pp[4*i + j] * 2^(i+j) computed here. A time-out counts as a
// failure.
module tb_scg_pp_adder;

  logic [15:0] pp;
  logic [7:0]  p;
  int          checks = 0, failures = 0;

  scg_pp_adder dut (.pp(pp), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 65536; m++) begin
      int e;
      pp = 16'(m);
      e  = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (pp[4*i + j]) e += 1 << (i + j);
      #1;
      checks++;
      if (int'(p) != e) begin
        failures++;
        if (failures < 10) $display("pp=%h: got %0d expected %0d", pp, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
