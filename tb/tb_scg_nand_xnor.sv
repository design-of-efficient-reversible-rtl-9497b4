// Self-checking testbench for scg_nand_xnor: the four (a, b) pairs against
// NAND, b.a', XOR and XNOR. A time-out counts as a failure.
module tb_scg_nand_xnor;

  logic a, b, o_nand, o_bna, o_xor, o_xnor;
  int   checks = 0, failures = 0;

  scg_nand_xnor dut (.a(a), .b(b), .o_nand(o_nand), .o_bna(o_bna), .o_xor(o_xor), .o_xnor(o_xnor));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      {a, b} = 2'(m);
      #1;
      checks++;
      if ({o_nand, o_bna, o_xor, o_xnor} !== {~(a & b), b & ~a, a ^ b, ~(a ^ b)}) begin
        failures++;
        $display("a=%b b=%b: got %b%b%b%b", a, b, o_nand, o_bna, o_xor, o_xnor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
