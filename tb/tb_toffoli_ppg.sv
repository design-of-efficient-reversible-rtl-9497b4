// Self-checking testbench for toffoli_ppg: all 256 (x, y) pairs. Each of
// the 16 outputs pp[4*i + j] must equal x[i] AND y[j], and the pass-through
// garbage outputs must return x and y unchanged. A time-out counts as a
// failure.
module tb_toffoli_ppg;

  logic [3:0]  x, y, x_pass, y_pass;
  logic [15:0] pp;
  int          checks = 0, failures = 0;

  toffoli_ppg dut (.x(x), .y(y), .pp(pp), .x_pass(x_pass), .y_pass(y_pass));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      {x, y} = 8'(m);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (pp[4*i + j] !== (x[i] & y[j])) begin
            failures++;
            $display("x=%b y=%b: pp x%0dy%0d = %b", x, y, i, j, pp[4*i + j]);
          end
        end
      checks++;
      if (x_pass !== x || y_pass !== y) begin
        failures++;
        $display("x=%b y=%b: pass-through %b %b", x, y, x_pass, y_pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
