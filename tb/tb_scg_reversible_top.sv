// End-to-end testbench for scg_reversible_top at its default parameters.
//
// Runs every circuit of the top level through its whole input space and
// compares with reference values computed here:
//   multiplier   all 256 pairs, plus 5 x 5 = 25 first;
//   adder/sub    all 1024 (mode, a, b, cin) cases, with the mode toggled
//                on every case;
//   full adder / full subtractor  all 8 cases each;
//   logic cells  all 4 operand pairs.
// It counts how often each mechanism occurs (product reaching bit 7,
// carry-out, borrow-out, add/subtract switch, full-adder carry,
// full-subtractor borrow) and counts a failure for any that never occurs.
// A time-out counts as a failure.
module tb_scg_reversible_top;

  import rev_pkg::*;

  mul_operand_t mul_x, mul_y;
  mul_product_t mul_p;
  logic         as_mode, as_cin, as_cout;
  logic [3:0]   as_a, as_b, as_result;
  logic [2:0]   fa_in, fs_in;
  logic [1:0]   fa_out, fs_out;
  logic         lg_a, lg_b;
  logic_out_t   lg_out;

  int checks = 0, failures = 0;
  int n_p7 = 0, n_carry = 0, n_borrow = 0, n_switch = 0, n_fa_carry = 0, n_fs_borrow = 0;

  scg_reversible_top dut (
    .mul_x(mul_x), .mul_y(mul_y), .mul_p(mul_p),
    .as_mode(as_mode), .as_a(as_a), .as_b(as_b), .as_cin(as_cin),
    .as_result(as_result), .as_cout(as_cout),
    .fa_in(fa_in), .fa_out(fa_out), .fs_in(fs_in), .fs_out(fs_out),
    .lg_a(lg_a), .lg_b(lg_b), .lg_out(lg_out)
  );

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    as_mode = 0; as_a = 0; as_b = 0; as_cin = 0;
    fa_in = 0; fs_in = 0; lg_a = 0; lg_b = 0;

    // multiplier
    mul_x = 4'd5; mul_y = 4'd5;
    #1;
    expect_true(mul_p == 8'd25, "5 x 5");
    for (int m = 0; m < 256; m++) begin
      {mul_x, mul_y} = 8'(m);
      #1;
      expect_true(int'(mul_p) == int'(mul_x) * int'(mul_y),
                  $sformatf("%0d x %0d = %0d", mul_x, mul_y, mul_p));
      if (mul_p[7]) n_p7++;
    end

    // adder / subtractor, mode toggled every case
    for (int m = 0; m < 1024; m++) begin
      logic last;
      int   e;
      last = as_mode;
      {as_a, as_b, as_cin} = 9'(m >> 1);
      as_mode = 1'(m);
      e = as_mode ? int'(as_a) - int'(as_b) - int'(as_cin)
                  : int'(as_a) + int'(as_b) + int'(as_cin);
      #1;
      expect_true(as_result == 4'(e) && as_cout == (as_mode ? (e < 0) : (e > 15)),
                  $sformatf("addsub mode=%b %0d %0d %b -> %0d %b", as_mode, as_a, as_b, as_cin,
                            as_result, as_cout));
      if (as_mode != last) n_switch++;
      if (as_cout && !as_mode) n_carry++;
      if (as_cout && as_mode) n_borrow++;
    end

    // single-gate full adder and full subtractor
    for (int m = 0; m < 8; m++) begin
      fa_in = 3'(m);
      fs_in = 3'(m);
      #1;
      expect_true(int'(fa_out) == int'(fa_in[2]) + int'(fa_in[1]) + int'(fa_in[0]),
                  $sformatf("full adder %b -> %b", fa_in, fa_out));
      expect_true(fs_out[0] == ^fs_in &&
                  fs_out[1] == (int'(fs_in[2]) - int'(fs_in[1]) - int'(fs_in[0]) < 0),
                  $sformatf("full subtractor %b -> %b", fs_in, fs_out));
      if (fa_out[1]) n_fa_carry++;
      if (fs_out[1]) n_fs_borrow++;
    end

    // logic cells
    for (int m = 0; m < 4; m++) begin
      {lg_a, lg_b} = 2'(m);
      #1;
      expect_true(lg_out == {lg_a | lg_b, lg_a & lg_b, lg_a, lg_a ^ lg_b,
                             ~(lg_a & lg_b), lg_b & ~lg_a, lg_a ^ lg_b, ~(lg_a ^ lg_b),
                             1'b1, lg_a, lg_a, ~lg_a},
                  $sformatf("logic cells a=%b b=%b -> %b", lg_a, lg_b, lg_out));
    end

    $display("products using bit 7: %0d", n_p7);
    $display("adder carry-outs: %0d, subtractor borrow-outs: %0d, mode switches: %0d",
             n_carry, n_borrow, n_switch);
    $display("full-adder carries: %0d, full-subtractor borrows: %0d", n_fa_carry, n_fs_borrow);
    expect_true(n_p7 > 0, "no product reached bit 7");
    expect_true(n_carry > 0, "no carry-out");
    expect_true(n_borrow > 0, "no borrow-out");
    expect_true(n_switch > 0, "no mode switch");
    expect_true(n_fa_carry > 0, "no full-adder carry");
    expect_true(n_fs_borrow > 0, "no full-subtractor borrow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
