// Self-checking testbench for scg_addsub.
//
// The default 4-bit instance is driven with every combination of mode,
// a, b and carry/borrow-in (1024 cases); a second, 12-bit instance gets
// 4000 random cases. Expected values are integer arithmetic:
//   mode 0: {cout, result} = a + b + cin
//   mode 1: result = (a - b - cin) mod 2^N, cout = 1 when a - b - cin < 0.
// Every case also counts the carry-out, the borrow-out and the switches
// between add and subtract, and a failure is counted if one never occurs.
// A time-out counts as a failure.
module tb_scg_addsub;

  localparam int unsigned NW = 12;

  logic          mode, cin, cout, mode_w, cin_w, cout_w;
  logic [3:0]    a, b, result;
  logic [NW-1:0] a_w, b_w, result_w;
  int            checks = 0, failures = 0;
  int            n_carry = 0, n_borrow = 0, n_switch = 0;
  logic          last_mode = 1'b0;

  scg_addsub dut (.mode(mode), .a(a), .b(b), .cin(cin), .result(result), .cout(cout));
  scg_addsub #(.N(NW)) dut_w (.mode(mode_w), .a(a_w), .b(b_w), .cin(cin_w),
                              .result(result_w), .cout(cout_w));

  task automatic check4();
    longint e;
    e = mode ? longint'(a) - longint'(b) - longint'(cin)
             : longint'(a) + longint'(b) + longint'(cin);
    #1;
    checks++;
    if (result !== 4'(e) || cout !== (mode ? (e < 0) : (e > 15))) begin
      failures++;
      $display("N=4 mode=%b a=%0d b=%0d cin=%b: got result=%0d cout=%b", mode, a, b, cin, result, cout);
    end
    if (cout && !mode) n_carry++;
    if (cout && mode)  n_borrow++;
    if (mode != last_mode) n_switch++;
    last_mode = mode;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_w = 0; a_w = '0; b_w = '0; cin_w = 0;
    for (int m = 0; m < 1024; m++) begin
      {mode, a, b, cin} = 10'(m);
      check4();
    end
    for (int t = 0; t < 4000; t++) begin
      longint e;
      mode_w = 1'($urandom);
      cin_w  = 1'($urandom);
      a_w    = NW'($urandom);
      b_w    = NW'($urandom);
      e = mode_w ? longint'(a_w) - longint'(b_w) - longint'(cin_w)
                 : longint'(a_w) + longint'(b_w) + longint'(cin_w);
      #1;
      checks++;
      if (result_w !== NW'(e) || cout_w !== (mode_w ? (e < 0) : (e >= (longint'(1) << NW)))) begin
        failures++;
        $display("N=%0d mode=%b a=%0d b=%0d cin=%b: got result=%0d cout=%b",
                 NW, mode_w, a_w, b_w, cin_w, result_w, cout_w);
      end
    end
    $display("carry-outs %0d, borrow-outs %0d, mode switches %0d", n_carry, n_borrow, n_switch);
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
