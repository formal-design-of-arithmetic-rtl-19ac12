// tb_carry_skip_adder: self-checking testbench for carry_skip_adder.
//
// Drives the adder at its default width (64) and at 13 bits (a width that
// is not a multiple of the block size) with corner cases (all-ones
// propagate chains, carry-in on full propagate, zero) and random operands,
// and compares {cout, s} with a + b + cin computed by the simulator.
// Prints the TB_RESULT line and stops; a watchdog ends a run that hangs.
module tb_carry_skip_adder;
  int checks = 0, failures = 0;

  logic [63:0] a, b, s;
  logic        cin, cout;
  logic [12:0] a13, b13, s13;
  logic        cout13;

  carry_skip_adder           dut   (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  carry_skip_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(cout13));

  task automatic apply(logic [63:0] ta, logic [63:0] tb, logic tc);
    logic [64:0] exp64;
    logic [13:0] exp13;
    a = ta; b = tb; cin = tc; a13 = ta[12:0]; b13 = tb[12:0];
    #1;
    exp64 = 65'(ta) + 65'(tb) + 65'(tc);
    exp13 = 14'(ta[12:0]) + 14'(tb[12:0]) + 14'(tc);
    checks += 2;
    if ({cout, s} !== exp64) begin
      failures++;
      if (failures < 10) $display("FAIL 64: %h + %h + %0d = %h, expected %h", ta, tb, tc, {cout, s}, exp64);
    end
    if ({cout13, s13} !== exp13) begin
      failures++;
      if (failures < 10) $display("FAIL 13: %h + %h + %0d = %h, expected %h", ta[12:0], tb[12:0], tc, {cout13, s13}, exp13);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    apply('1, '1, 1'b1);
    for (int i = 0; i < 64; i++) begin
      apply(64'h1 << i, '1 >> (63 - i), 1'b0);   // carry born at bit i, propagates to the top
      apply(~(64'h1 << i), 64'h1 << i, 1'b1);    // full propagate, carry-in travels the word
    end
    for (int i = 0; i < 4000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
