// tb_two_operand_adder: one 64-bit instance of every adder algorithm,
// all driven with the same random and corner-case operands; each
// {cout, s} must equal a + b + cin.
module tb_two_operand_adder
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [63:0]        a, b;
  logic               cin;
  logic [10:0][63:0]  s;
  logic [10:0]        cout;
  for (genvar k = 0; k < 11; k++) begin : g_alg
    two_operand_adder #(.ALG(adder_alg_e'(k))) u (.a(a), .b(b), .cin(cin), .s(s[k]), .cout(cout[k]));
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [64:0] e;
      a   = (n < 2) ? '1 : {$urandom, $urandom};
      b   = (n < 2) ? 64'(n) : {$urandom, $urandom};
      cin = (n < 2) ? 1'b1 : 1'($urandom);
      #1;
      e = 65'(a) + 65'(b) + 65'(cin);
      for (int k = 0; k < 11; k++) begin
        checks++;
        if ({cout[k], s[k]} != e) begin
          failures++;
          if (failures < 10) $display("FAIL algorithm %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
