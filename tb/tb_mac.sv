// tb_mac: the default 32-bit unsigned multiply accumulator
// p = x0*y0 + x1 + x2 (Booth, Wallace tree, ripple carry adder), including
// the all-ones case whose result is exactly 2^64 - 1, and a two's complement
// non-Booth one with an RB tree and Kogge-Stone adder. p must equal the
// formula computed by the simulator.
module tb_mac
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  logic [31:0] x0, y0, x1, x2;
  logic [63:0] pu, ps;
  mac dut (.x0(x0), .y0(y0), .x1(x1), .x2(x2), .p(pu));
  mac #(.SIGNED(1'b1), .BOOTH(1'b0), .PPA(MOA_RB), .FSA(ADD_KS)) dut_s (.x0(x0), .y0(y0), .x1(x1), .x2(x2), .p(ps));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] eu, es;
      if (n == 0) begin
        x0 = '1; y0 = '1; x1 = '1; x2 = '1;
      end else if (n == 1) begin
        x0 = 32'h8000_0000; y0 = 32'h7fff_ffff; x1 = 32'h8000_0000; x2 = 32'h8000_0000;
      end else begin
        x0 = $urandom; y0 = $urandom; x1 = $urandom; x2 = $urandom;
      end
      #1;
      eu = 64'(x0) * 64'(y0) + 64'(x1) + 64'(x2);
      es = 64'($signed(x0)) * 64'($signed(y0)) + 64'($signed(x1)) + 64'($signed(x2));
      checks += 2;
      if (pu != eu) failures++;
      if (ps != es) failures++;
      if (n == 0) begin
        checks++;
        if (pu != '1) failures++;
      end
    end
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
