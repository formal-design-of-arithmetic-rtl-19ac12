// tb_sd_mult: the 8-bit SD2,1 multiplier for all 65536 operand pairs, P must
// equal X * Y as 17-bit two's complement; then 3000 random pairs on a 16-bit
// instance (33-bit P). Also counts that every Booth digit value -2..2
// occurred in the recoding and that the accumulator produced negative
// digits, and fails if one never did.
module tb_sd_mult
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  int digit_seen[5];
  int neg_f_digits = 0;
  logic [7:0]  x, y;
  logic [16:0] p;
  logic [15:0] x16, y16;
  logic [32:0] p16;
  sd_mult            dut   (.x(x), .y(y), .p(p));
  sd_mult #(.N(16))  dut16 (.x(x16), .y(y16), .p(p16));
  initial begin
    for (int vx = 0; vx < 256; vx++)
      for (int vy = 0; vy < 256; vy++) begin
        x = 8'(vx);
        y = 8'(vy);
        #1;
        checks++;
        if (int'($signed(p)) != int'($signed(x)) * int'($signed(y))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", $signed(x), $signed(y), $signed(p));
        end
        for (int i = 0; i < 4; i++) begin
          int d;
          d = (dut.b[i].s ? -1 : 1) * (2 * int'(dut.b[i].d1) + int'(dut.b[i].d0));
          digit_seen[d+2]++;
        end
        for (int k = 0; k < 16; k++) if (dut.f[k].n && !dut.f[k].p) neg_f_digits++;
      end
    for (int n = 0; n < 3000; n++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      #1;
      checks++;
      if (longint'($signed(p16)) != longint'($signed(x16)) * longint'($signed(y16))) failures++;
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", d - 2);
      end
    end
    checks++;
    if (neg_f_digits == 0) failures++;
    $display("Booth digits -2..2 seen: %0d %0d %0d %0d %0d; negative F digits: %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4], neg_f_digits);
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
