// tb_sd_ppg: drives random radix-4 digits B (four of them) and random 8-bit
// Y; each row PP[i] must equal B{i} * Y * 4^i, must have no non-zero digit
// outside its range [2i+8 : 2i], and all rows together must sum to B * Y.
module tb_sd_ppg
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd4_digit_t [3:0]        b;
  logic [7:0]              y;
  sd2_digit_t [3:0][15:0]  pp;
  sd_ppg dut (.b(b), .y(y), .pp(pp));
  initial begin
    for (int k = 0; k < 3000; k++) begin
      int bv[4];
      longint total, expt;
      y = 8'($urandom);
      for (int i = 0; i < 4; i++) begin
        bv[i] = int'($urandom_range(4)) - 2;
        b[i].s  = (bv[i] < 0);
        b[i].d1 = (bv[i] == 2 || bv[i] == -2);
        b[i].d0 = (bv[i] == 1 || bv[i] == -1);
      end
      #1;
      total = 0;
      expt  = 0;
      for (int i = 0; i < 4; i++) begin
        longint row;
        bit outside;
        row = 0;
        outside = 0;
        for (int d = 15; d >= 0; d--) begin
          row = 2 * row + sd2_value(pp[i][d]);
          if ((d < 2 * i || d > 2 * i + 8) && (pp[i][d].p || pp[i][d].n)) outside = 1;
        end
        checks++;
        if (row != longint'(bv[i]) * longint'($signed(y)) * (longint'(1) << (2 * i)) || outside) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d: b=%0d y=%0d -> %0d", i, bv[i], $signed(y), row);
        end
        total += row;
        expt  += longint'(bv[i]) * longint'($signed(y)) * (longint'(1) << (2 * i));
      end
      checks++;
      if (total != expt) failures++;
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
