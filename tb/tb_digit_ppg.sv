// tb_digit_ppg: exhaustive check of one partial product digit. For every
// Booth digit b in {-2..2} and every y_k, y_km1, neg_k, neg_km1 the digit
// must equal b times the signed weight of the selected Y bit (y_k for
// |b| = 1, y_km1 for |b| = 2), and never be coded +1 and -1 at once.
module tb_digit_ppg
  import arith_pkg::*;
;
  int checks = 0, failures = 0;
  sd4_digit_t b;
  logic y_k, y_km1, neg_k, neg_km1;
  sd2_digit_t pp;
  digit_ppg dut (.*);
  initial begin
    for (int bv = -2; bv <= 2; bv++)
      for (int v = 0; v < 16; v++) begin
        int sel, expv;
        b.s  = (bv < 0);
        b.d1 = (bv == 2 || bv == -2);
        b.d0 = (bv == 1 || bv == -1);
        {y_k, y_km1, neg_k, neg_km1} = 4'(v);
        #1;
        if (bv == 1 || bv == -1) sel = neg_k ? -int'(y_k) : int'(y_k);
        else if (bv != 0)        sel = neg_km1 ? -int'(y_km1) : int'(y_km1);
        else                     sel = 0;
        expv = (bv < 0) ? -sel : sel;
        checks++;
        if (sd2_value(pp) != expv || (pp.p && pp.n)) begin
          failures++;
          $display("FAIL b=%0d inputs=%b -> %p expected %0d", bv, 4'(v), pp, expv);
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
