// tb_arith_top: end-to-end test of arith_top at its built-in sizes (no
// parameter overrides). Every round drives all six units with new operands
// and checks every output against a reference computed by the simulator:
//   8-bit SD2,1 multiplier (all 65536 pairs over the run's first phase),
//   eleven 64-bit adders, four 32-operand adders, the 32-bit multiplier,
//   the constant multiplier (R = 299792458) and the multiply accumulator.
// It also counts how often the mechanisms of the design were exercised and
// fails for any that never was: each radix-4 Booth digit value -2..2 in the
// SD multiplier, a negative signed digit reaching F, a negative product
// (sign extension in SD2TC), adder carry-out, a carry-skip block bypass
// (all four bits propagating with a carry arriving), a carry-select block
// whose carry-in is 1, a multi-operand sum wider than 32 bits, a negative
// Booth digit in the 32-bit multiplier and a MAC result in the top half
// of its range.
module tb_arith_top
  import arith_pkg::*;
;
  int checks = 0, failures = 0;

  logic [7:0]         sdm_x, sdm_y;
  logic [16:0]        sdm_p;
  logic [63:0]        add_a, add_b;
  logic               add_cin;
  logic [10:0][63:0]  add_s;
  logic [10:0]        add_cout;
  logic [31:0][31:0]  moa_ops;
  logic [3:0][36:0]   moa_s, moa_c;
  logic [31:0]        mul_x, mul_y, cm_x, mac_x0, mac_y0, mac_x1, mac_x2;
  logic [63:0]        mul_p, cm_p, mac_p;

  arith_top dut (.*);

  int booth_seen[5];
  int neg_f = 0, neg_prod = 0, add_carry = 0, skip_taken = 0, csel_one = 0;
  int moa_wide = 0, mul_negdig = 0, mac_high = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s", what);
  endtask

  initial begin
    for (int n = 0; n < 65536; n++) begin
      // ---- SD2,1 multiplier: exhaustive over the 8-bit operands
      sdm_x = 8'(n);
      sdm_y = 8'(n >> 8);
      // ---- library units: random operands, a few rounds of corner cases
      if (n % 16 == 0) begin
        add_a   = (n == 0) ? '1 : {$urandom, $urandom};
        add_b   = (n == 0) ? 64'd0 : (n == 16) ? ~add_a : {$urandom, $urandom};
        add_cin = (n < 32) ? 1'b1 : 1'($urandom);
        for (int i = 0; i < 32; i++) moa_ops[i] = (n == 0) ? '1 : $urandom;
        mul_x  = (n == 0) ? '1 : $urandom;
        mul_y  = (n == 0) ? '1 : $urandom;
        cm_x   = (n == 0) ? '1 : $urandom;
        mac_x0 = (n == 0) ? '1 : $urandom;
        mac_y0 = (n == 0) ? '1 : $urandom;
        mac_x1 = (n == 0) ? '1 : $urandom;
        mac_x2 = (n == 0) ? '1 : $urandom;
      end
      #1;
      // ---- SD multiplier checks and counters
      checks++;
      if (int'($signed(sdm_p)) != int'($signed(sdm_x)) * int'($signed(sdm_y)))
        fail($sformatf("sd_mult %0d * %0d = %0d", $signed(sdm_x), $signed(sdm_y), $signed(sdm_p)));
      for (int i = 0; i < 4; i++)
        booth_seen[(dut.u_sdm.b[i].s ? -1 : 1) * (2 * int'(dut.u_sdm.b[i].d1) + int'(dut.u_sdm.b[i].d0)) + 2]++;
      for (int k = 0; k < 16; k++) if (dut.u_sdm.f[k].n && !dut.u_sdm.f[k].p) neg_f++;
      if (sdm_p[16]) neg_prod++;
      if (n % 16 == 0) begin
        logic [64:0] ea;
        logic [36:0] em;
        logic [63:0] ep, ec, emac;
        logic [4:0]  blk_c;
        // adders
        ea = 65'(add_a) + 65'(add_b) + 65'(add_cin);
        for (int k = 0; k < 11; k++) begin
          checks++;
          if ({add_cout[k], add_s[k]} != ea) fail($sformatf("adder algorithm %0d", k));
        end
        if (ea[64]) add_carry++;
        // block carries of the first blocks, for the skip / select counters
        for (int k = 1; k < 5; k++) begin
          logic [64:0] mask;
          mask = (65'd1 << (4 * k)) - 65'd1;
          blk_c[k] = 1'(((65'(add_a) & mask) + (65'(add_b) & mask) + 65'(add_cin)) >> (4 * k));
        end
        for (int k = 1; k < 4; k++)
          if ((add_a[4*k +: 4] ^ add_b[4*k +: 4]) == 4'hf && blk_c[k]) skip_taken++;
        if (blk_c[1]) csel_one++;
        // multi-operand adders
        em = '0;
        for (int i = 0; i < 32; i++) em += 37'(moa_ops[i]);
        if (em[36:32] != 0) moa_wide++;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (37'(moa_s[k] + moa_c[k]) != em) fail($sformatf("multi-operand adder algorithm %0d", k));
        end
        // multiplier, constant multiplier, multiply accumulator
        ep = 64'(mul_x) * 64'(mul_y);
        checks++;
        if (mul_p != ep) fail("par_mult");
        for (int i = 0; i < 17; i++) if (dut.u_mul.u_ppg.g_booth.b[i].s) mul_negdig++;
        ec = 64'(299792458) * 64'(cm_x);
        checks++;
        if (cm_p != ec) fail("const_mult");
        emac = 64'(mac_x0) * 64'(mac_y0) + 64'(mac_x1) + 64'(mac_x2);
        checks++;
        if (mac_p != emac) fail("mac");
        if (emac[63]) mac_high++;
      end
    end
    // ---- every mechanism must have happened at least once
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (booth_seen[d] == 0) fail($sformatf("Booth digit %0d never occurred", d - 2));
    end
    checks += 9;
    if (neg_f == 0)      fail("no negative F digit");
    if (neg_prod == 0)   fail("no negative product");
    if (add_carry == 0)  fail("no adder carry-out");
    if (skip_taken == 0) fail("no carry-skip bypass");
    if (csel_one == 0)   fail("no carry-select block with carry-in 1");
    if (moa_wide == 0)   fail("no multi-operand sum above 32 bits");
    if (mul_negdig == 0) fail("no negative Booth digit in par_mult");
    if (mac_high == 0)   fail("no MAC result in the top half");
    if (dut.u_cm.NEG == '0) fail("constant has no negative CSD digit");
    $display("Booth digits -2..2: %0d %0d %0d %0d %0d", booth_seen[0], booth_seen[1],
             booth_seen[2], booth_seen[3], booth_seen[4]);
    $display("neg F digits %0d, neg products %0d, adder carries %0d, skips %0d, csel carry-in 1 %0d",
             neg_f, neg_prod, add_carry, skip_taken, csel_one);
    $display("wide MOA sums %0d, par_mult negative digits %0d, MAC high results %0d",
             moa_wide, mul_negdig, mac_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
