// tb_mult_ppg: the four generator variants (non-Booth / radix-4 Booth,
// unsigned / two's complement) at 32 bits, plus an 8-bit signed Booth one
// run exhaustively; the partial products of each must sum to X * Y modulo
// 2^(2N). Operands include 0, all-ones and the most negative value.
module tb_mult_ppg;
  int checks = 0, failures = 0;
  logic [31:0] x, y;
  logic [17:0][63:0] pp_ub, pp_tb;     // Booth: N/2 + 2 rows
  logic [32:0][63:0] pp_un, pp_tn;     // non-Booth: N + 1 rows
  logic [7:0]        x8, y8;
  logic [5:0][15:0]  pp8;

  mult_ppg                                      dut_ub (.x(x), .y(y), .pp(pp_ub));
  mult_ppg #(.SIGNED(1'b1))                     dut_tb (.x(x), .y(y), .pp(pp_tb));
  mult_ppg #(.BOOTH(1'b0))                      dut_un (.x(x), .y(y), .pp(pp_un));
  mult_ppg #(.SIGNED(1'b1), .BOOTH(1'b0))       dut_tn (.x(x), .y(y), .pp(pp_tn));
  mult_ppg #(.N(8), .SIGNED(1'b1))              dut_8  (.x(x8), .y(y8), .pp(pp8));

  function automatic logic [31:0] pick(int n);
    case (n)
      0: return '0;
      1: return '1;
      2: return 32'h8000_0000;
      3: return 32'h7fff_ffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] sub, stb, sun, stn, eu, es;
      x = pick(n % 5 + (n < 25 ? 0 : 4));
      y = pick(n / 5 + (n < 25 ? 0 : 4));
      #1;
      sub = '0; stb = '0; sun = '0; stn = '0;
      foreach (pp_ub[i]) begin sub += pp_ub[i]; stb += pp_tb[i]; end
      foreach (pp_un[i]) begin sun += pp_un[i]; stn += pp_tn[i]; end
      eu = 64'(x) * 64'(y);
      es = 64'($signed(x)) * 64'($signed(y));
      checks += 4;
      if (sub != eu) failures++;
      if (stb != es) failures++;
      if (sun != eu) failures++;
      if (stn != es) failures++;
      if (failures > 0 && failures < 4) $display("FAIL x=%h y=%h: %h %h %h %h", x, y, sub, stb, sun, stn);
    end
    for (int vx = 0; vx < 256; vx++)
      for (int vy = 0; vy < 256; vy++) begin
        logic [15:0] s8;
        x8 = 8'(vx);
        y8 = 8'(vy);
        #1;
        s8 = '0;
        foreach (pp8[i]) s8 += pp8[i];
        checks++;
        if (s8 != 16'($signed(x8) * $signed(y8))) failures++;
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
