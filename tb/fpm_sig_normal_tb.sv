// fpm_sig_normal_tb -- normal significand circuit against the integer reference
// (exact product, rounded by remainder comparison), all four rounding modes,
// both signs, random and edge operands, single precision.
module fpm_sig_normal_tb;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  localparam int L = 23;
  int checks = 0, failures = 0;
  int n_carry = 0, n_norm2 = 0;

  logic [L-1:0] xm, ym, zm;
  rnd_mode_e    mode;
  logic         s, delta;

  fpm_sig_normal #(.FRAC_W(L)) dut (
    .x_m(xm), .y_m(ym), .rnd_mode(mode), .z_s(s), .z_m(zm), .delta(delta));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t e;
    for (int i = 0; i < 20000; i++) begin
      xm   = L'(rand_frac(L));
      ym   = L'(rand_frac(L));
      if (i % 8 == 1) begin  // (2 - 2^-l)(1 + k 2^-l): just above 2
        xm = '1;
        ym = L'($urandom_range(0, 3));
      end
      if (i % 8 == 3) begin  // just below 2
        xm = L'(rand_frac(L) | 1);
        ym = L'(near_two_partner(wide_t'(xm), L));
      end
      if (i % 8 == 2) begin  // one operand exactly 1.0
        xm = '0;
      end
      mode = rnd_mode_e'($urandom_range(0, 3));
      s    = 1'($urandom);
      #1;
      e = ref_mul(wide_t'(xm), wide_t'(ym), L, int'(mode), s);
      n_carry += int'(e.carry);
      n_norm2 += int'(e.norm2);
      checks++;
      if (wide_t'(zm) != e.frac || delta != e.delta) begin
        failures++;
        $display("FAIL x=%h y=%h mode=%0d s=%b: z=%h d=%b exp z=%h d=%b",
                 xm, ym, mode, s, zm, delta, e.frac, e.delta);
      end
    end
    checks++;
    if (n_carry == 0 || n_norm2 == 0) begin
      failures++;
      $display("FAIL coverage carry=%0d norm2=%0d", n_carry, n_norm2);
    end
    $display("rounding carries=%0d products>=2: %0d", n_carry, n_norm2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
