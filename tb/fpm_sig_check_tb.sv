// fpm_sig_check_tb -- checking significand circuit. Given the correct LSB w_l of
// the normal result, Z'_m and delta' must equal the exactly rounded result for
// every rounding mode; given an inverted w_l, Z'_m must follow it. Single and
// double precision, random operands plus products next to 2.0.
module fpm_sig_check_tb;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_adj = 0, n_carry = 0;

  logic [22:0] xs, ys, zs_m;
  logic [51:0] xd, yd, zd_m;
  rnd_mode_e   mode;
  logic        s, wls, wld, ds, dd;

  fpm_sig_check #(.FRAC_W(23)) dut_s (
    .x_m(xs), .y_m(ys), .rnd_mode(mode), .z_s(s), .w_l(wls), .z_m(zs_m), .delta(ds));
  fpm_sig_check #(.FRAC_W(52)) dut_d (
    .x_m(xd), .y_m(yd), .rnd_mode(mode), .z_s(s), .w_l(wld), .z_m(zd_m), .delta(dd));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t es, ed;
    for (int i = 0; i < 20000; i++) begin
      xs = 23'(rand_frac(23));
      ys = 23'(rand_frac(23));
      xd = 52'(rand_frac(52));
      yd = 52'(rand_frac(52));
      if (i % 8 == 1) begin
        xs = '1; ys = 23'($urandom_range(0, 3));
        xd = '1; yd = 52'($urandom_range(0, 3));
      end
      if (i % 8 == 3) begin  // products just below 2
        xs = 23'(rand_frac(23) | 1); ys = 23'(near_two_partner(wide_t'(xs), 23));
        xd = 52'(rand_frac(52) | 1); yd = 52'(near_two_partner(wide_t'(xd), 52));
      end
      mode = rnd_mode_e'($urandom_range(0, 3));
      s    = 1'($urandom);
      es   = ref_mul(wide_t'(xs), wide_t'(ys), 23, int'(mode), s);
      ed   = ref_mul(wide_t'(xd), wide_t'(yd), 52, int'(mode), s);
      n_carry += int'(es.carry);
      wls  = es.frac[0];
      wld  = ed.frac[0];
      #1;
      // the checking path was off the normal result by one ulp and got adjusted
      if ((dut_s.v[0] ^ dut_s.r) != wls) n_adj++;
      checks++;
      if (wide_t'(zs_m) != es.frac || ds != es.delta) begin
        failures++;
        $display("FAIL sp x=%h y=%h mode=%0d s=%b: z'=%h d'=%b exp %h %b",
                 xs, ys, mode, s, zs_m, ds, es.frac, es.delta);
      end
      checks++;
      if (wide_t'(zd_m) != ed.frac || dd != ed.delta) begin
        failures++;
        $display("FAIL dp x=%h y=%h mode=%0d s=%b: z'=%h d'=%b exp %h %b",
                 xd, yd, mode, s, zd_m, dd, ed.frac, ed.delta);
      end
      // an inverted LSB from the normal path is copied, so the result differs
      wls = ~wls;
      #1;
      checks++;
      if (zs_m[0] != wls || wide_t'(zs_m) == es.frac) begin
        failures++;
        $display("FAIL inverted w_l x=%h y=%h z'=%h", xs, ys, zs_m);
      end
    end
    checks++;
    if (n_adj == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL coverage adjust=%0d carry=%0d", n_adj, n_carry);
    end
    $display("adjustments=%0d rounding carries=%0d", n_adj, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
