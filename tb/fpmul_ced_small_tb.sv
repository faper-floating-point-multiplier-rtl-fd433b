// fpmul_ced_small_tb -- exhaustive test of the detection claim at a reduced
// precision (EXP_W = 5, FRAC_W = 6).
//
// For every pair of fractions, every rounding mode and both signs, the fault-free
// product must match the integer reference with no alarm. Then the normal
// result fraction Z_m is replaced by every other 6-bit value: each replacement
// that moves the result by more than one unit in the last place must be flagged,
// and the 1-ulp replacements must be flagged in some cases and missed in others
// (the checker only misses them when they invert the LSB in the direction the
// adjuster follows).
module fpmul_ced_small_tb;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  localparam int E = 5, L = 6, W = 1 + E + L;
  localparam int BIAS = (1 << (E - 1)) - 1;
  int checks = 0, failures = 0;
  int n_big = 0, n_one_det = 0, n_one_miss = 0;

  logic [W-1:0] x, y, z;
  rnd_mode_e    mode;
  logic [1:0]   rail;
  logic         error;

  fpmul_ced #(.EXP_W(E), .FRAC_W(L)) dut (
    .x(x), .y(y), .rnd_mode(mode), .z(z), .err_rail(rail), .error(error));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t r;
    logic s;
    logic [E-1:0] e;
    logic [L-1:0] zm_ok;
    int d;
    for (int xm = 0; xm < (1 << L); xm++)
      for (int ym = 0; ym < (1 << L); ym++)
        for (int md = 0; md < 8; md++) begin
          x    = {md[2], E'(BIAS), L'(xm)};
          y    = {1'b0, E'(BIAS + 1), L'(ym)};
          mode = rnd_mode_e'(md[1:0]);
          s    = md[2];
          r    = ref_mul(wide_t'(xm), wide_t'(ym), L, int'(md[1:0]), s);
          e    = E'(BIAS + 1 + int'(r.delta));
          #1;
          checks++;
          if (z != {s, e, L'(r.frac)} || error) begin
            failures++;
            $display("FAIL clean x=%h y=%h mode=%0d z=%h", x, y, mode, z);
          end
          zm_ok = L'(r.frac);
          for (int v = 0; v < (1 << L); v++) begin
            if (v == int'(zm_ok)) continue;
            force dut.z_m = L'(v);
            #1;
            d = v - int'(zm_ok);
            if (d == 1 || d == -1) begin
              if (error) n_one_det++; else n_one_miss++;
            end else begin
              n_big++;
              checks++;
              if (!error) begin
                failures++;
                $display("FAIL undetected %0d ulp x=%h y=%h mode=%0d", d, x, y, mode);
              end
            end
            release dut.z_m;
          end
        end
    $display("errors > 1 ulp: %0d, all detected if failures=0; 1-ulp errors detected %0d, missed %0d",
             n_big, n_one_det, n_one_miss);
    checks++;
    if (n_one_det == 0 || n_one_miss == 0) begin
      failures++;
      $display("FAIL 1-ulp errors were not split between detected and missed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
