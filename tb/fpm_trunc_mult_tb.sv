// fpm_trunc_mult_tb -- truncated multiplier: checks the bound
// U - 2^-l < U' <= U against the exact product, that U' is really truncated
// (the dropped low positions are zero and the largest operands lose bits), for
// single (l = 23) and double (l = 52) precision.
module fpm_trunc_mult_tb;
  import fpm_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_trunc = 0;

  logic [22:0] xs, ys;
  logic [47:0] us;
  logic [51:0] xd, yd;
  logic [105:0] ud;

  fpm_trunc_mult #(.FRAC_W(23)) dut_s (.x_m(xs), .y_m(ys), .u_t(us));
  fpm_trunc_mult #(.FRAC_W(52)) dut_d (.x_m(xd), .y_m(yd), .u_t(ud));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int l, input wide_t xm, input wide_t ym, input wide_t ut);
    wide_t p;
    int    drop;
    p    = ((wide_t'(1) << l) | xm) * ((wide_t'(1) << l) | ym);
    drop = fpm_pkg::trunc_drop_cols(l);
    checks++;
    if (ut > p || (p - ut) >= (wide_t'(1) << l)) begin
      failures++;
      $display("FAIL bound l=%0d x=%h y=%h p=%h u'=%h", l, xm, ym, p, ut);
    end
    checks++;
    if ((ut & ((wide_t'(1) << drop) - 1)) != 0) begin
      failures++;
      $display("FAIL low columns not dropped l=%0d u'=%h", l, ut);
    end
    if (ut != p) n_trunc++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      xs = 23'(rand_frac(23));
      ys = 23'(rand_frac(23));
      xd = 52'(rand_frac(52));
      yd = 52'(rand_frac(52));
      if (i == 0) begin  // worst case: every dropped bit is 1
        xs = '1; ys = '1; xd = '1; yd = '1;
      end
      #1;
      check(23, wide_t'(xs), wide_t'(ys), wide_t'(us));
      check(52, wide_t'(xd), wide_t'(yd), wide_t'(ud));
    end
    checks++;
    if (fpm_pkg::trunc_drop_cols(23) != 18 || fpm_pkg::trunc_drop_cols(52) != 46) begin
      failures++;
      $display("FAIL drop columns %0d %0d", fpm_pkg::trunc_drop_cols(23),
               fpm_pkg::trunc_drop_cols(52));
    end
    checks++;
    if (n_trunc == 0) begin
      failures++;
      $display("FAIL product never truncated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
