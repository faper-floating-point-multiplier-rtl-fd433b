// fpm_normalizer_tb -- normalizer against shift-and-compare arithmetic on random
// significand products in [1,4), single precision (l = 23).
module fpm_normalizer_tb;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  localparam int L = 23;
  int checks = 0, failures = 0;

  logic [2*L+1:0] u;
  logic [L:0]     v;
  round_bits_t    rb;

  fpm_normalizer #(.FRAC_W(L)) dut (.u(u), .v(v), .rb(rb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t p, a, b, q, rem;
    int    sh;
    logic  n2;
    for (int i = 0; i < 3000; i++) begin
      a = (wide_t'(1) << L) | rand_frac(L);
      b = (wide_t'(1) << L) | rand_frac(L);
      if (i < 4) begin  // products at the edges of [1,4)
        a = (i[0]) ? ((wide_t'(1) << (L + 1)) - 1) : (wide_t'(1) << L);
        b = (i[1]) ? ((wide_t'(1) << (L + 1)) - 1) : (wide_t'(1) << L);
      end
      p  = a * b;
      u  = p[2*L+1:0];
      #1;
      n2  = p >= (wide_t'(1) << (2 * L + 1));
      sh  = n2 ? L + 1 : L;
      q   = p >> sh;
      rem = p - (q << sh);
      checks++;
      if (wide_t'(v) != q || rb.u_m1 != n2) begin
        failures++;
        $display("FAIL p=%h v=%h exp %h", p, v, q);
      end
      checks++;
      // round bits: the last kept bit, the first dropped bit, then the rest
      if (rb.u_l != (n2 ? rem[sh-1] : q[0]) ||
          rb.u_lp1 != (n2 ? rem[sh-2] : rem[sh-1]) ||
          rb.u_lm1 != (n2 ? q[0] : q[1]) ||
          rb.st != ((rem & ((wide_t'(1) << (L - 1)) - 1)) != 0)) begin
        failures++;
        $display("FAIL round bits p=%h rb=%b", p, rb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
