// fpm_round_bit_tb -- exhaustive check of the rounding bit generator: every
// combination of the five product bits, four modes and the sign, against a
// guard/sticky formulation of IEEE 754 rounding.
module fpm_round_bit_tb;
  import fpm_pkg::*;
  int checks = 0, failures = 0;

  round_bits_t rb;
  rnd_mode_e   mode;
  logic        s, r;

  fpm_round_bit dut (.rb(rb), .rnd_mode(mode), .z_s(s), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lsb, g, st, exp_r;
    for (int i = 0; i < 256; i++) begin
      rb   = round_bits_t'(i[4:0]);
      mode = rnd_mode_e'(i[6:5]);
      s    = i[7];
      #1;
      // last kept bit, first dropped bit, OR of the remaining dropped bits
      lsb = rb.u_m1 ? rb.u_lm1 : rb.u_l;
      g   = rb.u_m1 ? rb.u_l   : rb.u_lp1;
      st  = rb.u_m1 ? (rb.u_lp1 | rb.st) : rb.st;
      case (mode)
        RND_NE:  exp_r = g && (st || lsb);
        RND_UP:  exp_r = !s && (g || st);
        RND_DN:  exp_r = s && (g || st);
        default: exp_r = 1'b0;
      endcase
      checks++;
      if (r != exp_r) begin
        failures++;
        $display("FAIL rb=%b mode=%0d s=%b r=%b exp=%b", rb, mode, s, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
