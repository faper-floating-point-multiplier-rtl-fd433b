// fpmul_ced_tb -- end-to-end test of the error-detecting multiplier at its
// default size (single precision).
//
// 1. Fault-free: random normalized operands in all four rounding modes, plus
//    products next to 2.0; the product must match the integer reference and the
//    checker must report no error (no false alarm).
// 2. Injected faults in the normal significand multiplier: each bit of the full
//    product U stuck at 0 and at 1 (forced from the testbench) under random
//    operands. Every wrong output whose error exceeds one unit in the last place,
//    and every wrong exponent, must be flagged; undetected errors must be exactly
//    1 ulp. The detection ratio is printed.
// 3. Injected errors on the exponent increment delta, on the normal result
//    fraction (+-1 and +-k ulp) and on the checking circuit's result: all
//    errors above 1 ulp must be flagged.
// Each mechanism (rounding modes, product >= 2, rounding carry, adjuster
// increment, both multiplexer legs of the adjuster, detection, undetected 1-ulp
// error) is counted and must occur at least once.
module fpmul_ced_tb;
  import fpm_pkg::*;
  import fpm_ref_pkg::*;
  localparam int E = 8, L = 23, W = 1 + E + L;
  localparam int BIAS = (1 << (E - 1)) - 1;
  int checks = 0, failures = 0;

  logic [W-1:0] x, y, z;
  rnd_mode_e    mode;
  logic [1:0]   rail;
  logic         error;

  fpmul_ced dut (.x(x), .y(y), .rnd_mode(mode), .z(z), .err_rail(rail), .error(error));

  // mechanism counters
  int n_mode[4];
  int n_norm2 = 0, n_carry = 0, n_adjust = 0, n_sel1 = 0, n_sel0 = 0;
  int n_inj = 0, n_wrong = 0, n_detect = 0, n_miss1 = 0, n_false = 0;
  int n_exp_wrong = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_z(input logic [W-1:0] a, input logic [W-1:0] b,
                                         input rnd_mode_e m);
    ref_t r;
    logic s;
    logic [E-1:0] e;
    s = a[W-1] ^ b[W-1];
    r = ref_mul(wide_t'(a[L-1:0]), wide_t'(b[L-1:0]), L, int'(m), s);
    e = E'(int'(a[W-2:L]) + int'(b[W-2:L]) - BIAS + int'(r.delta));
    return {s, e, L'(r.frac)};
  endfunction

  // random normalized operand whose product exponent stays in range
  function automatic logic [W-1:0] rand_op();
    return {1'($urandom), E'($urandom_range(BIAS / 2 + 1, BIAS + BIAS / 2)), L'(rand_frac(L))};
  endfunction

  task automatic pick_operands(input int i);
    x    = rand_op();
    y    = rand_op();
    mode = rnd_mode_e'($urandom_range(0, 3));
    if (i % 8 == 3) y[L-1:0] = L'(near_two_partner(wide_t'(x[L-1:0]) | 1, L));
    if (i % 8 == 3) x[L-1:0] = x[L-1:0] | 1;
  endtask

  // error of z against the reference in units of the last place (same sign)
  function automatic longint ulp_err(input logic [W-1:0] got, input logic [W-1:0] want);
    longint a, b;
    a = longint'(got[W-2:0]);
    b = longint'(want[W-2:0]);
    if (got[W-1] != want[W-1]) return 64'h7fff_ffff;
    return (a > b) ? a - b : b - a;
  endfunction

  // judge one (possibly faulty) result
  task automatic judge(input logic [W-1:0] want, input string tag);
    longint d;
    d = ulp_err(z, want);
    checks++;
    if (rail[1] == rail[0] && error != 1'b1) begin
      failures++;
      $display("FAIL %s: error flag disagrees with rail %b", tag, rail);
    end
    if (z == want) begin
      if (error) n_false++;
    end else begin
      n_wrong++;
      if (z[W-2:L] != want[W-2:L]) n_exp_wrong++;
      if (error) n_detect++;
      else if (d == 1) n_miss1++;
      else begin
        failures++;
        $display("FAIL %s: undetected error of %0d ulp x=%h y=%h mode=%0d z=%h want=%h",
                 tag, d, x, y, mode, z, want);
      end
    end
  endtask

  initial begin
    logic [W-1:0] want;
    wide_t        p;
    logic [2*L+1:0] uf;
    for (int m = 0; m < 4; m++) n_mode[m] = 0;

    // ---- 1. fault-free operation ----
    for (int i = 0; i < 20000; i++) begin
      pick_operands(i);
      #1;
      want = ref_z(x, y, mode);
      n_mode[int'(mode)]++;
      if (dut.u_sig_n.rb.u_m1) n_norm2++;
      if (!dut.u_sig_n.rb.u_m1 && dut.delta) n_carry++;
      if ((dut.u_sig_c.v[0] ^ dut.u_sig_c.r) != z[0]) n_adjust++;
      if (dut.u_sig_c.u_adj.sel) n_sel1++; else n_sel0++;
      checks++;
      if (z != want || error || rail[1] == rail[0]) begin
        failures++;
        $display("FAIL clean x=%h y=%h mode=%0d z=%h want=%h rail=%b", x, y, mode, z, want, rail);
      end
    end

    // ---- 2. stuck-at faults on the full product U of the normal circuit ----
    for (int k = 0; k < 2 * L + 2; k++) begin
      for (int sa = 0; sa < 2; sa++) begin
        for (int i = 0; i < 300; i++) begin
          pick_operands(i);
          want = ref_z(x, y, mode);
          p    = ((wide_t'(1) << L) | wide_t'(x[L-1:0])) * ((wide_t'(1) << L) | wide_t'(y[L-1:0]));
          uf   = p[2*L+1:0];
          uf[k] = sa[0];
          force dut.u_sig_n.u = uf;
          #1;
          n_inj++;
          judge(want, "stuck-at");
          release dut.u_sig_n.u;
        end
      end
    end
    $display("stuck-at on U: %0d patterns, %0d wrong outputs, %0d detected (%0d.%0d%%), %0d undetected 1-ulp",
             n_inj, n_wrong, n_detect, (n_detect * 100) / (n_wrong > 0 ? n_wrong : 1),
             ((n_detect * 1000) / (n_wrong > 0 ? n_wrong : 1)) % 10, n_miss1);

    // ---- 3. errors on delta, on Z_m and on the checking result ----
    for (int i = 0; i < 2000; i++) begin
      pick_operands(i);
      #1;
      want = ref_z(x, y, mode);
      case (i % 4)
        0: force dut.delta = ~dut.u_sig_n.delta;
        1: force dut.z_m = dut.u_sig_n.z_m + L'(1);
        2: force dut.z_m = dut.u_sig_n.z_m - L'($urandom_range(1, 1000));
        default: force dut.zc_m = dut.u_sig_c.z_m ^ (L'(1) << $urandom_range(0, L - 1));
      endcase
      #1;
      if (i % 4 == 3) begin
        checks++;
        if (!error) begin
          failures++;
          $display("FAIL checking-side error not flagged x=%h y=%h", x, y);
        end else n_detect++;
      end else judge(want, "injected");
      case (i % 4)
        0: release dut.delta;
        1, 2: release dut.z_m;
        default: release dut.zc_m;
      endcase
    end

    $display("modes NE/TZ/UP/DN %0d/%0d/%0d/%0d, products>=2 %0d, rounding carries %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_norm2, n_carry);
    $display("adjuster increments %0d, sel=1 %0d, sel=0 %0d", n_adjust, n_sel1, n_sel0);
    $display("wrong outputs %0d (exponent wrong %0d), detected %0d, undetected 1-ulp %0d, false alarms %0d",
             n_wrong, n_exp_wrong, n_detect, n_miss1, n_false);
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0 ||
        n_norm2 == 0 || n_carry == 0 || n_adjust == 0 || n_sel1 == 0 || n_sel0 == 0 ||
        n_detect == 0 || n_miss1 == 0 || n_exp_wrong == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
