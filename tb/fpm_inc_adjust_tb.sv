// fpm_inc_adjust_tb -- merged incrementer/adjuster against the two-step
// definition: W' = V' + r', then W'' = W' if its LSB equals w_l, else W' + 1 ulp.
// Random V' plus the all-ones and all-zeros fractions, every (r', w_l).
module fpm_inc_adjust_tb;
  localparam int L = 23;
  int checks = 0, failures = 0;
  int n_sel = 0, n_adj = 0;

  logic [L:0]   v;
  logic         r, wl;
  logic [L+1:0] w;

  fpm_inc_adjust #(.FRAC_W(L)) dut (.v(v), .r(r), .w_l(wl), .w(w));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L+1:0] w1, w2;
    for (int i = 0; i < 8000; i++) begin
      v  = {1'b1, L'($urandom)};
      if (i < 8)       v = {1'b1, {L{1'b1}}};
      else if (i < 16) v = {1'b1, {L{1'b0}}};
      r  = i[0];
      wl = i[1];
      #1;
      w1 = (L+2)'(v) + (L+2)'(r);
      w2 = (w1[0] == wl) ? w1 : w1 + 1'b1;
      if (w2 != w1) n_adj++;
      if (dut.sel) n_sel++;
      checks++;
      if (w != w2) begin
        failures++;
        $display("FAIL v=%h r=%b wl=%b w=%h exp %h", v, r, wl, w, w2);
      end
    end
    checks++;
    if (n_adj == 0 || n_sel == 0) begin
      failures++;
      $display("FAIL coverage adjust=%0d sel=%0d", n_adj, n_sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
