// fpm_exponent_tb -- exponent sub-circuit against integer arithmetic, single
// (EXP_W = 8, exhaustive over X_e and delta for random Y_e) and double
// (EXP_W = 11, random) precision.
module fpm_exponent_tb;
  int checks = 0, failures = 0;

  logic [7:0]  xe8, ye8, ze8;
  logic [10:0] xe11, ye11, ze11;
  logic        d;

  fpm_exponent dut8 (.x_e(xe8), .y_e(ye8), .delta(d), .z_e(ze8));
  fpm_exponent #(.EXP_W(11)) dut11 (.x_e(xe11), .y_e(ye11), .delta(d), .z_e(ze11));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 8; k++) begin
        xe8  = 8'(i);
        ye8  = 8'($urandom);
        d    = 1'($urandom);
        xe11 = 11'($urandom);
        ye11 = 11'($urandom);
        #1;
        e = int'(xe8) + int'(ye8) - 127 + int'(d);
        checks++;
        if (int'(ze8) != ((e % 256) + 256) % 256) begin
          failures++;
          $display("FAIL8 %0d %0d %0d -> %0d", xe8, ye8, d, ze8);
        end
        e = int'(xe11) + int'(ye11) - 1023 + int'(d);
        checks++;
        if (int'(ze11) != ((e % 2048) + 2048) % 2048) begin
          failures++;
          $display("FAIL11 %0d %0d %0d -> %0d", xe11, ye11, d, ze11);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
