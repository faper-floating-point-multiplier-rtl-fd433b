// fpm_sign_tb -- exhaustive check of the sign sub-circuit (4 input combinations).
module fpm_sign_tb;
  int checks = 0, failures = 0;
  logic x_s, y_s, z_s;

  fpm_sign dut (.x_s(x_s), .y_s(y_s), .z_s(z_s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x_s, y_s} = 2'(i);
      #1;
      checks++;
      // product is negative when exactly one operand is negative
      if (z_s != ((i == 1) || (i == 2))) begin
        failures++;
        $display("FAIL x_s=%b y_s=%b z_s=%b", x_s, y_s, z_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
