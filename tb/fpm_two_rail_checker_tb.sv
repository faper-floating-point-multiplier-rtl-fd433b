// fpm_two_rail_checker_tb -- equal words must give a two-rail code word (01/10),
// words differing in one or more bits must give a non-code word (00/11).
// N = 32 (a full tree) and N = 5 (a padded tree).
module fpm_two_rail_checker_tb;
  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [4:0]  a5, b5;
  logic [1:0]  rail, rail5;

  fpm_two_rail_checker dut (.a(a), .b(b), .rail(rail));
  fpm_two_rail_checker #(.N(5)) dut5 (.a(a5), .b(b5), .rail(rail5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rail(input logic [1:0] rl, input logic ok, input string tag);
    checks++;
    if ((rl[1] != rl[0]) != ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h rail=%b", tag, a, b, rl);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = $urandom;
      b  = a;
      a5 = 5'($urandom);
      b5 = a5;
      #1;
      expect_rail(rail, 1'b1, "equal");
      expect_rail(rail5, 1'b1, "equal5");
      b  = a ^ (32'd1 << (i % 32));              // single-bit difference
      b5 = a5 ^ (5'd1 << (i % 5));
      #1;
      expect_rail(rail, 1'b0, "1-bit");
      expect_rail(rail5, 1'b0, "1-bit5");
      b  = a ^ ($urandom | 32'd1);               // any difference
      b5 = a5 ^ (5'($urandom) | 5'd1);
      #1;
      expect_rail(rail, 1'b0, "multi");
      expect_rail(rail5, 1'b0, "multi5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
