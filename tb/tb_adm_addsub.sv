// tb_adm_addsub: exhaustive test of the 4-bit adder/subtracter.
// Every a, b and add/subtract combination is applied and the result is
// compared with integer arithmetic clamped to 0..15, and the clamp flag
// with whether the exact result left that range.
module tb_adm_addsub;
  logic [3:0] a, b, y;
  logic       add, ovf;
  int checks = 0, failures = 0;

  adm_addsub #(.W(4)) dut (.a, .b, .add, .y, .ovf);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact, expy;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          a = 4'(i); b = 4'(j); add = m[0];
          #1;
          exact = m ? i + j : i - j;
          expy  = exact < 0 ? 0 : (exact > 15 ? 15 : exact);
          checks++;
          if (int'(y) != expy || ovf != (exact < 0 || exact > 15)) begin
            failures++;
            $display("FAIL a=%0d b=%0d add=%0d y=%0d ovf=%0d exp=%0d", i, j, m, y, ovf, expy);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
