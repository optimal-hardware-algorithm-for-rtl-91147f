// tb_adm_comparator: out is 1 exactly when vp is above vn (ties give 0),
// over pairs of random and equal voltages.
module tb_adm_comparator;
  real vp, vn;
  logic out;
  int checks = 0, failures = 0;

  adm_comparator dut (.vp, .vn, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expo;
    for (int i = 0; i < 300; i++) begin
      vp = ($urandom % 5000) / 1000.0;
      vn = (i % 10 == 0) ? vp : ($urandom % 5000) / 1000.0;
      #1;
      expo = (i % 10 == 0) ? 1'b0 : ((vp - vn) > 0.0);
      checks++;
      if (out != expo) begin failures++; $display("FAIL vp=%f vn=%f out=%0d", vp, vn, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
