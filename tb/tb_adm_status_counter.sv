// tb_adm_status_counter: the counter clears on a 1 pulse, counts 0 pulses
// and wraps from 3 to 0. Random pulse streams (biased to long runs of 0s)
// are compared with an integer count.
module tb_adm_status_counter;
  logic clk = 0, rst_n = 0, en = 0, d = 0;
  logic [1:0] q;
  int checks = 0, failures = 0;
  int model, n_wrap = 0;

  adm_status_counter #(.CNT_W(2)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (q != 2'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; model = 0;
    repeat (800) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      d  = ($urandom % 5) == 0;
      @(posedge clk); #1;
      if (en) begin
        if (d) model = 0;
        else begin if (model == 3) n_wrap++; model = (model + 1) % 4; end
      end
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL q=%0d exp=%0d", q, model); end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
