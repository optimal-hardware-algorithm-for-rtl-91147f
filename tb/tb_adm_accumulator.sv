// tb_adm_accumulator: the accumulator register loads its input on enabled
// clock edges, holds it otherwise, and clears on reset. Random data and
// enables are compared with a one-variable model.
module tb_adm_accumulator;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] d = 0, q;
  int checks = 0, failures = 0;
  int model;

  adm_accumulator #(.W(4)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (q !== 4'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    rst_n = 1;
    model = 0;
    repeat (500) begin
      @(negedge clk);
      en = 1'($urandom); d = 4'($urandom);
      @(posedge clk); #1;
      if (en) model = int'(d);
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL q=%0d exp=%0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
