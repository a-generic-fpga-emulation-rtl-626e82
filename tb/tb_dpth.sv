// tb_dpth: clocks the example DUV with random operands and checks the result and the
// three promoted internal signals against a two-phase adder model every cycle.
module tb_dpth;
  logic clock = 1'b0, reset = 1'b1;
  logic [63:0] input1 = '0, input2 = '0, result, annotated_dpth_x1, annotated_dpth_x2;
  logic annotated_dpth_control_enable;
  logic [63:0] x1, x2, acc;
  logic en;
  int checks = 0, failures = 0;

  dpth dut (.*);
  always #5 clock = ~clock;

  initial begin
    x1 = '0; x2 = '0; acc = '0; en = 1'b0;
    @(posedge clock); #1;
    reset = 1'b0;
    for (int i = 0; i < 300; i++) begin
      input1 = {$urandom, $urandom}; input2 = {$urandom, $urandom};
      if (i == 150) reset = 1'b1;
      if (i == 152) reset = 1'b0;
      @(posedge clock);
      if (reset) begin x1 = '0; x2 = '0; acc = '0; en = 1'b0; end
      else begin
        if (!en) begin x1 = input1; x2 = input2; end
        else acc = x1 + x2;
        en = ~en;
      end
      #1;
      checks++;
      if (result !== acc || annotated_dpth_x1 !== x1 || annotated_dpth_x2 !== x2
          || annotated_dpth_control_enable !== en) begin
        failures++;
        $display("FAIL cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
