// tb_scan_in_cell: drives random ce/sin/pin/test_mode sequences into one input scan
// cell and compares sout and dout each cycle with a reference flip-flop and mux.
module tb_scan_in_cell;
  logic ckT = 1'b0, rst_n = 1'b0, ce = 1'b0, sin = 1'b0, pin = 1'b0, test_mode = 1'b0;
  logic sout, dout;
  logic ref_q;
  int checks = 0, failures = 0;

  scan_in_cell dut (.*);
  always #5 ckT = ~ckT;

  initial begin
    ref_q = 1'b0;
    @(posedge ckT); rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      ce <= $urandom; sin <= $urandom; pin <= $urandom; test_mode <= $urandom;
      @(posedge ckT);
      if (ce) ref_q = sin;            // value sampled at this edge
      #1;
      checks++;
      if (sout !== ref_q || dout !== (test_mode ? ref_q : pin)) begin
        failures++;
        $display("FAIL cycle %0d: sout=%b dout=%b ref=%b", i, sout, dout, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge ckT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
