// tb_scan_out_cell: drives random din/ce_m/ctrl/ce_s/sin into one master-slave output
// cell and checks sout against a reference master and slave register pair.
module tb_scan_out_cell;
  logic ckT = 1'b0, rst_n = 1'b0, din = 1'b0, ce_m = 1'b0, ctrl = 1'b0, ce_s = 1'b0, sin = 1'b0;
  logic sout;
  logic m, s;
  int checks = 0, failures = 0;

  scan_out_cell dut (.*);
  always #5 ckT = ~ckT;

  initial begin
    m = 1'b0; s = 1'b0;
    @(posedge ckT); rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      din <= $urandom; ce_m <= $urandom; ctrl <= $urandom; ce_s <= $urandom; sin <= $urandom;
      @(posedge ckT);
      begin
        logic m_old;
        m_old = m;
        if (ce_m) m = din;
        if (ce_s) s = ctrl ? m_old : sin;
      end
      #1;
      checks++;
      if (sout !== s) begin
        failures++;
        $display("FAIL cycle %0d: sout=%b ref=%b", i, sout, s);
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
