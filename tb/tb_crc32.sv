// tb_crc32: checks the CRC engine against the published CRC-32 check value
// (0xCBF43926 for the ASCII string "123456789"), the empty message, and random
// messages against a bit-serial reference written here.
module tb_crc32;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [7:0] data = '0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32 dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_crc(input logic [7:0] q[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (q[i])
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[0] ^ q[i][b];
        c = c >> 1;
        if (fb) c ^= 32'hEDB88320;
      end
    return ~c;
  endfunction

  task automatic run(input logic [7:0] q[$], input logic [31:0] expect_crc);
    init <= 1'b1; @(posedge clk); init <= 1'b0;
    foreach (q[i]) begin
      en <= 1'b1; data <= q[i]; @(posedge clk);
      if ($urandom_range(0, 1)) begin
        en <= 1'b0; data <= 8'($urandom); @(posedge clk);
      end
    end
    en <= 1'b0;
    #1 checks++;
    if (crc !== expect_crc) begin
      failures++;
      $display("FAIL: crc %h expected %h (len %0d)", crc, expect_crc, q.size());
    end
    @(posedge clk);
  endtask

  initial begin
    logic [7:0] q[$];
    @(posedge clk); rst_n <= 1'b1; @(posedge clk);
    q = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    run(q, 32'hCBF43926);
    q.delete();
    run(q, 32'h0000_0000);
    for (int n = 0; n < 20; n++) begin
      q.delete();
      repeat ($urandom_range(1, 40)) q.push_back(8'($urandom));
      run(q, ref_crc(q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
