// tb_scan_out_chain: captures random DUV outputs into the default 193-bit chain
// (7 sets), loads the slaves and shifts out 7 words, checking each word in order
// and that a new capture into the masters during the unload does not disturb it.
module tb_scan_out_chain;
  localparam int N_OUT = 193;
  localparam int SETS = 7;
  logic ckT = 1'b0, rst_n = 1'b0, ce_m = 1'b0, load = 1'b0, ce_s = 1'b0;
  logic [N_OUT-1:0] duv_out = '0;
  logic [31:0] word_out;
  logic [SETS*32-1:0] snap;
  int checks = 0, failures = 0;

  scan_out_chain #(.N_OUT(N_OUT)) dut (.*);
  always #5 ckT = ~ckT;

  initial begin
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    for (int rep = 0; rep < 4; rep++) begin
      duv_out <= {7{$urandom}} ^ {N_OUT{1'b0}};
      for (int i = 0; i < 7; i++) duv_out[i*32 +: 25] <= 25'($urandom);
      @(posedge ckT);
      snap = '0; snap[N_OUT-1:0] = duv_out;
      ce_m <= 1'b1; @(posedge ckT); ce_m <= 1'b0;
      duv_out <= ~duv_out;
      load <= 1'b1; ce_s <= 1'b1; @(posedge ckT); load <= 1'b0;
      for (int k = 0; k < SETS; k++) begin
        ce_s <= 1'b1;
        ce_m <= (k == 2);       // capture new values in the middle of the unload
        #1;
        checks++;
        if (word_out !== snap[32*k +: 32]) begin
          failures++;
          $display("FAIL rep %0d word %0d: %h exp %h", rep, k, word_out, snap[32*k +: 32]);
        end
        @(posedge ckT);
      end
      ce_s <= 1'b0; ce_m <= 1'b0;
      #1 checks++;
      if (word_out !== 32'h0) begin failures++; $display("FAIL: zeros shift in"); end
      @(posedge ckT);
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
