// tb_adapt_tx: pushes reply headers and bursts of result words (one per cycle, as the
// DUV layer delivers them) and checks the byte stream (bits 31:24 first, one byte
// per cycle), the done pulse after the last byte, tx_busy until ack, and a header-only
// reply.
module tb_adapt_tx;
  logic ckT = 1'b0, rst_n = 1'b0;
  logic hdr_valid = 1'b0, hdr_has_data = 1'b0, data_av_o = 1'b0, data_last_o = 1'b0, ack = 1'b0;
  logic [31:0] hdr_word = '0, data_o = '0;
  logic tx_busy, wr_en, done;
  logic [7:0] data_comet;
  int checks = 0, failures = 0;

  adapt_tx #(.OUT_SETS(7)) dut (.*);
  always #5 ckT = ~ckT;

  logic [7:0] bytes_q[$];
  int dones = 0, done_at = -1, last_wr = -1, cyc = 0;
  always @(posedge ckT) begin
    cyc++;
    if (wr_en) begin bytes_q.push_back(data_comet); last_wr = cyc; end
    if (done) begin dones++; done_at = cyc; end
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic reply(input int nw);
    logic [31:0] w[$];
    logic [7:0] expb[$];
    int d0;
    w.push_back(nw == 0 ? 32'h0100_0000 | $urandom_range(0, 255) : 32'h0200_0000);
    for (int i = 0; i < nw; i++) w.push_back($urandom);
    foreach (w[i]) for (int b = 3; b >= 0; b--) expb.push_back(w[i][8*b +: 8]);
    bytes_q.delete();
    d0 = dones;
    hdr_valid <= 1'b1; hdr_word <= w[0]; hdr_has_data <= (nw != 0);
    @(posedge ckT);
    hdr_valid <= 1'b0;
    repeat ($urandom_range(2, 6)) @(posedge ckT);
    for (int i = 0; i < nw; i++) begin
      data_av_o <= 1'b1; data_o <= w[i+1]; data_last_o <= (i == nw - 1);
      @(posedge ckT);
    end
    data_av_o <= 1'b0; data_last_o <= 1'b0;
    for (int t = 0; t < 200 && dones == d0; t++) @(posedge ckT);
    chk(dones == d0 + 1, "one done per reply");
    chk(done_at == last_wr + 1, "done right after the last byte");
    chk(bytes_q == expb, "bytes in order, most significant first");
    repeat (3) @(posedge ckT);
    chk(tx_busy, "busy until ack");
    ack <= 1'b1; @(posedge ckT); ack <= 1'b0; @(posedge ckT);
    chk(!tx_busy, "idle after ack");
  endtask

  initial begin
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    #1 chk(!tx_busy && !wr_en, "idle after reset");
    reply(7);
    reply(0);
    reply(1);
    reply(7);
    reply(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge ckT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
