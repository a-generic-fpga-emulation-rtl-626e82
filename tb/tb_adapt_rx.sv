// tb_adapt_rx: feeds payloads to the adaptation layer's receive side from a model of
// the communication layer's buffer (one-cycle read latency) and checks: word packing
// (first byte in bits 31:24), configuration commands with clamping, the mode command,
// stimulus words forwarded in order and zero-filled up to n_in, extra words dropped,
// the reply header and its data flag, rx_done once per payload, and that no payload
// starts while the transmit side is busy.
module tb_adapt_rx;
  logic ckT = 1'b0, rst_n = 1'b0;
  logic en_in = 1'b0, rden_out, rx_done, tx_busy = 1'b0;
  logic [10:0] pay_len = '0;
  logic [7:0] rx_data = '0;
  logic [3:0] n_in;
  logic [2:0] n_out;
  logic [7:0] clk_high;
  logic test_mode, data_av_i, hdr_valid, hdr_has_data;
  logic [31:0] data_i, hdr_word;
  int checks = 0, failures = 0;

  adapt_rx #(.IN_SETS(14), .OUT_SETS(7), .BUF_BYTES(1472)) dut (.*);
  always #5 ckT = ~ckT;

  logic [7:0] buf_q[$];
  int rd = 0;
  always @(posedge ckT) begin
    if (rden_out) begin rx_data <= buf_q[rd]; rd <= rd + 1; end
    if (rx_done) en_in <= 1'b0;
  end

  logic [31:0] words_seen[$], hdrs[$];
  logic        hdr_flags[$];
  int dones = 0;
  always @(posedge ckT) begin
    if (data_av_i) words_seen.push_back(data_i);
    if (hdr_valid) begin hdrs.push_back(hdr_word); hdr_flags.push_back(hdr_has_data); end
    if (rx_done) dones++;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic send(input logic [31:0] w[$]);
    int d0;
    buf_q.delete();
    foreach (w[i]) for (int b = 3; b >= 0; b--) buf_q.push_back(w[i][8*b +: 8]);
    rd = 0;
    d0 = dones;
    words_seen.delete(); hdrs.delete(); hdr_flags.delete();
    en_in <= 1'b1; pay_len <= 11'(buf_q.size());
    for (int t = 0; t < 500 && dones == d0; t++) @(posedge ckT);
    @(posedge ckT);
    chk(dones == d0 + 1, "rx_done once per payload");
  endtask

  initial begin
    logic [31:0] w[$];
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    #1 chk(n_in == 14 && n_out == 7 && clk_high == 8 && test_mode, "reset configuration");

    w = '{32'h01_05_03_0A};
    send(w);
    chk(n_in == 5 && n_out == 3 && clk_high == 10, "CFG applied");
    chk(hdrs.size() == 1 && hdrs[0] == w[0] && hdr_flags[0] == 0, "CFG reply header");
    chk(words_seen.size() == 0, "CFG forwards no words");

    w = '{32'h01_63_00_00};
    send(w);
    chk(n_in == 14 && n_out == 1 && clk_high == 1, "CFG clamped");

    w = '{32'h03_00_00_00};
    send(w);
    chk(test_mode == 1'b0, "MODE 0");
    w = '{32'h03_00_00_01};
    send(w);
    chk(test_mode == 1'b1, "MODE 1");

    w = '{32'h01_04_07_08};
    send(w);
    // full stimulus
    w = '{32'h02_00_00_00, $urandom, $urandom, $urandom, $urandom};
    send(w);
    chk(hdrs.size() == 1 && hdrs[0] == 32'h0200_0000 && hdr_flags[0] == 1, "STIM reply header");
    chk(words_seen.size() == 4, "four stimulus words");
    for (int i = 0; i < 4 && i < words_seen.size(); i++) chk(words_seen[i] == w[i+1], "stimulus word order");
    // short stimulus: zero fill
    w = '{32'h02_00_00_00, $urandom};
    send(w);
    chk(words_seen.size() == 4 && words_seen[0] == w[1] && words_seen[1] == 0 && words_seen[3] == 0,
        "short stimulus zero-filled");
    // long stimulus: extra words dropped
    w = '{32'h02_00_00_00, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    send(w);
    chk(words_seen.size() == 4 && words_seen[3] == w[4], "extra words dropped");

    // transmit side busy: no start
    tx_busy <= 1'b1;
    buf_q = '{8'h03, 8'h00, 8'h00, 8'h00};
    rd = 0;
    en_in <= 1'b1; pay_len <= 11'd4;
    repeat (50) @(posedge ckT);
    chk(rd == 0, "no read while transmit side busy");
    tx_busy <= 1'b0;
    repeat (20) @(posedge ckT);
    chk(rd == 4 && test_mode == 1'b0, "payload read once transmit side idle");

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
