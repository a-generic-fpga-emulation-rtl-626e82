// tb_emu_top: end-to-end test of the emulator with its example DUV, at the top's
// default parameters.
//
// A host model builds Ethernet/IPv4/UDP frames (sequence number, command word,
// stimulus words, CRC-32), feeds them to the MAC receive port and parses every
// reply frame from the MAC transmit port: addresses, ports, IPv4 header checksum,
// UDP length, echoed sequence number, CRC and payload. A cycle-level model of the
// example DUV predicts every observed word. The test also covers: configuration
// commands (DUV clock width, shorter output chain), frames with a bad CRC or for
// another port (dropped, counted, no reply), short frames carried in Ethernet
// padding, stimuli shorter than the input chain (zero-filled), back-pressure from
// the MAC, and a switch to free-running mode and back. It measures the width of
// every DUV clock pulse and checks one pulse per stimulus.
module tb_emu_top;
  localparam logic [47:0] BRD_MAC  = 48'h02_00_00_00_00_01;
  localparam logic [31:0] BRD_IP   = 32'hC0_A8_01_0A;
  localparam logic [15:0] BRD_PORT = 16'd5000;
  localparam logic [47:0] HOST_MAC = 48'h02_11_22_33_44_55;
  localparam logic [31:0] HOST_IP  = 32'hC0_A8_01_02;
  localparam logic [15:0] HOST_PORT= 16'd40000;

  logic       ckT = 1'b0, rst_n = 1'b0;
  logic       mac_rx_valid = 1'b0, mac_rx_last = 1'b0, mac_rx_err = 1'b0;
  logic [7:0] mac_rx_data = '0;
  logic       mac_tx_valid, mac_tx_last, mac_tx_ready;
  logic [7:0] mac_tx_data;
  logic [128:0] duv_pins_in = '0;
  logic [63:0]  result_pins;
  logic         ckDUV, test_mode, duv_busy;
  logic [15:0]  cnt_good, cnt_crc_err, cnt_drop;

  emu_top dut (.*);

  always #5 ckT = ~ckT;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cfg = 0, n_stim = 0, n_crc_drop = 0, n_port_drop = 0, n_padded = 0,
      n_short_stim = 0, n_backpressure = 0, n_mode_free = 0, n_short_out = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- CRC-32, bit by bit, reflected ----------------
  function automatic logic [31:0] ref_crc(input logic [7:0] q[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (q[i]) begin
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[0] ^ q[i][b];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    end
    return ~c;
  endfunction

  // ---------------- frame construction ----------------
  function automatic void push16(ref logic [7:0] q[$], input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void push32(ref logic [7:0] q[$], input logic [31:0] v);
    push16(q, v[31:16]); push16(q, v[15:0]);
  endfunction

  function automatic void build_frame(ref logic [7:0] f[$], input logic [15:0] dport,
                                      input logic [31:0] seq, input logic [31:0] words[$],
                                      input bit bad_crc);
    logic [7:0] pay[$];
    logic [31:0] crc;
    int ulen, ilen, sum;
    logic [7:0] iph[$];
    push32(pay, seq);
    foreach (words[i]) push32(pay, words[i]);
    crc = ref_crc(pay) ^ (bad_crc ? 32'h1 : 32'h0);
    push32(pay, crc);
    ulen = 8 + pay.size();
    ilen = 20 + ulen;
    f.delete();
    for (int i = 5; i >= 0; i--) f.push_back(BRD_MAC[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(HOST_MAC[i*8 +: 8]);
    push16(f, 16'h0800);
    push16(iph, 16'h4500); push16(iph, 16'(ilen)); push16(iph, 16'h1234); push16(iph, 16'h0000);
    push16(iph, 16'h4011); push16(iph, 16'h0000); push32(iph, HOST_IP); push32(iph, BRD_IP);
    sum = 0;
    for (int i = 0; i < 20; i += 2) sum += {iph[i], iph[i+1]};
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    iph[10] = ~sum[15:8]; iph[11] = ~sum[7:0];
    foreach (iph[i]) f.push_back(iph[i]);
    push16(f, HOST_PORT); push16(f, dport); push16(f, 16'(ulen)); push16(f, 16'h0000);
    foreach (pay[i]) f.push_back(pay[i]);
    if (f.size() < 60) n_padded++;
    while (f.size() < 60) f.push_back(8'h00);
  endfunction

  task automatic send_frame(input logic [7:0] f[$]);
    foreach (f[i]) begin
      mac_rx_valid <= 1'b1;
      mac_rx_data  <= f[i];
      mac_rx_last  <= (i == f.size() - 1);
      @(posedge ckT);
    end
    mac_rx_valid <= 1'b0;
    mac_rx_last  <= 1'b0;
    repeat (12) @(posedge ckT);   // inter-frame gap
  endtask

  // ---------------- MAC transmit side: collect frames ----------------
  logic [7:0] cur[$];
  logic [7:0] frames[$][$];
  always @(posedge ckT) begin
    mac_tx_ready <= ($urandom_range(0, 3) != 0);
    if (mac_tx_valid && !mac_tx_ready) n_backpressure++;
    if (mac_tx_valid && mac_tx_ready) begin
      cur.push_back(mac_tx_data);
      if (mac_tx_last) begin
        frames.push_back(cur);
        cur.delete();
      end
    end
  end

  // Wait for one reply, check its framing, return its payload words.
  task automatic get_reply(input logic [31:0] seq, output logic [31:0] words[$], output bit ok);
    logic [7:0] f[$], pay[$];
    int sum, ulen, t;
    ok = 0;
    words.delete();
    t = 0;
    while (frames.size() == 0 && t < 5000) begin @(posedge ckT); t++; end
    check(frames.size() != 0, "reply frame arrives");
    if (frames.size() == 0) return;
    f = frames.pop_front();
    check(f.size() >= 54, "reply long enough");
    if (f.size() < 54) return;
    check({f[0],f[1],f[2],f[3],f[4],f[5]} == HOST_MAC, "reply dst MAC");
    check({f[6],f[7],f[8],f[9],f[10],f[11]} == BRD_MAC, "reply src MAC");
    check({f[12],f[13]} == 16'h0800 && f[14] == 8'h45 && f[23] == 8'd17, "reply IPv4/UDP");
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += {f[i], f[i+1]};
    while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
    check(sum == 16'hFFFF, "reply IPv4 header checksum");
    check({f[26],f[27],f[28],f[29]} == BRD_IP && {f[30],f[31],f[32],f[33]} == HOST_IP, "reply IPs");
    check({f[34],f[35]} == BRD_PORT && {f[36],f[37]} == HOST_PORT, "reply ports");
    ulen = {f[38], f[39]};
    check(ulen == f.size() - 34 && {f[16],f[17]} == f.size() - 14, "reply lengths");
    for (int i = 42; i < f.size() - 4; i++) pay.push_back(f[i]);
    check(ref_crc(pay) == {f[f.size()-4], f[f.size()-3], f[f.size()-2], f[f.size()-1]}, "reply CRC");
    check({pay[0],pay[1],pay[2],pay[3]} == seq, "reply sequence number");
    for (int i = 4; i + 3 < pay.size(); i += 4) words.push_back({pay[i],pay[i+1],pay[i+2],pay[i+3]});
    ok = 1;
  endtask

  // ---------------- example DUV model ----------------
  logic [63:0] m_x1 = '0, m_x2 = '0, m_acc = '0;
  logic        m_en = 1'b0;
  function automatic void model_clock(input logic rst, input logic [63:0] a, input logic [63:0] b);
    if (rst) begin m_x1 = '0; m_x2 = '0; m_acc = '0; m_en = 1'b0; end
    else begin
      if (!m_en) begin m_x1 = a; m_x2 = b; end
      else m_acc = m_x1 + m_x2;
      m_en = ~m_en;
    end
  endfunction
  function automatic logic [223:0] model_obs();
    return {31'h0, m_en, m_x2, m_x1, m_acc};
  endfunction

  // ---------------- DUV clock pulse measurement ----------------
  int pulses = 0, hi_len = 0, last_width = 0;
  always @(posedge ckT) begin
    if (test_mode) begin
      if (ckDUV) hi_len++;
      else if (hi_len != 0) begin
        pulses++; last_width = hi_len; hi_len = 0;
      end
    end else hi_len = 0;
  end

  // ---------------- transactions ----------------
  logic [31:0] seq_no = 32'h1000;
  int          n_out_cfg = 7;

  task automatic do_cfg(input int nin, input int nout, input int hi);
    logic [7:0]  f[$];
    logic [31:0] w[$], r[$];
    bit ok;
    w.push_back({8'h01, 8'(nin), 8'(nout), 8'(hi)});
    build_frame(f, BRD_PORT, seq_no, w, 0);
    send_frame(f);
    get_reply(seq_no, r, ok);
    if (ok) check(r.size() == 1 && r[0] == w[0], "CFG reply echoes command");
    seq_no++;
    n_cfg++;
    n_out_cfg = nout;
  endtask

  task automatic do_mode(input bit tm);
    logic [7:0]  f[$];
    logic [31:0] w[$], r[$];
    bit ok;
    w.push_back({8'h03, 23'h0, tm});
    build_frame(f, BRD_PORT, seq_no, w, 0);
    send_frame(f);
    get_reply(seq_no, r, ok);
    if (ok) check(r.size() == 1 && r[0] == w[0], "MODE reply echoes command");
    check(test_mode == tm, "test_mode follows MODE command");
    seq_no++;
  endtask

  // One stimulus: nwords of the 5 input words are sent (the rest are zero-filled).
  task automatic do_stim(input logic rst, input logic [63:0] a, input logic [63:0] b,
                         input int nwords, input int hi_expect);
    logic [7:0]  f[$];
    logic [31:0] w[$], r[$];
    logic [159:0] in_vec;
    logic [223:0] obs;
    int p0;
    bit ok;
    in_vec = {31'h0, rst, b, a};
    if (nwords < 5) in_vec = in_vec & ((160'h1 << (32 * nwords)) - 1);
    w.push_back(32'h0200_0000);
    for (int k = 0; k < nwords; k++) w.push_back(in_vec[32*k +: 32]);
    build_frame(f, BRD_PORT, seq_no, w, 0);
    p0 = pulses;
    duv_pins_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
    send_frame(f);
    get_reply(seq_no, r, ok);
    model_clock(in_vec[128], in_vec[63:0], in_vec[127:64]);
    obs = model_obs();
    if (ok) begin
      check(r.size() == 1 + n_out_cfg, "STIM reply word count");
      check(r.size() > 0 && r[0] == 32'h0200_0000, "STIM reply header");
      for (int k = 0; k < n_out_cfg && k + 1 < r.size(); k++)
        check(r[k+1] == obs[32*k +: 32], $sformatf("observed word %0d", k));
      check(result_pins == m_acc, "result pins follow the DUV result");
    end
    check(pulses == p0 + 1, "one DUV clock pulse per stimulus");
    check(last_width == hi_expect, $sformatf("DUV clock high for %0d cycles (got %0d)", hi_expect, last_width));
    seq_no++;
    n_stim++;
    if (nwords < 5) n_short_stim++;
    if (n_out_cfg < 7) n_short_out++;
  endtask

  task automatic do_bad(input bit bad_crc);
    logic [7:0]  f[$];
    logic [31:0] w[$];
    int g, c, d;
    w.push_back(32'h0200_0000);
    for (int k = 0; k < 5; k++) w.push_back($urandom);
    build_frame(f, bad_crc ? BRD_PORT : 16'd5001, seq_no, w, bad_crc);
    g = cnt_good; c = cnt_crc_err; d = cnt_drop;
    send_frame(f);
    repeat (400) @(posedge ckT);
    check(frames.size() == 0, "no reply to a dropped frame");
    check(cnt_good == g, "dropped frame not accepted");
    if (bad_crc) begin check(cnt_crc_err == c + 1, "CRC error counted"); n_crc_drop++; end
    else         begin check(cnt_drop == d + 1, "foreign port counted"); n_port_drop++; end
  endtask

  initial begin
    repeat (5) @(posedge ckT);
    rst_n <= 1'b1;
    repeat (5) @(posedge ckT);
    check(test_mode == 1'b1, "emulation mode after reset");

    // reset the DUV, default clock width of 8 cycles
    do_stim(1'b1, '0, '0, 5, 8);
    for (int i = 0; i < 6; i++)
      do_stim(1'b0, {$urandom, $urandom}, {$urandom, $urandom}, 5, 8);
    check(!duv_busy, "DUV layer idle between stimuli");

    // dropped frames
    do_bad(1'b1);
    do_bad(1'b0);

    // narrower DUV clock pulse, shorter output chain
    do_cfg(5, 3, 3);
    for (int i = 0; i < 4; i++)
      do_stim(1'b0, {$urandom, $urandom}, {$urandom, $urandom}, 5, 3);
    do_cfg(5, 7, 1);
    // stimuli shorter than the chain: missing words are zero
    do_stim(1'b0, {$urandom, $urandom}, {$urandom, $urandom}, 2, 1);
    do_stim(1'b0, {$urandom, $urandom}, {$urandom, $urandom}, 3, 1);

    // free-running mode: inputs from pins, DUV on ckT
    do_mode(1'b0);
    begin
      logic [63:0] a, b;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      duv_pins_in = {1'b0, b, a};
      repeat (6) @(posedge ckT);
      #1 check(result_pins == a + b, "free-running DUV adds pin operands");
      n_mode_free++;
    end
    do_mode(1'b1);
    do_cfg(5, 7, 8);
    do_stim(1'b1, '0, '0, 5, 8);
    for (int i = 0; i < 4; i++)
      do_stim(1'b0, {$urandom, $urandom}, {$urandom, $urandom}, 5, 8);

    check(cnt_good == 32'(seq_no - 32'h1000), "every good frame accepted");

    $display("end time %0t", $time);
    $display("mechanisms: cfg=%0d stim=%0d crc_drop=%0d port_drop=%0d padded=%0d short_stim=%0d short_out=%0d backpressure=%0d free_mode=%0d",
             n_cfg, n_stim, n_crc_drop, n_port_drop, n_padded, n_short_stim, n_short_out, n_backpressure, n_mode_free);
    check(n_cfg > 0, "config command exercised");
    check(n_crc_drop > 0, "CRC drop exercised");
    check(n_port_drop > 0, "address drop exercised");
    check(n_padded > 0, "padded frame exercised");
    check(n_short_stim > 0, "short stimulus exercised");
    check(n_short_out > 0, "shortened output chain exercised");
    check(n_backpressure > 0, "MAC back-pressure exercised");
    check(n_mode_free > 0, "free-running mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge ckT);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
