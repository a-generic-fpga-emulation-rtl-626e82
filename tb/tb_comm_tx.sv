// tb_comm_tx: writes reply payloads of several lengths into the communication
// layer's transmit side, with random back-pressure from the MAC, and parses each
// frame: addresses, EtherType, IPv4 header and its checksum, ports, lengths, the
// sequence number, the data bytes and the CRC-32; ack must pulse once per frame.
module tb_comm_tx;
  localparam logic [47:0] BRD_MAC  = 48'h02_00_00_00_00_01;
  localparam logic [31:0] BRD_IP   = 32'hC0_A8_01_0A;
  localparam logic [15:0] BRD_PORT = 16'd5000;
  logic ckT = 1'b0, rst_n = 1'b0;
  logic [47:0] peer_mac = 48'h02_11_22_33_44_55;
  logic [31:0] peer_ip = 32'hC0A8_0102, seq = '0;
  logic [15:0] peer_port = 16'd40000;
  logic wr_en = 1'b0, done = 1'b0, ack, mac_tx_valid, mac_tx_last, mac_tx_ready = 1'b0;
  logic [7:0] data_comet = '0, mac_tx_data;
  int checks = 0, failures = 0;

  comm_tx #(.BUF_BYTES(1472)) dut (.ckT, .rst_n, .own_mac(BRD_MAC), .own_ip(BRD_IP), .own_port(BRD_PORT),
    .peer_mac, .peer_ip, .peer_port, .seq, .wr_en, .data_comet, .done, .ack,
    .mac_tx_valid, .mac_tx_data, .mac_tx_last, .mac_tx_ready);
  always #5 ckT = ~ckT;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

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

  logic [7:0] cur[$], frames[$][$];
  int acks = 0;
  always @(posedge ckT) begin
    mac_tx_ready <= ($urandom_range(0, 2) != 0);
    if (ack) acks++;
    if (mac_tx_valid && mac_tx_ready) begin
      cur.push_back(mac_tx_data);
      if (mac_tx_last) begin frames.push_back(cur); cur.delete(); end
    end
  end

  initial begin
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    for (int n = 0; n < 6; n++) begin
      logic [7:0] d[$], f[$], pay[$];
      int len, sum, a0;
      d.delete(); pay.delete();
      len = (n == 0) ? 4 : 4 * $urandom_range(1, 30);
      for (int i = 0; i < len; i++) d.push_back(8'($urandom));
      seq = $urandom;
      a0 = acks;
      foreach (d[i]) begin wr_en <= 1'b1; data_comet <= d[i]; @(posedge ckT); end
      wr_en <= 1'b0; done <= 1'b1; @(posedge ckT); done <= 1'b0;
      for (int t = 0; t < 2000 && frames.size() == 0; t++) @(posedge ckT);
      @(posedge ckT);
      chk(frames.size() == 1, "one frame per reply");
      if (frames.size() == 0) continue;
      f = frames.pop_front();
      chk(f.size() == 42 + 8 + len, $sformatf("frame length %0d exp %0d", f.size(), 50 + len));
      chk({f[0],f[1],f[2],f[3],f[4],f[5]} == peer_mac && {f[6],f[7],f[8],f[9],f[10],f[11]} == BRD_MAC, "MACs");
      chk({f[12],f[13]} == 16'h0800 && f[14] == 8'h45 && f[23] == 8'd17, "IPv4/UDP");
      sum = 0;
      for (int i = 14; i < 34; i += 2) sum += {f[i], f[i+1]};
      while (sum > 65535) sum = (sum & 65535) + (sum >> 16);
      chk(sum == 65535, "IPv4 header checksum");
      chk({f[16],f[17]} == 20 + 8 + 8 + len && {f[38],f[39]} == 8 + 8 + len, "length fields");
      chk({f[26],f[27],f[28],f[29]} == BRD_IP && {f[30],f[31],f[32],f[33]} == peer_ip, "IPs");
      chk({f[34],f[35]} == BRD_PORT && {f[36],f[37]} == peer_port, "ports");
      chk({f[42],f[43],f[44],f[45]} == seq, "sequence number");
      for (int i = 42; i < f.size() - 4; i++) pay.push_back(f[i]);
      for (int i = 0; i < len; i++) chk(f[46+i] == d[i], "data byte");
      chk(ref_crc(pay) == {f[f.size()-4],f[f.size()-3],f[f.size()-2],f[f.size()-1]}, "CRC");
      chk(acks == a0 + 1, "one ack per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge ckT);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
