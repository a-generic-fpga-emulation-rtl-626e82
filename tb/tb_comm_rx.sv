// tb_comm_rx: sends Ethernet frames to the communication layer's receive side and
// checks what it accepts and drops. Good frames (with and without Ethernet padding)
// must be accepted, their data bytes readable from the buffer in order, and the
// sequence number and sender addresses kept. Frames with a bad CRC, another MAC, IP
// or port, another EtherType or protocol, a MAC error, or arriving while the buffer
// is full must be dropped and counted.
module tb_comm_rx;
  localparam logic [47:0] BRD_MAC  = 48'h02_00_00_00_00_01;
  localparam logic [31:0] BRD_IP   = 32'hC0_A8_01_0A;
  localparam logic [15:0] BRD_PORT = 16'd5000;

  logic ckT = 1'b0, rst_n = 1'b0;
  logic mac_rx_valid = 1'b0, mac_rx_last = 1'b0, mac_rx_err = 1'b0;
  logic [7:0] mac_rx_data = '0, rx_data;
  logic en_in, rden_out = 1'b0, rx_done = 1'b0;
  logic [10:0] pay_len;
  logic [31:0] seq, peer_ip;
  logic [47:0] peer_mac;
  logic [15:0] peer_port, cnt_good, cnt_crc_err, cnt_drop;
  int checks = 0, failures = 0;

  comm_rx #(.BUF_BYTES(1472)) dut (.ckT, .rst_n, .own_mac(BRD_MAC), .own_ip(BRD_IP), .own_port(BRD_PORT),
    .mac_rx_valid, .mac_rx_data, .mac_rx_last, .mac_rx_err, .en_in, .pay_len, .rden_out, .rx_data,
    .rx_done, .seq, .peer_mac, .peer_ip, .peer_port, .cnt_good, .cnt_crc_err, .cnt_drop);
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

  typedef struct {
    logic [47:0] dmac, smac;
    logic [15:0] etype;
    logic [7:0]  proto;
    logic [31:0] sip, dip;
    logic [15:0] sport, dport;
    logic [31:0] seq;
    bit          bad_crc;
  } hdr_t;

  function automatic void build(ref logic [7:0] f[$], input hdr_t h, input logic [7:0] data[$]);
    logic [7:0] pay[$];
    logic [31:0] crc;
    int ulen;
    f.delete();
    for (int i = 3; i >= 0; i--) pay.push_back(h.seq[8*i +: 8]);
    foreach (data[i]) pay.push_back(data[i]);
    crc = ref_crc(pay) ^ (h.bad_crc ? 32'h8000_0000 : 0);
    for (int i = 3; i >= 0; i--) pay.push_back(crc[8*i +: 8]);
    ulen = 8 + pay.size();
    for (int i = 5; i >= 0; i--) f.push_back(h.dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(h.smac[8*i +: 8]);
    f.push_back(h.etype[15:8]); f.push_back(h.etype[7:0]);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((20 + ulen) >> 8)); f.push_back(8'(20 + ulen));
    repeat (4) f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(h.proto); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(h.sip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(h.dip[8*i +: 8]);
    f.push_back(h.sport[15:8]); f.push_back(h.sport[7:0]);
    f.push_back(h.dport[15:8]); f.push_back(h.dport[7:0]);
    f.push_back(8'(ulen >> 8)); f.push_back(8'(ulen));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (pay[i]) f.push_back(pay[i]);
    while (f.size() < 60) f.push_back(8'hA5);
  endfunction

  task automatic send(input logic [7:0] f[$], input bit err);
    foreach (f[i]) begin
      mac_rx_valid <= 1'b1; mac_rx_data <= f[i]; mac_rx_last <= (i == f.size() - 1);
      mac_rx_err <= err && (i == f.size() - 1);
      @(posedge ckT);
    end
    mac_rx_valid <= 1'b0; mac_rx_last <= 1'b0; mac_rx_err <= 1'b0;
    repeat (3) @(posedge ckT);
  endtask

  task automatic drain(input logic [7:0] data[$]);
    logic [7:0] got[$];
    for (int i = 0; i < pay_len; i++) begin
      rden_out <= 1'b1; @(posedge ckT); rden_out <= 1'b0; #1 got.push_back(rx_data);
      @(posedge ckT);
    end
    chk(got == data, "buffered data bytes");
    rx_done <= 1'b1; @(posedge ckT); rx_done <= 1'b0; @(posedge ckT);
    chk(!en_in, "buffer freed by rx_done");
  endtask

  function automatic hdr_t good_hdr(input logic [31:0] s);
    hdr_t h;
    h.dmac = BRD_MAC; h.smac = 48'h02_AB_CD_EF_01_23; h.etype = 16'h0800; h.proto = 8'd17;
    h.sip = 32'h0A00_0001; h.dip = BRD_IP; h.sport = 16'd1234; h.dport = BRD_PORT;
    h.seq = s; h.bad_crc = 0;
    return h;
  endfunction

  initial begin
    logic [7:0] f[$], d[$];
    hdr_t h;
    int g, c, x;
    @(posedge ckT); rst_n <= 1'b1; @(posedge ckT);
    for (int n = 0; n < 6; n++) begin
      d.delete();
      repeat (4 * $urandom_range(1, 20)) d.push_back(8'($urandom));
      if (n == 0) begin d.delete(); repeat (4) d.push_back(8'($urandom)); end  // padded frame
      h = good_hdr(32'h100 + n);
      build(f, h, d);
      g = cnt_good;
      send(f, 0);
      chk(en_in && cnt_good == g + 1, "good frame accepted");
      chk(pay_len == d.size(), "payload length");
      chk(seq == h.seq && peer_mac == h.smac && peer_ip == h.sip && peer_port == h.sport,
          "sequence number and sender kept");
      drain(d);
    end
    d = '{8'h02, 8'h00, 8'h00, 8'h00};
    // bad CRC
    h = good_hdr(32'h200); h.bad_crc = 1; build(f, h, d);
    c = cnt_crc_err; send(f, 0);
    chk(!en_in && cnt_crc_err == c + 1, "bad CRC dropped");
    // wrong MAC, IP, port, EtherType, protocol, MAC error
    for (int k = 0; k < 6; k++) begin
      h = good_hdr(32'h300 + k);
      case (k)
        0: h.dmac = 48'h02_00_00_00_00_02;
        1: h.dip  = 32'hC0A8_0109;
        2: h.dport = 16'd5001;
        3: h.etype = 16'h86DD;
        4: h.proto = 8'd6;
        default: ;
      endcase
      build(f, h, d);
      x = cnt_drop; send(f, k == 5);
      chk(!en_in && cnt_drop == x + 1, $sformatf("foreign frame %0d dropped", k));
    end
    // buffer full: second frame dropped, first kept
    h = good_hdr(32'h400); build(f, h, d); send(f, 0);
    chk(en_in, "first frame held");
    h = good_hdr(32'h401); build(f, h, '{8'h03, 8'h00, 8'h00, 8'h01});
    x = cnt_drop; send(f, 0);
    chk(cnt_drop == x + 1 && seq == 32'h400, "frame dropped while buffer full");
    drain(d);
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
