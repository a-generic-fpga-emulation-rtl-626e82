// comm_tx: transmit side of the communication layer. It collects a reply payload
// written byte by byte by the adaptation layer and sends it to the host as one
// Ethernet/IPv4/UDP frame whose payload is the request's 32-bit sequence number,
// the reply bytes and a CRC-32 of sequence number and reply bytes.
//
// Bytes written with wr_en go to a payload buffer; done starts transmission. The
// frame goes to the MAC/IP/port the last accepted request came from, from the
// board's own addresses. Header fields: IPv4 without options, identification 0,
// don't-fragment set, TTL 64, header checksum computed here, UDP checksum 0 (not
// used, which IPv4 allows). The MAC adds preamble, padding and FCS. When the last
// byte has been accepted by the MAC, ack pulses and the buffer is free again.
// Use of UDP, the sequence number and the CRC follow the framework; the header
// field values and the handshake details are this design's choices.
//
// Interface to the MAC: mac_tx_valid/mac_tx_data/mac_tx_last, a byte moves in each
// cycle with mac_tx_valid and mac_tx_ready high. Writes while a frame is being sent
// are not allowed (assertion).
module comm_tx #(
  parameter int unsigned BUF_BYTES = 1472,
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1)
) (
  input  logic           ckT,
  input  logic           rst_n,
  input  logic [47:0]    own_mac,
  input  logic [31:0]    own_ip,
  input  logic [15:0]    own_port,
  input  logic [47:0]    peer_mac,
  input  logic [31:0]    peer_ip,
  input  logic [15:0]    peer_port,
  input  logic [31:0]    seq,
  // from the adaptation layer
  input  logic           wr_en,
  input  emu_pkg::byte_t data_comet,
  input  logic           done,
  output logic           ack,
  // MAC transmit stream
  output logic           mac_tx_valid,
  output emu_pkg::byte_t mac_tx_data,
  output logic           mac_tx_last,
  input  logic           mac_tx_ready
);
  import emu_pkg::*;

  emu_pkg::byte_t   mem [BUF_BYTES];
  logic [LEN_W-1:0] wr_ptr;
  logic             sending;
  logic [15:0]      idx, n_bytes, frame_len, ip_len, udp_len;
  logic [47:0]      dmac;
  logic [31:0]      dip, seq_q;
  logic [15:0]      dport, ip_csum;
  logic [31:0]      crc;
  logic             fire, crc_en;

  assign ip_len    = 16'(IP_HDR_BYTES + UDP_HDR_BYTES + SEQ_BYTES + CRC_BYTES) + n_bytes;
  assign udp_len   = 16'(UDP_HDR_BYTES + SEQ_BYTES + CRC_BYTES) + n_bytes;
  assign frame_len = 16'(HDR_BYTES + SEQ_BYTES + CRC_BYTES) + n_bytes;

  // IPv4 header checksum: ones' complement of the ones' complement sum of the header
  function automatic logic [15:0] ipv4_csum(input logic [15:0] tot_len,
                                            input logic [31:0] src, input logic [31:0] dst);
    logic [19:0] sum;
    sum = 20'h4500 + 20'(tot_len) + 20'h0000 + 20'h4000 + 20'h4011
        + 20'(src[31:16]) + 20'(src[15:0]) + 20'(dst[31:16]) + 20'(dst[15:0]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    return ~sum[15:0];
  endfunction
  assign ip_csum = ipv4_csum(ip_len, own_ip, dip);

  always_comb begin
    unique case (idx)
      16'd0:  mac_tx_data = dmac[47:40];
      16'd1:  mac_tx_data = dmac[39:32];
      16'd2:  mac_tx_data = dmac[31:24];
      16'd3:  mac_tx_data = dmac[23:16];
      16'd4:  mac_tx_data = dmac[15:8];
      16'd5:  mac_tx_data = dmac[7:0];
      16'd6:  mac_tx_data = own_mac[47:40];
      16'd7:  mac_tx_data = own_mac[39:32];
      16'd8:  mac_tx_data = own_mac[31:24];
      16'd9:  mac_tx_data = own_mac[23:16];
      16'd10: mac_tx_data = own_mac[15:8];
      16'd11: mac_tx_data = own_mac[7:0];
      16'd12: mac_tx_data = ETHERTYPE_IPV4[15:8];
      16'd13: mac_tx_data = ETHERTYPE_IPV4[7:0];
      16'd14: mac_tx_data = 8'h45;
      16'd15: mac_tx_data = 8'h00;
      16'd16: mac_tx_data = ip_len[15:8];
      16'd17: mac_tx_data = ip_len[7:0];
      16'd18, 16'd19: mac_tx_data = 8'h00;
      16'd20: mac_tx_data = 8'h40;
      16'd21: mac_tx_data = 8'h00;
      16'd22: mac_tx_data = 8'd64;
      16'd23: mac_tx_data = IP_PROTO_UDP;
      16'd24: mac_tx_data = ip_csum[15:8];
      16'd25: mac_tx_data = ip_csum[7:0];
      16'd26: mac_tx_data = own_ip[31:24];
      16'd27: mac_tx_data = own_ip[23:16];
      16'd28: mac_tx_data = own_ip[15:8];
      16'd29: mac_tx_data = own_ip[7:0];
      16'd30: mac_tx_data = dip[31:24];
      16'd31: mac_tx_data = dip[23:16];
      16'd32: mac_tx_data = dip[15:8];
      16'd33: mac_tx_data = dip[7:0];
      16'd34: mac_tx_data = own_port[15:8];
      16'd35: mac_tx_data = own_port[7:0];
      16'd36: mac_tx_data = dport[15:8];
      16'd37: mac_tx_data = dport[7:0];
      16'd38: mac_tx_data = udp_len[15:8];
      16'd39: mac_tx_data = udp_len[7:0];
      16'd40, 16'd41: mac_tx_data = 8'h00;
      16'd42: mac_tx_data = seq_q[31:24];
      16'd43: mac_tx_data = seq_q[23:16];
      16'd44: mac_tx_data = seq_q[15:8];
      16'd45: mac_tx_data = seq_q[7:0];
      default: begin
        if (idx == frame_len - 16'd4)      mac_tx_data = crc[31:24];
        else if (idx == frame_len - 16'd3) mac_tx_data = crc[23:16];
        else if (idx == frame_len - 16'd2) mac_tx_data = crc[15:8];
        else if (idx == frame_len - 16'd1) mac_tx_data = crc[7:0];
        else                               mac_tx_data = mem[LEN_W'(idx - 16'd46)];
      end
    endcase
  end

  assign mac_tx_valid = sending;
  assign mac_tx_last  = sending && (idx == frame_len - 16'd1);
  assign fire         = mac_tx_valid && mac_tx_ready;
  assign crc_en       = fire && idx >= 16'd42 && idx < frame_len - 16'd4;

  crc32 u_crc (.clk(ckT), .rst_n, .init(done && !sending), .en(crc_en), .data(mac_tx_data), .crc(crc));

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      sending <= 1'b0;
      idx     <= '0;
      n_bytes <= '0;
      dmac    <= '0;
      dip     <= '0;
      dport   <= '0;
      seq_q   <= '0;
      ack     <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (!sending) begin
        if (wr_en && int'(wr_ptr) < BUF_BYTES) wr_ptr <= wr_ptr + 1'b1;
        if (done) begin
          sending <= 1'b1;
          idx     <= '0;
          n_bytes <= 16'(wr_ptr) + (wr_en ? 16'd1 : 16'd0);
          dmac    <= peer_mac;
          dip     <= peer_ip;
          dport   <= peer_port;
          seq_q   <= seq;
        end
      end else if (fire) begin
        idx <= idx + 16'd1;
        if (mac_tx_last) begin
          sending <= 1'b0;
          wr_ptr  <= '0;
          ack     <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge ckT) begin
    if (wr_en && !sending && int'(wr_ptr) < BUF_BYTES) mem[wr_ptr] <= data_comet;
  end

  a_no_write_while_sending: assert property (@(posedge ckT) disable iff (!rst_n)
    wr_en |-> !sending);
endmodule
