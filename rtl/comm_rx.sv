// comm_rx: receive side of the communication layer. It takes Ethernet frames from
// the MAC as a byte stream, keeps only IPv4/UDP frames addressed to this board
// (own MAC address, own IP address, own UDP port), checks the emulator's payload
// format (32-bit sequence number, data, CRC-32 of sequence number and data) and
// stores the data bytes in a payload buffer for the adaptation layer.
//
// Frame layout expected, byte offsets from the destination MAC address: 6-11
// source MAC, 12-13 EtherType 0x0800, 14 0x45 (IPv4, no options), 23 protocol 17,
// 26-29 source IP, 30-33 destination IP, 34-35 source port, 36-37 destination port,
// 38-39 UDP length, 42 payload. The UDP length decides where the payload ends, so
// Ethernet padding is ignored. A frame is accepted when every check passes, the MAC
// reports no error, the payload holds at least a sequence number, one command word
// and the CRC, and the buffer is free. On acceptance en_in rises and stays high
// until the adaptation layer returns rx_done; pay_len is the number of data bytes;
// seq and the sender's MAC/IP/port are kept for the reply. Counters of accepted
// frames, CRC failures and other drops are brought out for observation. The
// protocol stack, the sequence number and the CRC come from the framework; header
// parsing details, the field sizes and the drop rules are this design's choices.
// IP header checksums are not checked (the MAC's frame check covers the frame).
//
// Interface to the MAC: mac_rx_valid qualifies mac_rx_data; mac_rx_last marks the
// last byte of a frame (the MAC has removed preamble and FCS) and mac_rx_err a bad
// frame. No back-pressure. Buffer read: rden_out with the read address counting
// from 0, rx_data one cycle later.
module comm_rx #(
  parameter int unsigned BUF_BYTES = 1472,
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1)
) (
  input  logic             ckT,
  input  logic             rst_n,
  input  logic [47:0]      own_mac,
  input  logic [31:0]      own_ip,
  input  logic [15:0]      own_port,
  // MAC receive stream
  input  logic             mac_rx_valid,
  input  emu_pkg::byte_t   mac_rx_data,
  input  logic             mac_rx_last,
  input  logic             mac_rx_err,
  // to the adaptation layer
  output logic             en_in,
  output logic [LEN_W-1:0] pay_len,
  input  logic             rden_out,
  output emu_pkg::byte_t   rx_data,
  input  logic             rx_done,
  // request identity, for the reply
  output logic [31:0]      seq,
  output logic [47:0]      peer_mac,
  output logic [31:0]      peer_ip,
  output logic [15:0]      peer_port,
  // observation counters
  output logic [15:0]      cnt_good,
  output logic [15:0]      cnt_crc_err,
  output logic [15:0]      cnt_drop
);
  import emu_pkg::*;

  byte_t        mem [BUF_BYTES];
  logic [15:0]  idx;            // byte offset in the frame
  logic         ok;             // header checks passed so far
  logic [15:0]  udp_len;
  logic [15:0]  pay_bytes;      // UDP length - 8
  logic [31:0]  seq_n, crc_rx;
  logic [47:0]  mac_n;
  logic [31:0]  ip_n;
  logic [15:0]  port_n;
  logic [LEN_W-1:0] rd_addr;
  logic [31:0]  crc_calc;
  logic         crc_en, crc_init;
  logic [15:0]  poff;           // offset in the UDP payload
  logic         in_pay;

  assign poff   = idx - 16'(HDR_BYTES);
  assign in_pay = (idx >= 16'(HDR_BYTES)) && (poff < pay_bytes);

  // CRC over sequence number and data: every payload byte except the last four
  assign crc_init = mac_rx_valid && idx == 16'd0;
  assign crc_en   = mac_rx_valid && in_pay && (poff + 16'd4 < pay_bytes);

  crc32 u_crc (.clk(ckT), .rst_n, .init(crc_init), .en(crc_en), .data(mac_rx_data), .crc(crc_calc));

  // expected value of a checked header byte
  function automatic logic hdr_byte_ok(input logic [15:0] i, input byte_t b,
                                       input logic [47:0] m, input logic [31:0] ip,
                                       input logic [15:0] p);
    unique case (i)
      16'd0:  return b == m[47:40];
      16'd1:  return b == m[39:32];
      16'd2:  return b == m[31:24];
      16'd3:  return b == m[23:16];
      16'd4:  return b == m[15:8];
      16'd5:  return b == m[7:0];
      16'd12: return b == ETHERTYPE_IPV4[15:8];
      16'd13: return b == ETHERTYPE_IPV4[7:0];
      16'd14: return b == 8'h45;
      16'd23: return b == IP_PROTO_UDP;
      16'd30: return b == ip[31:24];
      16'd31: return b == ip[23:16];
      16'd32: return b == ip[15:8];
      16'd33: return b == ip[7:0];
      16'd36: return b == p[15:8];
      16'd37: return b == p[7:0];
      default: return 1'b1;
    endcase
  endfunction

  logic frame_fits;
  assign frame_fits = ok && (udp_len >= 16'(UDP_HDR_BYTES + SEQ_BYTES + 4 + CRC_BYTES))
                      && (pay_bytes - 16'(SEQ_BYTES) <= 16'(BUF_BYTES))
                      && (idx + 16'd1 >= 16'(HDR_BYTES) + pay_bytes);

  // CRC comparison: when the frame ends exactly at the payload end the last CRC byte
  // is on the bus; with Ethernet padding it has already been collected.
  logic crc_match;
  always_comb begin
    if (idx + 16'd1 == 16'(HDR_BYTES) + pay_bytes)
      crc_match = (crc_calc == {crc_rx[23:0], mac_rx_data});
    else
      crc_match = (crc_calc == crc_rx);
  end

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      idx         <= '0;
      ok          <= 1'b1;
      udp_len     <= '0;
      pay_bytes   <= '0;
      seq_n       <= '0;
      crc_rx      <= '0;
      mac_n       <= '0;
      ip_n        <= '0;
      port_n      <= '0;
      en_in       <= 1'b0;
      pay_len     <= '0;
      seq         <= '0;
      peer_mac    <= '0;
      peer_ip     <= '0;
      peer_port   <= '0;
      cnt_good    <= '0;
      cnt_crc_err <= '0;
      cnt_drop    <= '0;
    end else begin
      if (mac_rx_valid) begin
        idx <= mac_rx_last ? 16'd0 : idx + 16'd1;
        if (!hdr_byte_ok(idx, mac_rx_data, own_mac, own_ip, own_port)) ok <= 1'b0;
        if (idx >= 16'd6  && idx <= 16'd11) mac_n  <= {mac_n[39:0], mac_rx_data};
        if (idx >= 16'd26 && idx <= 16'd29) ip_n   <= {ip_n[23:0], mac_rx_data};
        if (idx == 16'd34 || idx == 16'd35) port_n <= {port_n[7:0], mac_rx_data};
        if (idx == 16'd38) udp_len <= {mac_rx_data, udp_len[7:0]};
        if (idx == 16'd39) begin
          udp_len   <= {udp_len[15:8], mac_rx_data};
          pay_bytes <= {udp_len[15:8], mac_rx_data} - 16'(UDP_HDR_BYTES);
        end
        if (in_pay && poff < 16'(SEQ_BYTES)) seq_n <= {seq_n[23:0], mac_rx_data};
        if (in_pay) crc_rx <= {crc_rx[23:0], mac_rx_data};
        if (in_pay && poff >= 16'(SEQ_BYTES) && !en_in
            && int'(poff) - SEQ_BYTES < BUF_BYTES)
          mem[LEN_W'(int'(poff) - SEQ_BYTES)] <= mac_rx_data;

        if (mac_rx_last) begin
          ok <= 1'b1;
          if (!mac_rx_err && frame_fits && !en_in && crc_match) begin
            en_in     <= 1'b1;
            pay_len   <= LEN_W'(pay_bytes - 16'(SEQ_BYTES + CRC_BYTES));
            seq       <= seq_n;
            peer_mac  <= mac_n;
            peer_ip   <= ip_n;
            peer_port <= port_n;
            cnt_good  <= cnt_good + 16'd1;
          end else if (!mac_rx_err && frame_fits && !en_in) begin
            cnt_crc_err <= cnt_crc_err + 16'd1;
          end else begin
            cnt_drop <= cnt_drop + 16'd1;
          end
        end
      end
      if (rx_done) en_in <= 1'b0;
    end
  end

  // buffer read port
  always_ff @(posedge ckT) begin
    if (!rst_n || (en_in && rx_done)) rd_addr <= '0;
    else if (rden_out)                rd_addr <= rd_addr + 1'b1;
  end
  always_ff @(posedge ckT) begin
    if (rden_out) rx_data <= mem[rd_addr];
  end
endmodule
