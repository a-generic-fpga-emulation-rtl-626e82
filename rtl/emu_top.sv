// emu_top: the FPGA side of the emulator, with an example DUV in place.
//
// A host computer drives the design under verification (DUV) one clock cycle at a
// time over Ethernet. Three layers sit between the MAC and the DUV:
//   communication layer (comm_rx, comm_tx): UDP/IPv4 on Ethernet, each payload
//     carrying a sequence number and a CRC-32;
//   adaptation layer (adapt_rx, adapt_tx): bytes to and from 32-bit words, command
//     decoding, run-time configuration and flow control between the layers;
//   DUV layer (duv_layer): input scan chains that load 32 DUV inputs per system
//     clock, a generated DUV clock, and master-slave output scan chains that
//     capture the DUV outputs and promoted internal nodes and unload 32 per clock.
// One stimulus request yields exactly one DUV clock cycle and one reply frame with
// the observed values, so every observed signal can be traced cycle by cycle.
//
// The example DUV is dpth (two 64-bit operands and reset in, a 64-bit result and
// three promoted internal signals out): DUV input map bits 63:0 input1, 127:64
// input2, 128 reset (5 sets); observed map bits 63:0 result, 127:64 x1, 191:128 x2,
// 192 control enable (7 sets). The result also drives the result_pins outputs, as a
// DUV output drives an FPGA pin. With test_mode low (OP_MODE command) the DUV
// takes input1/input2/reset from duv_pins_in and runs on ckT.
//
// The MAC (with its MII interface) is outside: its receive and transmit byte streams
// are ports. There is no DHCP client, so the board's addresses are parameters.
module emu_top #(
  parameter int unsigned BUF_BYTES = 1472,
  parameter logic [47:0] OWN_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [31:0] OWN_IP    = 32'hC0_A8_01_0A,   // 192.168.1.10
  parameter logic [15:0] OWN_PORT  = 16'd5000
) (
  input  logic           ckT,
  input  logic           rst_n,
  // MAC receive stream
  input  logic           mac_rx_valid,
  input  emu_pkg::byte_t mac_rx_data,
  input  logic           mac_rx_last,
  input  logic           mac_rx_err,
  // MAC transmit stream
  output logic           mac_tx_valid,
  output emu_pkg::byte_t mac_tx_data,
  output logic           mac_tx_last,
  input  logic           mac_tx_ready,
  // DUV pins
  input  logic [128:0]   duv_pins_in,
  output logic [63:0]    result_pins,
  output logic           ckDUV,
  // observation
  output logic           test_mode,
  output logic           duv_busy,      // DUV layer between load and end of unload
  output logic [15:0]    cnt_good,
  output logic [15:0]    cnt_crc_err,
  output logic [15:0]    cnt_drop
);
  import emu_pkg::*;

  localparam int unsigned N_IN     = 129;
  localparam int unsigned N_OUT    = 193;
  localparam int unsigned IN_SETS  = (N_IN + 31) / 32;
  localparam int unsigned OUT_SETS = (N_OUT + 31) / 32;
  localparam int unsigned IN_W     = $clog2(IN_SETS + 1);
  localparam int unsigned OUT_W    = $clog2(OUT_SETS + 1);
  localparam int unsigned LEN_W    = $clog2(BUF_BYTES + 1);

  // communication <-> adaptation
  logic             en_in, rden_out, rx_done;
  logic [LEN_W-1:0] pay_len;
  byte_t            rx_data, data_comet;
  logic             wr_en, done, ack;
  logic [31:0]      seq, peer_ip;
  logic [47:0]      peer_mac;
  logic [15:0]      peer_port;
  // adaptation internal
  logic             tx_busy, hdr_valid, hdr_has_data;
  word_t            hdr_word;
  // configuration
  logic [IN_W-1:0]  n_in;
  logic [OUT_W-1:0] n_out;
  logic [7:0]       clk_high;
  // adaptation <-> DUV layer
  word_t            data_i, data_o;
  logic             data_av_i, data_av_o, data_last_o;
  // DUV
  logic [N_IN-1:0]  duv_in;
  logic [N_OUT-1:0] duv_out;

  comm_rx #(.BUF_BYTES(BUF_BYTES)) u_comm_rx (
    .ckT, .rst_n, .own_mac(OWN_MAC), .own_ip(OWN_IP), .own_port(OWN_PORT),
    .mac_rx_valid, .mac_rx_data, .mac_rx_last, .mac_rx_err,
    .en_in, .pay_len, .rden_out, .rx_data, .rx_done,
    .seq, .peer_mac, .peer_ip, .peer_port, .cnt_good, .cnt_crc_err, .cnt_drop
  );

  comm_tx #(.BUF_BYTES(BUF_BYTES)) u_comm_tx (
    .ckT, .rst_n, .own_mac(OWN_MAC), .own_ip(OWN_IP), .own_port(OWN_PORT),
    .peer_mac, .peer_ip, .peer_port, .seq,
    .wr_en, .data_comet, .done, .ack,
    .mac_tx_valid, .mac_tx_data, .mac_tx_last, .mac_tx_ready
  );

  adapt_rx #(.IN_SETS(IN_SETS), .OUT_SETS(OUT_SETS), .BUF_BYTES(BUF_BYTES)) u_adapt_rx (
    .ckT, .rst_n, .en_in, .pay_len, .rden_out, .rx_data, .rx_done,
    .n_in, .n_out, .clk_high, .test_mode, .data_i, .data_av_i,
    .tx_busy, .hdr_valid, .hdr_word, .hdr_has_data
  );

  adapt_tx #(.OUT_SETS(OUT_SETS)) u_adapt_tx (
    .ckT, .rst_n, .hdr_valid, .hdr_word, .hdr_has_data, .tx_busy,
    .data_o, .data_av_o, .data_last_o, .wr_en, .data_comet, .done, .ack
  );

  duv_layer #(.N_IN(N_IN), .N_OUT(N_OUT)) u_duv_layer (
    .ckT, .rst_n, .test_mode, .n_in, .n_out, .clk_high,
    .data_i, .data_av_i, .data_o, .data_av_o, .data_last_o, .busy(duv_busy),
    .pins_in(duv_pins_in), .duv_in, .duv_out, .ckDUV
  );

  dpth u_duv (
    .clock (ckDUV),
    .reset (duv_in[128]),
    .input1(duv_in[63:0]),
    .input2(duv_in[127:64]),
    .result(duv_out[63:0]),
    .annotated_dpth_x1(duv_out[127:64]),
    .annotated_dpth_x2(duv_out[191:128]),
    .annotated_dpth_control_enable(duv_out[192])
  );

  assign result_pins = duv_out[63:0];
endmodule
