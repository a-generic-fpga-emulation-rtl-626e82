// emu_pkg: constants and types shared by the emulator's layers.
//
// The DUV layer moves data in 32-bit words (the width the adaptation layer
// presents to the DUV layer). The host talks to the board over UDP/IPv4 on
// Ethernet; every UDP payload starts with a 32-bit sequence number and ends
// with a CRC-32 of everything before it. The framing constants, the command
// word layout and the opcodes below are this design's own choices: the
// framework only fixes the 32-bit word, the sequence number and the CRC.
//
// Command word (first 32-bit word after the sequence number):
//   [31:24] opcode
//   OP_CFG  : [23:16] input sets, [15:8] output sets, [7:0] DUV clock high cycles
//   OP_MODE : [0] test_mode (1 = emulation through the scan chains,
//                            0 = DUV inputs from the FPGA pins, DUV clocked by ckT)
//   OP_STIM : followed by one word per input set; answered by one word per output set
package emu_pkg;

  localparam int unsigned WORD_W = 32;   // scan-chain set width

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [7:0]        byte_t;

  typedef enum logic [7:0] {
    OP_CFG  = 8'h01,
    OP_STIM = 8'h02,
    OP_MODE = 8'h03
  } opcode_e;

  // Ethernet / IPv4 / UDP framing
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam int unsigned ETH_HDR_BYTES  = 14;
  localparam int unsigned IP_HDR_BYTES   = 20;
  localparam int unsigned UDP_HDR_BYTES  = 8;
  localparam int unsigned HDR_BYTES      = ETH_HDR_BYTES + IP_HDR_BYTES + UDP_HDR_BYTES; // 42
  localparam int unsigned SEQ_BYTES      = 4;
  localparam int unsigned CRC_BYTES      = 4;

  // CRC-32 (IEEE 802.3 polynomial, reflected), initial value and final xor
  localparam logic [31:0] CRC_POLY_REFL = 32'hEDB8_8320;
  localparam logic [31:0] CRC_INIT      = 32'hFFFF_FFFF;
  localparam logic [31:0] CRC_XOROUT    = 32'hFFFF_FFFF;

  // One byte step of the reflected CRC-32.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input byte_t b);
    logic [31:0] c;
    c = crc ^ {24'h0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ CRC_POLY_REFL) : (c >> 1);
    return c;
  endfunction

endpackage
