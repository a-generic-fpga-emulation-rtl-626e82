// crc32: byte-serial CRC-32 engine protecting the emulator's UDP payloads.
//
// The framework adds a CRC to every payload; this design uses the Ethernet CRC-32
// (polynomial 0x04C11DB7 in its bit-reflected form 0xEDB88320, register preset to
// all ones, result inverted), which the host can compute with any standard CRC-32
// routine. init clears the register to the preset value; each cycle with en high
// folds in one byte, least significant bit first. crc is the finished CRC of all
// bytes folded in since init (register inverted).
//
// Timing: the register updates on posedge clk; crc is combinational from it.
module crc32 (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           en,
  input  emu_pkg::byte_t data,
  output logic [31:0]    crc
);
  import emu_pkg::*;
  logic [31:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n || init) r <= CRC_INIT;
    else if (en)        r <= crc32_byte(r, data);
  end

  assign crc = r ^ CRC_XOROUT;
endmodule
