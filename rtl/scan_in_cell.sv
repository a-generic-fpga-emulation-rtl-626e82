// scan_in_cell: one input scan-chain cell, placed in front of one DUV primary input.
//
// A flip-flop clocked by the system clock ckT holds the stimulus bit. When ce is
// high the flip-flop takes the bit arriving on sin (from the adaptation layer for
// the first set of a chain, from the previous set's sout otherwise), so a chain of
// cells shifts one position per ckT cycle. A multiplexer drives the DUV input:
// with test_mode high it is the scanned bit, with test_mode low it is the FPGA pin.
// Cell structure (flip-flop with ce, mux under test_mode, sin/sout) follows the
// framework's scan library; the synchronous active-low reset is this design's choice.
//
// Timing: sout changes one ckT edge after a cycle with ce high; dout is combinational
// from the flip-flop, the pin and test_mode.
module scan_in_cell (
  input  logic ckT,
  input  logic rst_n,
  input  logic ce,
  input  logic sin,
  output logic sout,
  input  logic pin,
  input  logic test_mode,
  output logic dout
);
  logic q;

  always_ff @(posedge ckT) begin
    if (!rst_n)  q <= 1'b0;
    else if (ce) q <= sin;
  end

  assign sout = q;
  assign dout = test_mode ? q : pin;
endmodule
