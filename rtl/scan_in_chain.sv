// scan_in_chain: the input scan chains of the DUV layer, N_IN cells grouped in sets
// of 32 (one set per 32-bit word from the adaptation layer).
//
// Bit b of every set belongs to chain b: the 32 chains run side by side, so one
// 32-bit word is stored per ckT cycle and ceil(N_IN/32) cycles load every input
// (420 inputs take 14 sets and 14 cycles). A shift (ce high) moves each set's
// contents one set down, towards set 0, and writes word_in into set len-1, so
// after len shifts the first word sent sits in set 0 and the last in set len-1.
// The len input is the chain length the host configures (1..SETS); the choice of
// entry point is this design's way of honouring a shorter configured length.
// Set s bit b drives DUV input 32*s+b. Cells beyond N_IN in the last set pad the
// set to 32 bits and drive nothing; their unused DUV-side outputs are the one lint
// warning this module leaves, and they cost a multiplexer each only until synthesis
// removes them.
//
// Timing: one word is taken on every posedge ckT with ce high; duv_in follows
// the cells combinationally (see scan_in_cell).
module scan_in_chain #(
  parameter int unsigned N_IN = 420,
  localparam int unsigned SETS = (N_IN + 31) / 32,
  localparam int unsigned LEN_W = $clog2(SETS + 1)
) (
  input  logic              ckT,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [LEN_W-1:0]  len,
  input  emu_pkg::word_t    word_in,
  input  logic              test_mode,
  input  logic [N_IN-1:0]   pins,
  output logic [N_IN-1:0]   duv_in
);
  logic [SETS*32-1:0] pins_pad, dout, sout;
  logic [SETS*32-1:0] sin;

  always_comb begin
    pins_pad = '0;
    pins_pad[N_IN-1:0] = pins;
  end

  // Set s takes the new word when it is the configured entry set, else the set above.
  always_comb begin
    for (int s = 0; s < SETS; s++) begin
      if (s == SETS - 1 || s + 1 == int'(len))
        sin[s*32 +: 32] = word_in;
      else
        sin[s*32 +: 32] = sout[(s+1)*32 +: 32];
    end
  end

  for (genvar i = 0; i < SETS * 32; i++) begin : g_cell
    scan_in_cell u_cell (
      .ckT      (ckT),
      .rst_n    (rst_n),
      .ce       (ce),
      .sin      (sin[i]),
      .sout     (sout[i]),
      .pin      (pins_pad[i]),
      .test_mode(test_mode),
      .dout     (dout[i])
    );
  end

  assign duv_in = dout[N_IN-1:0];
endmodule
