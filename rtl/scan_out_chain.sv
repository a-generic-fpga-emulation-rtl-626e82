// scan_out_chain: the output scan chains of the DUV layer, N_OUT master-slave cells
// grouped in sets of 32, observing the DUV primary outputs and promoted internal nodes.
//
// Observed signal 32*s+b is cell b of set s. With ce_m high every master samples
// its signal in one ckT cycle. With load high and ce_s high every slave takes its
// master's value; with load low and ce_s high the slaves shift one set towards
// set 0, and word_out is always set 0's slaves. After a load, word_out shows set 0,
// and each further shift presents the next set: ceil(N_OUT/32) words in as many
// cycles. Zeros shift into the top set. Padding cells beyond N_OUT read 0.
//
// Timing: all registers update on posedge ckT; word_out is registered.
module scan_out_chain #(
  parameter int unsigned N_OUT = 193,
  localparam int unsigned SETS = (N_OUT + 31) / 32
) (
  input  logic             ckT,
  input  logic             rst_n,
  input  logic [N_OUT-1:0] duv_out,
  input  logic             ce_m,
  input  logic             load,
  input  logic             ce_s,
  output emu_pkg::word_t   word_out
);
  logic [SETS*32-1:0] din_pad, sout, sin;

  always_comb begin
    din_pad = '0;
    din_pad[N_OUT-1:0] = duv_out;
    sin = '0;
    for (int s = 0; s + 1 < SETS; s++)
      sin[s*32 +: 32] = sout[(s+1)*32 +: 32];
  end

  for (genvar i = 0; i < SETS * 32; i++) begin : g_cell
    scan_out_cell u_cell (
      .ckT  (ckT),
      .rst_n(rst_n),
      .din  (din_pad[i]),
      .ce_m (ce_m),
      .ctrl (load),
      .ce_s (ce_s),
      .sin  (sin[i]),
      .sout (sout[i])
    );
  end

  assign word_out = sout[31:0];
endmodule
