// duv_layer: the wrapper around the design under verification (DUV). It holds the
// input scan chains, the master-slave output scan chains, the sequencer and the
// DUV clock multiplexer. The DUV itself is instantiated next to it by the top level
// and connects through duv_in, duv_out and ckDUV, so the wrapper is independent of
// the DUV: only N_IN (primary inputs) and N_OUT (primary outputs plus promoted
// internal nodes) change from one DUV to the next.
//
// In emulation (test_mode high) every DUV input comes from its scan cell and ckDUV
// is the sequencer's generated clock: each stimulus of n_in words gives exactly one
// ckDUV pulse, clk_high ckT cycles wide, and n_out result words. With test_mode low
// the DUV inputs come from pins and ckDUV is ckT, i.e. the DUV runs free as in a
// prototype. The adaptation-layer side uses the signal names of the framework's
// traces: data_i/data_av_i in, data_o/data_av_o out.
//
// Timing: see duv_ctrl; data_o is valid in every cycle with data_av_o high.
module duv_layer #(
  parameter int unsigned N_IN  = 420,
  parameter int unsigned N_OUT = 193,
  localparam int unsigned IN_SETS  = (N_IN + 31) / 32,
  localparam int unsigned OUT_SETS = (N_OUT + 31) / 32,
  localparam int unsigned IN_W  = $clog2(IN_SETS + 1),
  localparam int unsigned OUT_W = $clog2(OUT_SETS + 1)
) (
  input  logic             ckT,
  input  logic             rst_n,
  input  logic             test_mode,
  input  logic [IN_W-1:0]  n_in,
  input  logic [OUT_W-1:0] n_out,
  input  logic [7:0]       clk_high,
  // adaptation layer
  input  emu_pkg::word_t   data_i,
  input  logic             data_av_i,
  output emu_pkg::word_t   data_o,
  output logic             data_av_o,
  output logic             data_last_o,
  output logic             busy,
  // DUV side
  input  logic [N_IN-1:0]  pins_in,
  output logic [N_IN-1:0]  duv_in,
  input  logic [N_OUT-1:0] duv_out,
  output logic             ckDUV
);
  logic in_ce, out_ce_m, out_load, out_ce_s, duv_clk;

  duv_ctrl #(.IN_SETS(IN_SETS), .OUT_SETS(OUT_SETS)) u_ctrl (
    .ckT, .rst_n, .n_in, .n_out, .clk_high, .data_av_i,
    .data_av_o, .data_last_o, .busy,
    .in_ce, .out_ce_m, .out_load, .out_ce_s, .duv_clk
  );

  scan_in_chain #(.N_IN(N_IN)) u_scan_in (
    .ckT, .rst_n, .ce(in_ce), .len(n_in), .word_in(data_i),
    .test_mode, .pins(pins_in), .duv_in
  );

  scan_out_chain #(.N_OUT(N_OUT)) u_scan_out (
    .ckT, .rst_n, .duv_out, .ce_m(out_ce_m), .load(out_load), .ce_s(out_ce_s),
    .word_out(data_o)
  );

  // DUV clock: generated pulse in emulation, system clock in free-running mode.
  assign ckDUV = test_mode ? duv_clk : ckT;
endmodule
