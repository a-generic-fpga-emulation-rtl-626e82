// scan_out_cell: one master-slave output scan-chain cell, observing one DUV output
// or one promoted internal node.
//
// The master flip-flop (enable ce_m) samples the observed DUV signal din at the end
// of a DUV clock cycle. A multiplexer in front of the slave flip-flop (enable ce_s)
// selects the master value when ctrl is high (parallel load) or the previous cell's
// sout when ctrl is low (shift). Because the slave holds the word being shifted, the
// master can take the next capture independently of the unload. Cell structure
// follows the framework's scan library; the polarity of ctrl and the synchronous
// active-low reset are this design's choices.
//
// Timing: every register updates on posedge ckT; sout is the slave flip-flop.
module scan_out_cell (
  input  logic ckT,
  input  logic rst_n,
  input  logic din,
  input  logic ce_m,
  input  logic ctrl,
  input  logic ce_s,
  input  logic sin,
  output logic sout
);
  logic master_q, slave_q;

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      master_q <= 1'b0;
      slave_q  <= 1'b0;
    end else begin
      if (ce_m) master_q <= din;
      if (ce_s) slave_q  <= ctrl ? master_q : sin;
    end
  end

  assign sout = slave_q;
endmodule
