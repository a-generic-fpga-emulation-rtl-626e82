// dpth: a small example design under verification, with the port list of the
// framework's signal-promotion example: two 64-bit operands, a 64-bit result, and
// three internal signals (the operand registers x1 and x2 and the control unit's
// enable) promoted to top-level outputs named annotated_<instance>_<signal> so the
// output scan chains can observe them.
//
// What it computes is this design's own choice (the framework does not define it;
// it only uses small adders and similar circuits as examples): a two-phase
// adder. With enable low the operand registers load input1 and input2; with enable
// high the result register takes x1 + x2. The control unit toggles enable every
// clock, so a new sum appears every second clock. The result port is named
// result rather than "output", which is a keyword.
//
// Timing: everything updates on posedge clock; reset is synchronous, active high.
module dpth (
  input  logic        clock,
  input  logic        reset,
  input  logic [63:0] input1,
  input  logic [63:0] input2,
  output logic [63:0] result,
  output logic [63:0] annotated_dpth_x1,
  output logic [63:0] annotated_dpth_x2,
  output logic        annotated_dpth_control_enable
);
  logic [63:0] x1, x2, acc;
  logic        enable;

  always_ff @(posedge clock) begin
    if (reset) begin
      x1     <= '0;
      x2     <= '0;
      acc    <= '0;
      enable <= 1'b0;
    end else begin
      enable <= ~enable;
      if (!enable) begin
        x1 <= input1;
        x2 <= input2;
      end else begin
        acc <= x1 + x2;
      end
    end
  end

  assign result                        = acc;
  assign annotated_dpth_x1             = x1;
  assign annotated_dpth_x2             = x2;
  assign annotated_dpth_control_enable = enable;
endmodule
