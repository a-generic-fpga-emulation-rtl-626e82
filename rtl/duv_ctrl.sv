// duv_ctrl: the DUV layer's sequencer. It turns a stream of stimulus words into one
// DUV clock cycle and a stream of result words, following the per-stimulus chain of
// events of the framework:
//   1  load: n_in words from the adaptation layer shift into the input chains
//      (in_ce follows data_av_i, one word per ckT cycle);
//   2/3 the DUV clock ckDUV rises and stays high for clk_high ckT cycles;
//   4  the DUV clock falls (one ckT cycle with the clock low);
//   then the output masters capture the DUV outputs (ce_m), the slaves take the
//   masters (out_load), and n_out words are shifted to the adaptation layer, one per
//   ckT cycle, with data_av_o high and data_last_o marking the final word.
// The order of the events and the run-time lengths and clock-high count come from
// the framework; the single low cycle before capture, the separate capture and
// slave-load cycles and the data_last_o flag are this design's choices.
// Words arriving while the sequencer is busy are ignored (flagged by an assertion).
//
// Timing: duv_clk is a register output, so ckDUV edges follow ckT rising edges.
// The first result word is presented clk_high + 4 ckT cycles after the cycle of the
// last stimulus word (clock high, one low cycle, capture, slave load).
module duv_ctrl #(
  parameter int unsigned IN_SETS  = 14,
  parameter int unsigned OUT_SETS = 7,
  localparam int unsigned IN_W  = $clog2(IN_SETS + 1),
  localparam int unsigned OUT_W = $clog2(OUT_SETS + 1)
) (
  input  logic             ckT,
  input  logic             rst_n,
  // run-time configuration
  input  logic [IN_W-1:0]  n_in,       // input sets to load, 1..IN_SETS
  input  logic [OUT_W-1:0] n_out,      // output sets to unload, 1..OUT_SETS
  input  logic [7:0]       clk_high,   // ckT cycles with ckDUV high, 1..255
  // from the adaptation layer
  input  logic             data_av_i,
  // to the adaptation layer
  output logic             data_av_o,
  output logic             data_last_o,
  output logic             busy,
  // chain controls
  output logic             in_ce,
  output logic             out_ce_m,
  output logic             out_load,
  output logic             out_ce_s,
  // generated DUV clock (before the test_mode mux)
  output logic             duv_clk
);
  typedef enum logic [2:0] {S_LOAD, S_CLK_HI, S_CLK_LO, S_CAPTURE, S_SLAVE, S_SHIFT} state_e;
  state_e state;
  logic [IN_W-1:0]  in_cnt;
  logic [OUT_W-1:0] out_cnt;
  logic [7:0]       hi_cnt;

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      in_cnt  <= '0;
      out_cnt <= '0;
      hi_cnt  <= '0;
      duv_clk <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (data_av_i) begin
          if (in_cnt + 1'b1 >= n_in) begin
            in_cnt  <= '0;
            hi_cnt  <= (clk_high == 8'd0) ? 8'd1 : clk_high;
            duv_clk <= 1'b1;
            state   <= S_CLK_HI;
          end else begin
            in_cnt <= in_cnt + 1'b1;
          end
        end
        S_CLK_HI: begin
          hi_cnt <= hi_cnt - 8'd1;
          if (hi_cnt == 8'd1) begin
            duv_clk <= 1'b0;
            state   <= S_CLK_LO;
          end
        end
        S_CLK_LO:  state <= S_CAPTURE;
        S_CAPTURE: state <= S_SLAVE;
        S_SLAVE: begin
          out_cnt <= '0;
          state   <= S_SHIFT;
        end
        S_SHIFT: begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt + 1'b1 >= n_out) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ce       = (state == S_LOAD) && data_av_i;
  assign out_ce_m    = (state == S_CAPTURE);
  assign out_load    = (state == S_SLAVE);
  assign out_ce_s    = (state == S_SLAVE) || (state == S_SHIFT);
  assign data_av_o   = (state == S_SHIFT);
  assign data_last_o = (state == S_SHIFT) && (out_cnt + 1'b1 >= n_out);
  assign busy        = (state != S_LOAD);

  // Stimulus words may only arrive while the sequencer is loading.
  a_no_word_while_busy: assert property (@(posedge ckT) disable iff (!rst_n)
    data_av_i |-> state == S_LOAD);
endmodule
