// adapt_rx: receive side of the adaptation layer. It reads a verified UDP payload
// byte by byte from the communication layer's buffer, packs the bytes into 32-bit
// words (first byte in bits 31:24), decodes the first word as a command and feeds
// stimulus words to the DUV layer.
//
// Commands (see emu_pkg): OP_CFG sets the input and output chain lengths and the
// number of ckT cycles the DUV clock stays high (clamped to 1..IN_SETS,
// 1..OUT_SETS and 1..255); OP_MODE sets test_mode; OP_STIM forwards exactly n_in
// words to the DUV layer with data_av_i, padding a short payload with zero words
// and dropping words beyond n_in. Every command word is also pushed to the
// transmit side as the header of the reply (hdr_has_data high for OP_STIM, whose
// reply carries the n_out result words). A payload is only started when the
// transmit side is idle, so requests and replies alternate. The word packing and
// the run-time configuration follow the framework; the command encoding, the
// padding rule and the reset values (all sets in use, clock high for 8 cycles as in
// the framework's trace, emulation mode) are this design's choices.
//
// Interface to the communication layer: en_in is high while a payload of pay_len
// bytes waits; rden_out requests the next byte, which appears on rx_data in the
// following cycle; rx_done pulses once the payload has been consumed.
// Timing: one byte per ckT cycle, so a word every four cycles.
module adapt_rx #(
  parameter int unsigned IN_SETS   = 14,
  parameter int unsigned OUT_SETS  = 7,
  parameter int unsigned BUF_BYTES = 1472,
  localparam int unsigned IN_W  = $clog2(IN_SETS + 1),
  localparam int unsigned OUT_W = $clog2(OUT_SETS + 1),
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1)
) (
  input  logic             ckT,
  input  logic             rst_n,
  // communication layer
  input  logic             en_in,
  input  logic [LEN_W-1:0] pay_len,
  output logic             rden_out,
  input  emu_pkg::byte_t   rx_data,
  output logic             rx_done,
  // configuration
  output logic [IN_W-1:0]  n_in,
  output logic [OUT_W-1:0] n_out,
  output logic [7:0]       clk_high,
  output logic             test_mode,
  // DUV layer
  output emu_pkg::word_t   data_i,
  output logic             data_av_i,
  // transmit side of the adaptation layer
  input  logic             tx_busy,
  output logic             hdr_valid,
  output emu_pkg::word_t   hdr_word,
  output logic             hdr_has_data
);
  import emu_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_PAD, S_DONE} state_e;
  state_e state;

  logic [LEN_W-1:0] len_q, rd_cnt;     // bytes in payload, read requests issued
  logic             byte_v;            // rx_data valid this cycle
  logic [1:0]       byte_pos;          // position of the arriving byte in its word
  logic [23:0]      part;              // bytes already received of the current word
  logic             first_word;        // next completed word is the command
  logic             stim;              // current payload is a stimulus
  logic [IN_W-1:0]  sent;              // stimulus words forwarded
  word_t            word;
  logic             word_v;

  assign rden_out = (state == S_READ) && (rd_cnt < len_q);
  assign word     = {part, rx_data};
  assign word_v   = byte_v && (byte_pos == 2'd3);

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      len_q     <= '0;
      rd_cnt    <= '0;
      byte_v    <= 1'b0;
      byte_pos  <= '0;
      part      <= '0;
      first_word<= 1'b1;
      stim      <= 1'b0;
      sent      <= '0;
      n_in      <= IN_W'(IN_SETS);
      n_out     <= OUT_W'(OUT_SETS);
      clk_high  <= 8'd8;
      test_mode <= 1'b1;
    end else begin
      byte_v <= rden_out;
      if (rden_out) rd_cnt <= rd_cnt + 1'b1;
      if (byte_v) begin
        byte_pos <= byte_pos + 2'd1;
        part     <= {part[15:0], rx_data};
      end

      // a completed word: command or stimulus
      if (word_v) begin
        first_word <= 1'b0;
        if (first_word) begin
          unique case (word[31:24])
            OP_CFG: begin
              n_in     <= (word[23:16] == 8'd0) ? IN_W'(1)
                        : (int'(word[23:16]) > IN_SETS) ? IN_W'(IN_SETS) : IN_W'(word[23:16]);
              n_out    <= (word[15:8] == 8'd0) ? OUT_W'(1)
                        : (int'(word[15:8]) > OUT_SETS) ? OUT_W'(OUT_SETS) : OUT_W'(word[15:8]);
              clk_high <= (word[7:0] == 8'd0) ? 8'd1 : word[7:0];
            end
            OP_MODE: test_mode <= word[0];
            OP_STIM: stim      <= 1'b1;
            default: ;
          endcase
        end else if (data_av_i) begin
          sent <= sent + 1'b1;
        end
      end
      if (state == S_PAD) sent <= sent + 1'b1;

      unique case (state)
        S_IDLE: if (en_in && !tx_busy) begin
          len_q      <= pay_len;
          rd_cnt     <= '0;
          byte_pos   <= '0;
          first_word <= 1'b1;
          stim       <= 1'b0;
          sent       <= '0;
          state      <= S_READ;
        end
        S_READ: if (rd_cnt == len_q && !byte_v) begin
          state <= (stim && sent < n_in) ? S_PAD : S_DONE;
        end
        S_PAD:  if (sent + 1'b1 >= n_in) state <= S_DONE;
        S_DONE: begin
          stim  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // stimulus words to the DUV layer: payload words, then zero padding
  always_comb begin
    data_av_i = 1'b0;
    data_i    = '0;
    if (state == S_READ && word_v && !first_word && stim && sent < n_in) begin
      data_av_i = 1'b1;
      data_i    = word;
    end else if (state == S_PAD) begin
      data_av_i = 1'b1;
    end
  end

  // reply header: the command word itself
  assign hdr_valid    = word_v && first_word;
  assign hdr_word     = word;
  assign hdr_has_data = (word[31:24] == OP_STIM);
  assign rx_done      = (state == S_DONE);
endmodule
