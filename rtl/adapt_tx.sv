// adapt_tx: transmit side of the adaptation layer. It queues the reply to each
// request (the command word as header, then, for a stimulus, the n_out result words
// the DUV layer shifts out) and writes it to the communication layer one byte per
// cycle, bits 31:24 of each word first.
//
// A word FIFO absorbs the DUV layer's one-word-per-cycle burst while the byte
// serializer needs four cycles per word. Each FIFO entry carries a last flag: the
// header is last when no data follows, a data word is last when the DUV layer marks
// it. After the last byte, done pulses and the block waits for ack from the
// communication layer (frame sent) before it reports idle again. tx_busy is high
// from the header push until that ack. Byte order and the wr_en/done/ack names
// follow the framework's trace; the FIFO depth and last-flag scheme are this
// design's choices.
//
// Timing: bytes leave at one per ckT cycle; done is one cycle after the last byte.
module adapt_tx #(
  parameter int unsigned OUT_SETS = 7,
  localparam int unsigned DEPTH = OUT_SETS + 1
) (
  input  logic           ckT,
  input  logic           rst_n,
  // from the receive side
  input  logic           hdr_valid,
  input  emu_pkg::word_t hdr_word,
  input  logic           hdr_has_data,
  output logic           tx_busy,
  // from the DUV layer
  input  emu_pkg::word_t data_o,
  input  logic           data_av_o,
  input  logic           data_last_o,
  // to the communication layer
  output logic           wr_en,
  output emu_pkg::byte_t data_comet,
  output logic           done,
  input  logic           ack
);
  import emu_pkg::*;

  logic        push, pop, empty, full;
  logic [32:0] din, dout;
  logic [1:0]  byte_idx;
  logic        wait_ack, busy_q;

  assign push = hdr_valid || data_av_o;
  assign din  = hdr_valid ? {!hdr_has_data, hdr_word} : {data_last_o, data_o};

  sync_fifo #(.WIDTH(33), .DEPTH(DEPTH)) u_fifo (
    .clk(ckT), .rst_n, .push, .din, .pop, .dout, .empty, .full
  );

  assign wr_en = !empty && !wait_ack;
  always_comb begin
    unique case (byte_idx)
      2'd0: data_comet = dout[31:24];
      2'd1: data_comet = dout[23:16];
      2'd2: data_comet = dout[15:8];
      default: data_comet = dout[7:0];
    endcase
  end
  assign pop = wr_en && (byte_idx == 2'd3);

  always_ff @(posedge ckT) begin
    if (!rst_n) begin
      byte_idx <= '0;
      wait_ack <= 1'b0;
      done     <= 1'b0;
      busy_q   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (hdr_valid) busy_q <= 1'b1;
      if (wr_en) byte_idx <= byte_idx + 2'd1;
      if (pop && dout[32]) begin
        done     <= 1'b1;
        wait_ack <= 1'b1;
      end
      if (wait_ack && ack) begin
        wait_ack <= 1'b0;
        busy_q   <= 1'b0;
      end
    end
  end

  assign tx_busy = busy_q || hdr_valid;

  // The FIFO holds a whole reply (header plus OUT_SETS words), so it never fills.
  a_fifo_never_full: assert property (@(posedge ckT) disable iff (!rst_n) push |-> !full);
  a_hdr_data_exclusive: assert property (@(posedge ckT) disable iff (!rst_n)
    !(hdr_valid && data_av_o));
endmodule
