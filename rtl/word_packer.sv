// Packs variable-length records into fixed 16-bit output words.
//
// Records enter right-aligned with their length (up to IN_W bits, at most
// one per clock) and are appended, first bit first, to a bit accumulator.
// Whenever the accumulator holds a full word, its oldest 16 bits leave as
// one output word, so the output side writes at most one word per clock.
// in_last marks the last record of an event (in_valid may be low with it
// if the last pixel of the event was not kept): the packer then writes out
// what is left, fills the unused low bits of the final word with ones and
// flags that word with out_last. The tail always holds at least one fill
// bit: if the event's bits fill whole words, or nothing was written at
// all, the last word is all ones. Every event therefore ends with exactly
// one out_last word. A one-filled tail cannot be mistaken for a record,
// because a record starting with '1' is at least 22 bits long at the
// default field widths (the anode and sample fields must total at least 11
// bits for this to hold). Packing into 16-bit words follows the chip
// description; the bit order and the padding rule are this design's
// choices.
//
// The accumulator is sized for the worst burst the cluster encoder can
// produce (isolated records back to back across an anode boundary followed
// by continuations): an exhaustive search over hit patterns gives a peak of
// 53 bits. Overflow is a sticky error flag, and an assertion in simulation.
// Output is registered: out_valid/out_word/out_last appear the cycle after
// the accumulator holds the word. busy is high from in_last until the last
// word has left; no record may arrive while it is high.
module word_packer #(
  parameter int unsigned IN_W   = 27,
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ACC_W  = 64,
  localparam int unsigned LW    = $clog2(IN_W + 1),
  localparam int unsigned CW    = $clog2(ACC_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_bits,
  input  logic [LW-1:0]     in_len,
  input  logic              in_last,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic              out_last,
  output logic              busy,
  output logic              overflow
);

  logic [ACC_W-1:0] acc;
  logic [CW-1:0]    cnt;        // valid bits, oldest at acc[cnt-1]
  logic             flushing;

  logic             emit_full, emit_tail;
  logic [CW-1:0]    cnt_after_emit;
  logic [CW:0]      cnt_next_wide;
  logic [WORD_W-1:0] word_full, word_tail;

  always_comb begin
    emit_full      = cnt >= CW'(WORD_W);
    emit_tail      = flushing && !emit_full;
    cnt_after_emit = emit_full ? cnt - CW'(WORD_W) : (emit_tail ? '0 : cnt);
    cnt_next_wide  = {1'b0, cnt_after_emit} + (in_valid ? (CW+1)'(in_len) : '0);
    word_full      = WORD_W'(acc >> (cnt - CW'(WORD_W)));
    // fewer than WORD_W bits left: left-justify them and fill with ones
    word_tail = WORD_W'(({{WORD_W{1'b0}}, acc[WORD_W-1:0]} << (CW'(WORD_W) - cnt)) |
                        (((2*WORD_W)'(1) << (CW'(WORD_W) - cnt)) - 1'b1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      flushing  <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_last  <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= emit_full || emit_tail;
      out_last  <= emit_tail;
      if (emit_full)      out_word <= word_full;
      else if (emit_tail) out_word <= word_tail;
      if (emit_tail) flushing <= 1'b0;
      if (in_last) flushing <= 1'b1;
      if (in_valid) acc <= (acc << in_len) | ACC_W'(in_bits);
      if (cnt_next_wide > (CW+1)'(ACC_W)) begin
        overflow <= 1'b1;
        cnt      <= CW'(ACC_W);
      end else begin
        cnt <= cnt_next_wide[CW-1:0];
      end
    end
  end

  assign busy = flushing;

  // a record may not arrive while the previous event is being closed
  a_no_input_while_flushing: assert property (@(posedge clk) disable iff (!rst_n)
    flushing |-> !in_valid);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(cnt_next_wide > (CW+1)'(ACC_W)));

endmodule
