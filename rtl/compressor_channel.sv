// One bi-dimensional compressor channel (one half-detector).
//
// An event is ANODES anodes of LEN = len_m1+1 samples, streamed anode by
// anode, one 8-bit sample per clock at most (din_valid). The channel
//   1. builds the five-pixel cross around every pixel (cross_window),
//   2. applies the two-threshold cluster test (cluster_detect),
//   3. encodes each kept centre value, with its position for an isolated
//      cluster and without it for a continuation (cluster_encoder),
//   4. packs the records into 16-bit words (word_packer).
// Pixels that fail the test produce no output at all.
//
// Event control (this design's choice; the published description gives
// no framing signals): the first valid sample after reset or after the
// previous event is anode 0, sample 0. After the last sample of anode
// ANODES-1 the channel raises busy and pushes LEN+2 zero samples of its
// own to bring out the crosses of the last anode, then waits for the
// packer's out_last word. Samples offered while busy are ignored and set
// the sticky in_err flag. len_m1 and the thresholds are sampled at the
// start of each event and held for the whole event.
//
// Latency: the record of pixel (a, s) is ready LEN+2 pushes after the pixel
// arrived plus three clocks (cross register, encoder, packer output).
// Throughput: one sample per clock in, at most one word per clock out.
module compressor_channel
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES      = 256,
  parameter int unsigned MAX_SAMPLES = 256,
  localparam int unsigned NW = $clog2(ANODES),
  localparam int unsigned SW = $clog2(MAX_SAMPLES),
  localparam int unsigned REC_W  = 1 + NW + SW + VCODE_MAX,
  localparam int unsigned RLEN_W = $clog2(REC_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] len_m1,
  input  thresholds_t   th,
  input  logic          din_valid,
  input  pixel_t        din,
  output logic          busy,
  output logic          out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic          out_last,
  output logic          in_err,
  output logic          overflow
);

  typedef enum logic [1:0] {S_RUN, S_FLUSH, S_DRAIN} state_t;

  state_t        state;
  logic [NW-1:0] in_a;
  logic [SW-1:0] in_s;
  logic [SW+1:0] flush_cnt;
  logic          started;      // at least one sample of this event taken
  logic [SW-1:0] len_q;
  thresholds_t   th_q;

  logic   push;
  pixel_t push_data;
  logic   take;

  assign take      = (state == S_RUN) && din_valid;
  assign push      = take || (state == S_FLUSH);
  assign push_data = (state == S_FLUSH) ? '0 : din;
  logic   pk_busy;
  assign busy      = (state != S_RUN) || pk_busy;

  // sizes in force for this event: follow the inputs until its first sample
  logic [SW-1:0] len_cur;
  thresholds_t   th_cur;
  assign len_cur = started ? len_q : len_m1;
  assign th_cur  = started ? th_q  : th;

  logic last_rec_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RUN;
      in_a      <= '0;
      in_s      <= '0;
      flush_cnt <= '0;
      started   <= 1'b0;
      len_q     <= '0;
      th_q      <= '0;
      in_err    <= 1'b0;
    end else begin
      if (busy && din_valid) in_err <= 1'b1;
      unique case (state)
        S_RUN: if (take) begin
          if (!started) begin
            started <= 1'b1;
            len_q   <= len_m1;
            th_q    <= th;
          end
          if (in_s == len_cur) begin
            in_s <= '0;
            if (in_a == NW'(ANODES - 1)) begin
              in_a      <= '0;
              flush_cnt <= '0;
              state     <= S_FLUSH;
            end else begin
              in_a <= in_a + 1'b1;
            end
          end else begin
            in_s <= in_s + 1'b1;
          end
        end
        S_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == {2'b00, len_q} + (SW+2)'(2)) state <= S_DRAIN;  // LEN+2 pushes
        end
        S_DRAIN: if (last_rec_out) begin
          state   <= S_RUN;
          started <= 1'b0;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  // the cross window restarts its counters once the last cross is out
  logic win_clear;
  assign win_clear = (state == S_DRAIN);

  cross_t        win;
  logic          win_valid, center_last;
  logic [NW-1:0] c_anode;
  logic [SW-1:0] c_sample;
  logic          hit;

  cross_window #(.ANODES(ANODES), .MAX_SAMPLES(MAX_SAMPLES)) u_window (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (win_clear),
    .push         (push),
    .din          (push_data),
    .len_m1       (len_cur),
    .win_valid    (win_valid),
    .win        (win),
    .center_anode (c_anode),
    .center_sample(c_sample),
    .center_last  (center_last)
  );

  cluster_detect u_detect (
    .win(win),
    .th   (th_cur),
    .hit  (hit)
  );

  logic                 rec_valid, rec_last;
  logic                 rec_cont;   // record kind, for observation only
  logic [REC_W-1:0]     rec_bits;
  logic [RLEN_W-1:0]    rec_len;

  cluster_encoder #(.AN_W(NW), .SM_W(SW)) u_encoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .eval     (win_valid),
    .hit      (hit),
    .in_last  (center_last),
    .value    (win.center),
    .anode    (c_anode),
    .sample   (c_sample),
    .rec_valid(rec_valid),
    .rec_bits (rec_bits),
    .rec_len  (rec_len),
    .rec_last (rec_last),
    .rec_cont (rec_cont)
  );

  word_packer #(.IN_W(REC_W), .WORD_W(WORD_W)) u_packer (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rec_valid),
    .in_bits  (rec_bits),
    .in_len   (rec_len),
    .in_last  (rec_last),
    .out_valid(out_valid),
    .out_word (out_word),
    .out_last (out_last),
    .busy     (pk_busy),
    .overflow (overflow)
  );

  assign last_rec_out = out_valid && out_last;

endmodule
