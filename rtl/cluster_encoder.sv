// Record encoder for the pixels kept by the cluster test.
//
// For every evaluated cross (eval high) the encoder decides what, if
// anything, goes to the output. Nothing is written when hit is low. When
// hit is high the centre value is written with a short-codes-for-small-
// values prefix code (see carlos_pkg). If the previous evaluated pixel of
// the same anode was also kept, the new one is a continuation and its
// position is implied (previous position + 1 sample), so only '0' and the
// value code are written. Otherwise it is an isolated cluster, or the start
// of a multiple one, and '1', the anode index and the sample index precede
// the value code. That split follows the published algorithm; the bit
// layout is this design's own.
//
// Timing: one register stage. rec_valid/rec_bits/rec_len appear the cycle
// after eval. rec_bits is right-aligned, first bit to send at bit
// rec_len-1. rec_last repeats in_last of an evaluated cross (the last pixel
// of an event), whether it was kept or not.
module cluster_encoder
  import carlos_pkg::*;
#(
  parameter int unsigned AN_W  = 8,
  parameter int unsigned SM_W = 8,
  localparam int unsigned REC_W   = 1 + AN_W + SM_W + VCODE_MAX,
  localparam int unsigned RLEN_W  = $clog2(REC_W + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                eval,
  input  logic                hit,
  input  logic                in_last,
  input  pixel_t              value,
  input  logic [AN_W-1:0]  anode,
  input  logic [SM_W-1:0] sample,
  output logic                rec_valid,
  output logic [REC_W-1:0]    rec_bits,
  output logic [RLEN_W-1:0]   rec_len,
  output logic                rec_last,
  output logic                rec_cont   // record is a continuation
);

  logic                 prev_hit;
  logic                 cont;
  logic [VCODE_MAX-1:0] vcode;
  logic [3:0]           vlen;

  always_comb begin
    vcode = value_code(value, vlen);
    cont  = prev_hit && (sample != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_hit  <= 1'b0;
      rec_valid <= 1'b0;
      rec_bits  <= '0;
      rec_len   <= '0;
      rec_last  <= 1'b0;
      rec_cont  <= 1'b0;
    end else begin
      rec_valid <= eval && hit;
      rec_last  <= eval && in_last;
      if (eval) begin
        prev_hit <= hit;
        rec_cont <= cont;
        if (cont) begin
          rec_bits <= REC_W'(vcode);             // '0' flag is the zero above
          rec_len  <= RLEN_W'(vlen) + 1'b1;
        end else begin
          rec_bits <= (REC_W'({1'b1, anode, sample}) << vlen) | REC_W'(vcode);
          rec_len  <= RLEN_W'(vlen) + RLEN_W'(1 + AN_W + SM_W);
        end
      end
    end
  end

endmodule
