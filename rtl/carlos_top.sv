// Two-channel readout compressor for one silicon drift detector.
//
// A detector is read as two half-detectors of ANODES anodes each; every
// half-detector delivers its event as a stream of 8-bit samples, anode by
// anode, at up to one sample per 40 MHz clock. Each stream has its own
// bi-dimensional compressor channel, which keeps only the pixels that
// belong to a cluster (two-threshold test on the five-pixel cross) and
// writes them as variable-length records packed into 16-bit words, at most
// one word per clock per channel. Both channels share one serial
// configuration register, which sets the number of samples per anode
// (8..MAX_SAMPLES, common to both) and a high/low threshold pair per
// channel. The chip's four anode line-buffer RAMs are the two in each
// channel's cross window.
//
// Ports per channel c: din_valid[c]/din[c] in; out_valid[c]/out_word[c]/
// out_last[c] out, out_last marking the final word of an event; busy[c]
// high while the channel closes an event (inputs are then ignored and
// raise in_err[c]); overflow[c] a sticky packer error that the encoding
// cannot reach in normal operation.
//
// The JTAG switch function of the chip and the link to the counting room
// are not part of this RTL: their behaviour is not published. The 16-bit
// words are brought out as plain ports instead.
module carlos_top
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES      = 256,
  parameter int unsigned MAX_SAMPLES = 256,
  parameter int unsigned CHANNELS    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // serial configuration
  input  logic              cfg_en,
  input  logic              cfg_sdi,
  input  logic              cfg_load,
  output logic              cfg_sdo,
  // front-end sample streams
  input  logic              din_valid [CHANNELS],
  input  pixel_t            din       [CHANNELS],
  output logic              busy      [CHANNELS],
  // compressed output words
  output logic              out_valid [CHANNELS],
  output logic [WORD_W-1:0] out_word  [CHANNELS],
  output logic              out_last  [CHANNELS],
  // error flags
  output logic              in_err    [CHANNELS],
  output logic              overflow  [CHANNELS]
);

  localparam int unsigned SW = $clog2(MAX_SAMPLES);

  logic [SW-1:0] len_m1;
  thresholds_t   th [CHANNELS];

  serial_config #(.CHANNELS(CHANNELS), .MAX_SAMPLES(MAX_SAMPLES)) u_cfg (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_en  (cfg_en),
    .cfg_sdi (cfg_sdi),
    .cfg_load(cfg_load),
    .cfg_sdo (cfg_sdo),
    .len_m1  (len_m1),
    .th      (th)
  );

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    compressor_channel #(.ANODES(ANODES), .MAX_SAMPLES(MAX_SAMPLES)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .len_m1   (len_m1),
      .th       (th[c]),
      .din_valid(din_valid[c]),
      .din      (din[c]),
      .busy     (busy[c]),
      .out_valid(out_valid[c]),
      .out_word (out_word[c]),
      .out_last (out_last[c]),
      .in_err   (in_err[c]),
      .overflow (overflow[c])
    );
  end

endmodule
