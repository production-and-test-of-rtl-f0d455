// Serial configuration register of the chip.
//
// The chip is configured through a serial signal; this block holds what
// the compressors need: the number of samples per anode (8..MAX_SAMPLES)
// and the high/low threshold pair of each channel. The serial protocol is
// not published, so this design uses the simplest one in the system
// clock domain: while cfg_en is high, one bit of cfg_sdi is shifted in per
// clock, most significant bit first, into a shadow register; a cfg_load
// pulse copies the shadow into the active registers. cfg_sdo is the bit
// leaving the shadow register, so several chips can be daisy-chained or
// the pattern read back.
//
// Frame (CFG_W = SAMPLE_W + 16*CHANNELS bits, first bit sent first):
//   len_m1 (samples per anode minus one), then for channel 0, 1, ...:
//   th_hi, th_lo.
// A length below 8 samples is raised to 8. After reset the length is
// MAX_SAMPLES and both thresholds are 255, so nothing passes the cluster
// test until the chip is configured.
module serial_config
  import carlos_pkg::*;
#(
  parameter int unsigned CHANNELS    = 2,
  parameter int unsigned MAX_SAMPLES = 256,
  localparam int unsigned SW         = $clog2(MAX_SAMPLES),
  localparam int unsigned CFG_W      = SW + 2 * PIX_W * CHANNELS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_en,
  input  logic          cfg_sdi,
  input  logic          cfg_load,
  output logic          cfg_sdo,
  output logic [SW-1:0] len_m1,
  output thresholds_t   th [CHANNELS]
);

  localparam logic [SW-1:0] MIN_LEN_M1 = SW'(7);

  logic [CFG_W-1:0] shadow;
  logic [CFG_W-1:0] active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      active <= {SW'(MAX_SAMPLES - 1), {(2 * PIX_W * CHANNELS){1'b1}}};
    end else begin
      if (cfg_en) shadow <= {shadow[CFG_W-2:0], cfg_sdi};
      if (cfg_load) begin
        active <= shadow;
        if (shadow[CFG_W-1 -: SW] < MIN_LEN_M1) active[CFG_W-1 -: SW] <= MIN_LEN_M1;
      end
    end
  end

  assign cfg_sdo = shadow[CFG_W-1];
  assign len_m1  = active[CFG_W-1 -: SW];

  for (genvar c = 0; c < CHANNELS; c++) begin : g_th
    assign th[c] = active[(CHANNELS - 1 - c) * 2 * PIX_W +: 2 * PIX_W];
  end

endmodule
