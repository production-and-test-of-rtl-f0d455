// Two-threshold cluster test on one five-pixel cross.
//
// A cross is a cluster when at least one of its five pixels is above the
// high threshold and, at the same time, at least one *other* pixel of the
// cross is above the low threshold. "Above" is taken as strictly greater.
// The test is written exactly as stated, as an OR over the pixel that
// carries the high hit, so it stays correct even if the two thresholds
// are programmed the wrong way round. Purely combinational.
module cluster_detect
  import carlos_pkg::*;
(
  input  cross_t      win,
  input  thresholds_t th,
  output logic        hit
);

  pixel_t     px [5];
  logic [4:0] hi, lo;

  always_comb begin
    px[0] = win.north;
    px[1] = win.south;
    px[2] = win.east;
    px[3] = win.west;
    px[4] = win.center;
    for (int i = 0; i < 5; i++) begin
      hi[i] = px[i] > th.th_hi;
      lo[i] = px[i] > th.th_lo;
    end
    hit = 1'b0;
    for (int i = 0; i < 5; i++) begin
      // another pixel than i above the low threshold
      hit |= hi[i] & |(lo & ~(5'b1 << i));
    end
  end

endmodule
