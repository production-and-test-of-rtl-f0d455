// Self-checking test of the two-threshold cluster test.
// Drives random crosses and thresholds (plus directed corner cases: a
// single high pixel alone, a high pixel with a low neighbour, equality with
// a threshold) and compares the hit output with a pairwise reference.
module tb_cluster_detect;
  import carlos_pkg::*;

  cross_t      win;
  thresholds_t th;
  logic        hit;
  int          checks = 0, failures = 0;

  cluster_detect dut (.win(win), .th(th), .hit(hit));

  function automatic bit ref_hit(cross_t w, thresholds_t t);
    int p[5] = '{int'(w.north), int'(w.south), int'(w.east), int'(w.west), int'(w.center)};
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        if (i != j && p[i] > int'(t.th_hi) && p[j] > int'(t.th_lo)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_one(string what);
    #1;
    checks++;
    if (hit !== ref_hit(win, th)) begin
      failures++;
      $display("FAIL %s: cross=%h th=%h hit=%b", what, win, th, hit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    th = '{th_hi: 8'd100, th_lo: 8'd30};
    // single high pixel, nothing else: noise spike, rejected
    win = '{north: 8'd0, south: 8'd0, east: 8'd0, west: 8'd0, center: 8'd200};
    check_one("lone spike");
    if (hit !== 1'b0) failures++;
    checks++;
    // high pixel on a neighbour with low pixel in the centre position
    win = '{north: 8'd150, south: 8'd0, east: 8'd31, west: 8'd0, center: 8'd0};
    check_one("high north, low east");
    if (hit !== 1'b1) failures++;
    checks++;
    // equality is not "above"
    win = '{north: 8'd100, south: 8'd30, east: 8'd30, west: 8'd30, center: 8'd30};
    check_one("at thresholds");
    if (hit !== 1'b0) failures++;
    checks++;
    // two high pixels, nothing else: each is the "other" of the other
    win = '{north: 8'd0, south: 8'd0, east: 8'd101, west: 8'd101, center: 8'd0};
    check_one("two highs");
    if (hit !== 1'b1) failures++;
    checks++;
    for (int n = 0; n < 20000; n++) begin
      th.th_hi = 8'($urandom_range(0, 255));
      th.th_lo = (n % 7 == 0) ? 8'($urandom_range(0, 255)) : 8'($urandom_range(0, int'(th.th_hi)));
      win = cross_t'({$urandom, 8'($urandom)});
      // bias towards the interesting region around the thresholds
      if (n % 2 == 0) begin
        win.north  = 8'(int'(th.th_lo) + $urandom_range(0, 3) - 1);
        win.center = 8'(int'(th.th_hi) + $urandom_range(0, 3) - 1);
        win.east   = 8'($urandom_range(0, int'(th.th_lo)));
        win.west   = 8'($urandom_range(0, int'(th.th_lo)));
        win.south  = 8'($urandom_range(0, int'(th.th_lo)));
      end
      check_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
