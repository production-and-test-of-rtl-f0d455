// Self-checking test of the cross window.
// Streams several random events (8 anodes, lengths 8..16 samples, random
// gaps between pushes), pushes LEN+2 extra samples after each one and
// compares every cross that comes out with the matrix: NORTH/SOUTH are the
// neighbouring anodes, EAST/WEST the neighbouring samples, zero outside
// the matrix. Also checks the positions, the order, center_last and that
// the cross appears the cycle after the push that completes it.
module tb_cross_window;
  import carlos_pkg::*;
  import tb_carlos_model_pkg::*;
  localparam int NA = 8, MS = 16;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         clear, push;
  pixel_t       din;
  logic [3:0]   len_m1;
  logic         win_valid, center_last;
  cross_t       win;
  logic [2:0]   c_anode;
  logic [3:0]   c_sample;
  int           checks = 0, failures = 0;
  byte unsigned m[];
  int           len, exp_q, n_seen;
  int           npush;

  always #5 clk = ~clk;

  cross_window #(.ANODES(NA), .MAX_SAMPLES(MS)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .push(push), .din(din), .len_m1(len_m1),
    .win_valid(win_valid), .win(win), .center_anode(c_anode), .center_sample(c_sample),
    .center_last(center_last));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // content checker: every cross that comes out
  always @(posedge clk) if (rst_n) begin
    int a, s;
    if (win_valid) begin
      a = exp_q / len;
      s = exp_q % len;
      checks++;
      if (int'(c_anode) != a || int'(c_sample) != s ||
          int'(win.center) != pix(m, NA, len, a, s) ||
          int'(win.north)  != pix(m, NA, len, a - 1, s) ||
          int'(win.south)  != pix(m, NA, len, a + 1, s) ||
          int'(win.west)   != pix(m, NA, len, a, s - 1) ||
          int'(win.east)   != pix(m, NA, len, a, s + 1) ||
          center_last != (exp_q == NA * len - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cross at %0d,%0d: got pos %0d,%0d c=%0d n=%0d s=%0d w=%0d e=%0d", a, s,
                   c_anode, c_sample, win.center, win.north, win.south, win.west, win.east);
      end
      exp_q++;
      n_seen++;
    end
  end

  // timing checker: a cross follows a push by one clock, from push LEN+3 on,
  // and no cross appears after a clock without a push
  task automatic do_push(pixel_t d);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      push = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (win_valid) begin
        failures++;
        $display("FAIL cross without a push");
      end
      @(negedge clk);
    end
    push = 1'b1;
    din  = d;
    @(posedge clk);
    #1;
    push = 1'b0;
    npush++;
    checks++;
    if (win_valid !== (npush >= len + 3)) begin
      failures++;
      $display("FAIL win_valid=%b after push %0d", win_valid, npush);
    end
  endtask

  initial begin
    clear = 0; push = 0; din = 0; len_m1 = 4'd7; npush = 0; len = 8;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ev = 0; ev < 6; ev++) begin
      len = (ev == 0) ? 8 : ((ev == 1) ? 16 : $urandom_range(8, 16));
      len_m1 = 4'(len - 1);
      m = new[NA * len];
      foreach (m[i]) m[i] = 8'($urandom);
      exp_q = 0;
      n_seen = 0;
      npush = 0;
      for (int i = 0; i < NA * len; i++) do_push(m[i]);
      for (int i = 0; i < len + 2; i++) do_push(8'($urandom));
      @(posedge clk);  // the content checker takes the last cross here
      @(negedge clk);
      checks++;
      if (n_seen != NA * len) begin
        failures++;
        $display("FAIL event %0d: %0d crosses, expected %0d", ev, n_seen, NA * len);
      end
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
