// Threshold sweep on one physics-sized event (256 anodes x 200 samples).
//
// The same synthetic event (low noise, clusters, lone spikes) is sent
// through both channels several times. Between runs the thresholds are
// raised through the serial port: channel 0 raises the high threshold,
// channel 1 the low one. Each run's output is decoded and compared with
// the reference model, and the number of kept pixels must never grow as a
// threshold rises; it must drop at least once on each channel. Reports the
// compression ratio (input bits / output bits) of every run.
module tb_threshold_sweep;
  import carlos_pkg::*;
  import tb_carlos_model_pkg::*;
  localparam int NA = 256, LEN = 200, RUNS = 5;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cfg_en, cfg_sdi, cfg_load, cfg_sdo;
  logic        din_valid [2];
  pixel_t      din       [2];
  logic        busy      [2];
  logic        out_valid [2];
  logic [15:0] out_word  [2];
  logic        out_last  [2];
  logic        in_err    [2];
  logic        overflow  [2];
  int          checks = 0, failures = 0;
  bit          got0[$], got1[$];
  byte unsigned mat[];
  int          hi0[RUNS] = '{40, 60, 90, 130, 200};
  int          lo1[RUNS] = '{12, 16, 22, 30, 45};
  int          prev_n[2] = '{-1, -1};
  int          drops[2] = '{0, 0};

  always #12.5 clk = ~clk;

  carlos_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_sdi(cfg_sdi), .cfg_load(cfg_load),
    .cfg_sdo(cfg_sdo), .din_valid(din_valid), .din(din), .busy(busy), .out_valid(out_valid),
    .out_word(out_word), .out_last(out_last), .in_err(in_err), .overflow(overflow));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done0 = 1'b0, done1 = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid[0] && out_last[0]) done0 <= 1'b1;
    if (out_valid[1] && out_last[1]) done1 <= 1'b1;
    if (out_valid[0]) for (int i = 15; i >= 0; i--) got0.push_back(out_word[0][i]);
    if (out_valid[1]) for (int i = 15; i >= 0; i--) got1.push_back(out_word[1][i]);
  end

  task automatic configure(int h0, int l0, int h1, int l1);
    logic [39:0] f = {8'(LEN - 1), 8'(h0), 8'(l0), 8'(h1), 8'(l1)};
    for (int i = 39; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1;
      cfg_sdi = f[i];
    end
    @(negedge clk);
    cfg_en = 1'b0;
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
  endtask

  task automatic check_run(int c, int thi, int tlo, ref bit got[$]);
    rec_t exp_q[$], dec_q[$];
    int errs;
    expected(mat, NA, LEN, thi, tlo, exp_q);
    errs = decode(got, 8, 8, dec_q);
    checks++;
    if (errs != 0 || dec_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL ch%0d th=%0d/%0d: %0d errors, %0d records, %0d expected", c, thi, tlo,
               errs, dec_q.size(), exp_q.size());
    end
    for (int i = 0; i < dec_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (dec_q[i] != exp_q[i]) failures++;
    end
    checks++;
    if (prev_n[c] >= 0 && dec_q.size() > prev_n[c]) begin
      failures++;
      $display("FAIL ch%0d: kept pixels rose from %0d to %0d with a higher threshold",
               c, prev_n[c], dec_q.size());
    end
    if (prev_n[c] >= 0 && dec_q.size() < prev_n[c]) drops[c]++;
    prev_n[c] = dec_q.size();
    $display("ch%0d th_hi=%0d th_lo=%0d: %0d pixels kept, %0d words, compression %0.1f : 1",
             c, thi, tlo, dec_q.size(), got.size() / 16,
             real'(NA * LEN * 8) / real'(got.size()));
  endtask

  initial begin
    cfg_en = 0; cfg_sdi = 0; cfg_load = 0;
    din_valid = '{0, 0};
    din = '{0, 0};
    gen_event(mat, NA, LEN, 0, 60);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      configure(hi0[r], 10, 60, lo1[r]);
      got0.delete();
      got1.delete();
      done0 = 1'b0;
      done1 = 1'b0;
      for (int i = 0; i < NA * LEN; i++) begin
        din_valid = '{1, 1};
        din = '{mat[i], mat[i]};
        @(negedge clk);
      end
      din_valid = '{0, 0};
      wait (done0 && done1);
      repeat (2) @(negedge clk);
      check_run(0, hi0[r], 10, got0);
      check_run(1, 60, lo1[r], got1);
    end
    checks++;
    if (drops[0] == 0 || drops[1] == 0) begin
      failures++;
      $display("FAIL the kept-pixel count never dropped (ch0 %0d, ch1 %0d)", drops[0], drops[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
