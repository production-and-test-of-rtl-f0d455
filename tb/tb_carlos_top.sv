// End-to-end test of the two-channel compressor at its full size
// (256 anodes, up to 256 samples per anode, both channels running at once).
//
// Every event is configured through the serial port first (samples per
// anode and a threshold pair per channel), then both half-detector
// streams are driven at the same time, with random gaps in one of them.
// The 16-bit words of each channel are decoded back into records and
// compared with the reference model, i.e. the reverse of the compressor.
// Event sizes: 256 x 8 (shortest anode), 256 x 200 (a physics-sized
// event), 256 x 256 (largest event) and 256 x 192 (a 48k-sample event),
// with low-noise-plus-clusters, uniform random and bell-shaped noise data.
// Checks also the rate (no input refused during an event; the event closes
// within LEN+2 pushes plus a few clocks), the refusal and flag of a
// sample offered while busy, and counts each mechanism: isolated and
// continuation records, border crosses, rejected lone spikes, the three
// value-code lengths, input gaps, a configuration change between events.
module tb_carlos_top;
  import carlos_pkg::*;
  import tb_carlos_model_pkg::*;
  localparam int NA = 256;
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
  int          n_iso = 0, n_cont = 0, n_border = 0, n_spike = 0, n_code[3] = '{0, 0, 0};
  int          n_gap = 0, n_cfg = 0, n_words = 0, n_samples = 0;
  byte unsigned mat0[], mat1[];

  always #12.5 clk = ~clk;   // 40 MHz

  carlos_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_sdi(cfg_sdi), .cfg_load(cfg_load),
    .cfg_sdo(cfg_sdo), .din_valid(din_valid), .din(din), .busy(busy), .out_valid(out_valid),
    .out_word(out_word), .out_last(out_last), .in_err(in_err), .overflow(overflow));

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid[0]) for (int i = 15; i >= 0; i--) got0.push_back(out_word[0][i]);
    if (out_valid[1]) for (int i = 15; i >= 0; i--) got1.push_back(out_word[1][i]);
    n_words += int'(out_valid[0]) + int'(out_valid[1]);
  end

  task automatic configure(int len, int h0, int l0, int h1, int l1);
    logic [39:0] f = {8'(len - 1), 8'(h0), 8'(l0), 8'(h1), 8'(l1)};
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
    n_cfg++;
  endtask

  task automatic stream(int c, int len, bit gaps, ref byte unsigned m[]);
    int tclose = 0;
    for (int i = 0; i < NA * len; i++) begin
      while (gaps && $urandom_range(0, 7) == 0) begin
        din_valid[c] = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      din_valid[c] = 1'b1;
      din[c] = m[i];
      @(negedge clk);
      checks++;
      if (busy[c] && i != NA * len - 1) begin
        failures++;
        if (failures < 10) $display("FAIL ch%0d busy during event at sample %0d", c, i);
      end
    end
    din_valid[c] = 1'b0;
    n_samples += NA * len;
    while (!(out_valid[c] && out_last[c])) begin
      @(posedge clk);
      #1;
      tclose++;
      if (tclose > 5000) break;
    end
    @(posedge clk);
    #1;
    checks++;
    if (tclose > len + 2 + 6) begin
      failures++;
      $display("FAIL ch%0d event close took %0d clocks (LEN+2 = %0d)", c, tclose, len + 2);
    end
  endtask

  task automatic compare(int c, int len, int thi, int tlo, ref byte unsigned m[], ref bit got[$]);
    rec_t exp_q[$], dec_q[$];
    int errs;
    expected(m, NA, len, thi, tlo, exp_q);
    foreach (exp_q[i]) begin
      if (exp_q[i].cont) n_cont++; else n_iso++;
      if (exp_q[i].a == 0 || exp_q[i].a == NA - 1 || exp_q[i].s == 0 || exp_q[i].s == len - 1)
        n_border++;
      n_code[exp_q[i].v < 16 ? 0 : (exp_q[i].v < 64 ? 1 : 2)]++;
    end
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < len; s++)
        if (pix(m, NA, len, a, s) > thi && !is_hit(m, NA, len, a, s, thi, tlo)) n_spike++;
    errs = decode(got, 8, 8, dec_q);
    checks++;
    if (errs != 0) begin
      failures++;
      $display("FAIL ch%0d: %0d format errors", c, errs);
    end
    checks++;
    if (dec_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL ch%0d: %0d records decoded, %0d expected", c, dec_q.size(), exp_q.size());
    end
    for (int i = 0; i < dec_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (dec_q[i] != exp_q[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL ch%0d record %0d: got a%0d s%0d v%0d exp a%0d s%0d v%0d", c, i,
                   dec_q[i].a, dec_q[i].s, dec_q[i].v, exp_q[i].a, exp_q[i].s, exp_q[i].v);
      end
    end
    $display("ch%0d event 256x%0d th=%0d/%0d: %0d samples -> %0d words (%0d records)",
             c, len, thi, tlo, NA * len, got.size() / 16, exp_q.size());
  endtask

  task automatic run_event(int len, int k0, int k1, int h0, int l0, int h1, int l1);
    configure(len, h0, l0, h1, l1);
    gen_event(mat0, NA, len, k0, 40);
    gen_event(mat1, NA, len, k1, 40);
    got0.delete();
    got1.delete();
    fork
      stream(0, len, 1'b0, mat0);
      stream(1, len, 1'b1, mat1);
    join
    compare(0, len, h0, l0, mat0, got0);
    compare(1, len, h1, l1, mat1, got1);
  endtask

  initial begin
    cfg_en = 0; cfg_sdi = 0; cfg_load = 0;
    din_valid = '{0, 0};
    din = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_event(8,   0, 2, 40, 15, 50, 40);
    run_event(200, 0, 2, 50, 20, 60, 45);
    run_event(256, 0, 1, 45, 18, 230, 150);
    run_event(192, 1, 2, 240, 200, 55, 42);
    // a sample offered while channel 0 closes its event is refused and flagged
    checks++;
    if (in_err[0] || in_err[1]) begin
      failures++;
      $display("FAIL in_err set without cause");
    end
    configure(8, 40, 15, 40, 15);
    gen_event(mat0, NA, 8, 0, 4);
    got0.delete();
    for (int i = 0; i < NA * 8; i++) begin
      din_valid[0] = 1'b1; din[0] = mat0[i];
      @(negedge clk);
    end
    din[0] = 8'h55;        // one sample too many
    @(negedge clk);
    din_valid[0] = 1'b0;
    wait (out_valid[0] && out_last[0]);
    repeat (3) @(negedge clk);
    compare(0, 8, 40, 15, mat0, got0);
    checks++;
    if (!in_err[0] || in_err[1]) begin
      failures++;
      $display("FAIL in_err: ch0=%b (expected 1) ch1=%b (expected 0)", in_err[0], in_err[1]);
    end
    checks++;
    if (overflow[0] || overflow[1]) begin
      failures++;
      $display("FAIL packer overflow");
    end
    checks++;
    if (n_iso == 0 || n_cont == 0 || n_border == 0 || n_spike == 0 || n_gap == 0 || n_cfg < 2 ||
        n_code[0] == 0 || n_code[1] == 0 || n_code[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("isolated=%0d continuation=%0d border=%0d rejected_spikes=%0d gaps=%0d configs=%0d codes=%0d/%0d/%0d",
             n_iso, n_cont, n_border, n_spike, n_gap, n_cfg, n_code[0], n_code[1], n_code[2]);
    $display("samples in=%0d words out=%0d", n_samples, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
