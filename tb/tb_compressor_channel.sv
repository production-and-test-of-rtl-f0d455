// Self-checking test of one compressor channel at reduced size
// (32 anodes, up to 64 samples per anode).
// Runs a series of events of different lengths, thresholds and data kinds
// with random gaps in the input, decodes the 16-bit words back into
// records and compares them with the reference model. Also checks that an
// event closes within LEN+2 pushes plus a few clocks, that a sample
// offered while busy is refused and flagged, and that every mechanism
// occurred: isolated and continuation records, crosses cut by the matrix
// border, rejected lone spikes, all three value-code lengths.
module tb_compressor_channel;
  import carlos_pkg::*;
  import tb_carlos_model_pkg::*;
  localparam int NA = 32, MS = 64;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [5:0]  len_m1;
  thresholds_t th;
  logic        din_valid, busy, out_valid, out_last, in_err, overflow;
  pixel_t      din;
  logic [15:0] out_word;
  int          checks = 0, failures = 0;
  bit          got[$];
  int          n_words = 0;
  int          n_iso = 0, n_cont = 0, n_border = 0, n_spike = 0, n_code[3] = '{0, 0, 0};
  int          n_gap = 0;

  always #5 clk = ~clk;

  compressor_channel #(.ANODES(NA), .MAX_SAMPLES(MS)) dut (
    .clk(clk), .rst_n(rst_n), .len_m1(len_m1), .th(th), .din_valid(din_valid), .din(din),
    .busy(busy), .out_valid(out_valid), .out_word(out_word), .out_last(out_last),
    .in_err(in_err), .overflow(overflow));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 15; i >= 0; i--) got.push_back(out_word[i]);
    n_words++;
  end

  task automatic run_event(int len, int thi, int tlo, int kind, int gaps);
    byte unsigned m[];
    rec_t exp_q[$], dec_q[$];
    int errs, t0, tclose, lead;
    gen_event(m, NA, len, kind, 4);
    expected(m, NA, len, thi, tlo, exp_q);
    // mechanism counts from the reference
    foreach (exp_q[i]) begin
      if (exp_q[i].cont) n_cont++; else n_iso++;
      if (exp_q[i].a == 0 || exp_q[i].a == NA - 1 || exp_q[i].s == 0 || exp_q[i].s == len - 1)
        n_border++;
      n_code[exp_q[i].v < 16 ? 0 : (exp_q[i].v < 64 ? 1 : 2)]++;
    end
    for (int a = 0; a < NA; a++)
      for (int s = 0; s < len; s++)
        if (pix(m, NA, len, a, s) > thi && !is_hit(m, NA, len, a, s, thi, tlo)) n_spike++;
    @(negedge clk);
    len_m1 = 6'(len - 1);
    th = '{th_hi: 8'(thi), th_lo: 8'(tlo)};
    got.delete();
    n_words = 0;
    for (int i = 0; i < NA * len; i++) begin
      while (gaps && $urandom_range(0, 5) == 0) begin
        din_valid = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      din_valid = 1'b1;
      din = m[i];
      @(negedge clk);
      if (i == 0) begin
        // the event's settings are now latched: disturb the inputs
        len_m1 = 6'd7;
        th = '{th_hi: 8'd0, th_lo: 8'd0};
      end
      checks++;
      if (busy && i != NA * len - 1) begin
        failures++;
        $display("FAIL busy during event at sample %0d", i);
      end
    end
    din_valid = 1'b0;
    t0 = 0;
    tclose = 0;
    while (!(out_valid && out_last)) begin
      @(posedge clk);
      #1;
      tclose++;
      if (tclose > 2000) break;
    end
    @(posedge clk);
    #1;
    lead = len + 2;
    checks++;
    if (tclose > lead + 6) begin
      failures++;
      $display("FAIL event close took %0d clocks (LEN+2 = %0d)", tclose, lead);
    end
    errs = decode(got, 5, 6, dec_q);
    checks++;
    if (errs != 0) begin
      failures++;
      $display("FAIL %0d format errors in the output stream", errs);
    end
    checks++;
    if (dec_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %0d records decoded, %0d expected", dec_q.size(), exp_q.size());
    end
    for (int i = 0; i < dec_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (dec_q[i] != exp_q[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL record %0d: got a%0d s%0d v%0d c%0d exp a%0d s%0d v%0d c%0d", i,
                   dec_q[i].a, dec_q[i].s, dec_q[i].v, dec_q[i].cont,
                   exp_q[i].a, exp_q[i].s, exp_q[i].v, exp_q[i].cont);
      end
    end
    $display("event len=%0d th=%0d/%0d kind=%0d: %0d samples -> %0d words, %0d records",
             len, thi, tlo, kind, NA * len, n_words, exp_q.size());
    repeat (2) @(negedge clk);
  endtask

  initial begin
    din_valid = 0; din = 0; len_m1 = 6'd7; th = '{th_hi: 8'd255, th_lo: 8'd255};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_event(8, 40, 15, 0, 0);
    run_event(64, 50, 20, 0, 1);
    run_event(40, 30, 24, 2, 1);
    run_event(64, 200, 120, 1, 1);
    run_event(13, 255, 255, 0, 0);   // nothing can pass: empty event
    run_event(64, 8, 4, 0, 0);       // low thresholds: dense output
    // a sample offered while the channel closes an event is refused
    checks++;
    if (in_err) begin
      failures++;
      $display("FAIL in_err set too early");
    end
    begin
      byte unsigned m[];
      gen_event(m, NA, 8, 0, 2);
      @(negedge clk);
      len_m1 = 6'd7;
      for (int i = 0; i < NA * 8; i++) begin
        din_valid = 1'b1; din = m[i];
        @(negedge clk);
      end
      din_valid = 1'b1; din = 8'hAA;   // one extra, busy is now high
      @(negedge clk);
      din_valid = 1'b0;
      wait (out_valid && out_last);
      repeat (3) @(negedge clk);
      checks++;
      if (!in_err) begin
        failures++;
        $display("FAIL in_err not set by a sample offered while busy");
      end
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL packer overflow");
    end
    checks++;
    if (n_iso == 0 || n_cont == 0 || n_border == 0 || n_spike == 0 || n_gap == 0 ||
        n_code[0] == 0 || n_code[1] == 0 || n_code[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("isolated=%0d continuation=%0d border=%0d rejected_spikes=%0d gaps=%0d codes=%0d/%0d/%0d",
             n_iso, n_cont, n_border, n_spike, n_gap, n_code[0], n_code[1], n_code[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
