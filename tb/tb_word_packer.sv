// Self-checking test of the 16-bit word packer.
// Random records (1..27 bits) enter with random gaps, paced so that the
// accumulator cannot overflow; every few hundred records an event is closed
// with in_last, sometimes together with a record and sometimes alone, and
// also with nothing at all pending. The bit string leaving the packer must
// be the concatenation of the records, followed by the one-filled tail of
// the final word (at least one fill bit), and the event must close within
// a few clocks.
module tb_word_packer;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_last;
  logic [26:0] in_bits;
  logic [4:0]  in_len;
  logic        out_valid, out_last, busy, overflow;
  logic [15:0] out_word;
  int          checks = 0, failures = 0;
  int          n_tail = 0, n_exact = 0, n_empty = 0;
  bit          exp_bits[$];
  bit          got_bits[$];
  int          occ = 0;

  always #5 clk = ~clk;

  word_packer #(.IN_W(27), .WORD_W(16), .ACC_W(64)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bits(in_bits), .in_len(in_len),
    .in_last(in_last), .out_valid(out_valid), .out_word(out_word), .out_last(out_last),
    .busy(busy), .overflow(overflow));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect output words
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 15; i >= 0; i--) got_bits.push_back(out_word[i]);
  end

  task automatic close_event(bit with_record, int len);
    int wait_cycles = 0;
    bit exp_w[$];
    @(negedge clk);
    in_valid = with_record;
    in_last  = 1'b1;
    in_len   = 5'(len);
    in_bits  = 27'($urandom) & ((27'(1) << len) - 1);
    if (with_record) for (int i = len - 1; i >= 0; i--) exp_bits.push_back(in_bits[i]);
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    while (!(out_valid && out_last)) begin
      @(posedge clk);
      #1;
      wait_cycles++;
      if (wait_cycles > 100) break;
    end
    @(posedge clk);  // the collector takes the last word at this edge
    #1;
    // expected: records, then ones up to a whole word; an empty event is one word of ones
    exp_w = exp_bits;
    if (exp_w.size() == 0) n_empty++;
    else if (exp_w.size() % 16 == 0) n_exact++;
    else n_tail++;
    // at least one fill bit, then up to the word boundary
    exp_w.push_back(1'b1);
    while (exp_w.size() % 16 != 0) exp_w.push_back(1'b1);
    checks++;
    if (wait_cycles > 6) begin
      failures++;
      $display("FAIL event close took %0d cycles", wait_cycles);
    end
    checks++;
    if (got_bits.size() != exp_w.size()) begin
      failures++;
      $display("FAIL size got %0d exp %0d", got_bits.size(), exp_w.size());
    end else begin
      for (int i = 0; i < exp_w.size(); i++) if (got_bits[i] != exp_w[i]) begin
        failures++;
        $display("FAIL bit %0d", i);
        break;
      end
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after close");
    end
    exp_bits.delete();
    got_bits.delete();
    occ = 0;
  endtask

  initial begin
    in_valid = 1'b0; in_last = 1'b0; in_bits = '0; in_len = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // empty event
    close_event(1'b0, 0);
    // exact multiple: two 8-bit records then in_last alone
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_len = 5'd8; in_bits = 27'($urandom_range(0, 255));
      for (int i = 7; i >= 0; i--) exp_bits.push_back(in_bits[i]);
    end
    @(negedge clk); in_valid = 1'b0;
    close_event(1'b0, 0);
    for (int ev = 0; ev < 60; ev++) begin
      int nrec = $urandom_range(0, 300);
      for (int r = 0; r < nrec; r++) begin
        int len;
        @(negedge clk);
        occ = (occ > 16) ? occ - 16 : 0;
        len = $urandom_range(1, 27);
        if (occ + len <= 40 && $urandom_range(0, 3) != 0) begin
          in_valid = 1'b1;
          in_len   = 5'(len);
          in_bits  = 27'($urandom) & ((27'(1) << len) - 1);
          for (int i = len - 1; i >= 0; i--) exp_bits.push_back(in_bits[i]);
          occ += len;
        end else begin
          in_valid = 1'b0;
        end
      end
      @(negedge clk); in_valid = 1'b0;
      repeat (4) @(negedge clk);
      close_event(ev % 2 == 0, $urandom_range(1, 27));
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL overflow flag set");
    end
    checks++;
    if (n_tail == 0 || n_exact == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL event endings not all seen: tail=%0d exact=%0d empty=%0d", n_tail, n_exact, n_empty);
    end
    $display("endings: tail=%0d exact=%0d empty=%0d", n_tail, n_exact, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
