// Self-checking test of the record encoder.
// Walks a 16 x 40 matrix position by position with random gaps between
// evaluations and random hits, and checks every record one clock after
// its evaluation against an independently built bit string: isolated
// records carry '1', anode and sample, continuations only '0'; the value
// code has the three lengths 5, 8 and 10 bits. All record kinds and code
// lengths must be seen.
module tb_cluster_encoder;
  import carlos_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        eval, hit, in_last;
  pixel_t      value;
  logic [7:0]  anode, sample;
  logic        rec_valid, rec_last, rec_cont;
  logic [26:0] rec_bits;
  logic [4:0]  rec_len;
  int          checks = 0, failures = 0;
  int          n_iso = 0, n_cont = 0, n_len[3] = '{0, 0, 0};

  always #5 clk = ~clk;

  cluster_encoder #(.AN_W(8), .SM_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .eval(eval), .hit(hit), .in_last(in_last), .value(value),
    .anode(anode), .sample(sample), .rec_valid(rec_valid), .rec_bits(rec_bits),
    .rec_len(rec_len), .rec_last(rec_last), .rec_cont(rec_cont));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev;
    string es;
    eval = 0; hit = 0; in_last = 0; value = 0; anode = 0; sample = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++) begin
      prev = 1'b0;
      for (int s = 0; s < 40; s++) begin
        bit exp_cont;
        bit exp_v[$];
        int vlen;
        exp_v.delete();
        @(negedge clk);
        eval = 1'b0;
        hit = 1'b0;
        in_last = 1'b0;
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk);  // a gap between evaluations
        end
        eval    = 1'b1;
        hit     = ($urandom_range(0, 2) != 0);
        anode   = 8'(a);
        sample  = 8'(s);
        in_last = (a == 15 && s == 39);
        case ($urandom_range(0, 2))
          0: value = 8'($urandom_range(0, 15));
          1: value = 8'($urandom_range(16, 63));
          default: value = 8'($urandom_range(64, 255));
        endcase
        // expected bit string
        exp_cont = prev && (s != 0);
        if (!exp_cont) begin
          exp_v.push_back(1'b1);
          for (int i = 7; i >= 0; i--) exp_v.push_back(anode[i]);
          for (int i = 7; i >= 0; i--) exp_v.push_back(sample[i]);
        end else exp_v.push_back(1'b0);
        if (value < 16) begin
          exp_v.push_back(1'b0); vlen = 4;
        end else if (value < 64) begin
          exp_v.push_back(1'b1); exp_v.push_back(1'b0); vlen = 6;
        end else begin
          exp_v.push_back(1'b1); exp_v.push_back(1'b1); vlen = 8;
        end
        for (int i = vlen - 1; i >= 0; i--) exp_v.push_back(value[i]);
        prev = hit;
        @(posedge clk);
        #1;
        checks++;
        if (rec_valid !== hit || rec_last !== in_last) begin
          failures++;
          $display("FAIL valid/last at %0d,%0d", a, s);
        end
        if (hit) begin
          checks++;
          if (rec_cont !== exp_cont || int'(rec_len) != exp_v.size()) begin
            failures++;
            $display("FAIL len/cont at %0d,%0d: len %0d exp %0d", a, s, rec_len, exp_v.size());
          end else begin
            for (int i = 0; i < exp_v.size(); i++)
              if (rec_bits[exp_v.size() - 1 - i] !== exp_v[i]) begin
                failures++;
                $display("FAIL bits at %0d,%0d", a, s);
                break;
              end
            if (exp_v.size() < 27 && (rec_bits >> exp_v.size()) != 0) begin
              failures++;
              $display("FAIL stray high bits at %0d,%0d", a, s);
            end
          end
          if (exp_cont) n_cont++; else n_iso++;
          n_len[vlen == 4 ? 0 : (vlen == 6 ? 1 : 2)]++;
        end
      end
    end
    @(negedge clk);
    eval = 1'b0;
    checks++;
    if (n_iso == 0 || n_cont == 0 || n_len[0] == 0 || n_len[1] == 0 || n_len[2] == 0) begin
      failures++;
      $display("FAIL not every record kind seen");
    end
    $display("isolated=%0d continuation=%0d code lengths 5/8/10: %0d/%0d/%0d",
             n_iso, n_cont, n_len[0], n_len[1], n_len[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
