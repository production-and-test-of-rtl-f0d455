// Self-checking test of the line-buffer RAM: random enable/write traffic
// against a shadow array, checking read-first behaviour (old data out
// while new data is written), one-clock read latency and that rdata holds
// while en is low.
module tb_line_buffer_ram;
  localparam int DEPTH = 256;
  logic       clk = 1'b0;
  logic       en, we;
  logic [7:0] addr, wdata, rdata;
  int         checks = 0, failures = 0;
  logic [7:0] shadow [DEPTH];
  logic [7:0] exp_q;

  always #5 clk = ~clk;

  line_buffer_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    // fill every word once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 8'(i); wdata = 8'($urandom);
      shadow[i] = wdata;
    end
    @(negedge clk);
    en = 1'b0; we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      we    = $urandom_range(0, 1) == 1;
      addr  = 8'($urandom);
      wdata = 8'($urandom);
      if (en) begin
        exp_q = shadow[addr];
        if (we) shadow[addr] = wdata;
      end
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d rdata=%h exp=%h", addr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
