// Self-checking test of the serial configuration register.
// Checks the reset values, shifts random frames in MSB first with gaps in
// cfg_en, checks that nothing changes before cfg_load and that every field
// lands where the frame format puts it, that a length below 8 samples is
// raised to 8, and that cfg_sdo returns the frame shifted in.
module tb_serial_config;
  import carlos_pkg::*;
  localparam int CFG_W = 8 + 32;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cfg_en, cfg_sdi, cfg_load, cfg_sdo;
  logic [7:0]  len_m1;
  thresholds_t th [2];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_config #(.CHANNELS(2), .MAX_SAMPLES(256)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_sdi(cfg_sdi), .cfg_load(cfg_load),
    .cfg_sdo(cfg_sdo), .len_m1(len_m1), .th(th));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic shift_frame(logic [CFG_W-1:0] f);
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        cfg_en = 1'b0;
        @(negedge clk);
      end
      cfg_en = 1'b1;
      cfg_sdi = f[i];
    end
    @(negedge clk);
    cfg_en = 1'b0;
  endtask

  initial begin
    logic [CFG_W-1:0] f, prev_f;
    cfg_en = 0; cfg_sdi = 0; cfg_load = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(len_m1 == 8'd255, "reset length");
    check(th[0] == 16'hFFFF && th[1] == 16'hFFFF, "reset thresholds");
    prev_f = {8'd255, 32'hFFFF_FFFF};
    for (int n = 0; n < 40; n++) begin
      f = {8'($urandom), $urandom};
      if (n % 5 == 0) f[CFG_W-1 -: 8] = 8'($urandom_range(0, 6));
      shift_frame(f);
      check({len_m1, th[0], th[1]} == prev_f, "no change before load");
      // the shadow register holds the frame: its top bit is on cfg_sdo
      check(cfg_sdo == f[CFG_W-1], "sdo shows first bit of frame");
      @(negedge clk);
      cfg_load = 1'b1;
      @(negedge clk);
      cfg_load = 1'b0;
      check(len_m1 == ((f[CFG_W-1 -: 8] < 8'd7) ? 8'd7 : f[CFG_W-1 -: 8]), "length field");
      check(th[0].th_hi == f[31:24] && th[0].th_lo == f[23:16], "channel 0 thresholds");
      check(th[1].th_hi == f[15:8] && th[1].th_lo == f[7:0], "channel 1 thresholds");
      prev_f = {len_m1, th[0], th[1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
