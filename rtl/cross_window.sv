// Five-pixel cross generator for an anode-by-anode sample stream.
//
// Samples arrive one per push, all samples of anode 0 first, then anode 1,
// and so on; each anode has LEN = len_m1+1 samples (8..MAX_SAMPLES). To see
// the NORTH and SOUTH neighbours of a pixel, the previous two anodes are
// kept in two line-buffer RAMs chained one after the other: RAM A delays
// the stream by one anode, RAM B by a second anode. A three-stage shift
// register on the centre row supplies EAST and WEST. The neighbourhood is
// therefore complete two samples after the SOUTH pixel of the centre has
// arrived, so the cross for stream position q leaves after push q+LEN+2.
//
// Cross pixels that fall outside the matrix (the first and last anode, the
// first and last sample of an anode) are forced to zero. The cross itself
// and the anode-by-anode scan follow the published algorithm; the use of
// two of the chip's four 256-word RAMs per channel as chained anode delays
// and the border rule are this design's choices.
//
// Interface: push advances the whole pipeline by one sample (RAMs are
// enabled only on push, so gaps in the stream are allowed). clear restarts
// the position counters for a new event. win_valid is high for one cycle,
// the cycle after a push, when win/center_anode/center_sample hold a
// complete cross; center_last flags the last pixel of the event. After the
// last real sample of an event the owner must push LEN+2 further samples
// (any value) to bring the last anode's crosses out.
module cross_window
  import carlos_pkg::*;
#(
  parameter int unsigned ANODES      = 256,
  parameter int unsigned MAX_SAMPLES = 256,
  localparam int unsigned NW = $clog2(ANODES),
  localparam int unsigned SW = $clog2(MAX_SAMPLES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  pixel_t        din,
  input  logic [SW-1:0] len_m1,
  output logic          win_valid,
  output cross_t        win,
  output logic [NW-1:0] center_anode,
  output logic [SW-1:0] center_sample,
  output logic          center_last
);

  // ---- position counters -------------------------------------------------
  logic [SW-1:0] wr_addr;      // sample index of the pushed pixel
  logic [SW-1:0] wr_addr_d;    // sample index of the previous push
  logic [SW+1:0] lead;         // pushes so far, saturating at LEN+2
  logic [NW-1:0] nxt_a;        // position of the next centre to come out
  logic [SW-1:0] nxt_s;
  logic          lead_done;

  assign lead_done = (lead == ({2'b00, len_m1} + (SW+2)'(3)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr       <= '0;
      wr_addr_d     <= '0;
      lead          <= '0;
      nxt_a         <= '0;
      nxt_s         <= '0;
      win_valid     <= 1'b0;
      center_anode  <= '0;
      center_sample <= '0;
    end else if (clear) begin
      wr_addr   <= '0;
      lead      <= '0;
      nxt_a     <= '0;
      nxt_s     <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (push) begin
        wr_addr   <= (wr_addr == len_m1) ? '0 : wr_addr + 1'b1;
        wr_addr_d <= wr_addr;
        // lead counts pushes; the cross is complete from push LEN+3 on
        if (!lead_done) lead <= lead + 1'b1;
        if (lead_done) begin
          win_valid     <= 1'b1;
          center_anode  <= nxt_a;
          center_sample <= nxt_s;
          if (nxt_s == len_m1) begin
            nxt_s <= '0;
            nxt_a <= nxt_a + 1'b1;
          end else begin
            nxt_s <= nxt_s + 1'b1;
          end
        end
      end
    end
  end

  // ---- two chained anode delays -----------------------------------------
  pixel_t ram_a_q;   // stream delayed by one anode
  pixel_t ram_b_q;   // stream delayed by two anodes

  line_buffer_ram #(.DEPTH(MAX_SAMPLES), .WIDTH(PIX_W)) u_ram_a (
    .clk  (clk),
    .en   (push),
    .we   (1'b1),
    .addr (wr_addr),
    .wdata(din),
    .rdata(ram_a_q)
  );

  line_buffer_ram #(.DEPTH(MAX_SAMPLES), .WIDTH(PIX_W)) u_ram_b (
    .clk  (clk),
    .en   (push),
    .we   (1'b1),
    .addr (wr_addr_d),
    .wdata(ram_a_q),
    .rdata(ram_b_q)
  );

  // ---- alignment registers ----------------------------------------------
  pixel_t c1, c2, c3;   // centre row: c1 = EAST, c2 = CENTER, c3 = WEST
  pixel_t s1, s2, s3;   // next anode, delayed to the centre column
  pixel_t n1;           // previous anode, delayed to the centre column

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c1, c2, c3, s1, s2, s3, n1} <= '0;
    end else if (push) begin
      c1 <= ram_a_q;
      c2 <= c1;
      c3 <= c2;
      s1 <= din;
      s2 <= s1;
      s3 <= s2;
      n1 <= ram_b_q;
    end
  end

  // ---- border masking ---------------------------------------------------
  always_comb begin
    win.center = c2;
    win.east   = (center_sample == len_m1)         ? '0 : c1;
    win.west   = (center_sample == '0)             ? '0 : c3;
    win.north  = (center_anode  == '0)             ? '0 : n1;
    win.south  = (center_anode  == NW'(ANODES - 1)) ? '0 : s3;
    center_last  = (center_anode == NW'(ANODES - 1)) && (center_sample == len_m1);
  end

endmodule
