// Single-port synchronous RAM used as an anode line buffer.
//
// The chip holds four 256-word RAMs, two per compressor channel; each one
// stores the samples of one anode so that the neighbouring anodes of a
// pixel are available when the next anode streams in. The RAM macro
// itself is a full-custom block whose ports are not published, so this is
// a plain array with this design's port choice: one address, read-first.
// When en is high the word at addr is read into rdata on the clock edge
// and, if we is also high, wdata is written to the same address after
// the read (old data out, new data in). rdata holds when en is low.
// Read latency is one clock. Contents are not reset.
module line_buffer_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
