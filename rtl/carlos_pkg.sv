// Shared types and constants of the two-channel bi-dimensional compressor.
//
// A half-detector event is a matrix of 8-bit pixels: one row per anode,
// one column per drift-time sample. The compressor looks at every pixel
// together with its four neighbours (the "cross") and keeps the central
// value only where the two-threshold cluster test passes. This package
// holds the pixel and cross types, the per-channel threshold pair, and the
// widths of the variable-length record written for each kept pixel.
//
// Record format (this design's own choice; the encoding table is not
// published with the algorithm):
//   isolated cluster     : '1' , anode (8 bits) , sample (8 bits) , value code
//   continuation cluster : '0' , value code   (position = previous one + 1 sample)
//   value code           : v < 16  -> '0'  v[3:0]   (5 bits)
//                          v < 64  -> '10' v[5:0]   (8 bits)
//                          else    -> '11' v[7:0]   (10 bits)
// Short codes go to small values, which dominate after thresholding of
// noise-level data, in the spirit of a Huffman code.
package carlos_pkg;

  localparam int unsigned PIX_W    = 8;    // sample width, from the chip description
  localparam int unsigned WORD_W   = 16;   // output word width, from the chip description
  localparam int unsigned VCODE_MAX = 10;  // longest value code

  typedef logic [PIX_W-1:0] pixel_t;

  // The five pixels of one cross. NORTH/SOUTH are the neighbouring anodes
  // (previous / next row), EAST/WEST the neighbouring samples of the same
  // anode (next / previous column).
  typedef struct packed {
    pixel_t north;
    pixel_t south;
    pixel_t east;
    pixel_t west;
    pixel_t center;
  } cross_t;

  // Programmable threshold pair of one channel.
  typedef struct packed {
    pixel_t th_hi;
    pixel_t th_lo;
  } thresholds_t;

  // Value code of a kept pixel: code right-aligned in the returned vector,
  // length in bits in len.
  function automatic logic [VCODE_MAX-1:0] value_code(input pixel_t v, output logic [3:0] len);
    logic [VCODE_MAX-1:0] c;
    if (v < 8'd16) begin
      c   = {5'b0, 1'b0, v[3:0]};
      len = 4'd5;
    end else if (v < 8'd64) begin
      c   = {2'b0, 2'b10, v[5:0]};
      len = 4'd8;
    end else begin
      c   = {2'b11, v};
      len = 4'd10;
    end
    return c;
  endfunction

endpackage
