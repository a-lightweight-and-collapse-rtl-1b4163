// ofsr_pkg: shared constants and types of the OFSR-PUF (obfuscation-feedback-shift-register
// physical unclonable function).
//
// The default sizes are those of the 8-cell instance the design is evaluated with: a 32-bit
// challenge register (n = 32), m = n/4 = 8 entropy-source (ES) cells, 8 obfuscation indices
// (H = 8) and a 32-bit multi-bit response (K = 32). An ES cell is characterised by a 16-row
// look-up table, and the reliability mask holds one 16-bit row per cell.
package ofsr_pkg;

  // Default configuration: 8-cell OFSR-PUF.
  localparam int unsigned DEF_N = 32;   // challenge length n
  localparam int unsigned DEF_H = 8;    // number of obfuscation index numbers H
  localparam int unsigned DEF_K = 32;   // response length K (number of loops)

  // Each ES cell takes four challenge bits.
  localparam int unsigned CELL_BITS = 4;
  localparam int unsigned LUT_ROWS  = 1 << CELL_BITS;

  // One ES cell's challenge-to-bit table, and one row of the reliability mask.
  typedef logic [LUT_ROWS-1:0] lut_row_t;

  // Three-input bitwise majority, used by the triple-majority-vote stage.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
