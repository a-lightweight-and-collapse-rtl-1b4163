// es_cell: one entropy-source (ES) cell, as a look-up table.
//
// The silicon cell is a configurable cross-coupled inverter pair whose four challenge bits pick
// the components that race; its outcome for every 4-bit challenge is fixed by process variation,
// so the cell behaves as a 16-row table. This module is that table, as used in an FPGA
// emulation: lut[c] is the cell's answer to challenge c, where c[3] is the first (oldest) of
// the cell's four challenge bits. The flip input inverts the answer and stands for the rare
// noisy evaluation of a marginal cell; tie it low for a noise-free cell.
//
// Purely combinational.
module es_cell (
  input  ofsr_pkg::lut_row_t lut,    // this instance's 16-row table
  input  logic [3:0]         c,      // the cell's four challenge bits
  input  logic               flip,   // noise injection: invert the answer
  output logic               o
);

  always_comb o = lut[c] ^ flip;

endmodule
