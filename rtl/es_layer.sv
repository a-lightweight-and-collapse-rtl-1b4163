// es_layer: the m = n/4 ES cells of the OFSR-PUF.
//
// Cell l (0-based) reads challenge bits q[4l] .. q[4l+3], i.e. four consecutive positions of the
// current window, with q[4l] as the most significant bit of its 4-bit row index. Its output
// o[l] goes to the AND gate layer. The nibble for each cell is also brought out (nib) for the
// reliability mask, which is addressed by the same four bits. Four consecutive bits per cell
// follow the document; which of them is the most significant is this design's choice.
//
// Purely combinational.
module es_layer #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  localparam int unsigned M = N / ofsr_pkg::CELL_BITS
) (
  input  logic [N-1:0]                 q,      // challenge window
  input  ofsr_pkg::lut_row_t [M-1:0]   lut,    // table of every cell
  input  logic [M-1:0]                 flip,   // per-cell noise injection
  output logic [M-1:0][3:0]            nib,    // each cell's 4-bit row index
  output logic [M-1:0]                 o       // ES outputs O[1:m]
);

  for (genvar l = 0; l < M; l++) begin : g_cell
    assign nib[l] = {q[4*l], q[4*l+1], q[4*l+2], q[4*l+3]};
    es_cell u_cell (
      .lut  (lut[l]),
      .c    (nib[l]),
      .flip (flip[l]),
      .o    (o[l])
    );
  end

endmodule
