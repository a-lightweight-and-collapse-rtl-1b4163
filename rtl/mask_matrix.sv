// mask_matrix: the reliability information matrix of the ES selection scheme (ESS).
//
// Row l holds s_l[1:16], one bit per challenge of ES cell l: 1 where the cell answers that
// challenge reliably, 0 where enrollment found it unreliable. In operation the four challenge
// bits that drive cell l also pick one bit of row l, giving S[l]; the AND gate layer then forces
// the cell's contribution to zero whenever S[l] = 0, so unreliable challenge-cell pairs never
// reach the response and no challenge has to be screened by the verifier.
//
// The rows are written one at a time through a simple write port (we, waddr, wdata) after
// enrollment, which is done outside this design. Reset sets every bit to 1 (nothing masked);
// that reset value is this design's choice. Read is combinational; a write takes effect on the
// next rising edge.
module mask_matrix #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  localparam int unsigned M = N / ofsr_pkg::CELL_BITS,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,      // write one row
  input  logic [AW-1:0]            waddr,   // row (cell) number, 0-based
  input  ofsr_pkg::lut_row_t       wdata,   // s_l[1:16], bit c for challenge c
  input  logic [M-1:0][3:0]        nib,     // each cell's 4 challenge bits
  output logic [M-1:0]             s        // selected mask bits S[1:m]
);

  ofsr_pkg::lut_row_t [M-1:0] rows;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rows <= '1;
    end else if (we && (32'(waddr) < M)) begin
      rows[waddr] <= wdata;
    end
  end

  for (genvar l = 0; l < M; l++) begin : g_sel
    assign s[l] = rows[l][nib[l]];
  end

endmodule
