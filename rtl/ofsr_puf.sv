// ofsr_puf: the OFSR-PUF core, a strong PUF built from m = n/4 weak ES cells placed in the
// feedback of an n-bit shift register.
//
// Per loop: the ES layer reads the current n-bit window four bits per cell; the reliability
// mask picks S[l] with the same four bits and the AND gate layer keeps only reliable outputs
// t[l]; the XOR gate layer folds them into the feedback bit FB, which is the loop's response
// bit; the obfuscation layer turns t into index numbers that choose which register bits are
// flipped by FB; the input layer applies the flips and shifts FB in. K loops give the K-bit
// response Re[1:K].
//
// Interface: start/busy/done/resp as in ofsr_ctrl (done K+2 cycles after start). chal must be
// stable during the init loop (the cycle after start). es_lut is each cell's 16-row table
// (process variation in silicon, a random table per instance in an FPGA emulation); es_flip
// inverts a cell's output and is used only to inject noise. The mask rows are written through
// mask_we/mask_addr/mask_wdata and should not be written during an evaluation.
module ofsr_puf #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  parameter int unsigned H = ofsr_pkg::DEF_H,
  parameter int unsigned K = ofsr_pkg::DEF_K,
  localparam int unsigned M = N / ofsr_pkg::CELL_BITS,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [N-1:0]             chal,        // chal[i] = C[i+1]
  input  ofsr_pkg::lut_row_t [M-1:0] es_lut,
  input  logic [M-1:0]             es_flip,
  input  logic                     mask_we,
  input  logic [AW-1:0]            mask_addr,
  input  ofsr_pkg::lut_row_t       mask_wdata,
  output logic                     busy,
  output logic                     done,
  output logic [K-1:0]             resp         // resp[k-1] = Re[k]
);

  logic [N-1:0]      q;
  logic [N-1:0]      r;
  logic [M-1:0][3:0] nib;
  logic [M-1:0]      o, s, t;
  logic              fb, init, step;

  input_layer #(.N(N)) u_input (
    .clk, .rst_n, .init, .step, .r, .fb, .q
  );

  es_layer #(.N(N)) u_es (
    .q, .lut(es_lut), .flip(es_flip), .nib, .o
  );

  mask_matrix #(.N(N)) u_mask (
    .clk, .rst_n, .we(mask_we), .waddr(mask_addr), .wdata(mask_wdata), .nib, .s
  );

  and_layer #(.M(M)) u_and (.o, .s, .t);

  xor_layer #(.M(M)) u_xor (.t, .fb);

  obfuscation_layer #(.N(N), .H(H)) u_obf (
    .init, .chal, .t, .fb, .sel(), .r
  );

  ofsr_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .start, .fb, .init, .step, .busy, .done, .resp
  );

  // The challenge length must be a whole number of ES cells.
  initial assert (N % ofsr_pkg::CELL_BITS == 0 && N >= 8)
    else $error("ofsr_puf: N must be a multiple of 4 and at least 8");

endmodule
