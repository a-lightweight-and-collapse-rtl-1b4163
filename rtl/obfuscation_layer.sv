// obfuscation_layer: the nonlinear obfuscation layer of the OFSR-PUF.
//
// Without it the OFSR-PUF is a plain LFSR: the response bits become the next challenge bits,
// so a recorded challenge-response pair reveals the answer to every challenge that is a window
// of it (a "collapse response"). This layer flips some challenge bits each loop so that the
// register contents no longer equal the response sequence.
//
// From the masked ES bits t[1:m] it forms H index numbers of log2(n) bits each. Index h
// (1-based) is the cyclic window t[h], t[h+1], ..., t[h+log2(n)-1] with positions taken modulo
// m and t[h] as the most significant bit. A decoder turns the set of indices into the n-bit
// selection vector sel (sel[i] = 1 when i equals one of the indices; repeated indices select
// the same bit). The output per challenge bit is
//   R[i] = C[i]            when init = 1 (load loop),
//   R[i] = FB & sel[i]     otherwise,
// and the input layer XORs R into the register. With H = 0 the layer selects nothing and the
// design is the linear LFSR-based PUF.
//
// The window, the decoder and Eq. (7) follow the document. Bit order inside an index, the
// 0-based position of index value v (register bit q[v], i.e. challenge position v+1) and the
// wrap of windows beyond h = m are this design's choices. Purely combinational.
module obfuscation_layer #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  parameter int unsigned H = ofsr_pkg::DEF_H,
  localparam int unsigned M = N / ofsr_pkg::CELL_BITS,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic         init,   // load loop
  input  logic [N-1:0] chal,   // external challenge C[1:n]
  input  logic [M-1:0] t,      // masked ES bits t_k[1:m]
  input  logic         fb,     // feedback bit of this loop
  output logic [N-1:0] sel,    // decoded selection sel[1:n]
  output logic [N-1:0] r       // R[1:n] to the input layer
);

  if (H == 0) begin : g_linear
    assign sel = '0;
  end else begin : g_obf
    logic [H-1:0][LOGN-1:0] bin;   // index numbers BIN_h
    logic [H-1:0][N-1:0]    onehot;

    for (genvar h = 0; h < H; h++) begin : g_bin
      for (genvar j = 0; j < LOGN; j++) begin : g_bit
        // bit j counted from the first (most significant) bit of the window
        assign bin[h][LOGN-1-j] = t[(h + j) % M];
      end
      // decoder for one index
      always_comb begin
        onehot[h] = '0;
        onehot[h][bin[h]] = 1'b1;
      end
    end

    always_comb begin
      sel = '0;
      for (int h = 0; h < int'(H); h++) sel |= onehot[h];
    end
  end

  always_comb r = init ? chal : (sel & {N{fb}});

endmodule
