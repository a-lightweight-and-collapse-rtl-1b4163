// xor_layer: the XOR gate layer of the OFSR-PUF.
//
// FB = t[1] ^ t[2] ^ ... ^ t[m]: the parity of the masked ES outputs is the feedback bit of the
// loop and also that loop's response bit. Purely combinational; a synthesis tool builds the
// balanced XOR tree.
module xor_layer #(
  parameter int unsigned M = ofsr_pkg::DEF_N / ofsr_pkg::CELL_BITS
) (
  input  logic [M-1:0] t,
  output logic         fb
);

  always_comb fb = ^t;

endmodule
