// and_layer: the AND gate layer of the OFSR-PUF.
//
// t[l] = O[l] & S[l]: each ES output passes only where the reliability mask marks the current
// challenge of that cell as reliable; elsewhere t[l] is stuck at zero. The t bits feed both the
// XOR gate layer and the obfuscation layer. Purely combinational.
module and_layer #(
  parameter int unsigned M = ofsr_pkg::DEF_N / ofsr_pkg::CELL_BITS
) (
  input  logic [M-1:0] o,   // ES outputs
  input  logic [M-1:0] s,   // selected mask bits
  output logic [M-1:0] t    // reliable bits t_k[1:m]
);

  always_comb t = o & s;

endmodule
