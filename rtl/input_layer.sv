// input_layer: the n-bit challenge register of the OFSR-PUF.
//
// Bit q[i] holds challenge position i+1 of the current window, so q[0] is the oldest bit and
// q[N-1] the newest. In the init loop the register takes R directly (the obfuscation layer then
// passes the external challenge through R). In every later loop each bit is first XORed with its
// obfuscation bit R[i] (FB where sel[i] = 1, else 0), and the register then shifts one place
// towards q[0] with the feedback bit FB entering at q[N-1]. This is the LFSR update with the
// obfuscation of the document; doing the XOR and the shift in the same clock edge, one loop per
// cycle, is this design's choice. The bit leaving at q[0] is never read again, so its
// obfuscation bit is dropped.
//
// Timing: q updates on the rising clock edge when init or step is high; init has priority.
// Reset (active low, synchronous to the clock) clears the register.
module input_layer #(
  parameter int unsigned N = ofsr_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,   // load loop: q <= r
  input  logic         step,   // feedback loop: obfuscate, then shift in fb
  input  logic [N-1:0] r,      // per-bit input from the obfuscation layer
  input  logic         fb,     // feedback bit of this loop
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (init)  q <= r;
    else if (step)  q <= {fb, q[N-1:1] ^ r[N-1:1]};
  end

endmodule
