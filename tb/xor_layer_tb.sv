// xor_layer_tb: FB must be the parity of t, counted bit by bit, for all 8-bit inputs.
module xor_layer_tb;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic [M-1:0] t;
  logic         fb;

  xor_layer #(.M(M)) dut (.t, .fb);

  initial begin
    for (int i = 0; i < 256; i++) begin
      int ones;
      t = 8'(i);
      #1;
      ones = 0;
      for (int l = 0; l < M; l++) if (t[l]) ones++;
      checks++;
      if (fb !== ((ones % 2) == 1)) begin
        failures++;
        $display("FAIL t=%b fb=%b", t, fb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
