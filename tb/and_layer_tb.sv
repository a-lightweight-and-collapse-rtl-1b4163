// and_layer_tb: random ES outputs and mask bits; t must be set only where both are.
module and_layer_tb;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic [M-1:0] o, s, t;

  and_layer #(.M(M)) dut (.o, .s, .t);

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {o, s} = 16'(i);
      #1;
      for (int l = 0; l < M; l++) begin
        checks++;
        if (t[l] !== (o[l] && s[l])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
