// es_cell_tb: checks the ES cell table look-up exhaustively for random tables, with and
// without the noise flip.
module es_cell_tb;
  int checks = 0, failures = 0;
  logic [15:0] lut;
  logic [3:0]  c;
  logic        flip, o;

  es_cell dut (.lut, .c, .flip, .o);

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      lut = 16'($urandom);
      for (int i = 0; i < 32; i++) begin
        c = 4'(i);
        flip = i[4];
        #1;
        checks++;
        if (o !== ((((lut >> i[3:0]) & 16'd1) != 0) ^ flip)) begin
          failures++;
          $display("FAIL lut=%h c=%0d flip=%b o=%b", lut, c, flip, o);
        end
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
