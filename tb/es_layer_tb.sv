// es_layer_tb: random windows and cell tables; checks that cell l reads challenge bits
// 4l..4l+3 (first bit most significant) and outputs its table entry, noise flip included.
module es_layer_tb;
  localparam int N = 32, M = N / 4;
  int checks = 0, failures = 0;
  logic [N-1:0]          q;
  logic [M-1:0][15:0]    lut;
  logic [M-1:0]          flip, o;
  logic [M-1:0][3:0]     nib;

  es_layer #(.N(N)) dut (.q, .lut, .flip, .nib, .o);

  initial begin
    for (int trial = 0; trial < 500; trial++) begin
      q = N'($urandom);
      for (int l = 0; l < M; l++) lut[l] = 16'($urandom);
      flip = (trial % 3 == 0) ? M'($urandom) : '0;
      #1;
      for (int l = 0; l < M; l++) begin
        int idx;
        idx = q[4*l]*8 + q[4*l+1]*4 + q[4*l+2]*2 + q[4*l+3];
        checks++;
        if (nib[l] != 4'(idx) || o[l] !== (lut[l][idx] ^ flip[l])) begin
          failures++;
          $display("FAIL cell %0d q=%h idx=%0d nib=%0d o=%b", l, q, idx, nib[l], o[l]);
        end
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
