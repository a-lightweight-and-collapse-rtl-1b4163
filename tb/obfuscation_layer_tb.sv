// obfuscation_layer_tb: random t, FB and challenge. sel is checked position by position: sel[i]
// must be 1 exactly when some window h of log2(n) consecutive t bits (cyclic, first bit most
// significant) has the value i. R must be the challenge in the init loop and sel & FB otherwise.
// Runs with n = 32 (m = 8) and H = 8 and H = 6, and with H = 0 (no selection at all).
module obfuscation_layer_tb;
  localparam int N = 32, M = N / 4, LOGN = 5;
  int checks = 0, failures = 0;
  int selected = 0;
  logic         init, fb;
  logic [N-1:0] chal;
  logic [M-1:0] t;
  logic [N-1:0] sel8, r8, sel6, r6, sel0, r0;

  obfuscation_layer #(.N(N), .H(8)) dut8 (.init, .chal, .t, .fb, .sel(sel8), .r(r8));
  obfuscation_layer #(.N(N), .H(6)) dut6 (.init, .chal, .t, .fb, .sel(sel6), .r(r6));
  obfuscation_layer #(.N(N), .H(0)) dut0 (.init, .chal, .t, .fb, .sel(sel0), .r(r0));

  function automatic bit hit(int hcount, int i);
    for (int h = 0; h < hcount; h++) begin
      int v = 0;
      for (int j = 0; j < LOGN; j++) v = v * 2 + int'(t[(h + j) % M]);
      if (v == i) return 1;
    end
    return 0;
  endfunction

  task automatic check_one(string name, int hcount, logic [N-1:0] sel, logic [N-1:0] r);
    for (int i = 0; i < N; i++) begin
      bit e = hit(hcount, i);
      checks++;
      if (sel[i] !== e) begin
        failures++;
        $display("FAIL %s t=%b sel[%0d]=%b expected %b", name, t, i, sel[i], e);
      end
      checks++;
      if (r[i] !== (init ? chal[i] : (e & fb))) begin
        failures++;
        $display("FAIL %s r[%0d]", name, i);
      end
    end
  endtask

  initial begin
    for (int tr = 0; tr < 2000; tr++) begin
      t = 8'($urandom);
      fb = 1'($urandom);
      init = ($urandom % 4) == 0;
      chal = N'($urandom);
      #1;
      check_one("H8", 8, sel8, r8);
      check_one("H6", 6, sel6, r6);
      check_one("H0", 0, sel0, r0);
      if (!init && fb && r8 != '0) selected++;
    end
    checks++;
    if (selected == 0) begin
      failures++;
      $display("FAIL no obfuscation flip was ever produced");
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
