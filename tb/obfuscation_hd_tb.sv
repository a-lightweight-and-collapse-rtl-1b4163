// obfuscation_hd_tb: effect of the obfuscation layer on an 8-cell PUF (n = 32).
//
// Four cores share cell tables, masks and challenges and differ only in H, the number of
// obfuscation indices: 0 (plain LFSR), 6, 8 and 16. Each runs 2n-1 = 63 loops; the register
// window after loop n+k-1 holds challenge positions n+k .. 2n+k-1, and it is compared with
// response bits k .. n+k-1 for k = 1..32. Without obfuscation the two are the same sequence
// (collapse response, Hamming distance exactly 0); with obfuscation the fractional distance
// must rise towards 0.5 (the estimate H/(2(H+1)) gives 0.43, 0.44 and 0.47).
module obfuscation_hd_tb;
  localparam int N = 32, K = 2 * N - 1, M = N / 4;
  localparam int HS [4] = '{0, 6, 8, 16};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]       chal = '0;
  logic [M-1:0][15:0] lut = '0;
  logic               mask_we = 0;
  logic [2:0]         mask_addr = '0;
  logic [15:0]        mask_wdata = '0;
  logic [3:0]         busy, done;
  logic [K-1:0]       resp [4];
  logic [N-1:0]       qhist [4][K+1];
  int                 loopno [4];
  real                hd_sum [4];
  int                 hd_n;

  for (genvar g = 0; g < 4; g++) begin : g_puf
    ofsr_puf #(.N(N), .H(HS[g]), .K(K)) dut (
      .clk, .rst_n, .start, .chal, .es_lut(lut), .es_flip('0), .mask_we, .mask_addr,
      .mask_wdata, .busy(busy[g]), .done(done[g]), .resp(resp[g]));

    // record the register window after every loop
    always @(posedge clk) begin
      if (dut.init) loopno[g] = 0;
      else if (dut.step) begin
        #1;
        loopno[g]++;
        qhist[g][loopno[g]] = dut.q;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    for (int g = 0; g < 4; g++) hd_sum[g] = 0.0;
    hd_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int inst = 0; inst < 60; inst++) begin
      for (int l = 0; l < M; l++) lut[l] = 16'($urandom);
      for (int l = 0; l < M; l++) begin
        @(negedge clk);
        mask_we = 1; mask_addr = 3'(l);
        for (int c = 0; c < 16; c++) mask_wdata[c] = ($urandom % 1000) >= 145;
      end
      @(negedge clk);
      mask_we = 0;
      for (int c = 0; c < 5; c++) begin
        @(negedge clk);
        chal = N'($urandom);
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done[0]) @(negedge clk);
        for (int g = 0; g < 4; g++) begin
          for (int k = 1; k <= N; k++) begin
            int d;
            d = 0;
            for (int i = 0; i < N; i++)
              if (qhist[g][N + k - 1][i] != resp[g][k - 1 + i]) d++;
            hd_sum[g] += real'(d) / real'(N);
            if (g == 0) begin
              checks++;
              if (d != 0) begin
                failures++;
                $display("FAIL linear PUF: window and response differ at k=%0d", k);
              end
            end
          end
        end
        hd_n += N;
      end
    end
    for (int g = 0; g < 4; g++) begin
      real hd;
      hd = hd_sum[g] / real'(hd_n);
      $display("H = %0d: mean challenge/response Hamming distance %0.3f", HS[g], hd);
      if (g > 0) begin
        checks++;
        if (hd < 0.30 || hd > 0.60) begin
          failures++;
          $display("FAIL H = %0d: distance %0.3f out of range", HS[g], hd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
