// ofsr_ctrl_tb: drives a random FB stream; checks one init loop, exactly K feedback loops,
// done K+2 cycles after start, and that resp[k-1] is the FB of loop k.
module ofsr_ctrl_tb;
  localparam int K = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, fb = 0;
  logic init, step, busy, done;
  logic [K-1:0] resp, expect_resp;

  ofsr_ctrl #(.K(K)) dut (.clk, .rst_n, .start, .fb, .init, .step, .busy, .done, .resp);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      int cyc, n_init, n_step, k;
      repeat ($urandom % 4) @(negedge clk);
      start = 1;
      cyc = 0; n_init = 0; n_step = 0; k = 0;
      expect_resp = '0;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 10 * K) begin
        fb = 1'($urandom);
        if (init) n_init++;
        if (step) begin
          expect_resp[k] = fb;
          k++;
          n_step++;
        end
        checks++;
        if (busy !== (init || step)) failures++;
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != K + 2 || n_init != 1 || n_step != K) begin
        failures++;
        $display("FAIL run %0d: done after %0d cycles, %0d init, %0d loops", run, cyc, n_init, n_step);
      end
      checks++;
      if (resp !== expect_resp) begin
        failures++;
        $display("FAIL run %0d: resp=%h expected %h", run, resp, expect_resp);
      end
      @(negedge clk);
      checks++;
      if (done || busy) failures++;
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
