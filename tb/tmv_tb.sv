// tmv_tb: the voting sequencer against a stand-in core that answers each start after a random
// delay with a scripted response. Checks the challenge handed to the core, the number of core
// evaluations (1 or 3), the bitwise majority, and done one cycle after the last core_done.
module tmv_tb;
  localparam int N = 32, K = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, req = 0, tmv_en = 0;
  logic [N-1:0] chal_in = '0, core_chal;
  logic core_start, core_done = 0, busy, done;
  logic [K-1:0] core_resp = '0, resp;
  logic [1:0] evals;
  logic [K-1:0] script [3];
  int starts;

  tmv #(.N(N), .K(K)) dut (.clk, .rst_n, .req, .tmv_en, .chal_in, .core_start, .core_chal,
                           .core_done, .core_resp, .busy, .done, .evals, .resp);

  always #5 clk = ~clk;

  // Stand-in core: answers start number i with script[i].
  initial begin
    forever begin
      @(posedge clk);
      if (core_start && rst_n) begin
        int idx;
        idx = starts;
        starts++;
        checks++;
        if (core_chal !== chal_in) begin
          failures++;
          $display("FAIL core challenge %h expected %h", core_chal, chal_in);
        end
        repeat (1 + $urandom % 6) @(posedge clk);
        #1;
        core_done = 1;
        core_resp = script[idx % 3];
        @(posedge clk);
        #1;
        core_done = 0;
        core_resp = K'($urandom);
      end
    end
  end

  initial begin
    logic [K-1:0] expect_resp;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int cyc;
      for (int i = 0; i < 3; i++) script[i] = K'($urandom);
      tmv_en = run % 2;
      chal_in = N'($urandom);
      expect_resp = tmv_en ? ((script[0] & script[1]) | (script[0] & script[2]) |
                              (script[1] & script[2])) : script[0];
      starts = 0;
      req = 1;
      @(negedge clk);
      req = 0;
      cyc = 0;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (resp !== expect_resp || starts != (tmv_en ? 3 : 1) || evals != 2'(starts)) begin
        failures++;
        $display("FAIL run %0d vote=%b resp=%h expected %h, %0d core starts", run, tmv_en,
                 resp, expect_resp, starts);
      end
      @(negedge clk);
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
