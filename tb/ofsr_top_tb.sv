// ofsr_top_tb: end-to-end test of the OFSR-PUF top at its default size (8 cells, n = 32,
// H = 8, K = 32). For a series of random instances it enrolls a reliability mask through the
// mask port, then for random challenges:
//   - a single evaluation must equal the reference model, done K+4 cycles after start;
//   - a single evaluation with one cell's output inverted (noise injection) is counted when the
//     noise changes the response;
//   - a voted evaluation with the same noise during the first of its three runs must equal the
//     noise-free response, done 3(K+3)+1 cycles after start.
// It counts each mechanism (mask shielding a cell, obfuscation flips, noise corrupting a
// response, the vote correcting it, the response differing from the final register window)
// and fails if any of them never happened.
module ofsr_top_tb;
  import ofsr_model_pkg::*;
  localparam int N = 32, H = 8, K = 32, M = N / 4;
  typedef ofsr_model #(N, H, K) model_t;

  int checks = 0, failures = 0;
  int n_masked = 0, n_obf = 0, n_noise = 0, n_vote_fix = 0, n_decoupled = 0, n_mask_writes = 0;
  logic clk = 0, rst_n = 0, start = 0, tmv_en = 0;
  logic [N-1:0]       chal = '0;
  logic [M-1:0][15:0] lut = '0, mask;
  logic [M-1:0]       es_flip, noise_cells = '0;
  logic               noise_on = 0;
  logic               mask_we = 0;
  logic [2:0]         mask_addr = '0;
  logic [15:0]        mask_wdata = '0;
  logic busy, done;
  logic [1:0] evals;
  logic [K-1:0] resp, expect_resp;
  logic [N-1:0] win;

  ofsr_top dut (.clk, .rst_n, .start, .tmv_en, .chal, .es_lut(lut), .es_flip, .mask_we,
                .mask_addr, .mask_wdata, .busy, .done, .evals, .resp);

  // Noise only during the first evaluation of a request.
  assign es_flip = (noise_on && evals == 2'd0) ? noise_cells : '0;

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.u_puf.u_ctrl.step) begin
    if ((dut.u_puf.o & ~dut.u_puf.s) != '0) n_masked++;
    if (dut.u_puf.r != '0) n_obf++;
  end

  task automatic run_one(input logic vote, input logic noisy, output int cyc);
    @(negedge clk);
    tmv_en = vote;
    noise_on = noisy;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    noise_on = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int inst = 0; inst < 30; inst++) begin
      lut = model_t::rand_table();
      mask = model_t::rand_mask(15);
      for (int l = 0; l < M; l++) begin
        @(negedge clk);
        mask_we = 1; mask_addr = 3'(l); mask_wdata = mask[l];
        n_mask_writes++;
      end
      @(negedge clk);
      mask_we = 0;
      for (int c = 0; c < 8; c++) begin
        int cyc;
        bit noisy_differs;
        chal = N'($urandom);
        expect_resp = model_t::run(chal, lut, mask, win);
        // single evaluation, no noise
        run_one(0, 0, cyc);
        checks++;
        if (resp !== expect_resp || cyc != K + 4) begin
          failures++;
          $display("FAIL single: resp=%h expected %h, %0d cycles", resp, expect_resp, cyc);
        end
        checks++;
        if (dut.u_puf.u_input.q !== win) begin
          failures++;
          $display("FAIL final window %h expected %h", dut.u_puf.u_input.q, win);
        end
        if (win != expect_resp) n_decoupled++;
        // single evaluation with one noisy cell
        noise_cells = M'(1) << ($urandom % M);
        run_one(0, 1, cyc);
        noisy_differs = (resp != expect_resp);
        if (noisy_differs) n_noise++;
        // voted evaluation, noise in the first run only
        run_one(1, 1, cyc);
        checks++;
        if (resp !== expect_resp || cyc != 3 * (K + 3) + 1) begin
          failures++;
          $display("FAIL vote: resp=%h expected %h, %0d cycles", resp, expect_resp, cyc);
        end else if (noisy_differs) n_vote_fix++;
      end
    end
    $display("mask shielding %0d, obfuscation loops %0d, noisy responses %0d, vote fixes %0d, response != window %0d, mask writes %0d",
             n_masked, n_obf, n_noise, n_vote_fix, n_decoupled, n_mask_writes);
    checks++;
    if (n_masked == 0 || n_obf == 0 || n_noise == 0 || n_vote_fix == 0 || n_decoupled == 0
        || n_mask_writes == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
