// puf_quality_tb: uniformity, uniqueness and reliability of the default OFSR-PUF top
// (8 cells, n = 32, H = 8, K = 32).
//
// Instances are emulated as in an FPGA evaluation: every instance gets random cell tables and
// a reliability mask with 14.5% of entries cleared. All instances answer the same challenges.
//  - Uniformity: fraction of ones over all response bits, must lie in 0.45..0.55.
//  - Uniqueness: mean pairwise fractional Hamming distance between instances, 0.45..0.55.
//  - Reliability: each cell output is inverted at random with probability 0.26% per loop;
//    the bit error rate of the first 1, 8, 16 and 32 response bits is measured for single
//    and for triple-majority-voted evaluations. The voted error rate of the 32-bit
//    response must not exceed the single one.
module puf_quality_tb;
  localparam int N = 32, K = 32, M = N / 4;
  localparam int INST = 24, CHAL = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, tmv_en = 0;
  logic [N-1:0]       chal = '0;
  logic [M-1:0][15:0] lut = '0;
  logic [M-1:0]       es_flip = '0;
  logic               noise_on = 0;
  logic               mask_we = 0;
  logic [2:0]         mask_addr = '0;
  logic [15:0]        mask_wdata = '0;
  logic busy, done;
  logic [1:0] evals;
  logic [K-1:0] resp;
  logic [N-1:0] chals [CHAL];
  logic [K-1:0] golden [INST][CHAL];
  int ones, bits;
  int err_single [4], err_vote [4];
  localparam int LENS [4] = '{1, 8, 16, 32};

  ofsr_top dut (.clk, .rst_n, .start, .tmv_en, .chal, .es_lut(lut), .es_flip, .mask_we,
                .mask_addr, .mask_wdata, .busy, .done, .evals, .resp);

  always #5 clk = ~clk;

  // random cell noise, about 0.26% per cell per cycle
  always @(negedge clk)
    for (int l = 0; l < M; l++) es_flip[l] <= noise_on && (($urandom % 10000) < 26);

  task automatic evaluate(input logic vote, input logic noisy);
    @(negedge clk);
    tmv_en = vote;
    noise_on = noisy;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    noise_on = 0;
  endtask

  function automatic int hd_prefix(logic [K-1:0] a, logic [K-1:0] b, int len);
    int d = 0;
    for (int i = 0; i < len; i++) if (a[i] != b[i]) d++;
    return d;
  endfunction

  initial begin
    real u, q, pairs;
    ones = 0; bits = 0;
    for (int i = 0; i < 4; i++) begin err_single[i] = 0; err_vote[i] = 0; end
    for (int c = 0; c < CHAL; c++) chals[c] = N'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int inst = 0; inst < INST; inst++) begin
      for (int l = 0; l < M; l++) lut[l] = 16'($urandom);
      for (int l = 0; l < M; l++) begin
        @(negedge clk);
        mask_we = 1; mask_addr = 3'(l);
        for (int c = 0; c < 16; c++) mask_wdata[c] = ($urandom % 1000) >= 145;
      end
      @(negedge clk);
      mask_we = 0;
      for (int c = 0; c < CHAL; c++) begin
        chal = chals[c];
        evaluate(0, 0);
        golden[inst][c] = resp;
        for (int i = 0; i < K; i++) if (resp[i]) ones++;
        bits += K;
        for (int rep = 0; rep < 20; rep++) begin
          evaluate(0, 1);
          for (int i = 0; i < 4; i++) err_single[i] += hd_prefix(resp, golden[inst][c], LENS[i]);
          evaluate(1, 1);
          for (int i = 0; i < 4; i++) err_vote[i] += hd_prefix(resp, golden[inst][c], LENS[i]);
        end
      end
    end
    u = real'(ones) / real'(bits);
    q = 0.0; pairs = 0.0;
    for (int a = 0; a < INST; a++)
      for (int b = a + 1; b < INST; b++)
        for (int c = 0; c < CHAL; c++) begin
          q += real'(hd_prefix(golden[a][c], golden[b][c], K)) / real'(K);
          pairs += 1.0;
        end
    q = q / pairs;
    $display("uniformity %0.4f, uniqueness %0.4f", u, q);
    for (int i = 0; i < 4; i++)
      $display("%0d-bit response: bit error rate single %0.4f%%, voted %0.4f%%", LENS[i],
               100.0 * real'(err_single[i]) / real'(INST * CHAL * 20 * LENS[i]),
               100.0 * real'(err_vote[i]) / real'(INST * CHAL * 20 * LENS[i]));
    checks++;
    if (u < 0.45 || u > 0.55) begin failures++; $display("FAIL uniformity"); end
    checks++;
    if (q < 0.45 || q > 0.55) begin failures++; $display("FAIL uniqueness"); end
    checks++;
    if (err_single[3] == 0) begin failures++; $display("FAIL noise never caused an error"); end
    checks++;
    if (err_vote[3] > err_single[3]) begin failures++; $display("FAIL vote did not help"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
