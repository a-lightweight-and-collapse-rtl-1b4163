// ofsr_puf_tb: the OFSR-PUF core at its default size (n = 32, 8 cells, H = 8, K = 32) against
// the reference model. Each trial draws a new instance (cell tables) and, every other trial, a
// reliability mask with about 15% of entries cleared; it then checks the K-bit response of
// several random challenges and the K+2 cycle latency from start to done. Counts how often the
// mask cleared a cell output and how often the obfuscation flipped register bits.
module ofsr_puf_tb;
  import ofsr_model_pkg::*;
  localparam int N = 32, H = 8, K = 32, M = N / 4;
  typedef ofsr_model #(N, H, K) model_t;

  int checks = 0, failures = 0;
  int masked_hits = 0, obf_flips = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]       chal = '0;
  logic [M-1:0][15:0] lut = '0, mask;
  logic [M-1:0]       flip = '0;
  logic               mask_we = 0;
  logic [2:0]         mask_addr = '0;
  logic [15:0]        mask_wdata = '0;
  logic busy, done;
  logic [K-1:0] resp, expect_resp;
  logic [N-1:0] win;

  ofsr_puf dut (.clk, .rst_n, .start, .chal, .es_lut(lut), .es_flip(flip), .mask_we,
                .mask_addr, .mask_wdata, .busy, .done, .resp);

  always #5 clk = ~clk;

  // Mechanism counters, sampled during the feedback loops.
  always @(posedge clk) if (dut.step) begin
    if ((dut.o & ~dut.s) != '0) masked_hits++;
    if (dut.r != '0) obf_flips++;
  end

  task automatic write_mask(model_t::table_t m);
    for (int l = 0; l < M; l++) begin
      @(negedge clk);
      mask_we = 1; mask_addr = 3'(l); mask_wdata = m[l];
    end
    @(negedge clk);
    mask_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    mask = '1;
    for (int trial = 0; trial < 40; trial++) begin
      lut = model_t::rand_table();
      if (trial % 2 == 1) begin
        mask = model_t::rand_mask(15);
        write_mask(mask);
      end
      for (int c = 0; c < 10; c++) begin
        int cyc;
        @(negedge clk);
        chal = N'($urandom);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!done && cyc < 1000) begin
          @(negedge clk);
          cyc++;
        end
        expect_resp = model_t::run(chal, lut, mask, win);
        checks++;
        if (resp !== expect_resp) begin
          failures++;
          $display("FAIL trial %0d chal=%h resp=%h expected %h", trial, chal, resp, expect_resp);
        end
        checks++;
        if (cyc != K + 2) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cyc, K + 2);
        end
        checks++;
        if (dut.q !== win) begin
          failures++;
          $display("FAIL final window %h expected %h", dut.q, win);
        end
      end
    end
    checks++;
    if (masked_hits == 0 || obf_flips == 0) begin
      failures++;
      $display("FAIL mechanism never seen: masked=%0d obfuscation=%0d", masked_hits, obf_flips);
    end
    $display("masked cell outputs in %0d loops, obfuscation flips in %0d loops", masked_hits, obf_flips);
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
