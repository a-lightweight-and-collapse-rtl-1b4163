// ofsr_puf_32cell_tb: the 32-cell OFSR-PUF (n = 128, H = 32 obfuscation indices of 7 bits,
// K = 32) against the reference model, with random instances and a mask clearing about 15% of
// the entries. Also checks the K+2 cycle latency and the final register window.
module ofsr_puf_32cell_tb;
  import ofsr_model_pkg::*;
  localparam int N = 128, H = 32, K = 32, M = N / 4;
  typedef ofsr_model #(N, H, K) model_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0]       chal = '0;
  logic [M-1:0][15:0] lut = '0, mask;
  logic               mask_we = 0;
  logic [4:0]         mask_addr = '0;
  logic [15:0]        mask_wdata = '0;
  logic busy, done;
  logic [K-1:0] resp, expect_resp;
  logic [N-1:0] win;

  ofsr_puf #(.N(N), .H(H), .K(K)) dut (.clk, .rst_n, .start, .chal, .es_lut(lut),
    .es_flip('0), .mask_we, .mask_addr, .mask_wdata, .busy, .done, .resp);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      lut = model_t::rand_table();
      mask = model_t::rand_mask(15);
      for (int l = 0; l < M; l++) begin
        @(negedge clk);
        mask_we = 1; mask_addr = 5'(l); mask_wdata = mask[l];
      end
      @(negedge clk);
      mask_we = 0;
      for (int c = 0; c < 10; c++) begin
        int cyc;
        @(negedge clk);
        chal = {$urandom, $urandom, $urandom, $urandom};
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
        if (resp !== expect_resp || cyc != K + 2) begin
          failures++;
          $display("FAIL trial %0d resp=%h expected %h, %0d cycles", trial, resp, expect_resp, cyc);
        end
        checks++;
        if (dut.q !== win) begin
          failures++;
          $display("FAIL final window differs");
        end
      end
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
