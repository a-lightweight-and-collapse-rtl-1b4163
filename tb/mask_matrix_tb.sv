// mask_matrix_tb: after reset every S[l] must be 1; after rows are written, S[l] must be
// row l's bit at the cell's 4-bit challenge. Also checks that a write reaches only its row.
module mask_matrix_tb;
  localparam int N = 32, M = N / 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0]          waddr = '0;
  logic [15:0]         wdata = '0;
  logic [M-1:0][3:0]   nib;
  logic [M-1:0]        s;
  logic [M-1:0][15:0]  ref_rows;

  mask_matrix #(.N(N)) dut (.clk, .rst_n, .we, .waddr, .wdata, .nib, .s);

  always #5 clk = ~clk;

  task automatic check_all(int trials);
    for (int tr = 0; tr < trials; tr++) begin
      for (int l = 0; l < M; l++) nib[l] = 4'($urandom);
      #1;
      for (int l = 0; l < M; l++) begin
        checks++;
        if (s[l] !== ref_rows[l][nib[l]]) begin
          failures++;
          $display("FAIL cell %0d nib=%0d s=%b expected %b", l, nib[l], s[l], ref_rows[l][nib[l]]);
        end
      end
    end
  endtask

  initial begin
    nib = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_rows = '1;
    check_all(50);
    for (int round = 0; round < 20; round++) begin
      for (int l = 0; l < M; l++) begin
        @(negedge clk);
        we = 1; waddr = 3'(l); wdata = 16'($urandom);
        ref_rows[l] = wdata;
        @(negedge clk);
        we = 0;
        check_all(5);
      end
      check_all(50);
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
