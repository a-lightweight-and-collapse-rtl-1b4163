// input_layer_tb: random init/step/R/FB sequences against a reference register: init loads
// R, a step XORs R into the window, drops the oldest bit and appends FB.
module input_layer_tb;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, step = 0, fb = 0;
  logic [N-1:0] r = '0, q, model;

  input_layer #(.N(N)) dut (.clk, .rst_n, .init, .step, .r, .fb, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    model = '0;
    checks++;
    if (q !== '0) failures++;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int mode;
      mode = $urandom % 8;
      init = (mode == 0);
      step = (mode >= 2);
      r    = N'($urandom) & N'($urandom);
      fb   = 1'($urandom);
      @(posedge clk);
      if (init) model = r;
      else if (step) begin
        logic [N-1:0] x;
        x = model ^ r;
        for (int i = 0; i < N - 1; i++) model[i] = x[i+1];
        model[N-1] = fb;
      end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", cyc, q, model);
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
