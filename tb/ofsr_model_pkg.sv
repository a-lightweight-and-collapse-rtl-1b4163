// ofsr_model_pkg: reference model of the OFSR-PUF for the testbenches.
//
// Written from the algorithm, with 1-based arrays as in the textual description, and sharing
// no code with the RTL. run() returns the K-bit response (bit k-1 = Re[k]) of a noise-free
// instance with the given cell tables and reliability mask, and the final register window.
package ofsr_model_pkg;

  class ofsr_model #(int N = 32, int H = 8, int K = 32);
    localparam int M    = N / 4;
    localparam int LOGN = $clog2(N);

    typedef logic [M-1:0][15:0] table_t;

    // Response of one evaluation; win_out receives the final register contents (bit i-1 =
    // window position i).
    static function automatic logic [K-1:0] run(input logic [N-1:0] chal, input table_t lut,
                                                 input table_t mask,
                                                 output logic [N-1:0] win_out);
      bit          w  [1:N];
      bit          nw [1:N];
      bit          t  [1:M];
      bit          sel[1:N];
      logic [K-1:0] re;
      for (int i = 1; i <= N; i++) w[i] = chal[i-1];
      for (int k = 1; k <= K; k++) begin
        bit fb;
        fb = 0;
        for (int l = 1; l <= M; l++) begin
          int idx;
          idx = 8*w[4*l-3] + 4*w[4*l-2] + 2*w[4*l-1] + w[4*l];
          t[l] = lut[l-1][idx] & mask[l-1][idx];
          fb ^= t[l];
        end
        for (int i = 1; i <= N; i++) sel[i] = 0;
        for (int h = 1; h <= H; h++) begin
          int v;
          v = 0;
          for (int j = 0; j < LOGN; j++) v = 2*v + int'(t[((h - 1 + j) % M) + 1]);
          sel[v+1] = 1;
        end
        for (int i = 1; i < N; i++) nw[i] = w[i+1] ^ (sel[i+1] & fb);
        nw[N] = fb;
        w = nw;
        re[k-1] = fb;
      end
      for (int i = 1; i <= N; i++) win_out[i-1] = w[i];
      return re;
    endfunction

    // A random table: every bit from $urandom.
    static function automatic table_t rand_table();
      table_t x;
      for (int l = 0; l < M; l++) x[l] = 16'($urandom);
      return x;
    endfunction

    // A mask with roughly pct percent of entries cleared.
    static function automatic table_t rand_mask(int pct);
      table_t x;
      for (int l = 0; l < M; l++)
        for (int c = 0; c < 16; c++) x[l][c] = (($urandom % 100) >= pct);
      return x;
    endfunction
  endclass

endpackage
