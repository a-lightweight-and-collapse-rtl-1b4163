// ofsr_top: OFSR-PUF with optional triple-majority-vote response.
//
// The OFSR-PUF core (ofsr_puf) answers an n-bit challenge with a K-bit response produced by K
// loops of an ES-cell feedback shift register with nonlinear obfuscation. The tmv stage in
// front of it re-issues the same challenge three times and votes bit by bit when tmv_en is
// high, or passes a single evaluation through when it is low.
//
// Interface: pulse start with chal and tmv_en valid; done pulses when resp is ready:
// K+4 cycles after start for a single evaluation, 3*(K+3)+1 cycles with voting.
// es_lut holds each ES cell's 16-row table (the instance's fingerprint), es_flip injects noise
// into individual cells, and the mask port writes one reliability row per cell after
// enrollment. Defaults: 8 cells, n = 32, H = 8, K = 32.
module ofsr_top #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  parameter int unsigned H = ofsr_pkg::DEF_H,
  parameter int unsigned K = ofsr_pkg::DEF_K,
  localparam int unsigned M = N / ofsr_pkg::CELL_BITS,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       tmv_en,
  input  logic [N-1:0]               chal,
  input  ofsr_pkg::lut_row_t [M-1:0] es_lut,
  input  logic [M-1:0]               es_flip,
  input  logic                       mask_we,
  input  logic [AW-1:0]              mask_addr,
  input  ofsr_pkg::lut_row_t         mask_wdata,
  output logic                       busy,
  output logic                       done,
  output logic [1:0]                 evals,     // core evaluations so far
  output logic [K-1:0]               resp
);

  logic         core_start, core_done;
  logic [N-1:0] core_chal;
  logic [K-1:0] core_resp;

  tmv #(.N(N), .K(K)) u_tmv (
    .clk, .rst_n, .req(start), .tmv_en, .chal_in(chal),
    .core_start, .core_chal, .core_done, .core_resp,
    .busy, .done, .evals, .resp
  );

  ofsr_puf #(.N(N), .H(H), .K(K)) u_puf (
    .clk, .rst_n, .start(core_start), .chal(core_chal),
    .es_lut, .es_flip, .mask_we, .mask_addr, .mask_wdata,
    .busy(), .done(core_done), .resp(core_resp)
  );

endmodule
