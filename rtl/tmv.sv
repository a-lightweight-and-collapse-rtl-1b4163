// tmv: triple majority voting over repeated evaluations of one challenge.
//
// Cells that survive the reliability mask still flip now and then, and one wrong feedback bit
// corrupts every later bit of a multi-bit response. Evaluating the same challenge three times
// and taking the bitwise majority of the three responses removes a single bad evaluation.
// The document names this vote and its effect on the bit error rate; running it over three
// whole responses, with the sequencing below, is this design's choice.
//
// Operation: req (sampled while idle) latches chal_in and tmv_en. The module then starts the
// core (core_start, one cycle) with the latched challenge, waits for core_done and stores the
// response; with tmv_en = 1 it does so three times and outputs maj(r1, r2, r3) bit by bit, with
// tmv_en = 0 once and outputs that response. done is a one-cycle pulse in the cycle after the
// last core_done, and resp is stable from then until the next req is accepted. evals counts
// the core evaluations of the current request.
module tmv #(
  parameter int unsigned N = ofsr_pkg::DEF_N,
  parameter int unsigned K = ofsr_pkg::DEF_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic         tmv_en,
  input  logic [N-1:0] chal_in,
  // to and from the PUF core
  output logic         core_start,
  output logic [N-1:0] core_chal,
  input  logic         core_done,
  input  logic [K-1:0] core_resp,
  // result
  output logic         busy,
  output logic         done,
  output logic [1:0]   evals,
  output logic [K-1:0] resp
);

  typedef enum logic [1:0] {T_IDLE, T_ISSUE, T_WAIT, T_DONE} state_t;

  state_t       state;
  logic         vote;
  logic [K-1:0] r1, r2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      vote      <= 1'b0;
      evals     <= '0;
      core_chal <= '0;
      r1        <= '0;
      r2        <= '0;
      resp      <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (req) begin
          core_chal <= chal_in;
          vote      <= tmv_en;
          evals     <= '0;
          state     <= T_ISSUE;
        end
        T_ISSUE: state <= T_WAIT;
        T_WAIT: if (core_done) begin
          evals <= evals + 1'b1;
          if (!vote) begin
            resp  <= core_resp;
            state <= T_DONE;
          end else if (evals == 2'd0) begin
            r1    <= core_resp;
            state <= T_ISSUE;
          end else if (evals == 2'd1) begin
            r2    <= core_resp;
            state <= T_ISSUE;
          end else begin
            for (int i = 0; i < int'(K); i++)
              resp[i] <= ofsr_pkg::maj3(r1[i], r2[i], core_resp[i]);
            state <= T_DONE;
          end
        end
        T_DONE: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    core_start = (state == T_ISSUE);
    busy       = (state == T_ISSUE) || (state == T_WAIT);
    done       = (state == T_DONE);
  end

endmodule
