// ofsr_ctrl: loop controller of the OFSR-PUF core.
//
// One evaluation is one init loop followed by K feedback loops. In the init loop the
// challenge is loaded and the obfuscation selection is unused; in loop k = 1..K the core
// computes FB_k from the current window, the controller records it as response bit
// Re[k] (resp[k-1]) and the register obfuscates and shifts. The document fixes the init loop
// and the K loops; the start/busy/done handshake and one loop per clock cycle are this
// design's choices.
//
// Timing: start is sampled while idle. The init loop is the next cycle, the K feedback loops
// the K cycles after it, and done is a one-cycle pulse in the cycle after the last loop, i.e.
// K+2 cycles after the cycle in which start was seen high. resp is stable from done until
// the next start is accepted. busy is high from the init loop until done.
module ofsr_ctrl #(
  parameter int unsigned K = ofsr_pkg::DEF_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         fb,      // feedback bit of the current loop
  output logic         init,    // load loop
  output logic         step,    // feedback loop
  output logic         busy,
  output logic         done,
  output logic [K-1:0] resp     // resp[k-1] = Re[k] = FB_k
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_LOOP, S_DONE} state_t;

  localparam int unsigned CW = (K > 1) ? $clog2(K) : 1;

  state_t        state;
  logic [CW-1:0] loop;    // 0-based loop number within S_LOOP

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      loop  <= '0;
      resp  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_INIT;
        S_INIT: begin
          loop  <= '0;
          state <= S_LOOP;
        end
        S_LOOP: begin
          resp[loop] <= fb;
          if (32'(loop) == K - 1) state <= S_DONE;
          else                    loop  <= loop + 1'b1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    init = (state == S_INIT);
    step = (state == S_LOOP);
    busy = (state == S_INIT) || (state == S_LOOP);
    done = (state == S_DONE);
  end

endmodule
