// decoder_ctrl: frame and iteration control.
//   LOAD : accepts one load beat per llr_valid (24 channel LLRs, variable index
//          0..95 of every block column, in order); the beat also clears the CTV
//          word of that row index in every layer. After beat 95 decoding starts.
//   DEC  : all layers run; phase counts decode cycles modulo 96. One iteration
//          is one full 96-row sweep of every layer. In the cycle 96*n + PIPE_LAT
//          (n >= 1) the decision buffer holds exactly the result of n
//          iterations (later rows are still in the pipeline); the controller
//          then stops if H x = 0 (converged) or if n has reached max_iter,
//          and flushes the rows in flight in that same cycle.
//   DONE : done stays high with the iteration count and convergence flag until
//          the first beat of the next frame; a new frame may start at once.
// The frame protocol, the iteration counting and the check instant are this
// design's choices; the published algorithm gives the stop rule (H x = 0 or the preset
// maximum number of iterations). max_iter = 0 is treated as 1.
// Timing: done rises 96*n + PIPE_LAT + 1 cycles after the clock edge that
// took the last load beat.
module decoder_ctrl
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       llr_valid,
  input  logic [5:0] max_iter,
  input  logic       syn_ok,
  output logic       in_ready,
  output logic       load_en,
  output row_t       load_idx,
  output logic       run,
  output logic       flush,
  output row_t       phase,
  output logic       busy,
  output logic       done,
  output logic       converged,
  output logic [5:0] iter_count
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DEC, S_DONE} state_t;
  state_t     state;
  logic [5:0] iters, max_eff;
  logic       stop;

  assign max_eff  = (max_iter == '0) ? 6'd1 : max_iter;
  assign in_ready = (state != S_DEC);
  assign load_en  = llr_valid & in_ready;
  assign busy     = (state == S_LOAD) || (state == S_DEC);
  assign stop     = (state == S_DEC) && (phase == row_t'(PIPE_LAT)) && (iters != '0) &&
                    (syn_ok || (iters >= max_eff));
  assign run      = (state == S_DEC) && !stop;
  assign flush    = stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      load_idx   <= '0;
      phase      <= '0;
      iters      <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iter_count <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE, S_LOAD: begin
          if (load_en) begin
            done <= 1'b0;
            if (load_idx == row_t'(Z - 1)) begin
              load_idx <= '0;
              phase    <= '0;
              iters    <= '0;
              state    <= S_DEC;
            end else begin
              load_idx <= load_idx + 1'b1;
              state    <= S_LOAD;
            end
          end
        end
        S_DEC: begin
          if (stop) begin
            state      <= S_DONE;
            done       <= 1'b1;
            converged  <= syn_ok;
            iter_count <= iters;
          end else begin
            if (phase == row_t'(Z - 1)) begin
              phase <= '0;
              iters <= iters + 1'b1;
            end else begin
              phase <= phase + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
