// apt_ctrl: sequencer of the adaptive progressive thresholding recursion.
//
// start clears the histogram and lets one frame in. When the CH/CIA arrays
// are ready, the recursion begins with the whole gray range, upper bound
// T = 255. Each iteration reads the sub-image totals at index T (one clock,
// normalised by the 6-bit shift into W_T and U_T), starts the 16 blocks,
// waits until all are done, has the final-threshold unit pick the best t and
// apply the CLF rule, and then either stops or continues on the sub-image
// {0..t} with T = t. The threshold found by the last iteration is the
// result. The recursion also ends when a sub-image has no valid split left
// (the previous threshold is then kept) or after MAX_ITER iterations.
// The recursion and its stopping rule follow the reference algorithm; the
// iteration limit and the handling of exhausted sub-images are this design's.
//
// Outputs: busy while working; done rises when the result is ready and stays
// high until the next start, with thresh, found (at least one threshold was
// found), iterations, reason and log_sb2 (log2 sigma_B^2 of the last
// threshold). start is ignored while busy. Per iteration: 1 clock to load
// the totals, 1 to start, 20 until the blocks are done, 2 to evaluate (24).
// rst_n: active-low, synchronous.
module apt_ctrl
  import apt_pkg::*;
#(
  parameter int unsigned MAX_ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  // histogram unit
  output logic                hist_clear,
  input  logic                hist_ready,
  output logic [PIX_W-1:0]    top_idx,
  input  logic [C_W-1:0]      ch_top,
  input  logic [S_W-1:0]      cia_top,
  // between-class variance blocks
  output logic                blk_start,
  output logic [PIX_W-1:0]    t_upper,
  output logic [W_W-1:0]      w_tot,
  output logic [U_W-1:0]      u_tot,
  input  logic [NBLK-1:0]     blk_done,
  // final threshold unit
  output logic                eval,
  input  logic                res_valid,
  input  logic                best_valid,
  input  logic [PIX_W-1:0]    best_t,
  input  logic                stop,
  input  score_t              res_log_sb2,
  // result
  output logic [PIX_W-1:0]    thresh,
  output logic                found,
  output logic [4:0]          iterations,
  output stop_t               reason,
  output score_t              log_sb2
);

  typedef enum logic [2:0] {C_IDLE, C_FRAME, C_LOAD, C_START, C_SCAN, C_EVAL} cstate_t;
  cstate_t state;

  assign busy       = (state != C_IDLE);
  assign hist_clear = (state == C_IDLE) && start;
  assign blk_start  = (state == C_START);
  assign eval       = (state == C_SCAN) && (&blk_done);
  assign top_idx    = t_upper;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      done       <= 1'b0;
      t_upper    <= '0;
      w_tot      <= '0;
      u_tot      <= '0;
      thresh     <= '0;
      found      <= 1'b0;
      iterations <= '0;
      reason     <= STOP_NONE;
      log_sb2    <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (start) begin
          state      <= C_FRAME;
          done       <= 1'b0;
          found      <= 1'b0;
          thresh     <= '0;
          iterations <= '0;
          reason     <= STOP_NONE;
          log_sb2    <= '0;
        end
        C_FRAME: if (hist_ready) begin
          t_upper <= PIX_W'(LEVELS - 1);
          state   <= C_LOAD;
        end
        C_LOAD: begin
          w_tot <= W_W'(ch_top >> NORM_SH);
          u_tot <= U_W'(cia_top >> NORM_SH);
          state <= C_START;
        end
        C_START: state <= C_SCAN;
        C_SCAN:  if (&blk_done) state <= C_EVAL;
        C_EVAL: if (res_valid) begin
          if (!best_valid) begin
            state  <= C_IDLE;
            done   <= 1'b1;
            reason <= STOP_EMPTY;
          end else begin
            iterations <= iterations + 1'b1;
            thresh     <= best_t;
            found      <= 1'b1;
            log_sb2    <= res_log_sb2;
            t_upper    <= best_t;
            if (stop) begin
              state  <= C_IDLE;
              done   <= 1'b1;
              reason <= STOP_CLF;
            end else if (32'(iterations) + 1 >= MAX_ITER) begin
              state  <= C_IDLE;
              done   <= 1'b1;
              reason <= STOP_MAXIT;
            end else begin
              state <= C_LOAD;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // The final threshold unit answers only the evaluation it was asked for.
  a_result_expected: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> state == C_EVAL);

endmodule
