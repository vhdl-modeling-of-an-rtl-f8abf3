// trainer: state machine of the control unit that trains the network and
// runs it in operational mode.
//
// Training follows the univariate randomly optimised scheme: no gradient is
// computed; instead one weight at a time is replaced by a random value and
// the change is kept only if the training error over the whole set falls.
//   1. train_start: every weight gets a random value from the LFSR, and one
//      epoch over the stored set records the error of these weights
//      (baseline).
//   2. Each iteration picks the next weight in turn (neuron 0 weight 0,
//      neuron 0 weight 1, neuron 1 weight 0, ...), reads its value back
//      from the network, writes a fresh random value, and runs one epoch:
//      for every stored pattern the inputs are sent with a forward
//      calculation and the result is passed to the error calculator with
//      the target. If the error calculator does not keep the new weight,
//      the old value is written back.
//   3. After num_iter iterations train_done pulses.
// In idle, classify_start runs one forward calculation on cls_in1/cls_in2
// (cls_done pulses with cls_result), and host_w_wr / host_w_rd set or get
// weight host_w_idx (neuron idx/2, weight idx%2; host_w_done pulses).
// Every network access goes through the bus master (op_valid / op_done).
//
// Original design: the trainer is a state machine issuing the control
// signals; weights change randomly, one at a time, and a change is kept
// when the output comes closer to the target. This design's own choices:
// the round-robin order of the weights, the baseline epoch, the counters
// and the host weight access.
module trainer
  import nn_pkg::*;
#(
  parameter int unsigned AWD   = 9,    // RAM address width
  parameter int unsigned ITERW = 16    // iteration counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  // host control
  input  logic             train_start,
  input  logic [ITERW-1:0] num_iter,
  output logic             train_done,
  output logic             busy,
  output logic [ITERW-1:0] iter_count,
  output logic [ITERW-1:0] kept_count,
  output logic [ITERW-1:0] discard_count,
  input  logic             classify_start,
  input  data_t            cls_in1,
  input  data_t            cls_in2,
  output logic             cls_done,
  output logic [7:0]       cls_result,
  output logic             cls_overflow,
  input  logic             host_w_wr,
  input  logic             host_w_rd,
  input  logic [2:0]       host_w_idx,
  input  data_t            host_w_data,
  output logic             host_w_done,
  output data_t            host_w_q,
  // bus master
  output logic             op_valid,
  input  logic             op_ready,
  output cmd_e             op,
  output logic [AW-1:0]    op_addr,
  output logic [SW-1:0]    op_sel,
  output data_t            op_wdata,
  output data_t            op_in1,
  output data_t            op_in2,
  input  logic             op_done,
  input  data_t            op_rdata,
  input  logic [7:0]       op_result,
  input  logic             op_overflow,
  // RAM interface
  output logic             rd_en,
  output logic [AWD-1:0]   rd_addr,
  input  train_word_t      rd_data,
  input  logic [AWD:0]     n_patterns,
  // pseudo random number generator
  input  logic [7:0]       rnd,
  // error calculator
  output logic             err_clear,
  output logic             err_sample,
  output logic [7:0]       err_result,
  output logic [7:0]       err_target,
  output logic             err_epoch_end,
  output logic             err_baseline,
  input  logic             err_decided,
  input  logic             err_keep
);

  typedef enum logic [4:0] {
    S_IDLE,
    S_BUS_ISSUE, S_BUS_WAIT,
    S_INIT_W, S_INIT_NEXT,
    S_EP_CLEAR, S_EP_FETCH, S_EP_CALC, S_EP_SAMPLE,
    S_EP_END, S_EP_DECIDE,
    S_ITER, S_SAVE, S_PERTURB, S_ITER_NEXT,
    S_CLS_DONE, S_HOST_DONE
  } tr_state_e;

  tr_state_e        state, ret_state;
  logic [2:0]       widx;          // weight under trial / being initialised
  logic [AWD:0]     pat;           // pattern index within the epoch
  data_t            old_w;         // value to restore on discard
  logic             baseline;
  logic [ITERW-1:0] iters_goal;

  function automatic logic [AW-1:0] w_addr(input logic [2:0] k);
    return AW'(k >> 1);
  endfunction

  // Bus request helper fields are registers; S_BUS_ISSUE presents them.
  assign op_valid = (state == S_BUS_ISSUE);
  assign busy     = (state != S_IDLE);

  assign rd_addr       = pat[AWD-1:0];
  assign rd_en         = (state == S_EP_FETCH);
  assign err_clear     = (state == S_EP_CLEAR);
  assign err_sample    = (state == S_EP_SAMPLE);
  assign err_result    = op_result;
  assign err_epoch_end = (state == S_EP_END);
  assign err_baseline  = baseline;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      ret_state     <= S_IDLE;
      op            <= CMD_IDLE;
      op_addr       <= '0;
      op_sel        <= '0;
      op_wdata      <= '0;
      op_in1        <= '0;
      op_in2        <= '0;
      widx          <= '0;
      pat           <= '0;
      old_w         <= '0;
      baseline      <= 1'b0;
      iters_goal    <= '0;
      iter_count    <= '0;
      kept_count    <= '0;
      discard_count <= '0;
      train_done    <= 1'b0;
      cls_done      <= 1'b0;
      cls_result    <= '0;
      cls_overflow  <= 1'b0;
      host_w_done   <= 1'b0;
      host_w_q      <= '0;
      err_target    <= '0;
    end else begin
      train_done  <= 1'b0;
      cls_done    <= 1'b0;
      host_w_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (train_start) begin
            iters_goal    <= num_iter;
            iter_count    <= '0;
            kept_count    <= '0;
            discard_count <= '0;
            widx          <= '0;
            state         <= S_INIT_W;
          end else if (classify_start) begin
            op        <= CMD_CALC;
            op_in1    <= cls_in1;
            op_in2    <= cls_in2;
            ret_state <= S_CLS_DONE;
            state     <= S_BUS_ISSUE;
          end else if (host_w_wr || host_w_rd) begin
            op        <= host_w_wr ? CMD_WR_W : CMD_RD_W;
            op_addr   <= w_addr(host_w_idx);
            op_sel    <= host_w_idx[0];
            op_wdata  <= host_w_data;
            ret_state <= S_HOST_DONE;
            state     <= S_BUS_ISSUE;
          end
        end

        // generic bus operation: present the request, wait for completion
        S_BUS_ISSUE: if (op_ready) state <= S_BUS_WAIT;
        S_BUS_WAIT:  if (op_done)  state <= ret_state;

        // random starting weights
        S_INIT_W: begin
          op        <= CMD_WR_W;
          op_addr   <= w_addr(widx);
          op_sel    <= widx[0];
          op_wdata  <= data_t'(rnd);
          ret_state <= S_INIT_NEXT;
          state     <= S_BUS_ISSUE;
        end
        S_INIT_NEXT: begin
          if (widx == 3'(N_WEIGHTS - 1)) begin
            widx     <= '0;
            baseline <= 1'b1;
            state    <= S_EP_CLEAR;
          end else begin
            widx  <= widx + 1'b1;
            state <= S_INIT_W;
          end
        end

        // one epoch over the stored training set
        S_EP_CLEAR: begin
          pat   <= '0;
          state <= (n_patterns == '0) ? S_EP_END : S_EP_FETCH;
        end
        S_EP_FETCH: state <= S_EP_CALC;
        S_EP_CALC: begin
          op         <= CMD_CALC;
          op_in1     <= rd_data.in1;
          op_in2     <= rd_data.in2;
          err_target <= rd_data.target;
          ret_state  <= S_EP_SAMPLE;
          state      <= S_BUS_ISSUE;
        end
        S_EP_SAMPLE: begin
          pat   <= pat + 1'b1;
          state <= (pat + 1'b1 == n_patterns) ? S_EP_END : S_EP_FETCH;
        end
        S_EP_END: state <= S_EP_DECIDE;
        S_EP_DECIDE: begin
          if (err_decided) begin
            if (baseline) begin
              baseline <= 1'b0;
              state    <= S_ITER;
            end else if (err_keep) begin
              kept_count <= kept_count + 1'b1;
              state      <= S_ITER_NEXT;
            end else begin
              discard_count <= discard_count + 1'b1;
              op            <= CMD_WR_W;
              op_addr       <= w_addr(widx);
              op_sel        <= widx[0];
              op_wdata      <= old_w;
              ret_state     <= S_ITER_NEXT;
              state         <= S_BUS_ISSUE;
            end
          end
        end

        // one univariate trial
        S_ITER: begin
          if (iter_count == iters_goal) begin
            train_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            op        <= CMD_RD_W;
            op_addr   <= w_addr(widx);
            op_sel    <= widx[0];
            ret_state <= S_SAVE;
            state     <= S_BUS_ISSUE;
          end
        end
        S_SAVE: begin
          old_w <= op_rdata;
          state <= S_PERTURB;
        end
        S_PERTURB: begin
          op        <= CMD_WR_W;
          op_wdata  <= data_t'(rnd);
          ret_state <= S_EP_CLEAR;
          state     <= S_BUS_ISSUE;
        end
        S_ITER_NEXT: begin
          iter_count <= iter_count + 1'b1;
          widx       <= (widx == 3'(N_WEIGHTS - 1)) ? '0 : widx + 1'b1;
          state      <= S_ITER;
        end

        S_CLS_DONE: begin
          cls_result   <= op_result;
          cls_overflow <= op_overflow;
          cls_done     <= 1'b1;
          state        <= S_IDLE;
        end
        S_HOST_DONE: begin
          host_w_q    <= op_rdata;
          host_w_done <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
