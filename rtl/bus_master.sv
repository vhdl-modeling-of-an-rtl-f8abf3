// bus_master: drives the address / select / command / data buses of the
// neural network on behalf of the trainer.
//
// The trainer asks for one bus operation at a time with op_valid while
// op_ready is high: op is the command to send (CMD_WR_W to set a weight,
// CMD_RD_W to get one, CMD_CALC to run a forward calculation), op_addr and
// op_sel name the neuron and weight, op_wdata is the weight to store and
// op_in1 / op_in2 are the network inputs. The command is put on the bus for
// exactly one cycle and then returns to CMD_IDLE; the bus master then waits
// for Ack (weight operations) or Done (calculation) from the network,
// captures the returned weight or the result and overflow flag, and pulses
// op_done. The inputs stay on the Inputs bus until the next calculation.
//
// Original design: the four commands and their 2-bit codes, neuron
// addressing and weight selection, supplying weights and inputs, getting
// weights back. This design's own choices: the request/done handshake with
// the trainer and the one-cycle command pulse.
module bus_master
  import nn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // trainer side
  input  logic          op_valid,
  output logic          op_ready,
  input  cmd_e          op,
  input  logic [AW-1:0] op_addr,
  input  logic [SW-1:0] op_sel,
  input  data_t         op_wdata,
  input  data_t         op_in1,
  input  data_t         op_in2,
  output logic          op_done,
  output data_t         op_rdata,
  output logic [7:0]    op_result,
  output logic          op_overflow,
  // network side
  output nn_req_t       req,
  input  nn_rsp_t       rsp
);

  typedef enum logic [1:0] {BM_IDLE, BM_DRIVE, BM_WAIT} bm_state_e;
  bm_state_e state;
  cmd_e      cur_op;

  assign op_ready = (state == BM_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= BM_IDLE;
      cur_op      <= CMD_IDLE;
      req         <= '{addr: '0, sel: '0, cmd: CMD_IDLE, wdata: '0, in1: '0, in2: '0};
      op_done     <= 1'b0;
      op_rdata    <= '0;
      op_result   <= '0;
      op_overflow <= 1'b0;
    end else begin
      op_done <= 1'b0;
      unique case (state)
        BM_IDLE: begin
          if (op_valid && op != CMD_IDLE) begin
            req.addr  <= op_addr;
            req.sel   <= op_sel;
            req.cmd   <= op;
            req.wdata <= op_wdata;
            if (op == CMD_CALC) begin
              req.in1 <= op_in1;
              req.in2 <= op_in2;
            end
            cur_op <= op;
            state  <= BM_DRIVE;
          end
        end
        BM_DRIVE: begin
          req.cmd <= CMD_IDLE;
          state   <= BM_WAIT;
        end
        BM_WAIT: begin
          if (cur_op == CMD_CALC && rsp.done) begin
            op_result   <= rsp.result;
            op_overflow <= rsp.overflow;
            op_done     <= 1'b1;
            state       <= BM_IDLE;
          end else if (cur_op != CMD_CALC && rsp.ack) begin
            if (cur_op == CMD_RD_W) op_rdata <= rsp.rdata;
            op_done <= 1'b1;
            state   <= BM_IDLE;
          end
        end
        default: state <= BM_IDLE;
      endcase
    end
  end

  // Only existing neurons may be addressed by a weight operation, else the
  // bus master would wait for an Ack that never comes.
  a_addr_range : assert property (@(posedge clk) disable iff (!rst_n)
    (op_valid && op_ready && (op == CMD_WR_W || op == CMD_RD_W))
      |-> (32'(op_addr) < N_NEURONS));

endmodule
