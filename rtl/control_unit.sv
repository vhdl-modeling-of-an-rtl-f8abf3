// control_unit: everything around the neural-network datapath.
//
// Five sub-modules work together: the trainer state machine sequences all
// work; the bus master turns its requests into commands on the network's
// address / select / command / data buses and collects Ack, Done and
// Results; the RAM interface stores the 32-bit training words arriving on
// Data_in and recalls them every epoch; the LFSR supplies random weights
// (it steps on every clock, so each draw takes the register's current
// value, and seed_load sets its initialisation vector); the error
// calculator scores each epoch and tells the trainer whether to keep a
// trial weight, by squared error or, with DECIDE_ON_MISS = 1, by
// misclassification count.
//
// Interface: host side as in the top module (training-set load, training
// start and status, classification, weight get/set, error report);
// network side nn_req (Addr, sel, cmd, Inputs and outgoing weight data)
// and nn_rsp (Results, Ack, Done, returned weight, overflow).
//
// Original design: the five sub-modules and the signals between control
// unit and network (block diagram). This design's own choices: the host interface
// and the free-running LFSR with a loadable initialisation vector.
module control_unit
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned ITERW = 16,
  parameter bit          DECIDE_ON_MISS = 1'b0,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // training-set load (Data_in)
  input  logic             load_start,
  input  logic             data_valid,
  input  logic [31:0]      data_in,
  output logic [AWD:0]     n_patterns,
  output logic             ram_full,
  // initialisation vector of the random number generator
  input  logic             seed_load,
  input  logic [15:0]      seed,
  // training
  input  logic             train_start,
  input  logic [ITERW-1:0] num_iter,
  output logic             train_done,
  output logic             busy,
  output logic [ITERW-1:0] iter_count,
  output logic [ITERW-1:0] kept_count,
  output logic [ITERW-1:0] discard_count,
  output logic [31:0]      best_err,
  output logic [15:0]      best_miss,
  // operational mode
  input  logic             classify_start,
  input  data_t            cls_in1,
  input  data_t            cls_in2,
  output logic             cls_done,
  output logic [7:0]       cls_result,
  output logic             cls_overflow,
  // weight get / set
  input  logic             host_w_wr,
  input  logic             host_w_rd,
  input  logic [2:0]       host_w_idx,
  input  data_t            host_w_data,
  output logic             host_w_done,
  output data_t            host_w_q,
  // neural network
  output nn_req_t          nn_req,
  input  nn_rsp_t          nn_rsp
);

  logic        op_valid, op_ready, op_done, op_overflow;
  cmd_e        op;
  logic [AW-1:0] op_addr;
  logic [SW-1:0] op_sel;
  data_t       op_wdata, op_in1, op_in2, op_rdata;
  logic [7:0]  op_result;
  logic        rd_en;
  logic [AWD-1:0] rd_addr;
  train_word_t rd_data;
  logic [7:0]  rnd;
  logic        err_clear, err_sample, err_epoch_end, err_baseline;
  logic        err_decided, err_keep;
  logic [7:0]  err_result, err_target;

  trainer #(.AWD(AWD), .ITERW(ITERW)) u_trainer (
    .clk, .rst_n,
    .train_start, .num_iter, .train_done, .busy, .iter_count,
    .kept_count, .discard_count,
    .classify_start, .cls_in1, .cls_in2, .cls_done, .cls_result,
    .cls_overflow,
    .host_w_wr, .host_w_rd, .host_w_idx, .host_w_data, .host_w_done,
    .host_w_q,
    .op_valid, .op_ready, .op, .op_addr, .op_sel, .op_wdata, .op_in1,
    .op_in2, .op_done, .op_rdata, .op_result, .op_overflow,
    .rd_en, .rd_addr, .rd_data, .n_patterns,
    .rnd,
    .err_clear, .err_sample, .err_result, .err_target, .err_epoch_end,
    .err_baseline, .err_decided, .err_keep
  );

  bus_master u_bus_master (
    .clk, .rst_n,
    .op_valid, .op_ready, .op, .op_addr, .op_sel, .op_wdata, .op_in1,
    .op_in2, .op_done, .op_rdata, .op_result, .op_overflow,
    .req(nn_req), .rsp(nn_rsp)
  );

  ram_interface #(.DEPTH(DEPTH)) u_ram (
    .clk, .rst_n,
    .load_start, .data_valid, .data_in, .n_patterns, .full(ram_full),
    .rd_en, .rd_addr, .rd_data
  );

  lfsr_prng u_lfsr (
    .clk, .rst_n,
    .en(1'b1), .load(seed_load), .seed(seed),
    .state(), .bit_out(), .rnd
  );

  error_calculator #(.DECIDE_ON_MISS(DECIDE_ON_MISS)) u_err (
    .clk, .rst_n,
    .clear(err_clear), .sample_valid(err_sample), .result(err_result),
    .target(err_target), .epoch_end(err_epoch_end), .baseline(err_baseline),
    .err_sum(), .miss_count(), .decided(err_decided), .keep(err_keep),
    .best_err, .best_miss
  );

endmodule
