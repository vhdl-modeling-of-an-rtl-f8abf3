// ann_classifier_top: power-quality disturbance classifier, a control unit
// and a 2-2-1 neural-network datapath, as in the original block diagram.
//
// A host loads the training set (32-bit words on data_in with data_valid,
// after load_start), starts training with train_start for num_iter
// univariate random-optimisation iterations, waits for train_done, and then
// classifies (approximate, detail) coefficient pairs with classify_start;
// cls_done pulses with cls_result, an 8-bit class code (00 sag, 33 swell,
// 66 interruption, 99 fluctuation, CC normal, FF transient; the network's
// output is read as the nearest code). Weights can be read and written
// through host_w_*; seed_load / seed set the initialisation vector of the
// random weight generator; best_err and best_miss report the summed squared error
// and misclassification count of the current weights on the training set.
//
// Parameters: DEPTH training words, ITERW bits of iteration count, SHIFT
// scaling of each neuron's sum, DECIDE_ON_MISS selects the keep rule
// (0: squared error, 1: misclassification count).
//
// The network's buses (Addr, sel, cmd, Inputs, data; Results, Ack, Done)
// run between the two halves inside this module.
module ann_classifier_top
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned ITERW = 16,
  parameter int unsigned SHIFT = 7,
  parameter bit          DECIDE_ON_MISS = 1'b0,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_start,
  input  logic             data_valid,
  input  logic [31:0]      data_in,
  output logic [AWD:0]     n_patterns,
  output logic             ram_full,
  input  logic             seed_load,
  input  logic [15:0]      seed,
  input  logic             train_start,
  input  logic [ITERW-1:0] num_iter,
  output logic             train_done,
  output logic             busy,
  output logic [ITERW-1:0] iter_count,
  output logic [ITERW-1:0] kept_count,
  output logic [ITERW-1:0] discard_count,
  output logic [31:0]      best_err,
  output logic [15:0]      best_miss,
  input  logic             classify_start,
  input  logic [7:0]       cls_in1,
  input  logic [7:0]       cls_in2,
  output logic             cls_done,
  output logic [7:0]       cls_result,
  output logic             cls_overflow,
  input  logic             host_w_wr,
  input  logic             host_w_rd,
  input  logic [2:0]       host_w_idx,
  input  logic [7:0]       host_w_data,
  output logic             host_w_done,
  output logic [7:0]       host_w_q
);

  nn_req_t nn_req;
  nn_rsp_t nn_rsp;

  control_unit #(.DEPTH(DEPTH), .ITERW(ITERW), .DECIDE_ON_MISS(DECIDE_ON_MISS)) u_control (
    .clk, .rst_n,
    .load_start, .data_valid, .data_in, .n_patterns, .ram_full,
    .seed_load, .seed,
    .train_start, .num_iter, .train_done, .busy, .iter_count, .kept_count,
    .discard_count, .best_err, .best_miss,
    .classify_start, .cls_in1(data_t'(cls_in1)), .cls_in2(data_t'(cls_in2)),
    .cls_done, .cls_result, .cls_overflow,
    .host_w_wr, .host_w_rd, .host_w_idx, .host_w_data(data_t'(host_w_data)),
    .host_w_done, .host_w_q(host_w_q),
    .nn_req, .nn_rsp
  );

  neural_network #(.SHIFT(SHIFT)) u_nn (
    .clk, .rst_n,
    .req(nn_req), .rsp(nn_rsp)
  );

endmodule
