// neural_network: the classifier datapath, a 2-2-1 feed-forward network.
//
// Two hidden neurons (identifiers 0 and 1) take the two inputs straight
// from the Inputs bus (approximate and detail wavelet coefficients); there
// is no separate input layer. The output neuron (identifier 2) takes the
// two hidden outputs. All three sit on the shared address / select /
// command / data buses of the control unit; each decodes its own address.
//
// Timing: CMD_CALC on the command bus for one cycle starts the hidden
// layer; its results are registered one cycle later and start the output
// neuron, whose result is registered one cycle after that. So Done pulses
// two cycles after the CALC command, with Results valid from then on.
// Results is the output neuron's signed value in offset binary (-128 -> 00,
// +127 -> FF), so the class codes run 00..FF. Overflow reports that any
// neuron saturated during the last calculation. Weight reads and writes
// are acknowledged one cycle after the command.
//
// Original design: three neurons, two hidden and one output, feed-forward,
// inputs fed from the bus to the hidden layer, Results / Ack / Done back to
// the control unit. This design's own choices: the latency, the offset
// binary result and the OR-combined return bus.
module neural_network
  import nn_pkg::*;
#(
  parameter int unsigned SHIFT = 7
) (
  input  logic    clk,
  input  logic    rst_n,
  input  nn_req_t req,
  output nn_rsp_t rsp
);

  data_t      hid_x [N_IN];
  data_t      out_x [N_IN];
  data_t      h_y   [2];
  logic [1:0] h_valid, h_ovf, h_ack;
  data_t      h_rdata [2];
  data_t      o_y, o_rdata;
  logic       o_valid, o_ovf, o_ack;
  logic       calc;

  assign hid_x[0] = req.in1;
  assign hid_x[1] = req.in2;
  assign calc     = (req.cmd == CMD_CALC);

  for (genvar n = 0; n < 2; n++) begin : g_hidden
    neuron #(.ID(AW'(n)), .NI(N_IN), .SHIFT(SHIFT)) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .addr   (req.addr),
      .sel    (req.sel),
      .cmd    (req.cmd),
      .wdata  (req.wdata),
      .rdata  (h_rdata[n]),
      .ack    (h_ack[n]),
      .x      (hid_x),
      .calc   (calc),
      .y      (h_y[n]),
      .y_valid(h_valid[n]),
      .ovf    (h_ovf[n])
    );
  end

  assign out_x[0] = h_y[0];
  assign out_x[1] = h_y[1];

  neuron #(.ID(AW'(2)), .NI(N_IN), .SHIFT(SHIFT)) u_out (
    .clk    (clk),
    .rst_n  (rst_n),
    .addr   (req.addr),
    .sel    (req.sel),
    .cmd    (req.cmd),
    .wdata  (req.wdata),
    .rdata  (o_rdata),
    .ack    (o_ack),
    .x      (out_x),
    .calc   (&h_valid),
    .y      (o_y),
    .y_valid(o_valid),
    .ovf    (o_ovf)
  );

  assign rsp.rdata    = h_rdata[0] | h_rdata[1] | o_rdata;
  assign rsp.ack      = |h_ack | o_ack;
  assign rsp.done     = o_valid;
  assign rsp.result   = {~o_y[DW-1], o_y[DW-2:0]};
  assign rsp.overflow = |h_ovf | o_ovf;

  // At most one neuron answers a weight command.
  a_one_ack : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({h_ack, o_ack}));

endmodule
