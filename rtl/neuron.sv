// neuron: one processing element of the classifier datapath.
//
// The neuron holds NI 8-bit signed weights and computes the weighted sum
// u = sum(w[i] * x[i]) of equation (4), using one carry-save array
// multiplier per input so that all products form in parallel. A comparator
// checks the address bus against the neuron's identifier ID; when they are
// equal, a weight command acts on the weight named by the select bus:
//   CMD_WR_W (00)  store wdata into w[sel]            -> ack next cycle
//   CMD_RD_W (01)  return w[sel] on rdata             -> ack next cycle
//   CMD_IDLE (10)  nothing
// Forward calculation is started by the calc input (the network asserts it
// from CMD_CALC for the hidden layer and from the hidden layer's y_valid
// for the output layer). One cycle after calc, y holds the sum scaled by
// 2^-SHIFT (weights read as fixed-point fractions) and saturated to 8 bits,
// y_valid pulses for one cycle, and ovf tells whether saturation occurred;
// y and ovf hold until the next calculation.
//
// Original design: identifier comparator, 2-bit command decode, weight
// select, 8-bit signed weights and inputs, carry-save multipliers, linear
// weighted sum, an overflow flag. This design's own choices: the scaling
// shift, saturation, the one-cycle latency, rdata reading as zero when the
// neuron is not addressed (so that neurons can share a return bus by OR),
// and reset clearing the weights to zero.
module neuron
  import nn_pkg::*;
#(
  parameter logic [AW-1:0] ID    = '0,
  parameter int unsigned   NI    = 2,
  parameter int unsigned   SHIFT = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   addr,
  input  logic [SW-1:0]   sel,
  input  cmd_e            cmd,
  input  data_t           wdata,
  output data_t           rdata,
  output logic            ack,
  input  data_t           x [NI],
  input  logic            calc,
  output data_t           y,
  output logic            y_valid,
  output logic            ovf
);

  localparam int unsigned PW = 2 * DW;                 // product width
  localparam int unsigned SUMW = PW + $clog2(NI) + 1;

  data_t                  w [NI];
  logic signed [PW-1:0]   prod [NI];
  logic signed [SUMW-1:0] sum;
  logic signed [SUMW-1:0] scaled;
  logic                   equal;
  data_t                  y_next;
  logic                   ovf_next;

  assign equal = (addr == ID);

  for (genvar i = 0; i < NI; i++) begin : g_mult
    csa_multiplier #(.W(DW)) u_mult (.a(x[i]), .b(w[i]), .p(prod[i]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < NI; i++) sum += SUMW'(prod[i]);
    scaled = sum >>> SHIFT;
    if (scaled > SUMW'(127)) begin
      y_next   = 8'sd127;
      ovf_next = 1'b1;
    end else if (scaled < -SUMW'(128)) begin
      y_next   = -8'sd128;
      ovf_next = 1'b1;
    end else begin
      y_next   = data_t'(scaled);
      ovf_next = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) w[i] <= '0;
      rdata   <= '0;
      ack     <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
      ovf     <= 1'b0;
    end else begin
      ack     <= 1'b0;
      rdata   <= '0;
      y_valid <= 1'b0;
      if (equal && cmd == CMD_WR_W) begin
        w[sel] <= wdata;
        ack    <= 1'b1;
      end
      if (equal && cmd == CMD_RD_W) begin
        rdata <= w[sel];
        ack   <= 1'b1;
      end
      if (calc) begin
        y       <= y_next;
        ovf     <= ovf_next;
        y_valid <= 1'b1;
      end
    end
  end

  // The select bus may only name an existing weight.
  a_sel_range : assert property (@(posedge clk) disable iff (!rst_n)
    (equal && (cmd == CMD_WR_W || cmd == CMD_RD_W)) |-> (32'(sel) < NI));

endmodule
