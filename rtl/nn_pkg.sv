// nn_pkg: types and constants shared by the power-quality classifier.
//
// The neural-network bus follows the command encoding of the bus master
// description: a 2-bit command, a neuron address compared against each
// neuron's identifier, and a select line naming one of the neuron's weights.
// Weights and inputs are 8-bit signed integers. The split of the
// bidirectional 8-bit data bus into two one-way buses (control unit to
// network and back), the class output codes other than sag (00) and
// transient (FF), and the 32-bit training word layout are this design's own
// choices.
package nn_pkg;

  // Numbers of the network: two hidden neurons and one output neuron,
  // each with two inputs (the approximate and the detail coefficient).
  localparam int unsigned N_NEURONS = 3;
  localparam int unsigned N_IN      = 2;
  localparam int unsigned N_WEIGHTS = N_NEURONS * N_IN;
  localparam int unsigned DW        = 8;   // data / weight width
  localparam int unsigned AW        = 2;   // neuron address width
  localparam int unsigned SW        = 1;   // weight select width

  typedef logic signed [DW-1:0] data_t;

  // Command bus encoding.
  //   CMD_WR_W : weight on the data bus is stored in the addressed neuron
  //   CMD_RD_W : addressed neuron returns the selected weight
  //   CMD_IDLE : nothing happens
  //   CMD_CALC : forward calculation
  typedef enum logic [1:0] {
    CMD_WR_W = 2'b00,
    CMD_RD_W = 2'b01,
    CMD_IDLE = 2'b10,
    CMD_CALC = 2'b11
  } cmd_e;

  // Signals from the control unit to the network (block diagram: Addr, sel, cmd,
  // Inputs, plus the outbound half of the data bus).
  typedef struct packed {
    logic [AW-1:0] addr;
    logic [SW-1:0] sel;
    cmd_e          cmd;
    data_t         wdata;
    data_t         in1;   // approximate coefficient
    data_t         in2;   // detail coefficient
  } nn_req_t;

  // Signals from the network back to the control unit (block diagram: Results,
  // Ack, Done, plus the inbound half of the data bus and the overflow flag).
  typedef struct packed {
    data_t      rdata;
    logic       ack;
    logic       done;
    logic [7:0] result;
    logic       overflow;
  } nn_rsp_t;

  // Output codes of the six classes on the 8-bit result.
  localparam int unsigned N_CLASSES = 6;
  localparam logic [7:0] CODE_SAG          = 8'h00;
  localparam logic [7:0] CODE_SWELL        = 8'h33;
  localparam logic [7:0] CODE_INTERRUPTION = 8'h66;
  localparam logic [7:0] CODE_FLUCTUATION  = 8'h99;
  localparam logic [7:0] CODE_NORMAL       = 8'hCC;
  localparam logic [7:0] CODE_TRANSIENT    = 8'hFF;

  // Class codes in ascending order (class index 0..5).
  localparam logic [7:0] CLASS_CODES [N_CLASSES] = '{
    CODE_SAG, CODE_SWELL, CODE_INTERRUPTION, CODE_FLUCTUATION, CODE_NORMAL,
    CODE_TRANSIENT
  };

  // Class index of the code nearest to an 8-bit result: the decision
  // thresholds sit half-way between neighbouring codes (ties go up).
  function automatic logic [2:0] nearest_class(input logic [7:0] code);
    logic [2:0] c;
    c = 3'd0;
    for (int i = 1; i < N_CLASSES; i++) begin
      if ({1'b0, code, 1'b0} >= {1'b0, CLASS_CODES[i-1]} + {1'b0, CLASS_CODES[i]} + 10'd1)
        c = 3'(i);
    end
    return c;
  endfunction

  // Training word layout in RAM (32 bits).
  typedef struct packed {
    logic [7:0] reserved;
    logic [7:0] target;  // class code the network should produce
    data_t      in2;     // detail coefficient
    data_t      in1;     // approximate coefficient
  } train_word_t;

endpackage
