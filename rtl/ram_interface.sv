// ram_interface: storage of the training set.
//
// Training patterns arrive as 32-bit words (layout nn_pkg::train_word_t:
// in1, in2, target class code, reserved byte) on data_in and are appended
// to a DEPTH-word memory, one per cycle with data_valid. load_start empties
// the set first. The number of stored patterns is n_patterns. During
// training the control unit recalls the set every epoch through a
// synchronous read port: rd_data holds word rd_addr one cycle after rd_en.
// Writes beyond DEPTH are dropped and flagged by full.
//
// Original design: the module stores the training data as 32-bit words
// and recalls them for every epoch. This design's own choices: the word
// layout, the append-only write port, the read latency and DEPTH = 512
// (room for a 300-pattern set).
module ram_interface
  import nn_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AWD  = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_start,
  input  logic          data_valid,
  input  logic [31:0]   data_in,
  output logic [AWD:0]  n_patterns,
  output logic          full,
  input  logic          rd_en,
  input  logic [AWD-1:0] rd_addr,
  output train_word_t   rd_data
);

  logic [31:0] mem [DEPTH];

  assign full = (n_patterns == (AWD+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      n_patterns <= '0;
    else if (load_start)
      n_patterns <= '0;
    else if (data_valid && !full)
      n_patterns <= n_patterns + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (data_valid && !full && !load_start)
      mem[n_patterns[AWD-1:0]] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= train_word_t'(mem[rd_addr]);
  end

endmodule
