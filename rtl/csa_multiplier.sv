// csa_multiplier: combinational W x W signed multiplier built as a
// carry-save adder array, the multiplier used inside each neuron.
//
// Each bit b[i] of the multiplier selects a partial product: the
// sign-extended multiplicand shifted left by i. The sign bit b[W-1] has
// negative weight, so its row is the one's complement of the shifted
// multiplicand and the missing +1 is placed in the initial carry vector.
// Every row is folded into a (sum, carry) pair by a row of full adders
// (3:2 compressors) with no carry propagation; a single carry-propagate
// adder at the end turns the pair into the 2W-bit product. The use of a
// carry-save structure for the neuron multiplier is the original design's; the
// signed row arrangement is this design's choice.
//
// Interface: a, b signed W-bit; p signed 2W-bit, purely combinational.
module csa_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int unsigned PW = 2 * W;

  logic [PW-1:0] a_ext;
  logic [PW-1:0] row   [W];
  logic [PW-1:0] sum   [W+1];
  logic [PW-1:0] carry [W+1];

  assign a_ext = PW'(a);   // sign-extended multiplicand

  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (i == W - 1)
        row[i] = b[i] ? ~(a_ext << i) : '0;
      else
        row[i] = b[i] ? (a_ext << i) : '0;
    end
  end

  // Carry-save accumulation: sum[0]/carry[0] start with the +1 of the
  // negative sign row.
  assign sum[0]   = '0;
  assign carry[0] = PW'(b[W-1]);

  for (genvar i = 0; i < W; i++) begin : g_csa_row
    assign sum[i+1]   = sum[i] ^ carry[i] ^ row[i];
    assign carry[i+1] = ((sum[i] & carry[i]) | (sum[i] & row[i]) |
                         (carry[i] & row[i])) << 1;
  end

  // Final carry-propagate addition.
  assign p = signed'(sum[W] + carry[W]);

endmodule
