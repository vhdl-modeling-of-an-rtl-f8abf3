// tb_neuron: self-checking test of one neuron (identifier 1). Checks that
// weight writes and reads act only when the address matches, that Ack
// comes exactly one cycle after the command, and that a calculation gives
// the scaled, saturated weighted sum one cycle after calc, with the
// overflow flag, over random weights and inputs.
module tb_neuron;
  import nn_pkg::*;
  import tb_nn_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] addr;
  logic [SW-1:0] sel;
  cmd_e cmd;
  data_t wdata, rdata, y;
  logic ack, calc, y_valid, ovf;
  data_t x [2];
  int checks = 0, failures = 0;
  int w_ref [2];
  int n_ovf = 0;

  neuron #(.ID(2'd1), .NI(2), .SHIFT(7)) dut (
    .clk, .rst_n, .addr, .sel, .cmd, .wdata, .rdata, .ack, .x, .calc,
    .y, .y_valid, .ovf
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic bus(input logic [1:0] a, input logic s, input cmd_e c,
                     input data_t d);
    addr <= a; sel <= s; cmd <= c; wdata <= d;
    @(posedge clk);
    addr <= '0; sel <= '0; cmd <= CMD_IDLE; wdata <= '0;
    @(posedge clk);  // neuron registered the command on the previous edge
  endtask

  initial begin
    int s, e, v;
    bit sat;
    addr = 0; sel = 0; cmd = CMD_IDLE; wdata = 0; calc = 0;
    x[0] = 0; x[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // write both weights, with ack one cycle after the command
    for (int i = 0; i < 2; i++) begin
      w_ref[i] = (i == 0) ? 37 : -90;
      addr <= 2'd1; sel <= 1'(i); cmd <= CMD_WR_W; wdata <= 8'(w_ref[i]);
      @(posedge clk);
      cmd <= CMD_IDLE;
      #1 check(ack == 1'b1, "ack after write");
      @(posedge clk);
      #1 check(ack == 1'b0, "ack is one cycle");
    end
    // write to another neuron's address: no effect, no ack
    addr <= 2'd2; sel <= 0; cmd <= CMD_WR_W; wdata <= 8'd5;
    @(posedge clk);
    cmd <= CMD_IDLE;
    #1 check(ack == 1'b0, "no ack for other address");
    // read back
    for (int i = 0; i < 2; i++) begin
      addr <= 2'd1; sel <= 1'(i); cmd <= CMD_RD_W;
      @(posedge clk);
      cmd <= CMD_IDLE;
      #1 check(ack && s8(rdata) == w_ref[i], $sformatf("read weight %0d = %0d", i, s8(rdata)));
    end
    // read with another address gives zero and no ack
    addr <= 2'd0; sel <= 0; cmd <= CMD_RD_W;
    @(posedge clk);
    cmd <= CMD_IDLE;
    #1 check(!ack && rdata == 0, "other address read");

    // random calculations
    for (int t = 0; t < 2000; t++) begin
      if (t % 50 == 0) begin
        for (int i = 0; i < 2; i++) begin
          w_ref[i] = int'($urandom_range(0, 255)) - 128;
          bus(2'd1, 1'(i), CMD_WR_W, 8'(w_ref[i]));
        end
      end
      x[0] <= 8'($urandom); x[1] <= 8'($urandom);
      calc <= 1;
      @(posedge clk);
      calc <= 0;
      #1;
      s = w_ref[0] * s8(x[0]) + w_ref[1] * s8(x[1]);
      e = clamp8(floor_div128(s), sat);
      check(y_valid, "y_valid one cycle after calc");
      check(s8(y) == e && ovf == sat,
            $sformatf("calc %0d*%0d + %0d*%0d -> %0d ovf %0d, expected %0d %0d",
                      w_ref[0], s8(x[0]), w_ref[1], s8(x[1]), s8(y), ovf, e, sat));
      if (sat) n_ovf++;
      @(posedge clk);
      #1 check(!y_valid && s8(y) == e, "y holds, valid is a pulse");
    end
    check(n_ovf > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
