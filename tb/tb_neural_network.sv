// tb_neural_network: self-checking test of the three-neuron datapath.
// Sets all six weights over the bus, reads them back, then runs random
// forward calculations and compares Results and Overflow with the
// reference model. Done must come exactly two cycles after the CALC
// command.
module tb_neural_network;
  import nn_pkg::*;
  import tb_nn_model_pkg::*;

  logic clk = 0, rst_n = 0;
  nn_req_t req;
  nn_rsp_t rsp;
  int checks = 0, failures = 0;
  int w [6];
  int n_ovf = 0, n_noovf = 0;

  neural_network #(.SHIFT(7)) dut (.clk, .rst_n, .req, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic command(input int k, input cmd_e c, input int d);
    req.addr <= AW'(k / 2); req.sel <= SW'(k % 2); req.cmd <= c;
    req.wdata <= 8'(d);
    @(posedge clk);
    req.cmd <= CMD_IDLE;
    #1;
  endtask

  initial begin
    int exp_r, cyc;
    bit exp_o;
    req = '{addr: 0, sel: 0, cmd: CMD_IDLE, wdata: 0, in1: 0, in2: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    for (int blk = 0; blk < 40; blk++) begin
      for (int k = 0; k < 6; k++) begin
        w[k] = (blk == 0) ? (k * 20 - 50) : int'($urandom_range(0, 255)) - 128;
        command(k, CMD_WR_W, w[k]);
        check(rsp.ack, "write ack");
      end
      for (int k = 0; k < 6; k++) begin
        command(k, CMD_RD_W, 0);
        check(rsp.ack && s8(rsp.rdata) == w[k],
              $sformatf("read w%0d = %0d expected %0d", k, s8(rsp.rdata), w[k]));
      end
      @(posedge clk);
      for (int t = 0; t < 50; t++) begin
        req.in1 <= 8'($urandom); req.in2 <= 8'($urandom);
        command(0, CMD_CALC, 0);
        cyc = 1;
        while (!rsp.done && cyc < 10) begin
          @(posedge clk); #1; cyc++;
        end
        check(cyc == 2, $sformatf("done after %0d cycles", cyc));
        exp_r = model(w, s8(req.in1), s8(req.in2), exp_o);
        check(int'(rsp.result) == exp_r && rsp.overflow == exp_o,
              $sformatf("result %0d ovf %0d, expected %0d %0d",
                        rsp.result, rsp.overflow, exp_r, exp_o));
        if (exp_o) n_ovf++; else n_noovf++;
        @(posedge clk); #1;
        check(!rsp.done, "done is a pulse");
      end
    end
    check(n_ovf > 0 && n_noovf > 0, "both overflow and normal cases seen");
    $display("overflow cases %0d, normal %0d", n_ovf, n_noovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
