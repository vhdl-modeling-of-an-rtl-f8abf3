// tb_bus_master: self-checking test of the bus master against the real
// three-neuron datapath. Random weight writes, reads and calculations are
// requested; the test checks the command sequence on the bus (command for
// one cycle, then idle), the returned weights and results against the
// reference model, and the latency of each operation: op_done two cycles
// after the request is accepted for a weight access, three for a
// calculation.
module tb_bus_master;
  import nn_pkg::*;
  import tb_nn_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic op_valid = 0, op_ready, op_done, op_overflow;
  cmd_e op = CMD_IDLE;
  logic [AW-1:0] op_addr = 0;
  logic [SW-1:0] op_sel = 0;
  data_t op_wdata = 0, op_in1 = 0, op_in2 = 0, op_rdata;
  logic [7:0] op_result;
  nn_req_t req;
  nn_rsp_t rsp;
  int checks = 0, failures = 0;
  int w [6];
  int cmd_cycles = 0, n_wr = 0, n_rd = 0, n_calc = 0;

  bus_master dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .op_addr, .op_sel, .op_wdata,
    .op_in1, .op_in2, .op_done, .op_rdata, .op_result, .op_overflow,
    .req, .rsp
  );
  neural_network #(.SHIFT(7)) u_nn (.clk, .rst_n, .req, .rsp);

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

  // count cycles in which a non-idle command is on the bus
  always @(posedge clk) if (rst_n && req.cmd != CMD_IDLE) cmd_cycles++;

  task automatic do_op(input cmd_e c, input int k, input int d,
                       input int x1, input int x2, output int lat);
    int n_before;
    n_before = cmd_cycles;
    op <= c; op_addr <= AW'(k / 2); op_sel <= SW'(k % 2); op_wdata <= 8'(d);
    op_in1 <= 8'(x1); op_in2 <= 8'(x2);
    #1;
    while (!op_ready) begin @(posedge clk); #1; end
    op_valid <= 1;
    @(posedge clk);   // request accepted on this edge
    op_valid <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!op_done && lat < 20);
    check(cmd_cycles - n_before == 1, "command held for exactly one cycle");
  endtask

  initial begin
    int lat, exp_r, k, x1, x2;
    bit exp_o;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(op_ready && req.cmd == CMD_IDLE, "idle after reset");
    for (int i = 0; i < 6; i++) begin
      w[i] = int'($urandom_range(0, 255)) - 128;
      do_op(CMD_WR_W, i, w[i], 0, 0, lat);
      check(lat == 2, $sformatf("write latency %0d", lat));
      n_wr++;
    end
    for (int t = 0; t < 3000; t++) begin
      case ($urandom_range(0, 2))
        0: begin
          k = $urandom_range(0, 5);
          w[k] = int'($urandom_range(0, 255)) - 128;
          do_op(CMD_WR_W, k, w[k], 0, 0, lat);
          check(lat == 2, "write latency");
          n_wr++;
        end
        1: begin
          k = $urandom_range(0, 5);
          do_op(CMD_RD_W, k, 0, 0, 0, lat);
          check(lat == 2 && s8(op_rdata) == w[k],
                $sformatf("read w%0d = %0d expected %0d", k, s8(op_rdata), w[k]));
          n_rd++;
        end
        default: begin
          x1 = int'($urandom_range(0, 255)) - 128;
          x2 = int'($urandom_range(0, 255)) - 128;
          do_op(CMD_CALC, 0, 0, x1, x2, lat);
          exp_r = model(w, x1, x2, exp_o);
          check(lat == 3 && int'(op_result) == exp_r && op_overflow == exp_o,
                $sformatf("calc lat %0d result %0d expected %0d", lat, op_result, exp_r));
          n_calc++;
        end
      endcase
    end
    check(n_wr > 0 && n_rd > 0 && n_calc > 0, "all operations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
