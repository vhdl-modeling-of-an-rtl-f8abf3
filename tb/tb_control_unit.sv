// tb_control_unit: self-checking test of the control unit (trainer, bus
// master, RAM interface, LFSR and error calculator together) against a
// behavioural model of the network written in this testbench. A training
// set is loaded over data_in, training runs for a number of iterations,
// and the test checks that the reported best error never rises, that it
// equals the squared error recomputed from the weights the model holds at
// the end, that the misclassification count matches, that both kept and
// discarded trials occurred, and that the network saw exactly the
// expected number of calculations.
module tb_control_unit;
  import nn_pkg::*;
  import tb_nn_model_pkg::*;

  localparam int NPAT = 30;
  localparam int NITER = 60;

  logic clk = 0, rst_n = 0;
  logic load_start = 0, data_valid = 0;
  logic [31:0] data_in = 0;
  logic [9:0] n_patterns;
  logic ram_full;
  logic seed_load = 0;
  logic [15:0] seed = 0;
  logic train_start = 0, train_done, busy;
  logic [15:0] num_iter = 0, iter_count, kept_count, discard_count;
  logic [31:0] best_err;
  logic [15:0] best_miss;
  logic classify_start = 0, cls_done, cls_overflow;
  data_t cls_in1 = 0, cls_in2 = 0;
  logic [7:0] cls_result;
  logic host_w_wr = 0, host_w_rd = 0, host_w_done;
  logic [2:0] host_w_idx = 0;
  data_t host_w_data = 0, host_w_q;
  nn_req_t nn_req;
  nn_rsp_t nn_rsp;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  // ---- behavioural network ---------------------------------------------
  int w [6];
  int n_calc = 0;
  int calc_wait = 0;
  int pend_r;
  bit pend_o;
  always @(posedge clk) begin
    int k;
    nn_rsp.ack  <= 0;
    nn_rsp.done <= 0;
    nn_rsp.rdata <= 0;
    k = 2 * int'(nn_req.addr) + int'(nn_req.sel);
    if (!rst_n) begin
      nn_rsp <= '0;
    end else begin
      case (nn_req.cmd)
        CMD_WR_W: begin w[k] = s8(nn_req.wdata); nn_rsp.ack <= 1; end
        CMD_RD_W: begin nn_rsp.rdata <= 8'(w[k]); nn_rsp.ack <= 1; end
        CMD_CALC: begin
          pend_r = model(w, s8(nn_req.in1), s8(nn_req.in2), pend_o);
          calc_wait = 2;
          n_calc++;
        end
        default: ;
      endcase
      if (calc_wait > 0) begin
        calc_wait--;
        if (calc_wait == 0) begin
          nn_rsp.done <= 1;
          nn_rsp.result <= 8'(pend_r);
          nn_rsp.overflow <= pend_o;
        end
      end
    end
  end

  train_word_t set [NPAT];
  logic [31:0] prev_best = '1;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      checks++;
      if (best_err > prev_best) begin
        failures++;
        $display("FAIL best error rose from %0d to %0d", prev_best, best_err);
      end
      prev_best <= best_err;
    end
  end

  initial begin
    int e, m, r, lat;
    bit o;
    for (int i = 0; i < NPAT; i++) begin
      int c;
      c = i % 6;
      set[i].in1 = 8'(-100 + 40 * c + int'($urandom_range(0, 20)) - 10);
      set[i].in2 = 8'(((c % 2) ? 60 : -60) + int'($urandom_range(0, 20)) - 10);
      set[i].target = 8'(51 * c);
      set[i].reserved = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load_start <= 1; @(posedge clk); load_start <= 0;
    for (int i = 0; i < NPAT; i++) begin
      data_valid <= 1; data_in <= 32'(set[i]); @(posedge clk);
    end
    data_valid <= 0;
    @(posedge clk); #1;
    check(n_patterns == 10'(NPAT), "training set size");
    num_iter <= NITER; train_start <= 1;
    @(posedge clk); train_start <= 0;
    #1;
    lat = 0;
    while (!train_done && lat < 400000) begin @(posedge clk); #1; lat++; end
    check(train_done, "training finished");
    check(iter_count == NITER && kept_count + discard_count == NITER, "iteration counts");
    check(kept_count > 0 && discard_count > 0,
          $sformatf("kept %0d discarded %0d", kept_count, discard_count));
    check(n_calc == NPAT * (NITER + 1), $sformatf("calculations %0d", n_calc));
    e = 0; m = 0;
    for (int i = 0; i < NPAT; i++) begin
      r = model(w, s8(set[i].in1), s8(set[i].in2), o);
      e += (r - int'(set[i].target)) * (r - int'(set[i].target));
      if (class_of(r) != class_of(int'(set[i].target))) m++;
    end
    check(best_err == 32'(e) && best_miss == 16'(m),
          $sformatf("best error %0d/%0d miss %0d/%0d", best_err, e, best_miss, m));
    // operational mode
    cls_in1 <= set[3].in1; cls_in2 <= set[3].in2; classify_start <= 1;
    @(posedge clk); classify_start <= 0; #1;
    while (!cls_done) begin @(posedge clk); #1; end
    r = model(w, s8(set[3].in1), s8(set[3].in2), o);
    check(int'(cls_result) == r && cls_overflow == o, "classification");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
