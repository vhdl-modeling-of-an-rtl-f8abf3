// tb_ann_classifier_top: end-to-end test of the classifier at its default
// size. A synthetic six-class training set of 300 coefficient pairs
// (50 per class, clustered around one centre per class) is loaded;
// weights written by the host are read back and used for classifications
// that are compared with the reference model, including one that
// saturates (overflow); then the network is trained for 1000 iterations.
// The test checks that the best training error never rises, that it and
// the misclassification count equal the values recomputed from the
// trained weights read back from the network, and that every
// classification of the set matches the model. It counts each mechanism
// (weight write, weight read, forward calculation, trial kept, trial
// discarded, overflow, initialisation-vector load) and fails if one never
// happened.
module tb_ann_classifier_top;
  import tb_nn_model_pkg::*;

  localparam int NPAT = 300;
  localparam int NITER = 1000;

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
  logic [7:0] cls_in1 = 0, cls_in2 = 0, cls_result;
  logic host_w_wr = 0, host_w_rd = 0, host_w_done;
  logic [2:0] host_w_idx = 0;
  logic [7:0] host_w_data = 0, host_w_q;
  int checks = 0, failures = 0;
  longint cycles = 0;

  ann_classifier_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
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

  // mechanism counters, taken from the network's command bus
  int n_wr = 0, n_rd = 0, n_calc = 0, n_ovf = 0, n_seed = 0;
  always @(posedge clk) if (rst_n) begin
    case (dut.nn_req.cmd)
      2'b00: n_wr++;
      2'b01: n_rd++;
      2'b11: n_calc++;
      default: ;
    endcase
    if (dut.nn_rsp.done && dut.nn_rsp.overflow) n_ovf++;
  end

  logic [31:0] prev_best = '1;
  int n_best_checks = 0;
  always @(posedge clk) if (rst_n && busy) begin
    n_best_checks++;
    if (best_err > prev_best) begin
      failures++;
      $display("FAIL best error rose from %0d to %0d", prev_best, best_err);
    end
    prev_best <= best_err;
  end

  int x1 [NPAT], x2 [NPAT], tgt [NPAT];
  int w [6];

  task automatic host_write(input int k, input int v);
    host_w_idx <= 3'(k); host_w_data <= 8'(v); host_w_wr <= 1;
    @(posedge clk); host_w_wr <= 0; #1;
    while (!host_w_done) begin @(posedge clk); #1; end
  endtask

  task automatic host_read(input int k, output int v);
    host_w_idx <= 3'(k); host_w_rd <= 1;
    @(posedge clk); host_w_rd <= 0; #1;
    while (!host_w_done) begin @(posedge clk); #1; end
    v = s8(host_w_q);
  endtask

  task automatic classify(input int a, input int b, output int r, output bit o);
    cls_in1 <= 8'(a); cls_in2 <= 8'(b); classify_start <= 1;
    @(posedge clk); classify_start <= 0; #1;
    while (!cls_done) begin @(posedge clk); #1; end
    r = int'(cls_result); o = cls_overflow;
  endtask

  initial begin
    int r, e, m, v, correct, lat;
    bit o, eo;
    longint t0;
    for (int i = 0; i < NPAT; i++) begin
      int c;
      c = i % 6;
      x1[i] = -100 + 40 * c + int'($urandom_range(0, 30)) - 15;
      x2[i] = ((c % 2) ? 60 : -60) + int'($urandom_range(0, 30)) - 15;
      tgt[i] = 51 * c;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // load the training set
    load_start <= 1; @(posedge clk); load_start <= 0;
    for (int i = 0; i < NPAT; i++) begin
      data_valid <= 1;
      data_in <= {8'h00, 8'(tgt[i]), 8'(x2[i]), 8'(x1[i])};
      @(posedge clk);
    end
    data_valid <= 0;
    @(posedge clk); #1;
    check(n_patterns == 10'(NPAT), "training set size");

    // host-set weights, read back, classify against the model
    for (int k = 0; k < 6; k++) begin
      w[k] = (k < 4) ? 90 - 40 * k : 60 + 30 * (k - 4);
      host_write(k, w[k]);
    end
    for (int k = 0; k < 6; k++) begin
      host_read(k, v);
      check(v == w[k], $sformatf("weight %0d read back %0d", k, v));
    end
    for (int i = 0; i < 12; i++) begin
      classify(x1[i], x2[i], r, o);
      e = model(w, x1[i], x2[i], eo);
      check(r == e && o == eo, $sformatf("classification %0d: %0d/%0d", i, r, e));
    end
    // saturating case
    for (int k = 0; k < 6; k++) begin w[k] = 127; host_write(k, 127); end
    classify(120, 120, r, o);
    e = model(w, 120, 120, eo);
    check(eo && o && r == e, "overflow reported on saturation");

    // new initialisation vector for the random weights
    seed <= 16'h1234; seed_load <= 1;
    @(posedge clk); seed_load <= 0; #1;
    check(dut.u_control.u_lfsr.state == 16'h1234, "initialisation vector loaded");
    n_seed++;

    // training
    num_iter <= NITER; train_start <= 1;
    @(posedge clk); train_start <= 0; #1;
    t0 = cycles;
    while (!train_done) begin @(posedge clk); #1; end
    $display("training: %0d iterations in %0d cycles", NITER, cycles - t0);
    check(iter_count == NITER && kept_count + discard_count == NITER, "iteration counts");
    for (int k = 0; k < 6; k++) host_read(k, w[k]);
    e = 0; m = 0; correct = 0;
    for (int i = 0; i < NPAT; i++) begin
      r = model(w, x1[i], x2[i], eo);
      e += (r - tgt[i]) * (r - tgt[i]);
      if (class_of(r) != class_of(tgt[i])) m++;
    end
    check(best_err == 32'(e) && best_miss == 16'(m),
          $sformatf("trained error %0d/%0d miss %0d/%0d", best_err, e, best_miss, m));
    for (int i = 0; i < NPAT; i++) begin
      classify(x1[i], x2[i], r, o);
      e = model(w, x1[i], x2[i], eo);
      check(r == e && o == eo, $sformatf("classification after training %0d", i));
      if (class_of(r) == class_of(tgt[i])) correct++;
    end
    $display("weights after training: %0d %0d %0d %0d %0d %0d", w[0], w[1], w[2], w[3], w[4], w[5]);
    $display("correct classification of the training set: %0d of %0d", correct, NPAT);
    $display("mechanisms: weight writes %0d, weight reads %0d, calculations %0d, kept %0d, discarded %0d, overflows %0d",
             n_wr, n_rd, n_calc, kept_count, discard_count, n_ovf);
    check(n_wr > 0, "weight write happened");
    check(n_rd > 0, "weight read happened");
    check(n_calc > 0, "forward calculation happened");
    check(kept_count > 0, "trial weight kept");
    check(discard_count > 0, "trial weight discarded");
    check(n_ovf > 0, "overflow happened");
    check(n_best_checks > 0, "best error monitored");
    check(n_seed > 0, "initialisation vector load happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
