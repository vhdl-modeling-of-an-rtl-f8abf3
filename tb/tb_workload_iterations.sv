// tb_workload_iterations: the training runs of 1000 and 2000 iterations
// on a six-class set of 300 coefficient pairs (50 per class). The pairs are
// synthetic: each class is a cluster around its own centre, with the
// target set to the class code. Two classifiers run side by side on the
// same data, one keeping trial weights by squared error (the default) and
// one by misclassification count. For each run the test checks that
// training ends after the requested number of iterations, that the
// reported error and misclassification count match those recomputed from
// the trained weights, and reports the fraction of the set classified
// correctly. The second run restarts training from fresh random weights.
module tb_workload_iterations;
  import tb_nn_model_pkg::*;

  localparam int NPAT = 300;

  logic clk = 0, rst_n = 0;
  logic load_start = 0, data_valid = 0;
  logic [31:0] data_in = 0;
  logic train_start = 0;
  logic [15:0] num_iter = 0;
  logic host_w_rd [2];
  logic [2:0] host_w_idx = 0;
  logic [9:0] n_patterns [2];
  logic train_done [2], host_w_done [2];
  logic [15:0] iter_count [2], kept_count [2], discard_count [2], best_miss [2];
  logic [31:0] best_err [2];
  logic [7:0] host_w_q [2];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ann_classifier_top #(.DECIDE_ON_MISS(g == 1)) dut (
      .clk, .rst_n, .load_start, .data_valid, .data_in,
      .n_patterns(n_patterns[g]), .ram_full(),
      .seed_load(1'b0), .seed(16'd0),
      .train_start, .num_iter, .train_done(train_done[g]), .busy(),
      .iter_count(iter_count[g]), .kept_count(kept_count[g]),
      .discard_count(discard_count[g]), .best_err(best_err[g]),
      .best_miss(best_miss[g]),
      .classify_start(1'b0), .cls_in1(8'd0), .cls_in2(8'd0), .cls_done(),
      .cls_result(), .cls_overflow(),
      .host_w_wr(1'b0), .host_w_rd(host_w_rd[g]), .host_w_idx,
      .host_w_data(8'd0), .host_w_done(host_w_done[g]), .host_w_q(host_w_q[g])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (30_000_000) @(posedge clk);
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

  int x1 [NPAT], x2 [NPAT], tgt [NPAT];

  task automatic host_read(input int g, input int k, output int v);
    host_w_idx <= 3'(k); host_w_rd[g] <= 1;
    @(posedge clk); host_w_rd[g] <= 0; #1;
    while (!host_w_done[g]) begin @(posedge clk); #1; end
    v = s8(host_w_q[g]);
  endtask

  task automatic score(input int g, input int iters);
    int w [6];
    int r, e, m, correct;
    bit o;
    check(iter_count[g] == 16'(iters), $sformatf("%0d iterations done", iters));
    for (int k = 0; k < 6; k++) host_read(g, k, w[k]);
    e = 0; m = 0; correct = 0;
    for (int i = 0; i < NPAT; i++) begin
      r = model(w, x1[i], x2[i], o);
      e += (r - tgt[i]) * (r - tgt[i]);
      if (class_of(r) != class_of(tgt[i])) m++; else correct++;
    end
    check(best_err[g] == 32'(e) && best_miss[g] == 16'(m),
          $sformatf("error after %0d iterations %0d/%0d", iters, best_err[g], e));
    $display("%s, %0d iterations: kept %0d, discarded %0d, squared error %0d, correct %0d of %0d",
             g ? "keep by count" : "keep by error", iters, kept_count[g],
             discard_count[g], e, correct, NPAT);
  endtask

  task automatic train(input int iters);
    bit fin [2];
    num_iter <= 16'(iters); train_start <= 1;
    @(posedge clk); train_start <= 0; #1;
    fin = '{0, 0};
    while (!(fin[0] && fin[1])) begin
      @(posedge clk); #1;
      for (int g = 0; g < 2; g++) if (train_done[g]) fin[g] = 1;
    end
    for (int g = 0; g < 2; g++) score(g, iters);
  endtask

  initial begin
    host_w_rd = '{0, 0};
    for (int i = 0; i < NPAT; i++) begin
      int c;
      c = i % 6;
      x1[i] = -100 + 40 * c + int'($urandom_range(0, 40)) - 20;
      x2[i] = ((c % 3) - 1) * 70 + int'($urandom_range(0, 40)) - 20;
      tgt[i] = 51 * c;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load_start <= 1; @(posedge clk); load_start <= 0;
    for (int i = 0; i < NPAT; i++) begin
      data_valid <= 1;
      data_in <= {8'h00, 8'(tgt[i]), 8'(x2[i]), 8'(x1[i])};
      @(posedge clk);
    end
    data_valid <= 0;
    @(posedge clk); #1;
    check(n_patterns[0] == 10'(NPAT) && n_patterns[1] == 10'(NPAT), "training set size");
    train(1000);
    train(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
