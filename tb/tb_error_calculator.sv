// tb_error_calculator: self-checking test of the epoch error score.
// Random epochs of random (result, target) pairs; the summed squared error
// and the misclassification count are recomputed in the testbench, and
// the keep decision must follow "strictly lower than the best so far",
// with a baseline epoch always kept. A second instance decides on the
// misclassification count (ties broken by the squared error). decided must come one cycle after
// epoch_end.
module tb_error_calculator;
  import tb_nn_model_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, sample_valid = 0, epoch_end = 0, baseline = 0;
  logic [7:0] result = 0, target = 0;
  logic [31:0] err_sum, best_err;
  logic [15:0] miss_count, best_miss;
  logic decided, keep;
  logic [31:0] err_sum_m, best_err_m;
  logic [15:0] miss_count_m, best_miss_m;
  logic decided_m, keep_m;
  int checks = 0, failures = 0;
  int n_keep = 0, n_drop = 0;

  error_calculator dut (
    .clk, .rst_n, .clear, .sample_valid, .result, .target, .epoch_end,
    .baseline, .err_sum, .miss_count, .decided, .keep, .best_err, .best_miss
  );

  // second instance deciding on the misclassification count
  error_calculator #(.DECIDE_ON_MISS(1'b1)) dut_m (
    .clk, .rst_n, .clear, .sample_valid, .result, .target, .epoch_end,
    .baseline, .err_sum(err_sum_m), .miss_count(miss_count_m),
    .decided(decided_m), .keep(keep_m), .best_err(best_err_m),
    .best_miss(best_miss_m)
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
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    longint best, e, best2;
    int m, bm, r, t, n, bm2;
    bit exp_keep, exp_keep2;
    int n_keep2 = 0, n_drop2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    best = 0; bm = 0; best2 = 0; bm2 = 0;
    for (int ep = 0; ep < 300; ep++) begin
      clear <= 1; @(posedge clk); clear <= 0;
      e = 0; m = 0;
      n = $urandom_range(1, 40);
      for (int i = 0; i < n; i++) begin
        t = 51 * $urandom_range(0, 5);
        // results scattered around the target, sometimes far off
        r = t + int'($urandom_range(0, 120)) - 60 + ep / 10;
        if (r < 0) r = 0;
        if (r > 255) r = 255;
        result <= 8'(r); target <= 8'(t); sample_valid <= 1;
        @(posedge clk);
        e += (r - t) * (r - t);
        if (class_of(r) != class_of(t)) m++;
      end
      sample_valid <= 0;
      @(posedge clk); #1;
      check(err_sum == 32'(e) && miss_count == 16'(m),
            $sformatf("epoch %0d sum %0d/%0d miss %0d/%0d", ep, err_sum, e, miss_count, m));
      baseline <= (ep == 0); epoch_end <= 1;
      @(posedge clk);
      epoch_end <= 0; baseline <= 0;
      #1;
      exp_keep = (ep == 0) || (e < best);
      check(decided && keep == exp_keep, $sformatf("decision epoch %0d", ep));
      if (exp_keep) begin best = e; bm = m; n_keep++; end else n_drop++;
      check(best_err == 32'(best) && best_miss == 16'(bm), "best error");
      exp_keep2 = (ep == 0) || (m < bm2) || (m == bm2 && e < best2);
      check(decided_m && keep_m == exp_keep2, $sformatf("count decision epoch %0d", ep));
      if (exp_keep2) begin best2 = e; bm2 = m; n_keep2++; end else n_drop2++;
      check(best_err_m == 32'(best2) && best_miss_m == 16'(bm2), "best count");
      @(posedge clk); #1;
      check(!decided, "decided is a pulse");
    end
    check(n_keep > 1 && n_drop > 0, "both keep and discard seen");
    check(n_keep2 > 1 && n_drop2 > 0, "both keep and discard seen by count");
    $display("kept %0d discarded %0d", n_keep, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
