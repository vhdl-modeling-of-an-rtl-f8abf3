// tb_trainer: self-checking test of the training state machine on its
// own. The bus master, network, RAM, random source and error calculator
// are replaced by simple models in this testbench, and a checker follows
// the expected order of bus operations: six initial weight writes, a
// baseline epoch, then per iteration a read of the weight under trial, a
// write of the random value from the generator, one calculation per stored
// pattern in order (inputs taken from the RAM word, each result handed to
// the error calculator with the word's target), the epoch end, and a write
// of the old value when the trial weight is discarded. Classification and
// host weight access are checked afterwards.
module tb_trainer;
  import nn_pkg::*;

  localparam int AWD = 9;
  localparam int NPAT = 7;
  localparam int NITER = 40;

  logic clk = 0, rst_n = 0;
  logic train_start = 0, train_done, busy;
  logic [15:0] num_iter = 0, iter_count, kept_count, discard_count;
  logic classify_start = 0, cls_done, cls_overflow;
  data_t cls_in1 = 0, cls_in2 = 0;
  logic [7:0] cls_result;
  logic host_w_wr = 0, host_w_rd = 0, host_w_done;
  logic [2:0] host_w_idx = 0;
  data_t host_w_data = 0, host_w_q;
  logic op_valid, op_ready, op_done = 0, op_overflow = 0;
  cmd_e op;
  logic [AW-1:0] op_addr;
  logic [SW-1:0] op_sel;
  data_t op_wdata, op_in1, op_in2, op_rdata = 0;
  logic [7:0] op_result = 0;
  logic rd_en;
  logic [AWD-1:0] rd_addr;
  train_word_t rd_data;
  logic [AWD:0] n_patterns = NPAT;
  logic [7:0] rnd = 0;
  logic err_clear, err_sample, err_epoch_end, err_baseline;
  logic err_decided = 0, err_keep = 0;
  logic [7:0] err_result, err_target;

  int checks = 0, failures = 0;

  trainer #(.AWD(AWD), .ITERW(16)) dut (.*);

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
      if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // ---- models --------------------------------------------------------
  train_word_t mem [NPAT];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];
  always_ff @(posedge clk) rnd <= rnd + 8'd77;

  // bus: accept when idle, complete two cycles later
  int busy_cnt = 0;
  cmd_e acc_op;
  int acc_k;
  assign op_ready = (busy_cnt == 0);
  int w [6];

  typedef enum {P_IDLE, P_INIT, P_EPOCH, P_DECIDE, P_RD, P_WR, P_RESTORE, P_OTHER} phase_e;
  phase_e phase = P_IDLE;
  int init_cnt = 0, p = 0, iter = 0, old_w = 0, new_w = 0, n_kept = 0, n_disc = 0;
  bit base = 0;
  logic [7:0] last_result;

  always @(posedge clk) begin
    op_done <= 0;
    err_decided <= 0;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) begin
        op_done <= 1;
        if (acc_op == CMD_RD_W) op_rdata <= 8'(w[acc_k]);
        if (acc_op == CMD_CALC) begin
          last_result = 8'($urandom);
          op_result <= last_result;
        end
      end
    end else if (op_valid && rst_n) begin
      busy_cnt <= 3;
      acc_op = op;
      acc_k = 2 * int'(op_addr) + int'(op_sel);
      case (phase)
        P_INIT: begin
          check(op == CMD_WR_W && acc_k == init_cnt, "initial weight write order");
          w[acc_k] = s8(op_wdata);
          init_cnt++;
          if (init_cnt == 6) begin phase = P_EPOCH; p = 0; base = 1; end
        end
        P_EPOCH: begin
          check(op == CMD_CALC && op_in1 == mem[p].in1 && op_in2 == mem[p].in2,
                $sformatf("calculation for pattern %0d", p));
          p++;
          if (p == NPAT) phase = P_DECIDE;
        end
        P_RD: begin
          check(op == CMD_RD_W && acc_k == iter % 6, "read of the weight under trial");
          old_w = w[acc_k];
          phase = P_WR;
        end
        P_WR: begin
          check(op == CMD_WR_W && acc_k == iter % 6, "write of the trial weight");
          new_w = s8(op_wdata);
          w[acc_k] = new_w;
          phase = P_EPOCH; p = 0; base = 0;
        end
        P_RESTORE: begin
          check(op == CMD_WR_W && acc_k == iter % 6 && s8(op_wdata) == old_w,
                "restore of the old weight");
          w[acc_k] = s8(op_wdata);
          iter++;
          phase = P_RD;
        end
        P_OTHER: begin
          if (op == CMD_WR_W) w[acc_k] = s8(op_wdata);
        end
        default: check(0, "unexpected bus operation");
      endcase
    end
    if (err_sample) begin
      check(err_result == last_result && err_target == mem[p - 1].target,
            "error calculator gets result and target");
    end
    if (err_epoch_end) begin
      check(phase == P_DECIDE && err_baseline == base, "epoch end after all patterns");
      err_decided <= 1;
      err_keep <= ($urandom_range(0, 2) == 0);
    end
    if (err_decided) begin
      if (base) phase = P_RD;
      else if (err_keep) begin n_kept++; iter++; phase = P_RD; end
      else begin n_disc++; phase = P_RESTORE; end
    end
  end

  function automatic int s8(input logic [7:0] v);
    return int'(signed'(v));
  endfunction

  initial begin
    int lat;
    for (int i = 0; i < NPAT; i++) mem[i] = train_word_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!busy, "idle after reset");
    num_iter <= NITER; train_start <= 1;
    phase = P_INIT;
    @(posedge clk);
    train_start <= 0;
    lat = 0;
    #1;
    while (!train_done && lat < 100000) begin @(posedge clk); #1; lat++; end
    check(train_done, "training finished");
    check(iter == NITER && iter_count == 16'(NITER), "iteration count");
    check(kept_count == 16'(n_kept) && discard_count == 16'(n_disc),
          $sformatf("kept %0d/%0d discarded %0d/%0d", kept_count, n_kept, discard_count, n_disc));
    check(n_kept > 0 && n_disc > 0, "both keep and discard exercised");
    phase = P_OTHER;
    @(posedge clk);
    // classification
    cls_in1 <= 8'sd12; cls_in2 <= -8'sd7; classify_start <= 1;
    @(posedge clk); classify_start <= 0;
    #1;
    while (!cls_done) begin @(posedge clk); #1; end
    check(cls_result == last_result, "classification result");
    // host weight set and get
    host_w_idx <= 3'd4; host_w_data <= 8'sd99; host_w_wr <= 1;
    @(posedge clk); host_w_wr <= 0;
    #1;
    while (!host_w_done) begin @(posedge clk); #1; end
    check(w[4] == 99, "host weight write");
    host_w_idx <= 3'd4; host_w_rd <= 1;
    @(posedge clk); host_w_rd <= 0;
    #1;
    while (!host_w_done) begin @(posedge clk); #1; end
    check(s8(host_w_q) == 99, "host weight read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
