// tb_lfsr_prng: self-checking test of the LFSR. The serial output must
// follow the linear recursion s(k+16) = s(k) ^ s(k+11) ^ s(k+13) ^ s(k+14)
// from the seed, the register must hold when not enabled, reload from the
// seed input, and return to its start after exactly 2^16 - 1 steps (and
// not before).
module tb_lfsr_prng;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [15:0] seed = 0, state;
  logic bit_out;
  logic [7:0] rnd;
  int checks = 0, failures = 0;

  lfsr_prng #(.N(16), .TAPS(16'h6801), .SEED(16'hACE1)) dut (
    .clk, .rst_n, .en, .load, .seed, .state, .bit_out, .rnd
  );

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  bit seq [$];
  initial begin
    logic [15:0] start, hold;
    int period;
    repeat (2) @(posedge clk);
    #1 check(state == 16'hACE1, "reset loads the initialisation vector");
    rst_n = 1;
    for (int i = 0; i < 16; i++) seq.push_back(state[i]);
    en = 1;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk); #1;
      seq.push_back(state[15]);
      check(bit_out == seq[k + 1] && rnd == state[7:0], "output taps");
      check(seq[k + 16] == (seq[k] ^ seq[k + 11] ^ seq[k + 13] ^ seq[k + 14]),
            $sformatf("recursion at step %0d", k));
    end
    en = 0;
    hold = state;
    repeat (5) @(posedge clk);
    #1 check(state == hold, "holds when disabled");
    seed = 16'h0001; load = 1;
    @(posedge clk); #1;
    load = 0;
    check(state == 16'h0001, "seed load");
    start = state;
    en = 1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (state != start && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
