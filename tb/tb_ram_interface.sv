// tb_ram_interface: self-checking test of the training-set store. Loads a
// random set, checks the pattern count, reads every word back in random
// order with one cycle of read latency, then fills the memory to check
// that the full flag stops further writes, and that load_start empties it.
module tb_ram_interface;
  import nn_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, load_start = 0, data_valid = 0, full, rd_en = 0;
  logic [31:0] data_in = 0;
  logic [6:0] n_patterns;
  logic [5:0] rd_addr = 0;
  train_word_t rd_data;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  ram_interface #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .load_start, .data_valid, .data_in, .n_patterns, .full,
    .rd_en, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic load(input int n);
    load_start <= 1; @(posedge clk); load_start <= 0;
    for (int i = 0; i < n; i++) begin
      ref_mem[i % DEPTH] = (i < DEPTH) ? $urandom : ref_mem[i % DEPTH];
      data_valid <= 1;
      data_in <= (i < DEPTH) ? ref_mem[i] : 32'hDEAD_BEEF;
      @(posedge clk);
    end
    data_valid <= 0;
    @(posedge clk);
  endtask

  initial begin
    int a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load(40);
    #1 check(n_patterns == 40 && !full, "count after 40 words");
    for (int t = 0; t < 200; t++) begin
      a = $urandom_range(0, 39);
      rd_addr <= 6'(a); rd_en <= 1;
      @(posedge clk);
      rd_en <= 0;
      #1 check(32'(rd_data) == ref_mem[a], $sformatf("word %0d", a));
    end
    // field layout
    rd_addr <= 6'd3; rd_en <= 1; @(posedge clk); rd_en <= 0; #1;
    check(rd_data.in1 == ref_mem[3][7:0] && rd_data.in2 == ref_mem[3][15:8] &&
          rd_data.target == ref_mem[3][23:16], "word fields");
    // overfill
    load(DEPTH + 5);
    #1 check(n_patterns == DEPTH && full, "full after overfill");
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr <= 6'(i); rd_en <= 1;
      @(posedge clk); rd_en <= 0;
      #1 check(32'(rd_data) == ref_mem[i], $sformatf("word %0d after overfill", i));
    end
    load_start <= 1; @(posedge clk); load_start <= 0; #1;
    check(n_patterns == 0 && !full, "load_start empties the set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
