// Self-checking test of fc_ctrl: checks the derived run parameters (word
// count per ST configuration, clamping to the PLM capacity), the strict
// LOAD -> COMPUTE -> STORE order with one start pulse per phase, and the
// acc_done pulse. Phase completions are returned after random delays.
module tb_fc_ctrl;
  import fc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, busy, acc_done;
  conf_info_t conf = '0;
  logic load_start, load_done = 0, comp_start, comp_done = 0, store_start, store_done = 0;
  logic [2:0] cfg;
  logic [7:0] in_words;
  logic [5:0] n_out;
  logic acc_en;
  logic [31:0] in_add, w_add, out_add;
  int checks = 0, failures = 0;
  int phase_log [$];

  fc_ctrl dut (.*);

  always #5 clk = ~clk;

  // respond to each phase start after a random delay, and log the order
  always @(posedge clk) begin
    if (load_start)  begin phase_log.push_back(1); fork begin repeat (1 + $urandom % 5) @(negedge clk); load_done = 1; @(negedge clk); load_done = 0; end join_none end
    if (comp_start)  begin phase_log.push_back(2); fork begin repeat (1 + $urandom % 5) @(negedge clk); comp_done = 1; @(negedge clk); comp_done = 0; end join_none end
    if (store_start) begin phase_log.push_back(3); fork begin repeat (1 + $urandom % 5) @(negedge clk); store_done = 1; @(negedge clk); store_done = 0; end join_none end
    if (acc_done)    phase_log.push_back(4);
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(logic [2:0] c, int n, int m, int exp_words, int exp_out);
    phase_log.delete();
    @(negedge clk);
    conf.options = 32'(c); conf.n = 32'(n); conf.m = 32'(m); conf.acc = 32'(n % 2);
    conf.in_add = $urandom; conf.w_add = $urandom; conf.out_add = $urandom;
    start = 1;
    @(negedge clk); start = 0;
    expect_eq(int'(in_words), exp_words, "in_words");
    expect_eq(int'(n_out), exp_out, "n_out");
    expect_eq(int'(cfg), int'(c), "cfg");
    expect_eq(int'(acc_en), n % 2, "acc_en");
    expect_eq(int'(in_add == conf.in_add && w_add == conf.w_add && out_add == conf.out_add), 1, "addresses");
    conf = '0;                                        // captured values must stay
    while (!acc_done) @(negedge clk);
    expect_eq(int'(in_words), exp_words, "in_words held");
    @(negedge clk);
    expect_eq(phase_log.size(), 4, "phase count");
    if (phase_log.size() == 4)
      expect_eq(phase_log[0] * 1000 + phase_log[1] * 100 + phase_log[2] * 10 + phase_log[3], 1234, "phase order");
    @(negedge clk);
    expect_eq(int'(busy), 0, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(ST_16X16, 256, 32, 128, 32);
    run(ST_16X16, 3, 1, 2, 1);
    run(ST_8X8, 512, 32, 128, 32);
    run(ST_8X8, 5, 4, 2, 4);          // 3 lines -> 2 words
    run(ST_4X4, 1024, 8, 128, 8);
    run(ST_4X4, 9, 8, 2, 8);          // 3 lines -> 2 words
    run(ST_16X8, 100, 3, 50, 3);
    run(ST_8X4, 100, 3, 25, 3);
    run(ST_16X16, 640, 128, 128, 32); // clamped to the PLM capacity
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
