// Self-checking test of fc_conf_regs: writes every user register through the
// APB slave and reads it back, checks the conf outputs, DEVID, the start
// pulse (one cycle, only when idle), and STATUS running/done handling.
module tb_fc_conf_regs;
  import fc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0, pready, start, done = 0;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  conf_info_t conf;
  int checks = 0, failures = 0, starts = 0;

  fc_conf_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d; penable = 0;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; pwrite = 0; paddr = a; penable = 0;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic expect32(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0]  addrs [10] = '{8'h40, 8'h44, 8'h48, 8'h4C, 8'h50, 8'h54, 8'h58, 8'h5C, 8'h60, 8'h64};
    logic [31:0] vals [10];
    logic [31:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_read(8'h04, r); expect32(r, 0, "STATUS after reset");
    apb_read(8'h0C, r); expect32(r, 32'h0000_0FC0, "DEVID");
    foreach (addrs[i]) begin vals[i] = $urandom; apb_write(addrs[i], vals[i]); end
    foreach (addrs[i]) begin apb_read(addrs[i], r); expect32(r, vals[i], "register readback"); end
    expect32(conf.flags, vals[0], "conf.flags");     expect32(conf.out_add, vals[1], "conf.out_add");
    expect32(conf.w_add, vals[2], "conf.w_add");     expect32(conf.in_add, vals[3], "conf.in_add");
    expect32(conf.n, vals[4], "conf.n");             expect32(conf.m, vals[5], "conf.m");
    expect32(conf.offset_q_data, vals[6], "conf.offset_q_data");
    expect32(conf.offset_pe, vals[7], "conf.offset_pe");
    expect32(conf.options, vals[8], "conf.options"); expect32(conf.acc, vals[9], "conf.acc");
    apb_write(8'h04, 32'hFFFF_FFFF);                  // read-only, ignored
    apb_read(8'h04, r); expect32(r, 0, "STATUS is read only");
    // start
    apb_write(8'h00, 32'h1);
    @(negedge clk);
    expect32(32'(starts), 1, "one start pulse");
    apb_read(8'h04, r); expect32(r, 32'h1, "STATUS running");
    apb_write(8'h00, 32'h1);                          // while running: no new start
    @(negedge clk);
    expect32(32'(starts), 1, "no start while running");
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    apb_read(8'h04, r); expect32(r, 32'h2, "STATUS done");
    apb_write(8'h00, 32'h0);                          // deactivate: clears done
    apb_read(8'h04, r); expect32(r, 32'h0, "STATUS cleared");
    apb_write(8'h00, 32'h1);
    @(negedge clk);
    expect32(32'(starts), 2, "second start");
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
