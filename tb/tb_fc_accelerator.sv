// End-to-end test of fc_accelerator at its default (full) size.
//
// A CPU model programs the registers over APB, starts runs and polls STATUS;
// a behavioural DMA memory serves the tensors with random stalls. Each layer
// is built from plain integer values: inputs and weights are packed into
// 16-bit lines as the sum-together pairing requires (input slot s at the
// low end of the line, the matching weight at the mirrored position), and
// the outputs read back from memory are compared with the plain dot product
// sum_n w[k][n] * x[n]. Layers larger than the PLMs are split the way the
// driver software does: one output per run, input slices accumulated with
// the ACC register.
// Counted mechanisms, each of which must occur: every ST configuration,
// accumulate runs, partial last 64-line chunks, zero-padded lines, output
// count clamping (M > 32), DMA read gaps, write back-pressure and request
// waits. The cycle count of every run is printed.
module tb_fc_accelerator;
  import fc_pkg::*;
  import fc_ref_pkg::*;

  localparam int MEM = 16384;
  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0, pready, acc_done;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic dma_read_ctrl_valid, dma_read_ctrl_ready, dma_read_chnl_valid, dma_read_chnl_ready;
  logic dma_write_ctrl_valid, dma_write_ctrl_ready, dma_write_chnl_valid, dma_write_chnl_ready;
  dma_info_t dma_read_ctrl_data, dma_write_ctrl_data;
  logic [31:0] dma_read_chnl_data, dma_write_chnl_data;

  fc_accelerator dut (.*);
  dma_mem_model #(.MEM_WORDS(MEM), .STALL_PCT(25)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mode_runs [8];
  int acc_runs = 0, partial_runs = 0, padded_runs = 0, clamp_runs = 0, done_irqs = 0;
  always @(posedge clk) if (rst_n && acc_done) done_irqs++;

  // current layer
  int xv [];
  int wv [][];

  // ------------------------------------------------------------ CPU model
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

  // one hardware call, as the driver does it
  task automatic hw_call(logic [2:0] c, int n, int m, bit acc, int in_a, int w_a, int out_a);
    logic [31:0] st;
    int cycles = 0, irq0 = done_irqs;
    apb_write(8'h00, 32'h0);
    apb_write(8'h4C, 32'(in_a));
    apb_write(8'h48, 32'(w_a));
    apb_write(8'h44, 32'(out_a));
    apb_write(8'h64, 32'(acc));
    apb_write(8'h40, 32'h0);
    apb_write(8'h50, 32'(n));
    apb_write(8'h54, 32'(m));
    apb_write(8'h60, 32'(c));
    apb_write(8'h00, 32'h1);
    do begin
      apb_read(8'h04, st);
      cycles += 3;
    end while (st[1] == 1'b0);
    apb_write(8'h00, 32'h0);
    checks++;
    if (done_irqs != irq0 + 1) begin failures++; $display("FAIL acc_done pulses: %0d", done_irqs - irq0); end
    mode_runs[c]++;
    if (acc) acc_runs++;
    if (m > 32) clamp_runs++;
    $display("run cfg=%b N=%0d M=%0d acc=%0d: about %0d cycles", c, n, m, acc, cycles);
  endtask

  // ------------------------------------------------------- data packing
  // write values [first, first+count) of a vector to memory as packed words
  task automatic store_vec(logic [2:0] c, bit is_w, int k, int first, int count, int addr);
    int vpl = per_line(c), lines = (count + vpl - 1) / vpl, words = (lines + 1) / 2;
    for (int wd = 0; wd < words; wd++) begin
      logic [15:0] ln [2];
      for (int h = 0; h < 2; h++) begin
        ln[h] = 16'($urandom);                 // unused bits carry noise
        for (int s = 0; s < vpl; s++) begin
          int idx = (2 * wd + h) * vpl + s;
          int v = (idx < count) ? (is_w ? wv[k][first + idx] : xv[first + idx]) : 0;
          if (is_w) ln[h] = put(ln[h], v, w_off(c, s), w_bits(c));
          else      ln[h] = put(ln[h], v, x_off(c, s), x_bits(c));
        end
      end
      u_mem.mem[addr + wd] = {ln[1], ln[0]};
    end
  endtask

  task automatic new_layer(logic [2:0] c, int n, int m);
    xv = new[n];
    wv = new[m];
    foreach (xv[i]) xv[i] = rnd_signed(x_bits(c));
    foreach (wv[k]) begin
      wv[k] = new[n];
      foreach (wv[k][i]) wv[k][i] = rnd_signed(w_bits(c));
    end
  endtask

  function automatic longint dot(int k);
    longint s = 0;
    foreach (xv[i]) s += longint'(wv[k][i]) * longint'(xv[i]);
    return s;
  endfunction

  task automatic check_out(int out_a, int k_first, int count, string what);
    for (int k = 0; k < count; k++) begin
      logic [63:0] got = {u_mem.mem[out_a + 2*k + 1], u_mem.mem[out_a + 2*k]};
      longint exp = dot(k_first + k);
      checks++;
      if (longint'(got) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s out[%0d] = %0d exp %0d", what, k_first + k, $signed(got), exp);
      end
    end
  endtask

  // a layer that fits the PLMs: one call
  task automatic single_layer(logic [2:0] c, int n, int m);
    int in_a = 16, w_a = 512, out_a = 14000, words = words_of(c, n);
    int lines = (n + per_line(c) - 1) / per_line(c);
    new_layer(c, n, m);
    store_vec(c, 0, 0, 0, n, in_a);
    for (int k = 0; k < m; k++) store_vec(c, 1, k, 0, n, w_a + k * words);
    for (int i = out_a; i < out_a + 200; i++) u_mem.mem[i] = 32'hDEAD_BEEF;
    if ((2 * words) % 64 != 0) partial_runs++;
    if (lines % 2 != 0 || n % per_line(c) != 0) padded_runs++;
    hw_call(c, n, m, 0, in_a, w_a, out_a);
    check_out(out_a, 0, (m > 32) ? 32 : m, "single");
    checks++;
    if (u_mem.mem[out_a + 2 * ((m > 32) ? 32 : m)] != 32'hDEAD_BEEF) begin
      failures++;
      $display("FAIL write past the last output");
    end
  endtask

  // a layer with more inputs than the input PLM: one output per call,
  // input slices accumulated in the output PLM through the ACC register
  task automatic tiled_layer(logic [2:0] c, int n, int m);
    int in_a = 16, out_a = 14000, n_max = 256 * per_line(c);
    int w_a = in_a + words_of(c, n) + 8;
    new_layer(c, n, m);
    for (int s = 0; s < n; s += n_max) begin
      int cnt = (n - s < n_max) ? n - s : n_max;
      store_vec(c, 0, 0, s, cnt, in_a + s / (2 * per_line(c)));
      for (int k = 0; k < m; k++)
        store_vec(c, 1, k, s, cnt, w_a + k * words_of(c, n) + s / (2 * per_line(c)));
    end
    for (int k = 0; k < m; k++) begin
      for (int s = 0; s < n; s += n_max) begin
        int cnt = (n - s < n_max) ? n - s : n_max;
        if ((2 * words_of(c, cnt)) % 64 != 0) partial_runs++;
        hw_call(c, cnt, 1, s != 0, in_a + s / (2 * per_line(c)),
                w_a + k * words_of(c, n) + s / (2 * per_line(c)), out_a + 2 * k);
      end
    end
    check_out(out_a, 0, m, "tiled");
  endtask

  initial begin
    logic [31:0] id;
    repeat (3) @(negedge clk);
    rst_n = 1;
    apb_read(8'h0C, id);
    checks++;
    if (id != 32'h0000_0FC0) begin failures++; $display("FAIL DEVID %h", id); end
    // full PLM: 256 16-bit inputs x 32 outputs
    single_layer(ST_16X16, 256, 32);
    single_layer(ST_8X8,   512, 32);
    single_layer(ST_4X4,   1024, 32);
    single_layer(ST_16X8,  100, 9);
    single_layer(ST_8X4,   77, 5);
    single_layer(ST_8X8,   5, 3);          // padded, single partial chunk
    single_layer(ST_4X4,   130, 40);       // M above the output PLM: clamped
    // anomaly-detection style slices: 640 inputs, tiled over the input PLM
    tiled_layer(ST_16X16, 640, 2);
    tiled_layer(ST_8X8,   640, 2);
    $display("modes 16x16:%0d 16x8:%0d 8x8:%0d 8x4:%0d 4x4:%0d acc:%0d partial:%0d padded:%0d clamp:%0d",
             mode_runs[0], mode_runs[4], mode_runs[2], mode_runs[3], mode_runs[1],
             acc_runs, partial_runs, padded_runs, clamp_runs);
    $display("dma read gaps:%0d write backpressure:%0d request waits:%0d protocol errors:%0d",
             u_mem.read_gaps, u_mem.write_backpressure, u_mem.ctrl_waits, u_mem.protocol_errors);
    foreach (mode_runs[i]) if (i <= 4) begin
      checks++;
      if (mode_runs[i] == 0) begin failures++; $display("FAIL mode %0d never ran", i); end
    end
    checks++;
    if (acc_runs == 0 || partial_runs == 0 || padded_runs == 0 || clamp_runs == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (u_mem.read_gaps == 0 || u_mem.write_backpressure == 0 || u_mem.ctrl_waits == 0) begin
      failures++; $display("FAIL a DMA stall never happened");
    end
    checks++;
    if (u_mem.protocol_errors != 0) begin failures++; $display("FAIL DMA protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
