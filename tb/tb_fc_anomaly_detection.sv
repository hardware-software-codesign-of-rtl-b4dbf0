// Workload test: one full inference of the anomaly-detection autoencoder,
// eleven fully connected layers of widths 640-128-128-128-128-128-8-128-
// 128-128-128-640, on fc_accelerator at its default size, once each at
// 16-bit, 8-bit and 4-bit precision (ST modes 000, 010 and 001).
//
// A CPU model plays the driver: layers that fit the input PLM are run in
// groups of up to 32 outputs, one call per group; layers with more inputs
// than the input PLM holds (the 640-input first layer, and any layer at
// 16 bits over 256 inputs) are run one output per call, with the input
// slices accumulated in the output PLM through the ACC register. Every raw
// 64-bit output is compared with the plain dot product. Between layers the
// CPU model requantises the outputs back to the input width with an
// arithmetic right shift and saturation (own choice: the document leaves
// quantisation to software), and packs them as the next layer's input.
// Weights are random per layer and precision; the inputs of the first layer
// are random.
//
// Checks: every output of every layer, one acc_done pulse per call, no DMA
// protocol errors, and that the total accelerator cycles of an inference
// fall as the precision is reduced. Cycles and calls per precision are
// printed. A watchdog ends the run if it stalls.
module tb_fc_anomaly_detection;
  import fc_pkg::*;
  import fc_ref_pkg::*;

  localparam int MEM   = 65536;
  localparam int IN_A  = 16;       // layer input vector
  localparam int OUT_A = 1024;     // layer raw outputs, two words each
  localparam int W_A   = 4096;     // layer weights, row k at W_A + k*words
  localparam int NL    = 12;      // layer widths: 11 layers
  localparam logic [2:0] MODES [3] = '{ST_16X16, ST_8X8, ST_4X4};
  localparam int DIMS [NL] = '{640, 128, 128, 128, 128, 128, 8, 128, 128, 128, 128, 640};

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0, pready, acc_done;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic dma_read_ctrl_valid, dma_read_ctrl_ready, dma_read_chnl_valid, dma_read_chnl_ready;
  logic dma_write_ctrl_valid, dma_write_ctrl_ready, dma_write_chnl_valid, dma_write_chnl_ready;
  dma_info_t dma_read_ctrl_data, dma_write_ctrl_data;
  logic [31:0] dma_read_chnl_data, dma_write_chnl_data;

  fc_accelerator dut (.*);
  dma_mem_model #(.MEM_WORDS(MEM), .STALL_PCT(10)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, done_irqs = 0;
  longint cycle = 0, busy_cycles = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && acc_done) done_irqs++;
  end

  initial begin
    #200ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  int xv [];       // current layer input (plain values)
  int wv [][];     // current layer weights
  int calls = 0;

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

  task automatic hw_call(logic [2:0] c, int n, int m, bit acc, int in_a, int w_a, int out_a);
    logic [31:0] st;
    int irq0 = done_irqs;
    longint t0;
    apb_write(8'h4C, 32'(in_a));
    apb_write(8'h48, 32'(w_a));
    apb_write(8'h44, 32'(out_a));
    apb_write(8'h64, 32'(acc));
    apb_write(8'h50, 32'(n));
    apb_write(8'h54, 32'(m));
    apb_write(8'h60, 32'(c));
    t0 = cycle;
    apb_write(8'h00, 32'h1);
    do apb_read(8'h04, st); while (st[1] == 1'b0);
    busy_cycles += cycle - t0;
    apb_write(8'h00, 32'h0);
    calls++;
    checks++;
    if (done_irqs != irq0 + 1) begin failures++; $display("FAIL acc_done pulses: %0d", done_irqs - irq0); end
  endtask

  // pack values [first, first+count) of the input (is_w=0) or weight row k
  task automatic store_vec(logic [2:0] c, bit is_w, int k, int first, int count, int addr);
    int vpl = per_line(c), words = words_of(c, count);
    for (int wd = 0; wd < words; wd++) begin
      logic [15:0] ln [2];
      for (int h = 0; h < 2; h++) begin
        ln[h] = '0;
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

  // run one layer on the accelerator; returns the next layer's input
  task automatic run_layer(logic [2:0] c, int li, int n, int m, output int y []);
    int words = words_of(c, n), n_max = 256 * per_line(c), shift;
    int errs = 0, flat = 0;
    longint qmax = (64'sd1 <<< (x_bits(c) - 1)) - 1;
    wv = new[m];
    foreach (wv[k]) begin
      wv[k] = new[n];
      foreach (wv[k][i]) wv[k][i] = rnd_signed(w_bits(c));
    end
    store_vec(c, 0, 0, 0, n, IN_A);
    for (int k = 0; k < m; k++) store_vec(c, 1, k, 0, n, W_A + k * words);
    for (int i = OUT_A; i < OUT_A + 2 * m; i++) u_mem.mem[i] = 32'hDEAD_BEEF;
    if (n > n_max) begin
      // one output per call, input slices accumulated with ACC
      for (int k = 0; k < m; k++)
        for (int s = 0; s < n; s += n_max) begin
          int off = s / (2 * per_line(c));
          hw_call(c, (n - s < n_max) ? n - s : n_max, 1, s != 0,
                  IN_A + off, W_A + k * words + off, OUT_A + 2 * k);
        end
    end else begin
      for (int g = 0; g < m; g += 32)
        hw_call(c, n, (m - g < 32) ? m - g : 32, 0, IN_A, W_A + g * words, OUT_A + 2 * g);
    end
    // check the raw outputs, then requantise them for the next layer
    y = new[m];
    shift = w_bits(c) - 1 + $clog2(n) / 2;
    for (int k = 0; k < m; k++) begin
      longint exp = 0, got = longint'({u_mem.mem[OUT_A + 2*k + 1], u_mem.mem[OUT_A + 2*k]});
      longint q;
      foreach (xv[i]) exp += longint'(wv[k][i]) * longint'(xv[i]);
      checks++;
      if (got != exp) begin
        failures++;
        errs++;
        if (failures < 10) $display("FAIL layer %0d out[%0d] = %0d exp %0d", li, k, got, exp);
      end
      q = exp >>> shift;
      y[k] = int'((q > qmax) ? qmax : (q < -qmax - 1) ? -qmax - 1 : q);
      if (y[k] == 0 || q > qmax || q < -qmax - 1) flat++;
    end
    $display("layer %0d: %0d x %0d, %0d wrong outputs, %0d of %0d requantised values zero or saturated",
             li, n, m, errs, flat, m);
  endtask

  task automatic inference(logic [2:0] c, output longint cyc, output int ncalls);
    int y [];
    longint b0 = busy_cycles;
    int c0 = calls;
    xv = new[DIMS[0]];
    foreach (xv[i]) xv[i] = rnd_signed(x_bits(c));
    for (int l = 0; l < NL - 1; l++) begin
      run_layer(c, l, DIMS[l], DIMS[l + 1], y);
      xv = y;
    end
    cyc = busy_cycles - b0;
    ncalls = calls - c0;
    $display("inference cfg=%b: %0d calls, %0d accelerator cycles", c, ncalls, cyc);
  endtask

  initial begin
    longint cyc [3];
    int nc [3];
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (MODES[i]) inference(MODES[i], cyc[i], nc[i]);
    checks++;
    if (!(cyc[1] < cyc[0] && cyc[2] < cyc[1])) begin
      failures++;
      $display("FAIL cycles do not fall with precision: %0d %0d %0d", cyc[0], cyc[1], cyc[2]);
    end
    checks++;
    if (u_mem.protocol_errors != 0) begin failures++; $display("FAIL dma protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
