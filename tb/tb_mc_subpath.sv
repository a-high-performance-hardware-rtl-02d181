// tb_mc_subpath: checks one sub-datapath (horizontal filter, buffer, vertical filter)
// against the HEVC interpolation equations for luma (8-tap) blocks of many sizes, all
// sixteen fraction pairs and bit depths 8 and 10, with random input gaps and output
// stalls. One 64x64 block runs without gaps to check the rates: one input sample
// per cycle in the horizontal pass, one output sample per cycle in the vertical pass.
module tb_mc_subpath;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int T = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_h = 0, start_v = 0;
  logic [DIM_W-1:0] width, height;
  logic [FRAC_W-1:0] xfrac, yfrac;
  logic [3:0] bit_depth;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, h_busy, v_busy;
  sample_t in_data;
  inter_t out_data;

  mc_subpath #(.TAPS(T), .MAX_W(64), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int w, int h, int xf, int yf, int bd, bit gaps);
    int stride = w + T - 1;
    int area[];
    int q[$];
    int n_out, t0, t1, t_first, t_last, nin;
    area = new[stride * (h + T - 1)];
    foreach (area[i]) area[i] = $urandom_range((1 << bd) - 1);
    stream(T, area, stride, w, h, xf, yf, q);
    nin = q.size();
    @(negedge clk);
    width = DIM_W'(w); height = DIM_W'(h); xfrac = FRAC_W'(xf); yfrac = FRAC_W'(yf);
    bit_depth = 4'(bd);
    start_h = 1;
    @(negedge clk);
    start_h = 0;
    t0 = cycle;
    while (q.size() > 0) begin
      in_valid = !gaps || ($urandom_range(3) != 0);
      in_data  = sample_t'(q[0]);
      @(posedge clk);
      if (in_valid && in_ready) void'(q.pop_front());
      @(negedge clk);
    end
    in_valid = 0;
    t1 = cycle;
    while (h_busy) @(negedge clk);
    if (!gaps) begin
      checks++;
      if (t1 - t0 != nin) begin
        failures++;
        $display("FAIL h pass %0d cycles for %0d samples", t1 - t0, nin);
      end
    end
    start_v = 1;
    @(negedge clk);
    start_v = 0;
    n_out = 0;
    t_first = -1;
    t_last = 0;
    while (n_out < w * h) begin
      out_ready = !gaps || ($urandom_range(2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        int e = pred(T, area, stride, n_out % w, n_out / w, xf, yf, bd);
        checks++;
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0dx%0d xf%0d yf%0d bd%0d at %0d: got %0d exp %0d",
                     w, h, xf, yf, bd, n_out, out_data, e);
        end
        if (t_first < 0) t_first = cycle;
        t_last = cycle;
        n_out++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    if (!gaps) begin
      checks++;
      if (t_last - t_first != w * h - 1) begin
        failures++;
        $display("FAIL v pass not one sample per cycle: %0d cycles", t_last - t_first + 1);
      end
    end
    while (v_busy) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int xf = 0; xf < 4; xf++)
      for (int yf = 0; yf < 4; yf++)
        run_block(8, 4, xf, yf, ((xf + yf) % 2 != 0) ? 10 : 8, 1);
    run_block(4, 8, 2, 3, 8, 1);
    run_block(16, 12, 1, 1, 10, 1);
    run_block(12, 16, 3, 2, 8, 1);
    run_block(24, 32, 2, 0, 10, 1);
    run_block(64, 64, 1, 3, 8, 0);
    run_block(64, 64, 0, 0, 10, 0);
    run_block(64, 48, 3, 1, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
