// tb_mc_vfilter: checks the vertical filter, here in its 4-tap chroma form, against
// a model of the buffer holding random intermediate values. Every output must equal
// the HEVC vertical filter sum shifted right by 6 (the top row times 64 for an
// integer position). Random output stalls check that nothing is lost or repeated;
// a stall-free block must stream one sample per cycle.
module tb_mc_vfilter;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int T = 4, MW = 32, MH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [DIM_W-1:0] width, height;
  logic [FRAC_W-1:0] frac;
  logic rd_en, out_valid, out_ready = 0, busy;
  logic [5:0] rd_row, rd_col;
  inter_t rd_data [T];
  inter_t out_data;

  mc_vfilter #(.TAPS(T), .MAX_W(MW), .MAX_H(MH)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int mem [MH + T - 1][MW];
  always @(posedge clk) cycle++;

  // Buffer model: one-cycle read latency, output held while rd_en is low.
  always @(posedge clk) begin
    int r, cc;
    if (rd_en)
      for (int i = 0; i < T; i++) begin
        r = (int'(rd_row) + i) % (MH + T - 1);
        cc = int'(rd_col) % MW;
        rd_data[i] <= inter_t'(mem[r][cc]);
      end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h, int f, bit stall);
    int n = 0, e, t_first = -1, t_last = 0;
    foreach (mem[r, col]) mem[r][col] = $urandom_range(30000) - 10000;
    @(negedge clk);
    width = DIM_W'(w); height = DIM_W'(h); frac = FRAC_W'(f);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n < w * h) begin
      out_ready = !stall || ($urandom_range(2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        int x = n % w, y = n / w;
        e = 0;
        // At an integer position the window's top row is the sample itself.
        if (f == 0) e = 64 * mem[y][x];
        else for (int i = 0; i < T; i++) e += c(T, f, i) * mem[y + i][x];
        e = asr(e, 6);
        checks++;
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL f%0d (%0d,%0d) got %0d exp %0d", f, x, y, out_data, e);
        end
        if (t_first < 0) t_first = cycle;
        t_last = cycle;
        n++;
      end
      @(negedge clk);
    end
    out_ready = 1;
    while (busy) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra output"); end
    if (!stall) begin
      checks++;
      if (t_last - t_first != w * h - 1) begin
        failures++;
        $display("FAIL %0d samples took %0d cycles", w * h, t_last - t_first + 1);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) run(4 + 2 * f, 8 - f / 2, f, 1);
    run(32, 32, 5, 0);
    run(2, 2, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
