// tb_mc_hfilter: checks the horizontal filter on its own. Random rows of reference
// samples are streamed in (with random gaps) and every buffer write is compared with
// the filter sum of HEVC shifted by bit_depth-8; integer positions must give the
// sample times 64 shifted the same way. Also checks that exactly width*rows values
// are written, each within one cycle of the completing input, and that a gap-free
// block is taken at one sample per cycle.
module tb_mc_hfilter;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int T = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [DIM_W-1:0] width;
  logic [6:0] rows;
  logic [FRAC_W-1:0] frac;
  logic [3:0] bit_depth;
  logic in_valid = 0, in_ready, wr_en, busy;
  sample_t in_data;
  logic [6:0] wr_row, wr_col;
  inter_t wr_data;

  mc_hfilter #(.TAPS(T), .MAX_W(64), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0;
  int got [int];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (wr_en) got[int'(wr_row) * 128 + int'(wr_col)] = int'(wr_data);

  task automatic run(int w, int r, int f, int bd, bit gaps);
    int len = w + ((f != 0) ? T - 1 : 0);
    int s [];
    int k = 0, cyc = 0, e;
    s = new[len * r];
    foreach (s[i]) s[i] = $urandom_range((1 << bd) - 1);
    got.delete();
    @(negedge clk);
    width = DIM_W'(w); rows = 7'(r); frac = FRAC_W'(f); bit_depth = 4'(bd);
    start = 1;
    @(negedge clk);
    start = 0;
    while (k < len * r) begin
      in_valid = !gaps || ($urandom_range(2) != 0);
      in_data = sample_t'(s[k]);
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) k++;
      @(negedge clk);
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    checks++;
    if (got.size() != w * r) begin
      failures++;
      $display("FAIL %0d writes, expected %0d", got.size(), w * r);
    end
    if (!gaps) begin
      checks++;
      if (cyc != len * r) begin failures++; $display("FAIL %0d cycles for %0d samples", cyc, len * r); end
    end
    for (int y = 0; y < r; y++)
      for (int x = 0; x < w; x++) begin
        if (f == 0) e = asr(64 * s[y * len + x], bd - 8);
        else begin
          e = 0;
          for (int i = 0; i < T; i++) e += c(T, f, i) * s[y * len + x + i];
          e = asr(e, bd - 8);
        end
        checks++;
        if (!got.exists(y * 128 + x) || got[y * 128 + x] != e) begin
          failures++;
          if (failures < 10) $display("FAIL f%0d (%0d,%0d) exp %0d", f, x, y, e);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      run(8, 11, f, 8, 1);
      run(4, 15, f, 10, 1);
    end
    run(64, 71, 2, 10, 0);
    run(16, 3, 1, 8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
