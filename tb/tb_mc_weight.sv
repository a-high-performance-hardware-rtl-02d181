// tb_mc_weight: checks the biprediction / weighted prediction unit on random
// intermediate samples, weights, offsets, denominators and bit depths against the
// HEVC default and explicit weighted prediction equations, with random output
// stalls; also checks the two-cycle latency and one sample per cycle without stalls.
module tb_mc_weight;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bipred;
  logic [3:0] bit_depth;
  logic [2:0] log2_denom;
  logic signed [WGT_W-1:0] w0, w1;
  logic signed [OFS_W-1:0] o0, o1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  inter_t p0, p1;
  sample_t out_data;

  mc_weight dut (.*);

  int checks = 0, failures = 0;
  int expq[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        int e;
        e = expq.pop_front();
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d exp %0d", out_data, e);
        end
      end
    end
  end

  task automatic batch(bit bi, bit expl, int bd, bit stall, int n);
    @(negedge clk);
    bipred = bi; bit_depth = 4'(bd);
    log2_denom = expl ? 3'($urandom_range(7)) : 3'd0;
    w0 = expl ? WGT_W'($urandom_range(383) - 128) : WGT_W'(1);
    w1 = expl ? WGT_W'($urandom_range(383) - 128) : WGT_W'(1);
    o0 = expl ? OFS_W'($urandom_range(1023) - 512) : OFS_W'(0);
    o1 = expl ? OFS_W'($urandom_range(1023) - 512) : OFS_W'(0);
    for (int k = 0; k < n; ) begin
      in_valid = 1;
      // Intermediate samples span the range the filters can produce.
      p0 = inter_t'($urandom_range(32767 + 10000) - 10000);
      p1 = inter_t'($urandom_range(32767 + 10000) - 10000);
      out_ready = !stall || ($urandom_range(2) != 0);
      @(posedge clk);
      if (in_ready) begin
        expq.push_back(weighted(int'(p0), int'(p1), bi, expl, bd, int'(log2_denom),
                                int'(w0), int'(w1), int'(o0), int'(o1)));
        k++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    out_ready = 1;
    while (expq.size() > 0) @(negedge clk);
  endtask

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++)
      batch(r[0], r[1], r[2] ? 10 : 8, r[3], 50);
    // Latency and rate: two cycles from input to output, then one per cycle.
    @(negedge clk);
    bipred = 0; bit_depth = 8; log2_denom = 0; w0 = 1; w1 = 1; o0 = 0; o1 = 0;
    out_ready = 1; in_valid = 1; p0 = 100; p1 = 0;
    expq.push_back(weighted(100, 0, 0, 0, 8, 0, 1, 1, 0, 0));
    @(negedge clk);
    in_valid = 0;
    t = 1;
    while (!out_valid) begin @(negedge clk); t++; end
    checks++;
    if (t != 2) begin failures++; $display("FAIL latency %0d", t); end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
