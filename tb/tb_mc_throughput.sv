// tb_mc_throughput: luma throughput of one datapath for square prediction units of
// 8x8, 16x16, 32x32 and 64x64 samples, the sizes over which the design's throughput
// is usually quoted. Each block is fractional in both directions, so the horizontal
// pass reads (N+7)^2 samples; the source streams without gaps and the sink never
// stalls. The measured cycles per block must equal (N+7)^2 + N^2 + 8 (8 cycles of
// control and pipeline overhead), giving N^2 / ((N+7)^2 + N^2 + 8) output samples
// per cycle: about 0.22, 0.32, 0.40 and 0.45, approaching the 0.5 bound of the two
// sequential passes. Results are also checked sample by sample.
module tb_mc_throughput;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic job_valid = 0, job_ready, busy;
  mc_job_t job;
  logic in0_valid = 0, in0_ready, in1_valid = 0, in1_ready, out_valid, out_ready = 1;
  sample_t in0_data, in1_data = '0, out_data;

  mc_datapath u_luma (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int n);
    int stride = n + 7, area[], q[$], got = 0, t0, t1, e;
    real rate;
    area = new[stride * stride];
    foreach (area[i]) area[i] = $urandom_range(255);
    stream(8, area, stride, n, n, 2, 1, q);
    @(negedge clk);
    job = '{width: DIM_W'(n), height: DIM_W'(n), xfrac0: 3'd2, yfrac0: 3'd1,
            xfrac1: 3'd0, yfrac1: 3'd0, bipred: 1'b0, bit_depth: 4'd8, log2_denom: 3'd0,
            w0: WGT_W'(1), w1: WGT_W'(1), o0: '0, o1: '0};
    job_valid = 1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    job_valid = 0;
    fork
      foreach (q[i]) begin
        in0_valid = 1; in0_data = sample_t'(q[i]);
        @(posedge clk);
        while (!in0_ready) @(posedge clk);
        @(negedge clk);
        in0_valid = 0;
      end
      while (got < n * n) begin
        @(posedge clk);
        if (out_valid) begin
          e = weighted(pred(8, area, stride, got % n, got / n, 2, 1, 8), 0, 0, 0, 8,
                       0, 1, 1, 0, 0);
          checks++;
          if (int'(out_data) != e) failures++;
          got++;
          t1 = cycle;
        end
      end
    join
    rate = real'(n * n) / real'(t1 - t0);
    $display("%0dx%0d: %0d cycles, %.3f samples per cycle", n, n, t1 - t0, rate);
    checks++;
    if (t1 - t0 != stride * stride + n * n + 8) begin
      failures++;
      $display("FAIL expected %0d cycles", stride * stride + n * n + 8);
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    job = '0; in0_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(8);
    measure(16);
    measure(32);
    measure(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
