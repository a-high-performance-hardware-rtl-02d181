// tb_mc_datapath: checks a luma datapath (8-tap, up to 64x64) and a chroma datapath
// (4-tap, up to 32x32) end to end against the HEVC interpolation and weighted
// prediction equations: uni- and biprediction, default and explicit weighting,
// bit depths 8 and 10, different fractions for the two references, random input gaps
// and output stalls. Gap-free jobs check the cycle count: the H pass takes as many
// cycles as the longer reference block has samples, the V pass one cycle per output
// sample, plus a fixed control and pipeline overhead of OVH = 8 cycles, counted from
// the cycle the job is accepted to the cycle the last sample is taken.
module tb_mc_datapath;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int OVH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    job_valid [2], job_ready [2], busy [2];
  mc_job_t job [2];
  logic    in0_valid [2], in0_ready [2], in1_valid [2], in1_ready [2];
  sample_t in0_data [2], in1_data [2];
  logic    out_valid [2], out_ready [2];
  sample_t out_data [2];

  mc_datapath #(.TAPS(8), .MAX_W(64), .MAX_H(64)) u_luma (
    .clk, .rst_n, .job_valid(job_valid[0]), .job(job[0]), .job_ready(job_ready[0]),
    .in0_valid(in0_valid[0]), .in0_data(in0_data[0]), .in0_ready(in0_ready[0]),
    .in1_valid(in1_valid[0]), .in1_data(in1_data[0]), .in1_ready(in1_ready[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_ready(out_ready[0]),
    .busy(busy[0]));
  mc_datapath #(.TAPS(4), .MAX_W(32), .MAX_H(32)) u_chroma (
    .clk, .rst_n, .job_valid(job_valid[1]), .job(job[1]), .job_ready(job_ready[1]),
    .in0_valid(in0_valid[1]), .in0_data(in0_data[1]), .in0_ready(in0_ready[1]),
    .in1_valid(in1_valid[1]), .in1_data(in1_data[1]), .in1_ready(in1_ready[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_ready(out_ready[1]),
    .busy(busy[1]));

  int checks = 0, failures = 0, cycle = 0;
  int n_bi = 0, n_uni = 0, n_expl = 0, n_stall = 0, n_clip = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(int d, int which, int q[$], bit gaps);
    while (q.size() > 0) begin
      @(negedge clk);
      if (which == 0) begin
        in0_valid[d] = !gaps || ($urandom_range(3) != 0);
        in0_data[d]  = sample_t'(q[0]);
      end else begin
        in1_valid[d] = !gaps || ($urandom_range(3) != 0);
        in1_data[d]  = sample_t'(q[0]);
      end
      @(posedge clk);
      if (which == 0 && in0_valid[d] && in0_ready[d]) void'(q.pop_front());
      if (which == 1 && in1_valid[d] && in1_ready[d]) void'(q.pop_front());
    end
    @(negedge clk);
    if (which == 0) in0_valid[d] = 0; else in1_valid[d] = 0;
  endtask

  task automatic run_job(int d, int w, int h, bit bi, bit expl, int bd, bit gaps);
    int T = (d == 0) ? 8 : 4;
    int fmax = (d == 0) ? 3 : 7;
    int stride = w + T - 1;
    int a0[], a1[];
    int q0[$], q1[$];
    int xf0 = $urandom_range(fmax), yf0 = $urandom_range(fmax);
    int xf1 = $urandom_range(fmax), yf1 = $urandom_range(fmax);
    int denom = expl ? $urandom_range(7) : 0;
    int w0 = expl ? $urandom_range(255) - 100 : 1, w1 = expl ? $urandom_range(255) - 100 : 1;
    int o0 = expl ? $urandom_range(255) - 128 : 0, o1 = expl ? $urandom_range(255) - 128 : 0;
    int n = 0, t0, t_end, nin, e;
    mc_job_t j;
    a0 = new[stride * (h + T - 1)];
    a1 = new[stride * (h + T - 1)];
    foreach (a0[i]) a0[i] = $urandom_range((1 << bd) - 1);
    foreach (a1[i]) a1[i] = $urandom_range((1 << bd) - 1);
    stream(T, a0, stride, w, h, xf0, yf0, q0);
    stream(T, a1, stride, w, h, xf1, yf1, q1);
    nin = bi ? ((q0.size() > q1.size()) ? q0.size() : q1.size()) : q0.size();
    j = '{width: DIM_W'(w), height: DIM_W'(h), xfrac0: FRAC_W'(xf0), yfrac0: FRAC_W'(yf0),
          xfrac1: FRAC_W'(xf1), yfrac1: FRAC_W'(yf1), bipred: bi, bit_depth: 4'(bd),
          log2_denom: 3'(denom), w0: WGT_W'(w0), w1: WGT_W'(w1), o0: OFS_W'(o0), o1: OFS_W'(o1)};
    @(negedge clk);
    job[d] = j;
    job_valid[d] = 1;
    @(posedge clk);
    while (!job_ready[d]) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    job_valid[d] = 0;
    if (bi) n_bi++; else n_uni++;
    if (expl) n_expl++;
    fork
      feed(d, 0, q0, gaps);
      if (bi) feed(d, 1, q1, gaps);
      begin
        while (n < w * h) begin
          @(negedge clk);
          out_ready[d] = !gaps || ($urandom_range(2) != 0);
          @(posedge clk);
          if (out_valid[d] && !out_ready[d]) n_stall++;
          if (out_valid[d] && out_ready[d]) begin
            int x = n % w, y = n / w;
            int p0 = pred(T, a0, stride, x, y, xf0, yf0, bd);
            int p1 = bi ? pred(T, a1, stride, x, y, xf1, yf1, bd) : 0;
            e = weighted(p0, p1, bi, expl, bd, denom, w0, w1, o0, o1);
            if (e == 0 || e == (1 << bd) - 1) n_clip++;
            checks++;
            if (int'(out_data[d]) != e) begin
              failures++;
              if (failures < 10)
                $display("FAIL dp%0d %0dx%0d bi%0d ex%0d bd%0d f%0d%0d/%0d%0d at %0d: got %0d exp %0d",
                         d, w, h, bi, expl, bd, xf0, yf0, xf1, yf1, n, out_data[d], e);
            end
            n++;
          end
        end
        t_end = cycle;
        @(negedge clk);
        out_ready[d] = 0;
      end
    join
    if (!gaps) begin
      $display("dp%0d %0dx%0d bi%0d: %0d cycles for %0d input and %0d output samples",
               d, w, h, bi, t_end - t0, nin, w * h);
      checks++;
      if (t_end - t0 != nin + w * h + OVH) begin
        failures++;
        $display("FAIL dp%0d %0dx%0d: %0d cycles, expected %0d + %0d + %0d",
                 d, w, h, t_end - t0, nin, w * h, OVH);
      end
    end
    while (busy[d]) @(posedge clk);
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      job_valid[d] = 0; in0_valid[d] = 0; in1_valid[d] = 0; out_ready[d] = 0;
      job[d] = '0; in0_data[d] = '0; in1_data[d] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        run_job(0, 8, 8, 0, 0, 8, 1);
        run_job(0, 8, 4, 1, 0, 10, 1);
        run_job(0, 4, 8, 0, 1, 8, 1);
        run_job(0, 16, 16, 1, 1, 10, 1);
        run_job(0, 32, 8, 1, 0, 8, 1);
        run_job(0, 12, 16, 1, 1, 8, 1);
        run_job(0, 64, 64, 1, 0, 8, 0);
        run_job(0, 64, 16, 0, 0, 10, 0);
        run_job(0, 16, 64, 1, 1, 10, 0);
      end
      begin
        run_job(1, 4, 4, 0, 0, 8, 1);
        run_job(1, 4, 2, 1, 0, 10, 1);
        run_job(1, 2, 4, 1, 1, 8, 1);
        run_job(1, 8, 8, 1, 1, 10, 1);
        run_job(1, 16, 4, 0, 1, 8, 1);
        run_job(1, 32, 32, 1, 0, 8, 0);
        run_job(1, 32, 32, 0, 1, 10, 0);
        run_job(1, 6, 24, 1, 0, 8, 1);
      end
    join
    checks++;
    if (n_bi == 0 || n_uni == 0 || n_expl == 0 || n_stall == 0 || n_clip == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: bi %0d uni %0d explicit %0d stall %0d clip %0d",
               n_bi, n_uni, n_expl, n_stall, n_clip);
    end
    $display("jobs bi %0d uni %0d explicit %0d, stalled cycles %0d, clipped samples %0d",
             n_bi, n_uni, n_expl, n_stall, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
