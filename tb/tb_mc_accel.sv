// tb_mc_accel: end-to-end test of the accelerator at its default sizes, driven only
// through the register bus the way host software would drive it. For each prediction
// unit the host configures and starts the luma job, writes both reference blocks,
// then runs the Cb and Cr blocks through the chroma datapath while the luma result
// waits, and reads every predicted sample back. The samples are compared with the
// HEVC interpolation and weighted prediction equations.
//
// The prediction units cover the smallest (8x4, 4x8) and the largest (64x64) sizes,
// uni- and biprediction, default and explicit weighting, integer and fractional
// positions and bit depths 8 and 10. Counted mechanisms, each of which must occur:
// biprediction, uniprediction, explicit weighting, integer-position filtering,
// luma and chroma busy together, bus requests that wait (a full datapath or an
// output not yet ready) and clipped output samples.
module tb_mc_accel;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0, req_ready, rsp_valid;
  logic [7:0] req_addr = 0;
  logic [31:0] req_wdata = 0, rsp_rdata;

  mc_accel dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_bi = 0, n_uni = 0, n_expl = 0, n_int = 0, n_both_busy = 0, n_wait = 0, n_clip = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(int a, int dat);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = 8'(a); req_wdata = dat;
    @(posedge clk);
    while (!req_ready) begin n_wait++; @(posedge clk); end
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic bus_read(int a, output int dat);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = 8'(a);
    @(posedge clk);
    while (!req_ready) begin n_wait++; @(posedge clk); end
    @(negedge clk);
    req_valid = 0;
    dat = int'(rsp_rdata);
  endtask

  class block_t;
    int d, T, w, h, bi, expl, bd, denom, w0, w1, o0, o1, xf0, yf0, xf1, yf1, stride;
    int a0[], a1[];
    int q0[$], q1[$];

    function new(int d_, int w_, int h_, int bi_, int expl_, int bd_, int xf0_, int yf0_,
                 int xf1_, int yf1_);
      d = d_; T = (d == 0) ? 8 : 4; w = w_; h = h_; bi = bi_; expl = expl_; bd = bd_;
      xf0 = xf0_; yf0 = yf0_; xf1 = xf1_; yf1 = yf1_;
      denom = expl ? $urandom_range(7) : 0;
      w0 = expl ? $urandom_range(200) - 60 : 1;
      w1 = expl ? $urandom_range(200) - 60 : 1;
      o0 = expl ? $urandom_range(200) - 100 : 0;
      o1 = expl ? $urandom_range(200) - 100 : 0;
      stride = w + T - 1;
      a0 = new[stride * (h + T - 1)];
      a1 = new[stride * (h + T - 1)];
      foreach (a0[i]) a0[i] = $urandom_range((1 << bd) - 1);
      foreach (a1[i]) a1[i] = $urandom_range((1 << bd) - 1);
      stream(T, a0, stride, w, h, xf0, yf0, q0);
      stream(T, a1, stride, w, h, xf1, yf1, q1);
    endfunction
  endclass

  task automatic send(block_t b);
    int base = b.d * 64;
    bus_write(base + 'h00, (b.denom << 24) | (b.bd << 20) | (b.bi << 16) | (b.h << 8) | b.w);
    bus_write(base + 'h04, (b.yf1 << 12) | (b.xf1 << 8) | (b.yf0 << 4) | b.xf0);
    bus_write(base + 'h08, ((b.w1 & 'h1FF) << 16) | (b.w0 & 'h1FF));
    bus_write(base + 'h0C, ((b.o1 & 'hFFF) << 16) | (b.o0 & 'hFFF));
    bus_write(base + 'h10, 0);
    if (b.bi) n_bi++; else n_uni++;
    if (b.expl) n_expl++;
    if (b.xf0 == 0 || b.yf0 == 0 || (b.bi && (b.xf1 == 0 || b.yf1 == 0))) n_int++;
    foreach (b.q0[i]) bus_write(base + 'h14, b.q0[i]);
    if (b.bi) foreach (b.q1[i]) bus_write(base + 'h18, b.q1[i]);
  endtask

  task automatic receive(block_t b);
    int v, e, p0, p1;
    for (int n = 0; n < b.w * b.h; n++) begin
      int x = n % b.w, y = n / b.w;
      bus_read(b.d * 64 + 'h1C, v);
      p0 = pred(b.T, b.a0, b.stride, x, y, b.xf0, b.yf0, b.bd);
      p1 = b.bi ? pred(b.T, b.a1, b.stride, x, y, b.xf1, b.yf1, b.bd) : 0;
      e = weighted(p0, p1, b.bi, b.expl, b.bd, b.denom, b.w0, b.w1, b.o0, b.o1);
      if (e == 0 || e == (1 << b.bd) - 1) n_clip++;
      checks++;
      if (v != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL dp%0d %0dx%0d bi%0d at (%0d,%0d): got %0d exp %0d",
                   b.d, b.w, b.h, b.bi, x, y, v, e);
      end
    end
  endtask

  // One prediction unit: luma block w x h plus 4:2:0 Cb and Cr blocks.
  task automatic pu(int w, int h, int bi, int expl, int bd, int xf0, int yf0, int xf1, int yf1,
                    int cx0, int cy0, int cx1, int cy1);
    block_t l  = new(0, w, h, bi, expl, bd, xf0, yf0, xf1, yf1);
    block_t cb = new(1, w / 2, h / 2, bi, expl, bd, cx0, cy0, cx1, cy1);
    block_t cr = new(1, w / 2, h / 2, bi, expl, bd, cx0, cy0, cx1, cy1);
    int st;
    send(l);
    send(cb);
    bus_read('h20, st);
    if (st[0]) begin
      bus_read('h40 + 'h20, st);
      if (st[0]) n_both_busy++;
    end
    receive(l);
    receive(cb);
    send(cr);
    receive(cr);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pu(8, 4, 0, 0, 8, 1, 2, 0, 0, 3, 5, 0, 0);
    pu(4, 8, 0, 1, 10, 0, 3, 0, 0, 0, 7, 0, 0);
    pu(16, 16, 1, 0, 8, 2, 2, 0, 1, 4, 1, 6, 0);
    pu(16, 8, 1, 1, 10, 3, 0, 1, 3, 2, 0, 7, 7);
    pu(64, 64, 1, 0, 10, 1, 3, 2, 2, 2, 6, 4, 4);
    pu(64, 64, 0, 1, 8, 0, 0, 0, 0, 0, 0, 0, 0);
    checks++;
    if (n_bi == 0 || n_uni == 0 || n_expl == 0 || n_int == 0 || n_both_busy == 0
        || n_wait == 0 || n_clip == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("bi %0d uni %0d explicit %0d integer %0d both-busy %0d bus-waits %0d clipped %0d",
             n_bi, n_uni, n_expl, n_int, n_both_busy, n_wait, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
