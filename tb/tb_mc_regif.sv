// tb_mc_regif: checks the register interface with the testbench playing both
// datapaths. Configuration registers must read back what was written and appear in
// the job descriptor of the addressed datapath only; START must wait for job_ready
// and raise job_valid; sample writes must reach the right stream and wait while it is
// not ready; OUT reads must wait for a sample and return it; STATUS must report busy
// and a waiting sample.
module tb_mc_regif;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0, req_ready, rsp_valid;
  logic [7:0] req_addr = 0;
  logic [31:0] req_wdata = 0, rsp_rdata;
  logic    job_valid [2], job_ready [2], busy [2];
  mc_job_t job [2];
  logic    in0_valid [2], in0_ready [2], in1_valid [2], in1_ready [2];
  sample_t in0_data [2], in1_data [2];
  logic    out_valid [2], out_ready [2];
  sample_t out_data [2];

  mc_regif dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_job [2] = '{0, 0}, n_in0 [2] = '{0, 0}, n_in1 [2] = '{0, 0}, n_out [2] = '{0, 0};
  int last_in0 [2], last_in1 [2];
  always @(posedge clk) begin
    cycle++;
    for (int i = 0; i < 2; i++) begin
      if (job_valid[i] && job_ready[i]) n_job[i]++;
      if (in0_valid[i] && in0_ready[i]) begin n_in0[i]++; last_in0[i] = int'(in0_data[i]); end
      if (in1_valid[i] && in1_ready[i]) begin n_in1[i]++; last_in1[i] = int'(in1_data[i]); end
      if (out_valid[i] && out_ready[i]) n_out[i]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Returns the number of cycles the request waited.
  task automatic bus_write(int a, int dat, output int waited);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = 8'(a); req_wdata = dat;
    waited = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic bus_read(int a, output int dat, output int waited);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = 8'(a);
    waited = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; waited++; end
    @(negedge clk);
    req_valid = 0;
    check(rsp_valid == 1, "read response valid");
    dat = int'(rsp_rdata);
  endtask

  initial begin
    int v, wt;
    for (int i = 0; i < 2; i++) begin
      job_ready[i] = 1; in0_ready[i] = 1; in1_ready[i] = 1; out_valid[i] = 0;
      out_data[i] = '0; busy[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    bus_read(8'h00, v, wt);
    check(v == ((8 << 20) | (8 << 8) | 8), "SIZE reset value");
    for (int d = 0; d < 2; d++) begin
      automatic int base = d * 64;
      automatic int wd = 4 + 20 * d, ht = 60 - 30 * d;
      bus_write(base + 8'h00, (5 << 24) | (10 << 20) | (1 << 16) | (ht << 8) | wd, wt);
      bus_write(base + 8'h04, (3 << 12) | (2 << 8) | (1 << 4) | (7 - d), wt);
      bus_write(base + 8'h08, (9'h1F0 << 16) | 9'h0FF, wt);
      bus_write(base + 8'h0C, (12'h800 << 16) | 12'h7FF, wt);
      bus_read(base + 8'h00, v, wt);
      check(v == ((5 << 24) | (10 << 20) | (1 << 16) | (ht << 8) | wd), "SIZE read back");
      bus_read(base + 8'h04, v, wt);
      check(v == ((3 << 12) | (2 << 8) | (1 << 4) | (7 - d)), "FRAC read back");
      bus_read(base + 8'h08, v, wt);
      check(v == ((9'h1F0 << 16) | 9'h0FF), "WEIGHT read back");
      bus_read(base + 8'h0C, v, wt);
      check(v == ((12'h800 << 16) | 12'h7FF), "OFFSET read back");
      check(int'(job[d].width) == wd && int'(job[d].height) == ht && job[d].bipred
            && job[d].bit_depth == 10 && job[d].log2_denom == 5, "job size fields");
      check(int'(job[d].xfrac0) == 7 - d && job[d].yfrac0 == 1 && job[d].xfrac1 == 2
            && job[d].yfrac1 == 3, "job fraction fields");
      check(job[d].w0 == 255 && job[d].w1 == -16 && job[d].o0 == 2047 && job[d].o1 == -2048,
            "job weight fields");
    end
    check(job[0].width != job[1].width, "datapaths configured separately");
    // Unmapped addresses: writes change nothing, reads return 0.
    bus_write(8'h80, 32'h0000_0305, wt);
    bus_write(8'h90, 0, wt);
    check(int'(job[0].width) == 4 && n_job[0] == 0 && n_job[1] == 0, "unmapped write ignored");
    bus_read(8'h80, v, wt);
    check(v == 0 && wt == 0, "unmapped read returns 0");
    // START waits for job_ready.
    job_ready[1] = 0;
    fork
      bus_write(8'h40 + 8'h10, 0, wt);
      begin repeat (4) @(negedge clk); job_ready[1] = 1; end
    join
    check(wt >= 3 && n_job[1] == 1 && n_job[0] == 0, "START waits for the chroma datapath");
    bus_write(8'h10, 0, wt);
    check(wt == 0 && n_job[0] == 1, "START luma");
    // Sample ports.
    bus_write(8'h14, 123, wt);
    check(n_in0[0] == 1 && last_in0[0] == 123, "IN0 luma");
    bus_write(8'h40 + 8'h18, 1001, wt);
    check(n_in1[1] == 1 && last_in1[1] == 1001 && n_in1[0] == 0, "IN1 chroma");
    in0_ready[1] = 0;
    fork
      bus_write(8'h40 + 8'h14, 77, wt);
      begin repeat (3) @(negedge clk); in0_ready[1] = 1; end
    join
    check(wt >= 2 && n_in0[1] == 1 && last_in0[1] == 77, "IN0 waits while not ready");
    // Output port and status.
    busy[0] = 1;
    bus_read(8'h20, v, wt);
    check(v == 1, "STATUS busy");
    fork
      bus_read(8'h1C, v, wt);
      begin
        repeat (5) @(negedge clk);
        out_data[0] = 10'd513; out_valid[0] = 1;
        #1;
        while (!out_ready[0]) @(negedge clk);
        @(negedge clk);
        out_valid[0] = 0;
      end
    join
    check(wt >= 4 && v == 513 && n_out[0] == 1 && n_out[1] == 0, "OUT waits and returns sample");
    out_valid[1] = 1; busy[1] = 0;
    bus_read(8'h40 + 8'h20, v, wt);
    check(v == 2, "STATUS sample waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
