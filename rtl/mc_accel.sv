// mc_accel: HEVC motion compensation accelerator, top level.
//
// Two independent datapaths behind one register interface: a luma datapath with
// 8-tap filters for blocks up to 64x64, and a chroma datapath with 4-tap filters
// for blocks up to 32x32 (4:2:0 chroma of a 64x64 prediction unit). The host runs
// Cb and Cr one after the other through the chroma datapath, which keeps pace with
// luma because each chroma plane has a quarter of the luma samples. Both datapaths
// can work at the same time, each at one input sample per cycle in its horizontal
// pass and one output sample per cycle in its vertical pass.
//
// Interface: the request/response register bus of mc_regif (see there for the map).
//
// From the published accelerator (Goebel, 2014): two separate datapaths for luma and chroma, one chroma
// datapath for 4:2:0, a register-based host interface. Own choices: the bus and the
// sizes of the chroma datapath, derived from the largest prediction unit.
module mc_accel
  import mc_pkg::*;
#(
  parameter int LUMA_MAX   = 64,  // largest luma block side
  parameter int CHROMA_MAX = 32   // largest chroma block side
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic        req_write,
  input  logic [7:0]  req_addr,
  input  logic [31:0] req_wdata,
  output logic        req_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata
);

  logic    job_valid [2], job_ready [2], busy [2];
  mc_job_t job [2];
  logic    in0_valid [2], in0_ready [2], in1_valid [2], in1_ready [2];
  sample_t in0_data [2], in1_data [2];
  logic    out_valid [2], out_ready [2];
  sample_t out_data [2];

  mc_regif u_regif (
    .clk, .rst_n, .req_valid, .req_write, .req_addr, .req_wdata, .req_ready,
    .rsp_valid, .rsp_rdata,
    .job_valid, .job, .job_ready, .in0_valid, .in0_data, .in0_ready,
    .in1_valid, .in1_data, .in1_ready, .out_valid, .out_data, .out_ready, .busy
  );

  mc_datapath #(.TAPS(8), .MAX_W(LUMA_MAX), .MAX_H(LUMA_MAX)) u_luma (
    .clk, .rst_n,
    .job_valid(job_valid[0]), .job(job[0]), .job_ready(job_ready[0]),
    .in0_valid(in0_valid[0]), .in0_data(in0_data[0]), .in0_ready(in0_ready[0]),
    .in1_valid(in1_valid[0]), .in1_data(in1_data[0]), .in1_ready(in1_ready[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_ready(out_ready[0]),
    .busy(busy[0])
  );

  mc_datapath #(.TAPS(4), .MAX_W(CHROMA_MAX), .MAX_H(CHROMA_MAX)) u_chroma (
    .clk, .rst_n,
    .job_valid(job_valid[1]), .job(job[1]), .job_ready(job_ready[1]),
    .in0_valid(in0_valid[1]), .in0_data(in0_data[1]), .in0_ready(in0_ready[1]),
    .in1_valid(in1_valid[1]), .in1_data(in1_data[1]), .in1_ready(in1_ready[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_ready(out_ready[1]),
    .busy(busy[1])
  );

endmodule
