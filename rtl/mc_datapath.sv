// mc_datapath: one complete interpolation datapath (luma or chroma).
//
// Two sub-datapaths interpolate the two reference blocks of a biprediction in
// parallel; a weighting unit averages and weights their results. One job is one
// block of one plane. A small controller runs the job in two passes:
//   H pass  - both horizontal filters consume their reference blocks (one sample per
//             cycle each) and fill their buffers; only sub-datapath 0 runs for
//             uniprediction.
//   V pass  - once every horizontal filter has finished, both vertical filters start
//             together and stream width*height samples, one per cycle, in lockstep
//             through the weighting unit to the output.
// The job ends when the last output sample is taken; a new job is accepted only then.
// For large blocks the rate approaches 0.5 output samples per cycle.
//
// Interface: job_valid/job_ready hands over a job descriptor (mc_pkg::mc_job_t).
// in0/in1 are the reference sample streams (valid/ready), out the predicted samples
// in row-major order (valid/ready). Back-pressure on out stalls the V pass.
//
// From the published accelerator (Goebel, 2014): the datapath structure (two filter chains, then
// biprediction and weighted prediction), the sequential passes and the per-cycle
// rates. Own choices: the controller, the job descriptor and the handshakes.
module mc_datapath
  import mc_pkg::*;
#(
  parameter int TAPS  = 8,
  parameter int MAX_W = 64,
  parameter int MAX_H = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    job_valid,
  input  mc_job_t job,
  output logic    job_ready,
  input  logic    in0_valid,
  input  sample_t in0_data,
  output logic    in0_ready,
  input  logic    in1_valid,
  input  sample_t in1_data,
  output logic    in1_ready,
  output logic    out_valid,
  output sample_t out_data,
  input  logic    out_ready,
  output logic    busy
);

  typedef enum logic [2:0] {S_IDLE, S_HSTART, S_HPASS, S_VSTART, S_VPASS} state_t;
  state_t  state;
  mc_job_t job_q;
  logic [2*DIM_W-1:0] remaining;

  logic h_busy0, h_busy1, v_busy0, v_busy1;
  logic v0_valid, v1_valid, v0_ready, v1_ready;
  inter_t v0_data, v1_data;
  logic w_in_valid, w_in_ready;
  logic start_h, start_v;

  assign job_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign start_h   = (state == S_HSTART);
  assign start_v   = (state == S_VSTART);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job_q     <= '0;
      remaining <= '0;
    end else begin
      case (state)
        S_IDLE:   if (job_valid) begin
                    job_q     <= job;
                    remaining <= job.width * job.height;
                    state     <= S_HSTART;
                  end
        S_HSTART: state <= S_HPASS;
        S_HPASS:  if (!h_busy0 && !h_busy1) state <= S_VSTART;
        S_VSTART: state <= (remaining == 0) ? S_IDLE : S_VPASS;
        S_VPASS:  if (out_valid && out_ready) begin
                    remaining <= remaining - 1'b1;
                    if (remaining == 1) state <= S_IDLE;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  mc_subpath #(.TAPS(TAPS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_sp0 (
    .clk, .rst_n, .start_h, .start_v,
    .width(job_q.width), .height(job_q.height), .xfrac(job_q.xfrac0), .yfrac(job_q.yfrac0),
    .bit_depth(job_q.bit_depth),
    .in_valid(in0_valid), .in_data(in0_data), .in_ready(in0_ready),
    .out_valid(v0_valid), .out_data(v0_data), .out_ready(v0_ready),
    .h_busy(h_busy0), .v_busy(v_busy0)
  );

  mc_subpath #(.TAPS(TAPS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_sp1 (
    .clk, .rst_n, .start_h(start_h && job_q.bipred), .start_v(start_v && job_q.bipred),
    .width(job_q.width), .height(job_q.height), .xfrac(job_q.xfrac1), .yfrac(job_q.yfrac1),
    .bit_depth(job_q.bit_depth),
    .in_valid(in1_valid), .in_data(in1_data), .in_ready(in1_ready),
    .out_valid(v1_valid), .out_data(v1_data), .out_ready(v1_ready),
    .h_busy(h_busy1), .v_busy(v_busy1)
  );

  // Join the two vertical filter streams (they run in lockstep for biprediction).
  assign w_in_valid = v0_valid && (!job_q.bipred || v1_valid);
  assign v0_ready   = w_in_ready && (!job_q.bipred || v1_valid);
  assign v1_ready   = w_in_ready && job_q.bipred && v0_valid;

  mc_weight u_wgt (
    .clk, .rst_n, .bipred(job_q.bipred), .bit_depth(job_q.bit_depth),
    .log2_denom(job_q.log2_denom), .w0(job_q.w0), .w1(job_q.w1), .o0(job_q.o0), .o1(job_q.o1),
    .in_valid(w_in_valid), .p0(v0_data), .p1(v1_data), .in_ready(w_in_ready),
    .out_valid, .out_data, .out_ready
  );

  // The vertical filters of a biprediction must deliver their samples together.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_VPASS && job_q.bipred) |-> (v0_valid == v1_valid))
    else $error("sub-datapaths out of step");

  // A job ends only after both vertical filters have drained.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE) |-> (!v_busy0 && !v_busy1))
    else $error("vertical filter still busy at end of job");

endmodule
