// mc_weight: biprediction and weighted prediction at the end of a datapath.
//
// Each sub-datapath's 16-bit intermediate sample is multiplied by its weight (one
// multiplier per sub-datapath). With biprediction the two products are added and
// rounded together, otherwise only the first is used. The result is clipped to the
// sample range of the job's bit depth. With HEVC's explicit weighted prediction,
// log2WD = log2_denom + 14 - bit_depth and
//   uni: ((p0*w0 + 2^(log2WD-1)) >> log2WD) + o0
//   bi : (p0*w0 + p1*w1 + ((o0 + o1 + 1) << log2WD)) >> (log2WD + 1)
// Weights 1, offsets 0 and log2_denom 0 give exactly HEVC's default (unweighted)
// prediction, i.e. plain rounding, or the rounded average of both references.
//
// Pipeline: stage 1 registers the two products, stage 2 adds, shifts, clips and
// registers the output. Both stages advance when the output is empty or taken.
// Configuration must be stable while samples are in flight.
//
// From the published accelerator (Goebel, 2014): averaging for biprediction and a multiplier per
// sub-datapath for weighting. Own choices: folding the averaging into the weighted
// formula, the pipeline and the offset format (already scaled to the bit depth).
module mc_weight
  import mc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bipred,
  input  logic [3:0]              bit_depth,
  input  logic [2:0]              log2_denom,
  input  logic signed [WGT_W-1:0] w0,
  input  logic signed [WGT_W-1:0] w1,
  input  logic signed [OFS_W-1:0] o0,
  input  logic signed [OFS_W-1:0] o1,
  input  logic                    in_valid,
  input  inter_t                  p0,
  input  inter_t                  p1,
  output logic                    in_ready,
  output logic                    out_valid,
  output sample_t                 out_data,
  input  logic                    out_ready
);

  logic               adv;
  logic               s1_valid;
  logic signed [31:0] prod0, prod1;
  logic [4:0]         log2wd;
  logic signed [31:0] val;
  sample_t            clipped;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;
  assign log2wd   = 5'(log2_denom) + 5'd14 - 5'(bit_depth);

  always_comb begin
    logic signed [31:0] maxv;
    if (bipred) begin
      val = (prod0 + prod1 + ((32'(o0) + 32'(o1) + 32'sd1) <<< log2wd)) >>> (log2wd + 5'd1);
    end else if (log2wd >= 5'd1) begin
      val = ((prod0 + (32'sd1 <<< (log2wd - 5'd1))) >>> log2wd) + 32'(o0);
    end else begin
      val = prod0 + 32'(o0);
    end
    maxv = (32'sd1 <<< bit_depth) - 32'sd1;
    if (val < 0)         clipped = '0;
    else if (val > maxv) clipped = sample_t'(maxv);
    else                 clipped = sample_t'(val);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      prod0     <= '0;
      prod1     <= '0;
      out_data  <= '0;
    end else if (adv) begin
      s1_valid  <= in_valid;
      if (in_valid) begin
        prod0 <= 32'(p0) * 32'(w0);
        prod1 <= bipred ? 32'(p1) * 32'(w1) : 32'sd0;
      end
      out_valid <= s1_valid;
      if (s1_valid) out_data <= clipped;
    end
  end

endmodule
