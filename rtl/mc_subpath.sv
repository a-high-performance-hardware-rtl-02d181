// mc_subpath: one sub-datapath, the interpolation of one reference block.
//
// Horizontal filter -> buffer -> vertical filter, as one row of the datapath. The
// two filter passes run one after the other: start_h begins the horizontal pass,
// which consumes the reference block and fills the buffer; start_v (given by the
// datapath once every horizontal pass of the job has ended) begins the vertical pass,
// which empties it at one sample per cycle. The reference block is
// (width + e_x) x (height + e_y) samples, row-major, with e = TAPS-1 in a direction
// whose fraction is non-zero and 0 otherwise; its top-left sample is TAPS/2-1 samples
// left of and above the integer position in a filtered direction.
//
// The job fields must stay stable from start_h until v_busy falls.
//
// From the published accelerator (Goebel, 2014): the filter chain with its buffer between the two
// filters, and the sequential passes that bound throughput to 0.5 samples per cycle.
// Own choices: the reference block layout and the control handshake.
module mc_subpath
  import mc_pkg::*;
#(
  parameter int TAPS   = 8,
  parameter int MAX_W  = 64,
  parameter int MAX_H  = 64,
  localparam int ROW_W = $clog2(MAX_H + TAPS),
  localparam int COL_W = $clog2(MAX_W + TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_h,
  input  logic              start_v,
  input  logic [DIM_W-1:0]  width,
  input  logic [DIM_W-1:0]  height,
  input  logic [FRAC_W-1:0] xfrac,
  input  logic [FRAC_W-1:0] yfrac,
  input  logic [3:0]        bit_depth,
  input  logic              in_valid,
  input  sample_t           in_data,
  output logic              in_ready,
  output logic              out_valid,
  output inter_t            out_data,
  input  logic              out_ready,
  output logic              h_busy,
  output logic              v_busy
);

  logic             wr_en, rd_en;
  logic [ROW_W-1:0] wr_row, rd_row, h_rows;
  logic [COL_W-1:0] wr_col, rd_col;
  inter_t           wr_data;
  inter_t           rd_data [TAPS];

  assign h_rows = ROW_W'(height) + ((yfrac != 0) ? ROW_W'(TAPS - 1) : '0);

  mc_hfilter #(.TAPS(TAPS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_h (
    .clk, .rst_n, .start(start_h), .width, .rows(h_rows), .frac(xfrac), .bit_depth,
    .in_valid, .in_data, .in_ready,
    .wr_en, .wr_row, .wr_col, .wr_data, .busy(h_busy)
  );

  mc_buffer #(.TAPS(TAPS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_buf (
    .clk, .wr_en, .wr_row, .wr_col, .wr_data, .rd_en, .rd_row, .rd_col, .rd_data
  );

  mc_vfilter #(.TAPS(TAPS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_v (
    .clk, .rst_n, .start(start_v), .width, .height, .frac(yfrac),
    .rd_en, .rd_row, .rd_col, .rd_data,
    .out_valid, .out_data, .out_ready, .busy(v_busy)
  );

endmodule
