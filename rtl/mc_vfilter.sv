// mc_vfilter: vertical interpolation filter of one sub-datapath.
//
// It walks the output block in row-major order, one position per cycle. For output
// (y, x) it reads the column window of rows y .. y+TAPS-1 at column x from the
// buffer in a single cycle, weights it with the vertical coefficients and shifts the
// sum right by 6, giving the 16-bit intermediate prediction sample of HEVC. At an
// integer vertical position the top row of the window passes with weight 64, so the
// buffer then only needs the block's own rows.
//
// Pipeline: address (cycle 0), buffer read (cycle 1), filter and output register
// (cycle 2). All stages advance together when the output register is empty or
// out_ready is high, so back-pressure stalls the whole pipeline without loss.
// Interface: pulse start with width/height/frac valid and stable while busy; busy
// falls once the last sample has left the output register.
//
// From the published accelerator (Goebel, 2014): the second one-dimensional filter, fed from the buffer and
// producing one sample per cycle. Own choices: the scan order and the pipeline.
module mc_vfilter
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
  input  logic              start,
  input  logic [DIM_W-1:0]  width,
  input  logic [DIM_W-1:0]  height,
  input  logic [FRAC_W-1:0] frac,
  output logic              rd_en,
  output logic [ROW_W-1:0]  rd_row,
  output logic [COL_W-1:0]  rd_col,
  input  inter_t            rd_data [TAPS],
  output logic              out_valid,
  output inter_t            out_data,
  input  logic              out_ready,
  output logic              busy
);

  logic issuing;     // positions left to read
  logic s1_valid;    // buffer output holds a window
  logic adv;
  inter_t filt;

  assign adv   = !out_valid || out_ready;
  assign rd_en = adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing   <= 1'b0;
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      rd_row    <= '0;
      rd_col    <= '0;
    end else if (start) begin
      issuing   <= (width != 0) && (height != 0);
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      rd_row    <= '0;
      rd_col    <= '0;
    end else if (adv) begin
      out_valid <= s1_valid;
      if (s1_valid) out_data <= filt;
      s1_valid  <= issuing;
      if (issuing) begin
        if (rd_col == COL_W'(width) - 1'b1) begin
          rd_col <= '0;
          rd_row <= rd_row + 1'b1;
          if (rd_row == ROW_W'(height) - 1'b1) issuing <= 1'b0;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
    end
  end

  logic signed [27:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++)
      acc += 28'(mc_coef(TAPS, frac, i, 0)) * 28'(rd_data[i]);
    filt = inter_t'(acc >>> 6);
  end

  assign busy = issuing || s1_valid || out_valid;

endmodule
