// mc_hfilter: horizontal interpolation filter of one sub-datapath.
//
// Reference samples arrive as a row-major stream, one per cycle at most. They shift
// through a TAPS-long window; once a row has supplied enough samples, every new
// sample yields one filtered value, so the filter runs at one sample per cycle.
// A row holds width + TAPS-1 samples when the horizontal fraction is non-zero and
// exactly width samples when it is zero (integer position: the newest sample passes
// with weight 64, so no extension is needed). The sum is shifted right by
// bit_depth-8, giving the 16-bit intermediate of HEVC, and written to the buffer at
// (row, column) of the filtered block.
//
// Interface: pulse start with width/rows/frac/bit_depth valid; they must stay stable
// while busy. in_ready is high while samples are still expected. busy falls one cycle
// after the last buffer write. Latency: a filtered value is written the cycle after
// the sample that completes it is accepted.
//
// From the published accelerator (Goebel, 2014): a one-dimensional horizontal filter that processes one
// sample per cycle and feeds a buffer. Own choices: the stream handshake, the row
// layout of the input and the identity tap for integer positions.
module mc_hfilter
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
  input  logic [DIM_W-1:0]  width,      // output columns per row
  input  logic [ROW_W-1:0]  rows,       // rows to filter
  input  logic [FRAC_W-1:0] frac,
  input  logic [3:0]        bit_depth,
  input  logic              in_valid,
  input  sample_t           in_data,
  output logic              in_ready,
  output logic              wr_en,
  output logic [ROW_W-1:0]  wr_row,
  output logic [COL_W-1:0]  wr_col,
  output inter_t            wr_data,
  output logic              busy
);

  sample_t          win [TAPS];
  logic             accepting;
  logic [COL_W-1:0] in_col;
  logic [ROW_W-1:0] in_row;
  logic [COL_W-1:0] row_len;
  logic [COL_W-1:0] ext;

  assign ext      = (frac != 0) ? COL_W'(TAPS - 1) : '0;
  assign row_len  = COL_W'(width) + ext;
  assign in_ready = accepting;

  wire take = in_valid && accepting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      accepting <= 1'b0;
      in_col    <= '0;
      in_row    <= '0;
      wr_en     <= 1'b0;
      wr_row    <= '0;
      wr_col    <= '0;
      for (int i = 0; i < TAPS; i++) win[i] <= '0;
    end else begin
      wr_en <= 1'b0;
      if (start) begin
        accepting <= (rows != 0) && (width != 0);
        in_col    <= '0;
        in_row    <= '0;
      end else if (take) begin
        for (int i = 0; i < TAPS - 1; i++) win[i] <= win[i+1];
        win[TAPS-1] <= in_data;
        if (in_col >= ext) begin
          wr_en  <= 1'b1;
          wr_row <= in_row;
          wr_col <= in_col - ext;
        end
        if (in_col == row_len - 1) begin
          in_col <= '0;
          in_row <= in_row + 1'b1;
          if (in_row == rows - 1) accepting <= 1'b0;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
    end
  end

  // Filter on the registered window; its value is written in the same cycle.
  logic signed [23:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++)
      acc += 24'(mc_coef(TAPS, frac, i, TAPS - 1)) * $signed({14'b0, win[i]});
    wr_data = inter_t'(acc >>> (bit_depth - 4'd8));
  end

  assign busy = accepting || wr_en;

endmodule
