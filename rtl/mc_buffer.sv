// mc_buffer: intermediate buffer between the horizontal and the vertical filter.
//
// It holds the horizontally filtered block, up to MAX_H + TAPS - 1 rows of MAX_W
// 16-bit values. To let the vertical filter read a whole column window of TAPS
// vertically adjacent values in one cycle, the rows are spread over TAPS banks:
// row r lives in bank r mod TAPS at word (r div TAPS) * MAX_W + column. Any TAPS
// consecutive rows then fall into different banks. TAPS must be a power of two.
//
// Interface: one write port (row, column, data). One read port: rd_row names the top
// row y of the window; rd_data[i] returns row y+i of column rd_col one cycle after
// rd_en, and holds while rd_en is low. Reads of never-written words return whatever
// the memory holds.
//
// From the published accelerator (Goebel, 2014): a buffer that stores the results of the first filter until
// the second filter processes them. Own choices: the banked organisation and sizes.
module mc_buffer
  import mc_pkg::*;
#(
  parameter int TAPS   = 8,
  parameter int MAX_W  = 64,
  parameter int MAX_H  = 64,
  localparam int ROW_W  = $clog2(MAX_H + TAPS),
  localparam int COL_W  = $clog2(MAX_W + TAPS),
  localparam int LB     = $clog2(TAPS),
  localparam int GROUPS = (MAX_H + TAPS - 1 + TAPS - 1) / TAPS,
  localparam int DEPTH  = GROUPS * MAX_W,
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [COL_W-1:0] wr_col,
  input  inter_t           wr_data,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  input  logic [COL_W-1:0] rd_col,
  output inter_t           rd_data [TAPS]
);

  logic [LB-1:0] wr_bank;
  logic [ADDR_W-1:0] wr_addr;
  logic [LB-1:0] rd_first;     // bank of the window's top row
  logic [LB-1:0] rd_first_q;
  inter_t        bank_q [TAPS];

  assign wr_bank  = wr_row[LB-1:0];
  assign wr_addr  = ADDR_W'(32'(wr_row >> LB) * MAX_W + 32'(wr_col));
  assign rd_first = rd_row[LB-1:0];

  for (genvar b = 0; b < TAPS; b++) begin : g_bank
    inter_t mem [DEPTH];
    logic [ADDR_W-1:0] rd_addr;
    logic [LB-1:0]     rd_off;
    // Bank b holds window row y + ((b - y) mod TAPS).
    assign rd_off  = LB'(b) - rd_first;
    assign rd_addr = ADDR_W'(((32'(rd_row) + 32'(rd_off)) >> LB) * MAX_W + 32'(rd_col));
    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == LB'(b)) mem[wr_addr] <= wr_data;
      if (rd_en) bank_q[b] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_first_q <= rd_first;
  end

  // Rotate the banks back into window order.
  always_comb begin
    for (int i = 0; i < TAPS; i++) rd_data[i] = bank_q[LB'(rd_first_q + LB'(i))];
  end

endmodule
