// tb_mc_buffer: checks the banked intermediate buffer. A full block of
// MAX_H + TAPS - 1 rows is written, then windows of TAPS rows starting at every row
// are read at random columns and compared, tap by tap, with the written values;
// the read data must appear one cycle after rd_en and hold while rd_en is low.
module tb_mc_buffer;
  import mc_pkg::*;

  localparam int T = 8, MW = 64, MH = 64, R = MH + T - 1;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [6:0] wr_row, wr_col, rd_row, rd_col;
  inter_t wr_data;
  inter_t rd_data [T];

  mc_buffer #(.TAPS(T), .MAX_W(MW), .MAX_H(MH)) dut (.*);

  int checks = 0, failures = 0;
  int ref_mem [R][MW];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window(int y, int x, string what);
    for (int i = 0; i < T; i++) begin
      checks++;
      if (int'(rd_data[i]) != ref_mem[y + i][x]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s row %0d+%0d col %0d: got %0d exp %0d", what, y, i, x,
                   rd_data[i], ref_mem[y + i][x]);
      end
    end
  endtask

  initial begin
    int y, x;
    for (int r = 0; r < R; r++)
      for (int col = 0; col < MW; col++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 7'(r); wr_col = 7'(col);
        wr_data = inter_t'($urandom_range(65535));
        ref_mem[r][col] = int'(wr_data);
      end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      y = $urandom_range(MH - 1);
      x = $urandom_range(MW - 1);
      rd_en = 1; rd_row = 7'(y); rd_col = 7'(x);
      @(negedge clk);
      check_window(y, x, "read");
      rd_en = 0;
      rd_row = 7'($urandom_range(MH - 1));
      rd_col = 7'($urandom_range(MW - 1));
      @(negedge clk);
      check_window(y, x, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
