// mc_regif: register-based interface between the host CPU and the two datapaths.
//
// The host does all memory traffic itself: it writes a job's parameters into
// registers, starts the job, writes every reference sample into a data port and
// reads every predicted sample from another. A simple request/response bus carries
// this: a request is taken when req_valid and req_ready are both high; a read
// answers on the following cycle with rsp_valid. Writes to a sample port, to START
// and reads of OUT wait (req_ready low) until the datapath can take or give a sample,
// so no polling is needed.
//
// Register map, byte addresses, datapath d at base d*0x40 (d = 0 luma, 1 chroma):
//   +0x00 SIZE   [6:0] width, [14:8] height, [16] bipred, [23:20] bit depth,
//                [26:24] log2 weight denominator
//   +0x04 FRAC   [2:0] xfrac0, [6:4] yfrac0, [10:8] xfrac1, [14:12] yfrac1
//   +0x08 WEIGHT [8:0] w0, [24:16] w1 (signed)
//   +0x0C OFFSET [11:0] o0, [27:16] o1 (signed, sample units)
//   +0x10 START  write: hand the job to the datapath
//   +0x14 IN0    write: one sample of reference block 0
//   +0x18 IN1    write: one sample of reference block 1
//   +0x1C OUT    read:  one predicted sample
//   +0x20 STATUS [0] busy, [1] output sample waiting
// Addresses from 0x80 up are unmapped: writes are ignored, reads return 0. Data bits
// outside the fields above are ignored.
// Reset values: width/height 8, bit depth 8, weights 1, offsets 0.
//
// From the published accelerator (Goebel, 2014): a register-based interface in which the CPU performs
// every memory access. The bus, the register map and the waiting behaviour are this
// design's own.
module mc_regif
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic        req_write,
  input  logic [7:0]  req_addr,
  input  logic [31:0] req_wdata,
  output logic        req_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  output logic        job_valid [2],
  output mc_job_t     job       [2],
  input  logic        job_ready [2],
  output logic        in0_valid [2],
  output sample_t     in0_data  [2],
  input  logic        in0_ready [2],
  output logic        in1_valid [2],
  output sample_t     in1_data  [2],
  input  logic        in1_ready [2],
  input  logic        out_valid [2],
  input  sample_t     out_data  [2],
  output logic        out_ready [2],
  input  logic        busy      [2]
);

  localparam logic [5:0] A_SIZE = 6'h00, A_FRAC = 6'h04, A_WEIGHT = 6'h08,
                         A_OFFSET = 6'h0C, A_START = 6'h10, A_IN0 = 6'h14,
                         A_IN1 = 6'h18, A_OUT = 6'h1C, A_STATUS = 6'h20;

  logic       d;      // addressed datapath
  logic [5:0] a;      // register offset
  logic       hit;    // address inside the map (below 0x80)
  logic       take;
  mc_job_t    regs [2];

  assign d    = req_addr[6];
  assign a    = req_addr[5:0];
  assign hit  = !req_addr[7];
  assign take = req_valid && req_ready && hit;

  always_comb begin
    if (!hit) req_ready = 1'b1;
    else unique case (a)
      A_START: req_ready = !req_write || job_ready[d];
      A_IN0:   req_ready = !req_write || in0_ready[d];
      A_IN1:   req_ready = !req_write || in1_ready[d];
      A_OUT:   req_ready =  req_write || out_valid[d];
      default: req_ready = 1'b1;
    endcase
  end

  assign job = regs;

  for (genvar i = 0; i < 2; i++) begin : g_dp
    assign job_valid[i] = req_valid && hit && req_write && d == 1'(i) && a == A_START;
    assign in0_valid[i] = req_valid && hit && req_write && d == 1'(i) && a == A_IN0;
    assign in1_valid[i] = req_valid && hit && req_write && d == 1'(i) && a == A_IN1;
    assign in0_data[i]  = sample_t'(req_wdata);
    assign in1_data[i]  = sample_t'(req_wdata);
    assign out_ready[i] = req_valid && hit && !req_write && d == 1'(i) && a == A_OUT;
  end

  // Configuration registers, one set per datapath.
  for (genvar i = 0; i < 2; i++) begin : g_regs
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        regs[i]           <= '0;
        regs[i].width     <= DIM_W'(8);
        regs[i].height    <= DIM_W'(8);
        regs[i].bit_depth <= 4'd8;
        regs[i].w0        <= WGT_W'(1);
        regs[i].w1        <= WGT_W'(1);
      end else if (take && req_write && d == 1'(i)) begin
        case (a)
          A_SIZE: begin
            regs[i].width      <= req_wdata[6:0];
            regs[i].height     <= req_wdata[14:8];
            regs[i].bipred     <= req_wdata[16];
            regs[i].bit_depth  <= req_wdata[23:20];
            regs[i].log2_denom <= req_wdata[26:24];
          end
          A_FRAC: begin
            regs[i].xfrac0 <= req_wdata[2:0];
            regs[i].yfrac0 <= req_wdata[6:4];
            regs[i].xfrac1 <= req_wdata[10:8];
            regs[i].yfrac1 <= req_wdata[14:12];
          end
          A_WEIGHT: begin
            regs[i].w0 <= req_wdata[8:0];
            regs[i].w1 <= req_wdata[24:16];
          end
          A_OFFSET: begin
            regs[i].o0 <= req_wdata[11:0];
            regs[i].o1 <= req_wdata[27:16];
          end
          default: ;
        endcase
      end
    end
  end

  // Read responses.
  mc_job_t rj;
  assign rj = regs[d];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= req_valid && req_ready && !req_write;
      if (req_valid && req_ready && !req_write) begin
        if (!hit) rsp_rdata <= '0;
        else case (a)
          A_SIZE:   rsp_rdata <= {5'b0, rj.log2_denom, rj.bit_depth, 3'b0,
                                  rj.bipred, 1'b0, rj.height, 1'b0, rj.width};
          A_FRAC:   rsp_rdata <= {17'b0, rj.yfrac1, 1'b0, rj.xfrac1, 1'b0,
                                  rj.yfrac0, 1'b0, rj.xfrac0};
          A_WEIGHT: rsp_rdata <= {7'b0, rj.w1, 7'b0, rj.w0};
          A_OFFSET: rsp_rdata <= {4'b0, rj.o1, 4'b0, rj.o0};
          A_OUT:    rsp_rdata <= 32'(out_data[d]);
          A_STATUS: rsp_rdata <= {30'b0, out_valid[d], busy[d]};
          default:  rsp_rdata <= '0;
        endcase
      end
    end
  end

endmodule
