// bsc_accel_top: BSC precision-scalable vector systolic accelerator core.
//
// The compute part of the accelerator: the global buffer (weight buffer,
// input buffer, psum buffer), the array sequencer, the 32-PE vector systolic
// array of BSC vectors and the accumulation/ReLU unit. Each PE computes a
// length-32 dot product of 16-bit elements per clock, which is one 8b x 8b,
// four 4b x 4b or eight 2b x 2b products per element: 1024, 4096 or 8192
// multiply-accumulates per clock over the whole array.
//
// Data path of a job: the host (a microcontroller with a DMA engine in the
// full system, both outside this core) writes weight vectors into the weight
// buffer and feature vectors into the input buffer, sets mode, signedness,
// n_pix, n_tiles and relu_en and pulses start. The sequencer streams the
// tiles through the array; PE #k's result for pixel j of every tile is added
// into word j of psum bank k, and on the last tile ReLU is applied if enabled.
// With psum_cont set the job adds to the partial sums left by the previous
// job instead of starting from zero. With conv_en set the input buffer holds
// the feature map (channel split, row, column) and the sequencer forms the
// sliding windows of a KW x KH convolution itself. When done pulses, the host reads output
// pixel j of all 32 output channels at once through ps_addr / ps_rdata.
//
// Timing: buffer writes are synchronous; ps_rdata is combinational from
// ps_addr. mode, sgn and relu_en are latched at start. A job takes
// n_tiles * max(n_pix, 32) + 37 clocks from start to done.
//
// What follows the design description: the BSC vector, PE, array and its
// dataflow, and the existence of weight, input and psum buffers and of an
// accumulation/ReLU stage. Buffer sizes and ports, the job/tile sequencing and
// the host-side interface are this design's choices. Pooling and the
// DMA / off-chip memory / MCU side are not part of this core. The PEs'
// in-buffer accumulation (tag bit `acc`) is left unused by this sequencer:
// partial sums of consecutive tiles are added in the psum buffer instead.
module bsc_accel_top
  import bsc_pkg::*;
#(
  parameter int unsigned N_PE     = 32,
  parameter int unsigned L        = 32,
  parameter int unsigned IB_DEPTH = 1024,
  parameter int unsigned WB_DEPTH = 512,
  parameter int unsigned PS_DEPTH = 64,
  parameter int unsigned IB_AW    = $clog2(IB_DEPTH),
  parameter int unsigned WB_AW    = $clog2(WB_DEPTH),
  parameter int unsigned PS_AW    = $clog2(PS_DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // job control
  input  mode_e                       mode,
  input  sign_cfg_t                   sgn,
  input  logic                        relu_en,
  input  logic [15:0]                 n_pix,
  input  logic [15:0]                 n_tiles,
  input  logic                        psum_cont,
  input  logic                        conv_en,
  input  logic [7:0]                  conv_iw,
  input  logic [7:0]                  conv_ih,
  input  logic [7:0]                  conv_kw,
  input  logic [7:0]                  conv_kh,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // weight buffer write port
  input  logic                        wb_we,
  input  logic [WB_AW-1:0]            wb_waddr,
  input  logic [L-1:0][15:0]          wb_wdata,
  // input buffer write port
  input  logic                        ib_we,
  input  logic [IB_AW-1:0]            ib_waddr,
  input  logic [L-1:0][15:0]          ib_wdata,
  // psum buffer read port
  input  logic [PS_AW-1:0]            ps_addr,
  output logic [N_PE-1:0][31:0]       ps_rdata
);

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 24;

  mode_e      mode_q;
  sign_cfg_t  sgn_q;
  logic       relu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_8B;
      sgn_q  <= '0;
      relu_q <= 1'b0;
    end else if (start && !busy) begin
      mode_q <= mode;
      sgn_q  <= sgn;
      relu_q <= relu_en;
    end
  end

  // Sequencer
  logic             ib_re, wb_re;
  logic [IB_AW-1:0] ib_raddr;
  logic [WB_AW-1:0] wb_raddr;
  feat_tag_t        seq_tag;
  logic             wgt_start;

  array_seq #(.N_PE(N_PE), .IB_AW(IB_AW), .WB_AW(WB_AW), .PIX_MAX(PS_DEPTH)) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .n_pix     (n_pix),
    .n_tiles   (n_tiles),
    .psum_cont (psum_cont),
    .conv_en   (conv_en),
    .conv_iw   (conv_iw),
    .conv_ih   (conv_ih),
    .conv_kw   (conv_kw),
    .conv_kh   (conv_kh),
    .busy      (busy),
    .done      (done),
    .ib_re     (ib_re),
    .ib_raddr  (ib_raddr),
    .wb_re     (wb_re),
    .wb_raddr  (wb_raddr),
    .tag_out   (seq_tag),
    .wgt_start (wgt_start)
  );

  // Global buffer: input and weight buffers
  logic [L*16-1:0] ib_rdata, wb_rdata;

  vec_buffer #(.W(L*16), .DEPTH(IB_DEPTH)) u_ibuf (
    .clk   (clk),
    .we    (ib_we),
    .waddr (ib_waddr),
    .wdata (ib_wdata),
    .re    (ib_re),
    .raddr (ib_raddr),
    .rdata (ib_rdata)
  );

  vec_buffer #(.W(L*16), .DEPTH(WB_DEPTH)) u_wbuf (
    .clk   (clk),
    .we    (wb_we),
    .waddr (wb_waddr),
    .wdata (wb_wdata),
    .re    (wb_re),
    .raddr (wb_raddr),
    .rdata (wb_rdata)
  );

  // Vector systolic array
  logic [N_PE-1:0]         pe_valid;
  feat_tag_t [N_PE-1:0]    pe_tag;
  logic [N_PE-1:0][AW-1:0] pe_data;

  systolic_array #(.N_PE(N_PE), .L(L), .DW(DW), .AW(AW)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode_q),
    .sgn       (sgn_q),
    .feat_in   (ib_rdata),
    .tag_in    (seq_tag),
    .wgt_bus   (wb_rdata),
    .wgt_start (wgt_start),
    .out_valid (pe_valid),
    .out_tag   (pe_tag),
    .out_data  (pe_data)
  );

  // Accumulation / ReLU and psum buffer
  logic [N_PE-1:0][PS_AW-1:0] ps_rd_addr, ps_wr_addr;
  logic [N_PE-1:0][AW-1:0]    ps_rd_data, ps_wr_data;
  logic [N_PE-1:0]            ps_wr_en;

  post_unit #(.N_PE(N_PE), .AW(AW), .ABITS(PS_AW)) u_post (
    .relu_en    (relu_q),
    .in_valid   (pe_valid),
    .in_tag     (pe_tag),
    .in_data    (pe_data),
    .ps_rd_addr (ps_rd_addr),
    .ps_rd_data (ps_rd_data),
    .ps_wr_en   (ps_wr_en),
    .ps_wr_addr (ps_wr_addr),
    .ps_wr_data (ps_wr_data)
  );

  psum_buffer #(.N_PE(N_PE), .DEPTH(PS_DEPTH), .AW(AW)) u_psum (
    .clk       (clk),
    .rd_addr   (ps_rd_addr),
    .rd_data   (ps_rd_data),
    .wr_en     (ps_wr_en),
    .wr_addr   (ps_wr_addr),
    .wr_data   (ps_wr_data),
    .host_addr (ps_addr),
    .host_data (ps_rdata)
  );

endmodule
