// array_seq: sequencer that feeds the vector systolic array from the global
// buffer.
//
// A job is n_tiles matrix operations. Tile t multiplies the N_PE weight
// vectors at weight-buffer words t*N_PE .. t*N_PE+N_PE-1 (weight k for PE #k)
// with n_pix feature vectors at input-buffer words t*n_pix .. t*n_pix+n_pix-1
// (feature j = output pixel j). All tiles of a job add into the same partial
// sums, so a convolution is run as one job whose tiles are its channel splits
// and kernel-window positions, laid out in the buffers in that order. With
// psum_cont set, the first tile also adds to the stored sums, so a reduction
// longer than the buffers hold continues over several jobs.
//
// Convolution mode (conv_en): the input buffer holds the feature map itself,
// one vector per (channel split cs, row ih, column iw) at word
// cs*IH*IW + ih*IW + iw, and the sequencer forms the sliding windows. Tiles run
// over (cs, kh, kw) with kw fastest; within a tile the output pixels run
// along the width first, then the height, and pixel (oh, ow) reads word
// cs*IH*IW + (oh+kh)*IW + (ow+kw) (stride 1, no padding). The weight vector of
// kernel k for tile t = (cs*KH + kh)*KW + kw is at word t*N_PE + k, as in
// matrix mode. The host sets n_pix = OH*OW and n_tiles = CS*KH*KW.
//
// Tile t starts at clock t*P with P = max(n_pix, N_PE): in clock k of the tile
// the sequencer reads feature k (k < n_pix) and weight k (k < N_PE). The
// buffers answer one clock later, when the feature enters PE #0 with its tag
// and the weight is on the bus with wgt_start marking weight 0. With
// n_pix >= N_PE tiles follow back to back: a PE gets the next tile's weight at
// the same edge the next tile's first feature reaches it, so no clock is
// lost; with fewer pixels the sequencer waits out the N_PE-clock weight cycle.
// After the last issue it waits DRAIN clocks for the array and the
// accumulation unit to empty, then pulses done.
//
// Interface: start (pulse, while idle) latches the job configuration
// (n_pix, n_tiles, psum_cont and the convolution shape); busy is
// high until done. n_pix must be 1..PIX_MAX and n_tiles at least 1.
// The per-clock weight/feature timing follows the design description; the job
// / tile organisation and buffer layout are this design's choices.
module array_seq
  import bsc_pkg::*;
#(
  parameter int unsigned N_PE    = 32,
  parameter int unsigned IB_AW   = 10,
  parameter int unsigned WB_AW   = 9,
  parameter int unsigned PIX_MAX = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      n_pix,
  input  logic [15:0]      n_tiles,
  input  logic             psum_cont, // first tile adds to the stored partial sums too
  input  logic             conv_en,   // convolution addressing
  input  logic [7:0]       conv_iw,   // input width IW
  input  logic [7:0]       conv_ih,   // input height IH
  input  logic [7:0]       conv_kw,   // kernel width KW
  input  logic [7:0]       conv_kh,   // kernel height KH
  output logic             busy,
  output logic             done,
  // buffer read ports
  output logic             ib_re,
  output logic [IB_AW-1:0] ib_raddr,
  output logic             wb_re,
  output logic [WB_AW-1:0] wb_raddr,
  // to the array, aligned with the buffers' read data
  output feat_tag_t        tag_out,
  output logic             wgt_start
);

  localparam int unsigned DRAIN = N_PE + 4;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e      state_q;
  logic [15:0] npix_q, ntile_q, period_q;
  logic [15:0] tile_q, k_q, drain_q;
  logic        cont_q;
  logic [31:0] ibase_q;           // first feature address of the current tile
  // convolution address counters
  logic        conv_q;
  logic [7:0]  iw_q, kw_q, kh_q, ow_q, kwi_q, khi_q, owi_q;
  logic [15:0] ihw_q;
  logic [31:0] csbase_q, khbase_q, ohbase_q, conv_addr;
  feat_tag_t   tag_d;
  logic        wstart_d;

  always_comb begin
    tag_d    = '0;
    wstart_d = 1'b0;
    ib_re    = 1'b0;
    wb_re    = 1'b0;
    conv_addr = csbase_q + khbase_q + 32'(kwi_q) + ohbase_q + 32'(owi_q);
    ib_raddr  = conv_q ? IB_AW'(conv_addr) : IB_AW'(ibase_q + 32'(k_q));
    wb_raddr = WB_AW'(32'(tile_q) * N_PE + 32'(k_q));
    if (state_q == S_RUN) begin
      if (k_q < npix_q) begin
        ib_re      = 1'b1;
        tag_d.valid = 1'b1;
        tag_d.acc   = 1'b0;
        tag_d.psum  = (tile_q != 0) || cont_q;
        tag_d.last  = (tile_q == ntile_q - 1);
        tag_d.pix   = k_q;
      end
      if (k_q < 16'(N_PE)) begin
        wb_re    = 1'b1;
        wstart_d = (k_q == 0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      npix_q    <= '0;
      ntile_q   <= '0;
      period_q  <= '0;
      tile_q    <= '0;
      k_q       <= '0;
      drain_q   <= '0;
      ibase_q   <= '0;
      cont_q    <= 1'b0;
      conv_q    <= 1'b0;
      iw_q      <= '0;
      kw_q      <= '0;
      kh_q      <= '0;
      ow_q      <= '0;
      ihw_q     <= '0;
      kwi_q     <= '0;
      khi_q     <= '0;
      owi_q     <= '0;
      csbase_q  <= '0;
      khbase_q  <= '0;
      ohbase_q  <= '0;
      tag_out   <= '0;
      wgt_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      tag_out   <= tag_d;
      wgt_start <= wstart_d;
      done      <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q  <= S_RUN;
          npix_q   <= n_pix;
          ntile_q  <= n_tiles;
          cont_q   <= psum_cont;
          period_q <= (n_pix > 16'(N_PE)) ? n_pix : 16'(N_PE);
          tile_q   <= '0;
          k_q      <= '0;
          ibase_q  <= '0;
          conv_q   <= conv_en;
          iw_q     <= conv_iw;
          kw_q     <= conv_kw;
          kh_q     <= conv_kh;
          ow_q     <= conv_iw - conv_kw + 8'd1;
          ihw_q    <= 16'(conv_ih) * 16'(conv_iw);
          kwi_q    <= '0;
          khi_q    <= '0;
          owi_q    <= '0;
          csbase_q <= '0;
          khbase_q <= '0;
          ohbase_q <= '0;
        end
        S_RUN: begin
          // next output pixel: along the width, then down one row
          if (k_q < npix_q) begin
            if (owi_q == ow_q - 1) begin
              owi_q    <= '0;
              ohbase_q <= ohbase_q + 32'(iw_q);
            end else begin
              owi_q <= owi_q + 1;
            end
          end
          if (k_q == period_q - 1) begin
            k_q      <= '0;
            tile_q   <= tile_q + 1;
            ibase_q  <= ibase_q + 32'(npix_q);
            owi_q    <= '0;
            ohbase_q <= '0;
            // next tile: kw, then kh, then channel split
            if (kwi_q == kw_q - 1) begin
              kwi_q <= '0;
              if (khi_q == kh_q - 1) begin
                khi_q    <= '0;
                khbase_q <= '0;
                csbase_q <= csbase_q + 32'(ihw_q);
              end else begin
                khi_q    <= khi_q + 1;
                khbase_q <= khbase_q + 32'(iw_q);
              end
            end else begin
              kwi_q <= kwi_q + 1;
            end
            if (tile_q == ntile_q - 1) begin
              state_q <= S_DRAIN;
              drain_q <= '0;
            end
          end else begin
            k_q <= k_q + 1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1;
          if (drain_q == 16'(DRAIN - 1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // Job configuration rules.
  a_npix_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state_q == S_IDLE) |-> (n_pix != 0 && n_pix <= 16'(PIX_MAX)));
  a_ntile_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state_q == S_IDLE) |-> (n_tiles != 0));
  a_conv_shape: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state_q == S_IDLE && conv_en) |->
      (conv_kw != 0 && conv_kh != 0 && conv_kw <= conv_iw && conv_kh <= conv_ih &&
       32'(n_pix) == 32'(8'(conv_iw - conv_kw + 8'd1)) * 32'(8'(conv_ih - conv_kh + 8'd1))));

endmodule
