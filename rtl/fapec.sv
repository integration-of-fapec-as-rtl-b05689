// fapec: Fully Adaptive Prediction Error Coder with a 32-bit parallel output.
//
// 16-bit samples go through the pre-compressor (previous-sample predictor
// and differentiator), then the histogram accumulator bins each residual
// into a 37-bin histogram and parks it in the block memory. When a block
// of BLOCK_SIZE samples is complete, the histogram parser picks the PEC
// variant and segment boundaries, the table constructor turns them into a
// coding table with the help of the bin-equivalence memory, and the PEC
// coder emits the table as a header followed by the block's code words,
// which the word packer assembles into 32-bit words for the VC buffer.
// Histogram and block memory are double banked: block n+1 is accumulated
// while block n is coded.
//
// Interface: in_data/in_valid/in_ready (one sample at most every 6 clocks
// is taken), out_data/out_valid (one-clock pulse per 32-bit word; the
// word holds four stream bytes, bits 7:0 first, each most significant bit
// first, so the output matches the reference coder's byte stream),
// vcb_half_full pauses the output. Synchronous active-high reset.
// The bank bookkeeping (bank_busy) that stops a bank being refilled before
// it has been coded is this design's own.
// Lint note: the read data of the block memory's port A (ma_dout) is left
// unconnected on purpose; port A is only ever written (by the histogram
// accumulator), the coder reads through port B.
module fapec
  import fapec_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 255
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [SYMBOL_SIZE-1:0] in_data,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   vcb_half_full,
  output logic                   out_valid,
  output logic [31:0]            out_data
);

  localparam int unsigned CNT_W = $clog2(BLOCK_SIZE + 1);
  localparam int unsigned HA_W  = $clog2(2 * NBINS);
  localparam int unsigned MA_W  = $clog2(2 * BLOCK_SIZE);

  // pre-compressor -> histogram accumulator
  residual_t res;
  logic      res_valid, res_ready;

  // histogram memory
  logic             ha_en, ha_we, hb_en, hb_we;
  logic [HA_W-1:0]  ha_addr, hb_addr;
  logic [CNT_W-1:0] ha_din, ha_dout, hb_din, hb_dout;

  // block memory
  logic                 ma_en;
  logic [MA_W-1:0]      ma_addr, mb_addr;
  logic [SYMBOL_SIZE:0] ma_din, ma_dout, mb_dout;

  // accumulator -> parser -> table constructor
  logic                  done_valid, done_bank, done_ready, hist_ready;
  logic                  cal_valid, cal_ready;
  logic [1:0]            cal_variant;
  logic [LOG2_SSYZE-1:0] cal_seg1;
  logic [BIN_W-1:0]      cal_cb2, cal_cb3, cal_cb4;
  logic [BIN_W-1:0]      rom_addr;
  logic [SYMBOL_SIZE-1:0] rom_dout;

  // table constructor -> PEC coder
  logic                   tab_valid, tab_taken, block_coded;
  logic [1:0]             variant;
  logic [LOG2_SSYZE-1:0]  seg1, seg2, seg3, seg4;
  logic [SYMBOL_SIZE-1:0] c1, c2, c3;

  // PEC coder -> word packer
  logic                    pk_ready, t_valid, s_valid;
  logic [LOG2_SSYZE:0]     t_nbits;
  logic [TAB_LONG_REF-1:0] t_vec;
  logic [1:0]              v_out;
  logic [NB_W-1:0]         le_nb, ds_nb, lc_nb;
  logic [LE_W-1:0]         le_val;
  logic [DS_W-1:0]         ds_val;
  logic [LC_W-1:0]         lc_val;

  // bank bookkeeping: a bank is busy from the end of its accumulation
  // until the coder has finished it; the coder works through banks in turn
  logic [1:0] bank_busy;
  logic       code_bank_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bank_busy   <= '0;
      code_bank_q <= 1'b0;
    end else begin
      if (block_coded) begin
        bank_busy[code_bank_q] <= 1'b0;
        code_bank_q            <= ~code_bank_q;
      end
      if (done_valid && done_ready) bank_busy[done_bank] <= 1'b1;
    end
  end

  precompressor #(.BLOCK_SIZE(BLOCK_SIZE)) u_precomp (
    .clk, .rst,
    .in_data, .in_valid, .in_ready,
    .out_res(res), .out_valid(res_valid), .out_ready(res_ready)
  );

  hist_constructor #(.BLOCK_SIZE(BLOCK_SIZE)) u_hist_const (
    .clk, .rst,
    .in_res(res), .in_valid(res_valid), .in_ready(res_ready),
    .hist_ready, .bank_free(~bank_busy),
    .h_en(ha_en), .h_we(ha_we), .h_addr(ha_addr), .h_din(ha_din), .h_dout(ha_dout),
    .m_en(ma_en), .m_addr(ma_addr), .m_din(ma_din),
    .done_valid, .done_bank, .done_ready
  );

  dual_port_mem #(.WIDTH(CNT_W), .DEPTH(2 * NBINS), .B_PIPE(1'b1)) u_hist_mem (
    .clk,
    .a_en(ha_en), .a_we(ha_we), .a_addr(ha_addr), .a_din(ha_din), .a_dout(ha_dout),
    .b_en(hb_en), .b_we(hb_we), .b_addr(hb_addr), .b_din(hb_din), .b_dout(hb_dout)
  );

  dual_port_mem #(.WIDTH(SYMBOL_SIZE + 1), .DEPTH(2 * BLOCK_SIZE), .B_PIPE(1'b0)) u_block_mem (
    .clk,
    .a_en(ma_en), .a_we(1'b1), .a_addr(ma_addr), .a_din(ma_din), .a_dout(ma_dout),
    .b_en(1'b1), .b_we(1'b0), .b_addr(mb_addr), .b_din('0), .b_dout(mb_dout)
  );

  hist_boundary_extract #(.BLOCK_SIZE(BLOCK_SIZE)) u_hist_bound (
    .clk, .rst,
    .done_valid, .done_bank, .done_ready, .hist_ready,
    .b_en(hb_en), .b_we(hb_we), .b_addr(hb_addr), .b_din(hb_din), .b_dout(hb_dout),
    .res_valid(cal_valid), .res_ready(cal_ready), .res_variant(cal_variant),
    .res_seg1_bits(cal_seg1), .res_ceil_bin2(cal_cb2), .res_ceil_bin3(cal_cb3),
    .res_ceil_bin4(cal_cb4)
  );

  bin_equiv_rom u_bin_rom (.clk, .addr(rom_addr), .dout(rom_dout));

  table_constructor u_table_cons (
    .clk, .rst,
    .res_valid(cal_valid), .res_ready(cal_ready), .res_variant(cal_variant),
    .res_seg1_bits(cal_seg1), .res_ceil_bin2(cal_cb2), .res_ceil_bin3(cal_cb3),
    .res_ceil_bin4(cal_cb4),
    .rom_addr, .rom_dout,
    .table_valid(tab_valid), .table_taken(tab_taken), .block_coded,
    .coding_variant(variant), .seg1_bits(seg1), .seg2_bits(seg2), .seg3_bits(seg3),
    .seg4_bits(seg4), .ceil1(c1), .ceil2(c2), .ceil3(c3)
  );

  pec_coder #(.BLOCK_SIZE(BLOCK_SIZE)) u_pec (
    .clk, .rst,
    .table_valid(tab_valid), .coding_variant(variant),
    .seg1_bits(seg1), .seg2_bits(seg2), .seg3_bits(seg3), .seg4_bits(seg4),
    .ceil1(c1), .ceil2(c2), .ceil3(c3),
    .table_taken(tab_taken), .block_coded,
    .ready(pk_ready), .table_valid_out(t_valid), .table_num_bits(t_nbits),
    .table_vector(t_vec), .comp_sample_valid(s_valid), .coding_variant_out(v_out),
    .le_num_bits(le_nb), .ds_num_bits(ds_nb), .lc_num_bits(lc_nb),
    .le_comp_val(le_val), .ds_comp_val(ds_val), .lc_comp_val(lc_val),
    .rd(mb_dout), .raddr(mb_addr)
  );

  word_packer u_packer (
    .clk, .rst,
    .ready(pk_ready), .table_valid_out(t_valid), .table_num_bits(t_nbits),
    .table_vector(t_vec), .comp_sample_valid(s_valid), .coding_variant_out(v_out),
    .le_num_bits(le_nb), .ds_num_bits(ds_nb), .lc_num_bits(lc_nb),
    .le_comp_val(le_val), .ds_comp_val(ds_val), .lc_comp_val(lc_val),
    .vcb_half_full, .out_valid, .out_data
  );

endmodule
