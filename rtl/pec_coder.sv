// pec_coder: parallel-output Prediction Error Coder.
//
// For each block it first emits the coding table as a header, then codes
// the BLOCK_SIZE residuals stored in the block memory with the selected PEC
// variant. Every code word leaves on its own port together with its length
// in bits; bit 0 of a word is the first bit of the stream.
//
// Header (Table_Vector, first bit in bit 0): LE "01", h(0), i(0), j(1:0),
// k(3:0) = 10 bits; DS "00", h(1:0), i(1:0), j(2:0), k(3:0) = 13 bits;
// LC "1", h, i, j, k (4 bits each) = 17 bits. Each field is sent most
// significant bit first; k = 16 is sent as 0.
//
// Code words (Fig. "PEC coding strategy"; stream order, left first):
//   LE  seg1: s v[h]            seg2: 1 0^h s v[i]
//       seg3: 1 0^h s 1^i 0 v[j]  seg4: 1 0^h s 1^i 1 v[k]
//   DS  seg1: s v[h]            seg2: s 1^h v[i]
//       seg3: 1 0^h s 0 v[j]    seg4: 1 0^h s 1 v[k]
//   LC  seg1: 0 v[h] (s if v!=0)  seg2: 1 0 v[i] s
//       seg3: 1 1 0 v[j] s      seg4: 1 1 1 v[k] s
// where s is the sign (1 = negative), v[n] the value inside the segment
// (modulus minus the previous ceiling minus one) sent least significant
// bit first, and 1^n / 0^n runs of n ones / zeros used as escapes.
//
// Timing, as in the coder this follows: the segment of a residual is found
// in one clock and the code word built in the next; a third clock waits
// for the word packer's Ready, so one residual is coded at most every
// 3 clocks. The block memory is read with one clock of latency at address
// raddr; the two halves of the memory (0..BLOCK_SIZE-1 and
// BLOCK_SIZE..2*BLOCK_SIZE-1) are coded in turn.
// This design's own additions: the header is only sent when Ready is high
// (so it cannot overrun the packer), and table_taken / block_coded tell the
// table constructor and the bank bookkeeping when a table was taken and a
// block is finished. All logic uses the rising clock edge.
// Lint note: code-word lengths and bit positions are worked out in 32-bit
// variables (nb, le_n, ds_n, lc_n) for simple arithmetic; only their low
// bits (the port widths) are used, the upper bits are always zero.
module pec_coder
  import fapec_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 255,
  localparam int unsigned MA_W = $clog2(2 * BLOCK_SIZE)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      table_valid,
  // coding table from the table constructor
  input  logic [1:0]                coding_variant,
  input  logic [LOG2_SSYZE-1:0]     seg1_bits,
  input  logic [LOG2_SSYZE-1:0]     seg2_bits,
  input  logic [LOG2_SSYZE-1:0]     seg3_bits,
  input  logic [LOG2_SSYZE-1:0]     seg4_bits,
  input  logic [SYMBOL_SIZE-1:0]    ceil1,
  input  logic [SYMBOL_SIZE-1:0]    ceil2,
  input  logic [SYMBOL_SIZE-1:0]    ceil3,
  output logic                      table_taken,
  output logic                      block_coded,
  // to the word packer
  input  logic                      ready,
  output logic                      table_valid_out,
  output logic [LOG2_SSYZE:0]       table_num_bits,
  output logic [TAB_LONG_REF-1:0]   table_vector,
  output logic                      comp_sample_valid,
  output logic [1:0]                coding_variant_out,
  output logic [NB_W-1:0]           le_num_bits,
  output logic [NB_W-1:0]           ds_num_bits,
  output logic [NB_W-1:0]           lc_num_bits,
  output logic [LE_W-1:0]           le_comp_val,
  output logic [DS_W-1:0]           ds_comp_val,
  output logic [LC_W-1:0]           lc_comp_val,
  // block memory read port
  input  logic [SYMBOL_SIZE:0]      rd,
  output logic [MA_W-1:0]           raddr
);

  localparam int unsigned TB = TAB_LONG_REF;

  typedef enum logic [2:0] {S_IDLE, S_TABLE_CODING, S_WAIT_1, S_WAIT_2, S_OUTPUT_COMP_VAL} state_e;

  state_e                  state_q;
  logic [MA_W-1:0]         word_count_q;
  logic                    last_word;

  // stage 1 registers (segment selection)
  logic                    sign_q;
  logic [1:0]              segment_q;
  logic [SYMBOL_SIZE-1:0]  segment_value_q;
  logic [1:0]              variant_q;
  logic [4:0]              s1_q, s2_q, s3_q, s4_q;

  logic [1:0]              segment_n;
  logic [SYMBOL_SIZE-1:0]  segment_value_n;
  logic [SYMBOL_SIZE-1:0]  abs_value;

  logic [TB-1:0]           table_vector_n, table_vector_q;
  logic [LOG2_SSYZE:0]     table_num_bits_n;

  logic [31:0]             le_n, ds_n, lc_n;
  logic [NB_W-1:0]         le_nb_n, ds_nb_n, lc_nb_n;

  assign last_word = (word_count_q == MA_W'(BLOCK_SIZE - 1)) ||
                     (word_count_q == MA_W'(2 * BLOCK_SIZE - 1));
  assign table_taken = (state_q == S_IDLE) && table_valid && ready;

  // ---- FSM ---------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state_q           <= S_IDLE;
      word_count_q      <= '0;
      table_valid_out   <= 1'b0;
      comp_sample_valid <= 1'b0;
      block_coded       <= 1'b0;
    end else begin
      table_valid_out   <= 1'b0;
      comp_sample_valid <= 1'b0;
      block_coded       <= 1'b0;
      unique case (state_q)
        S_IDLE:         if (table_taken) state_q <= S_TABLE_CODING;
        S_TABLE_CODING: begin
                          table_valid_out <= 1'b1;
                          state_q         <= S_WAIT_1;
                        end
        S_WAIT_1:       state_q <= S_WAIT_2;
        S_WAIT_2:       state_q <= S_OUTPUT_COMP_VAL;
        S_OUTPUT_COMP_VAL:
          if (ready) begin
            comp_sample_valid <= 1'b1;
            word_count_q <= (word_count_q == MA_W'(2 * BLOCK_SIZE - 1)) ? '0 : word_count_q + 1'b1;
            if (last_word) begin
              block_coded <= 1'b1;
              state_q     <= S_IDLE;
            end else begin
              state_q <= S_WAIT_1;
            end
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---- coding table header ----------------------------------------------
  always_comb begin
    table_vector_n = '0;
    if (!coding_variant[1]) begin
      table_num_bits_n = (LOG2_SSYZE+1)'(LE_TAB_LONG);
      table_vector_n[TB-1 -: 2] = 2'b01;
      table_vector_n[TB-3]      = seg1_bits[0];
      table_vector_n[TB-4]      = seg2_bits[0];
      table_vector_n[TB-5 -: 2] = seg3_bits[1:0];
      table_vector_n[TB-7 -: 4] = seg4_bits;
    end else if (!coding_variant[0]) begin
      table_num_bits_n = (LOG2_SSYZE+1)'(DS_TAB_LONG);
      table_vector_n[TB-1 -: 2]  = 2'b00;
      table_vector_n[TB-3 -: 2]  = seg1_bits[1:0];
      table_vector_n[TB-5 -: 2]  = seg2_bits[1:0];
      table_vector_n[TB-7 -: 3]  = seg3_bits[2:0];
      table_vector_n[TB-10 -: 4] = seg4_bits;
    end else begin
      table_num_bits_n = (LOG2_SSYZE+1)'(LC_TAB_LONG);
      table_vector_n[TB-1]       = 1'b1;
      table_vector_n[TB-2 -: 4]  = seg1_bits;
      table_vector_n[TB-6 -: 4]  = seg2_bits;
      table_vector_n[TB-10 -: 4] = seg3_bits;
      table_vector_n[TB-14 -: 4] = seg4_bits;
    end
  end

  // ---- stage 1: segment of the residual ---------------------------------
  always_comb begin
    abs_value       = rd[SYMBOL_SIZE-1:0];
    segment_n       = 2'd0;
    segment_value_n = abs_value;
    if (abs_value > ceil3) begin
      segment_n       = 2'd3;
      segment_value_n = abs_value - ceil3 - 1'b1;
    end else if (abs_value > ceil2) begin
      segment_n       = 2'd2;
      segment_value_n = abs_value - ceil2 - 1'b1;
    end else if (abs_value > ceil1) begin
      segment_n       = 2'd1;
      segment_value_n = abs_value - ceil1 - 1'b1;
    end
  end

  // ---- stage 2: code words ----------------------------------------------
  logic [31:0] s1, s2, s3, s4, sx, nb;
  logic [31:0] v, sg;

  always_comb begin
    s1 = 32'(s1_q); s2 = 32'(s2_q); s3 = 32'(s3_q); s4 = 32'(s4_q);
    nb = 0;
    sx = (segment_q == 2'd2) ? s3 : s4;
    v  = 32'(segment_value_q);
    sg = 32'(sign_q);
    le_n = '0; ds_n = '0; lc_n = '0;
    le_nb_n = '0; ds_nb_n = '0; lc_nb_n = '0;
    if (!variant_q[1]) begin
      // LE
      unique case (segment_q)
        2'd0: begin
          le_n = sg | ((v & low_mask(s1)) << 1);
          nb   = s1 + 1;
        end
        2'd1: begin
          le_n = 32'd1 | (sg << (s1 + 1)) | ((v & low_mask(s2)) << (s1 + 2));
          nb   = s1 + s2 + 2;
        end
        default: begin
          le_n = 32'd1 | (sg << (s1 + 1)) | (low_mask(s2) << (s1 + 2)) |
                 (32'(segment_q[0]) << (s1 + 2 + s2)) | ((v & low_mask(sx)) << (s1 + 3 + s2));
          nb   = s1 + s2 + 3 + sx;
        end
      endcase
      le_nb_n = NB_W'(nb);
    end else if (!variant_q[0]) begin
      // DS
      unique case (segment_q)
        2'd0: begin
          ds_n = sg | ((v & low_mask(s1)) << 1);
          nb   = s1 + 1;
        end
        2'd1: begin
          ds_n = sg | (low_mask(s1) << 1) | ((v & low_mask(s2)) << (s1 + 1));
          nb   = s1 + s2 + 1;
        end
        default: begin
          ds_n = 32'd1 | (sg << (s1 + 1)) | (32'(segment_q[0]) << (s1 + 2)) |
                 ((v & low_mask(sx)) << (s1 + 3));
          nb   = s1 + 3 + sx;
        end
      endcase
      ds_nb_n = NB_W'(nb);
    end else begin
      // LC
      unique case (segment_q)
        2'd0: begin
          lc_n = ((v & low_mask(s1)) << 1) | (sg << (s1 + 1));
          nb   = (v == 0) ? s1 + 1 : s1 + 2;
        end
        2'd1: begin
          lc_n = 32'b01 | ((v & low_mask(s2)) << 2) | (sg << (s2 + 2));
          nb   = s2 + 3;
        end
        2'd2: begin
          lc_n = 32'b011 | ((v & low_mask(s3)) << 3) | (sg << (s3 + 3));
          nb   = s3 + 4;
        end
        default: begin
          lc_n = 32'b111 | ((v & low_mask(s4)) << 3) | (sg << (s4 + 3));
          nb   = s4 + 4;
        end
      endcase
      lc_nb_n = NB_W'(nb);
    end
  end

  // ---- data path registers ----------------------------------------------
  always_ff @(posedge clk) begin
    sign_q             <= rd[SYMBOL_SIZE];
    variant_q          <= coding_variant;
    coding_variant_out <= variant_q;
    s1_q               <= 5'(seg1_bits);
    s2_q               <= 5'(seg2_bits);
    s3_q               <= 5'(seg3_bits);
    s4_q               <= (seg4_bits == '0) ? 5'd16 : 5'(seg4_bits);
    segment_q          <= segment_n;
    segment_value_q    <= segment_value_n;
    table_num_bits     <= table_num_bits_n;
    table_vector_q     <= table_vector_n;
    le_num_bits        <= le_nb_n;
    ds_num_bits        <= ds_nb_n;
    lc_num_bits        <= lc_nb_n;
    le_comp_val        <= le_n[LE_W-1:0];
    ds_comp_val        <= ds_n[DS_W-1:0];
    lc_comp_val        <= lc_n[LC_W-1:0];
  end

  // header leaves with its first bit in bit 0
  assign table_vector = {<<{table_vector_q}};
  assign raddr        = word_count_q;

endmodule
