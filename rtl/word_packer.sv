// word_packer: turns the variable-length output of the PEC coder into a
// stream of 32-bit words.
//
// Three stages, as in the packer this follows:
//  1. input mux: the coding table or the code word of the active variant,
//     with its length, is selected and registered;
//  2. half-word buffer: the registered bits are appended to a 16-bit
//     buffer at the fill pointer. A word that does not fit is split: the
//     first part completes the buffer, the rest goes in during the next
//     one or two clocks (a 23-bit word can need three clocks);
//  3. full word: every completed 16-bit buffer goes into the low, then the
//     high half of the 32-bit output; out_valid pulses for one clock when
//     both halves are filled.
// Bit 0 of every input word is the first bit of the stream. An output
// word carries 32 stream bits as four bytes: bits 7:0 hold the first eight,
// bits 15:8 the next eight and so on, and inside each byte the earlier bit
// is the more significant one (bit 7 is the first bit of the word). Stored
// least significant byte first, the words therefore form the stream as a
// byte file read most significant bit first, the format of the reference
// coder's output files and simulation words.
//
// Flow control: ready tells the PEC coder it may present a new word; it is
// low while a word is being split, while one is waiting or in flight, and
// while the VC buffer reports half full (vcb_half_full), in which case a
// waiting word is held, not dropped. These hold rules are this design's
// own; the packer it follows only looked at the half-full flag on the
// clock a word arrived. The stream is continuous across blocks: nothing is
// padded or flushed at a block boundary.
// Lint note: the bit-placing helper shifts in 32 bits so that a word
// reaching past the 16-bit buffer does not wrap; only the low 16 bits are
// kept, the rest is the part handled in the next clock.
module word_packer
  import fapec_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  // from the PEC coder
  output logic                      ready,
  input  logic                      table_valid_out,
  input  logic [LOG2_SSYZE:0]       table_num_bits,
  input  logic [TAB_LONG_REF-1:0]   table_vector,
  input  logic                      comp_sample_valid,
  input  logic [1:0]                coding_variant_out,
  input  logic [NB_W-1:0]           le_num_bits,
  input  logic [NB_W-1:0]           ds_num_bits,
  input  logic [NB_W-1:0]           lc_num_bits,
  input  logic [LE_W-1:0]           le_comp_val,
  input  logic [DS_W-1:0]           ds_comp_val,
  input  logic [LC_W-1:0]           lc_comp_val,
  // to the VC buffer
  input  logic                      vcb_half_full,
  output logic                      out_valid,
  output logic [31:0]               out_data
);

  typedef enum logic [1:0] {S_1ST_STAGE, S_2ND_STAGE, S_3RD_STAGE} state_e;

  state_e        state_q, state_n;
  logic [22:0]   in_value_q;
  logic [5:0]    num_bits_q;
  logic          pending_q;          // a registered word waits for stage 2
  logic          in_valid;
  logic [4:0]    ptr_q, ptr_n;       // fill pointer, or offset into in_value
  logic [5:0]    remaining_q, remaining_n;
  logic [15:0]   half_word_q, half_word_n;
  logic          half_word_valid_n, half_word_valid_q;
  logic          consume;
  logic [31:0]   full_word_q;
  logic          upper_half_q;

  assign in_valid = table_valid_out || comp_sample_valid;

  // ---- stage 1: input mux -----------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      in_value_q <= '0;
      num_bits_q <= '0;
      pending_q  <= 1'b0;
    end else begin
      if (table_valid_out) begin
        in_value_q <= 23'(table_vector);
        num_bits_q <= 6'(table_num_bits);
      end else if (comp_sample_valid) begin
        if (!coding_variant_out[1]) begin
          in_value_q <= le_comp_val;
          num_bits_q <= 6'(le_num_bits);
        end else if (!coding_variant_out[0]) begin
          in_value_q <= ds_comp_val;
          num_bits_q <= 6'(ds_num_bits);
        end else begin
          in_value_q <= 23'(lc_comp_val);
          num_bits_q <= 6'(lc_num_bits);
        end
      end
      if (in_valid)     pending_q <= 1'b1;
      else if (consume) pending_q <= 1'b0;
    end
  end

  // ---- stage 2: 16-bit half-word buffer ---------------------------------
  // Writes `n` bits of `src`, starting at source bit `from`, into `dst`
  // starting at bit `at`.
  function automatic logic [15:0] place(input logic [15:0] dst, input logic [22:0] src,
                                        input int unsigned from, input int unsigned at,
                                        input int unsigned n);
    logic [31:0] m, d;
    m = low_mask(n) << at;
    d = (32'(src) >> from) << at;
    return (dst & ~m[15:0]) | (d[15:0] & m[15:0]);
  endfunction

  logic [31:0] p, nb, r;

  always_comb begin
    state_n           = state_q;
    ptr_n             = ptr_q;
    remaining_n       = remaining_q;
    half_word_n       = half_word_q;
    half_word_valid_n = 1'b0;
    consume           = 1'b0;
    p  = 32'(ptr_q);
    nb = 32'(num_bits_q);
    r  = 32'(remaining_q);
    unique case (state_q)
      S_1ST_STAGE:
        if (pending_q && !vcb_half_full) begin
          consume = 1'b1;
          if (p + nb >= 16) half_word_valid_n = 1'b1;
          if (p + nb > 16) begin
            state_n     = S_2ND_STAGE;
            ptr_n       = 5'(16 - p);          // source offset of the rest
            remaining_n = 6'(nb - (16 - p));
            half_word_n = place(half_word_q, in_value_q, 0, p, 16 - p);
          end else begin
            ptr_n       = 5'((p + nb) % 16);
            remaining_n = '0;
            half_word_n = place(half_word_q, in_value_q, 0, p, nb);
          end
        end
      S_2ND_STAGE: begin
        if (r >= 16) half_word_valid_n = 1'b1;
        if (r > 16) begin
          state_n     = S_3RD_STAGE;
          ptr_n       = 5'(p + 16);
          remaining_n = 6'(r - 16);
          half_word_n = place(half_word_q, in_value_q, p, 0, 16);
        end else begin
          state_n     = S_1ST_STAGE;
          ptr_n       = 5'(r % 16);
          remaining_n = '0;
          half_word_n = place(half_word_q, in_value_q, p, 0, r);
        end
      end
      S_3RD_STAGE: begin
        state_n     = S_1ST_STAGE;
        ptr_n       = 5'(r);
        remaining_n = '0;
        half_word_n = place(half_word_q, in_value_q, p, 0, r);
      end
      default: state_n = S_1ST_STAGE;
    endcase
  end

  assign ready = (state_q == S_1ST_STAGE) && !pending_q && !in_valid && !vcb_half_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q           <= S_1ST_STAGE;
      ptr_q             <= '0;
      remaining_q       <= '0;
      half_word_q       <= '0;
      half_word_valid_q <= 1'b0;
    end else begin
      state_q           <= state_n;
      ptr_q             <= ptr_n;
      remaining_q       <= remaining_n;
      half_word_q       <= half_word_n;
      half_word_valid_q <= half_word_valid_n;
    end
  end

  // ---- stage 3: 32-bit output word --------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      full_word_q  <= '0;
      upper_half_q <= 1'b0;
      out_valid    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (half_word_valid_q) begin
        if (!upper_half_q) begin
          full_word_q[15:0] <= half_word_q;
          upper_half_q      <= 1'b1;
        end else begin
          full_word_q[31:16] <= half_word_q;
          upper_half_q       <= 1'b0;
          out_valid          <= 1'b1;
        end
      end
    end
  end

  // stream bit 8*b + i (b = byte, i = 0 earliest) leaves on bit 8*b + 7 - i
  always_comb begin
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        out_data[8*b + 7 - i] = full_word_q[8*b + i];
  end

  // A new word must never arrive while the previous one is still pending.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> !pending_q || consume);

endmodule
