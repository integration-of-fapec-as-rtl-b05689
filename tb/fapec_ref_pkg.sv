// fapec_ref_pkg: reference model used by the FAPEC testbenches.
//
// Written independently of the RTL: codes are built by appending bits one
// at a time in stream order, the bin table by walking the bin rule, and the
// decoder parses a bit stream back into samples. Contents:
//   ref_bin_max / ref_value_to_bin   histogram bin rule
//   ref_ceilings                     segment ceilings from segment sizes
//   ref_encode / ref_header          PEC code word / coding-table header
//   fapec_decoder                    full stream decoder (header + codes,
//                                    then prediction undone)
package fapec_ref_pkg;

  typedef struct {
    int unsigned variant;   // 0 LE, 2 DS, 3 LC
    int unsigned h, i, j, k;
  } table_t;

  // ---- histogram bins ----------------------------------------------------
  function automatic int unsigned ref_bin_max(int unsigned b);
    int unsigned bin, lo, hi;
    bin = 0;
    for (int unsigned v = 0; v < 16; v++) begin
      if (bin == b) return v;
      bin++;
    end
    for (int unsigned o = 4; o < 16; o++) begin
      lo = 1 << o;
      hi = (1 << (o + 1)) - 1;
      if (o <= 12) begin
        if (bin == b) return lo + (1 << (o - 1)) - 1;
        bin++;
        if (bin == b) return hi;
        bin++;
      end else begin
        if (bin == b) return hi;
        bin++;
      end
    end
    return 65535;
  endfunction

  function automatic int unsigned ref_value_to_bin(int unsigned v);
    for (int unsigned b = 0; b < 37; b++)
      if (v <= ref_bin_max(b)) return b;
    return 36;
  endfunction

  // ---- ceilings --------------------------------------------------------------
  function automatic int unsigned sat(longint unsigned x);
    return (x > 65535) ? 65535 : int'(x);
  endfunction

  // number of moduli segment n holds
  function automatic longint unsigned ref_cap(int unsigned variant, int unsigned n, int unsigned bits);
    longint unsigned p;
    p = longint'(1) << bits;
    if (variant < 2 && n == 1) return p - 1;   // LE: all-ones escape
    if (variant == 2 && n == 0) return p - 1;  // DS: all-ones escape
    return p;
  endfunction

  function automatic void ref_ceilings(table_t t, output int unsigned c1, output int unsigned c2,
                                       output int unsigned c3);
    c1 = sat(ref_cap(t.variant, 0, t.h) - 1);
    c2 = sat(longint'(c1) + ref_cap(t.variant, 1, t.i));
    c3 = sat(longint'(c2) + ref_cap(t.variant, 2, t.j));
  endfunction

  // ---- bit appending helpers -------------------------------------------------
  typedef struct {
    bit [63:0]   bits;
    int unsigned len;
  } code_t;

  function automatic void put(ref code_t c, input bit b);
    c.bits[c.len] = b;
    c.len++;
  endfunction

  function automatic void put_lsb(ref code_t c, input int unsigned v, input int unsigned n);
    for (int unsigned q = 0; q < n; q++) put(c, v[q]);
  endfunction

  function automatic void put_msb(ref code_t c, input int unsigned v, input int unsigned n);
    for (int q = int'(n) - 1; q >= 0; q--) put(c, v[q]);
  endfunction

  function automatic void put_run(ref code_t c, input bit b, input int unsigned n);
    for (int unsigned q = 0; q < n; q++) put(c, b);
  endfunction

  // ---- PEC code word of one residual -----------------------------------------
  function automatic code_t ref_encode(table_t t, bit sign, int unsigned modulus);
    code_t c;
    int unsigned c1, c2, c3, seg, v;
    c.bits = '0;
    c.len  = 0;
    ref_ceilings(t, c1, c2, c3);
    if (modulus > c3)      begin seg = 3; v = modulus - c3 - 1; end
    else if (modulus > c2) begin seg = 2; v = modulus - c2 - 1; end
    else if (modulus > c1) begin seg = 1; v = modulus - c1 - 1; end
    else                   begin seg = 0; v = modulus; end
    if (t.variant < 2) begin
      if (seg == 0) begin put(c, sign); put_lsb(c, v, t.h); end
      else begin
        put(c, 1'b1); put_run(c, 1'b0, t.h); put(c, sign);
        if (seg == 1) put_lsb(c, v, t.i);
        else begin
          put_run(c, 1'b1, t.i);
          put(c, seg == 3);
          put_lsb(c, v, (seg == 2) ? t.j : t.k);
        end
      end
    end else if (t.variant == 2) begin
      if (seg == 0) begin put(c, sign); put_lsb(c, v, t.h); end
      else if (seg == 1) begin put(c, sign); put_run(c, 1'b1, t.h); put_lsb(c, v, t.i); end
      else begin
        put(c, 1'b1); put_run(c, 1'b0, t.h); put(c, sign); put(c, seg == 3);
        put_lsb(c, v, (seg == 2) ? t.j : t.k);
      end
    end else begin
      if (seg == 0) begin
        put(c, 1'b0); put_lsb(c, v, t.h);
        if (v != 0) put(c, sign);
      end else begin
        put(c, 1'b1);
        if (seg == 1) put(c, 1'b0);
        else begin put(c, 1'b1); put(c, seg == 3); end
        put_lsb(c, v, (seg == 1) ? t.i : (seg == 2) ? t.j : t.k);
        put(c, sign);
      end
    end
    return c;
  endfunction

  // ---- coding-table header -----------------------------------------------------
  function automatic code_t ref_header(table_t t);
    code_t c;
    c.bits = '0;
    c.len  = 0;
    if (t.variant < 2) begin
      put(c, 1'b0); put(c, 1'b1);
      put_msb(c, t.h, 1); put_msb(c, t.i, 1); put_msb(c, t.j, 2); put_msb(c, t.k % 16, 4);
    end else if (t.variant == 2) begin
      put(c, 1'b0); put(c, 1'b0);
      put_msb(c, t.h, 2); put_msb(c, t.i, 2); put_msb(c, t.j, 3); put_msb(c, t.k % 16, 4);
    end else begin
      put(c, 1'b1);
      put_msb(c, t.h, 4); put_msb(c, t.i, 4); put_msb(c, t.j, 4); put_msb(c, t.k % 16, 4);
    end
    return c;
  endfunction

  // ---- stream decoder ------------------------------------------------------------
  class fapec_decoder;
    bit          q[$];
    int unsigned pos;
    int unsigned block_size;
    // statistics
    int unsigned n_variant[4];
    int unsigned n_segment[4];
    int unsigned n_split3;     // codes the packer needs three clocks for
    table_t      last_table;

    function new(int unsigned bs);
      block_size = bs;
      pos = 0;
      n_variant = '{default: 0};
      n_segment = '{default: 0};
      n_split3 = 0;
    endfunction

    function void push_word(bit [31:0] w);
      // bytes in order, each most significant bit first
      for (int b = 0; b < 32; b++) q.push_back(w[8 * (b / 8) + 7 - b % 8]);
    endfunction

    function bit avail(int unsigned n);
      return pos + n <= q.size();
    endfunction

    function int unsigned get_lsb(int unsigned n);
      int unsigned v = 0;
      for (int unsigned b = 0; b < n; b++) v[b] = q[pos + b];
      pos += n;
      return v;
    endfunction

    function int unsigned get_msb(int unsigned n);
      int unsigned v = 0;
      for (int unsigned b = 0; b < n; b++) v = (v << 1) | int'(q[pos + b]);
      pos += n;
      return v;
    endfunction

    // Decodes one block; returns 0 (and leaves pos unchanged) if the stream
    // ends before the block does.
    function bit decode_block(output int unsigned samples[$]);
      int unsigned start, c1, c2, c3, v, seg, modulus, prev, smp, all1, cstart, splits;
      bit s, tmp;
      table_t t;
      int unsigned segcnt[4];
      start = pos;
      segcnt = '{default: 0};
      samples.delete();
      if (!avail(17)) return 0;
      if (q[pos]) begin
        pos++;
        t.variant = 3;
        t.h = get_msb(4); t.i = get_msb(4); t.j = get_msb(4); t.k = get_msb(4);
      end else if (q[pos + 1]) begin
        pos += 2;
        t.variant = 0;
        t.h = get_msb(1); t.i = get_msb(1); t.j = get_msb(2); t.k = get_msb(4);
        if (t.h == 0) t.h = 2;
        if (t.i == 0) t.i = 2;
      end else begin
        pos += 2;
        t.variant = 2;
        t.h = get_msb(2); t.i = get_msb(2); t.j = get_msb(3); t.k = get_msb(4);
      end
      if (t.k == 0) t.k = 16;
      ref_ceilings(t, c1, c2, c3);
      prev = 0;
      splits = 0;
      for (int unsigned n = 0; n < block_size; n++) begin
        if (!avail(64)) begin pos = start; return 0; end
        cstart = pos;
        if (t.variant < 2) begin
          s = q[pos]; pos++;
          v = get_lsb(t.h);
          if (s && v == 0) begin
            s = q[pos]; pos++;
            all1 = (1 << t.i) - 1;
            v = get_lsb(t.i);
            if (v != all1) seg = 1;
            else begin
              tmp = q[pos]; pos++;
              seg = tmp ? 3 : 2;
              v = get_lsb(tmp ? t.k : t.j);
            end
          end else seg = 0;
        end else if (t.variant == 2) begin
          s = q[pos]; pos++;
          all1 = (1 << t.h) - 1;
          v = get_lsb(t.h);
          if (v == all1) begin seg = 1; v = get_lsb(t.i); end
          else if (s && v == 0) begin
            s = q[pos]; pos++;
            tmp = q[pos]; pos++;
            seg = tmp ? 3 : 2;
            v = get_lsb(tmp ? t.k : t.j);
          end else seg = 0;
        end else begin
          tmp = q[pos]; pos++;
          if (!tmp) begin
            seg = 0;
            v = get_lsb(t.h);
            s = 0;
            if (v != 0) begin s = q[pos]; pos++; end
          end else begin
            tmp = q[pos]; pos++;
            if (!tmp) seg = 1;
            else begin tmp = q[pos]; pos++; seg = tmp ? 3 : 2; end
            v = get_lsb(seg == 1 ? t.i : seg == 2 ? t.j : t.k);
            s = q[pos]; pos++;
          end
        end
        segcnt[seg]++;
        // a code starting at offset o of a 16-bit half word spills over
        // two more half words when it is longer than 32 - o bits
        if ((cstart % 16) + (pos - cstart) > 32) splits++;
        unique case (seg)
          0: modulus = v;
          1: modulus = c1 + 1 + v;
          2: modulus = c2 + 1 + v;
          default: modulus = c3 + 1 + v;
        endcase
        if (n == 0) smp = s ? (0 - modulus) & 16'hffff : modulus;
        else        smp = s ? (prev - modulus) & 16'hffff : (prev + modulus) & 16'hffff;
        samples.push_back(smp);
        prev = smp;
      end
      n_variant[t.variant]++;
      for (int b = 0; b < 4; b++) n_segment[b] += segcnt[b];
      n_split3 += splits;
      last_table = t;
      return 1;
    endfunction
  endclass

endpackage
