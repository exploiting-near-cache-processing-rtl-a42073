// ccs_ref_pkg: reference model of the CCS command set, for the testbenches.
//
// Written from the command definitions (r[i] = f(a[i], b[i] or k) for maps, one word for
// reductions), element by element, with none of the datapath's structure. Command numbers are
// the table order 0..47 used by the RTL.
package ccs_ref_pkg;

  typedef logic [31:0] word_t;

  localparam int NCMD = 48;

  // operand class: 0 = two vectors, 1 = vector and constant, 2 = one vector, 3 = constant only
  function automatic int kind_of(int c);
    if (c <= 5)  return 0;
    if (c <= 11) return 1;
    if (c <= 17) return 2;
    if (c <= 23) return 0;
    if (c <= 29) return 1;
    if (c <= 35) return 0;
    if (c <= 41) return 1;
    if (c <= 45) return 2;
    if (c == 46) return 3;
    return 2;
  endfunction

  function automatic bit is_reduce(int c);
    return (c >= 3 && c <= 5) || (c >= 15 && c <= 17) || (c >= 43 && c <= 45);
  endfunction

  function automatic word_t rotl(word_t a, int s);
    s = s % 32;
    if (s == 0) return a;
    return (a << s) | (a >> (32 - s));
  endfunction

  function automatic word_t sra(word_t a, int s);
    word_t r = a;
    for (int i = 0; i < s; i++) r = {r[31], r[31:1]};
    return r;
  endfunction

  // map result of one element; y is b[i] or k as the class says
  function automatic word_t map_elem(int c, word_t a, word_t y);
    int s;
    s = int'(y[4:0]);
    case (c)
      0, 6:   return a + y;
      1, 7:   return a - y;
      2, 8:   return a * y;
      9:      return ($signed(a) < $signed(y)) ? 32'd1 : 32'd0;
      10:     return ($signed(a) > $signed(y)) ? 32'd1 : 32'd0;
      11:     return (a == y) ? 32'd1 : 32'd0;
      12:     return -a;
      13:     return a * a;
      14:     return ($signed(a) < 0) ? -a : a;
      18, 24: return a << s;
      19, 25: return a >> s;
      20, 26: return {a[31], 31'(a << s)};
      21, 27: return sra(a, s);
      22, 28: return rotl(a, s);
      23, 29: return rotl(a, 32 - s);
      30, 36: return a & y;
      31, 37: return ~(a & y);
      32, 38: return a | y;
      33, 39: return ~(a | y);
      34, 40: return a ^ y;
      35, 41: return ~(a ^ y);
      42:     return ~a;
      46:     return y;
      47:     return a;
      default: return 32'hdead_beef;
    endcase
  endfunction

  // value one element contributes to a reduction
  function automatic word_t red_elem(int c, word_t a, word_t b);
    word_t d;
    d = a - b;
    case (c)
      3:       return d * d;
      4:       return ($signed(d) < 0) ? -d : d;
      5:       return a * b;
      default: return a;
    endcase
  endfunction

  // fold one contribution into a running reduction
  function automatic word_t red_fold(int c, word_t acc, word_t x);
    case (c)
      16:      return ($signed(x) > $signed(acc)) ? x : acc;
      17:      return ($signed(x) < $signed(acc)) ? x : acc;
      43:      return acc & x;
      44:      return acc | x;
      45:      return acc ^ x;
      default: return acc + x;
    endcase
  endfunction

  // A whole command on a word-addressed memory image (word address = byte address / 4).
  // The operand covers span = (len-1)*stride+1 words from its base; a word takes part when
  // the stride mask bit of its position in the line is set. Map results go to the same
  // positions from the result base; a reduction writes one word at the result address (0 when
  // no element took part).
  function automatic void ref_exec(ref word_t m[], input int c, input int len, input word_t k,
                                   input int a, input int b, input int r, input int stride,
                                   input logic [63:0] sm, input int n);
    int span, off;
    bit any;
    word_t acc, y;
    if (len == 0) return;
    span = (len - 1) * stride + 1;
    off  = (kind_of(c) == 3) ? r % n : a % n;
    any  = 0;
    acc  = '0;
    for (int j = 0; j < span; j++) begin
      if (!sm[(off + j) % n]) continue;
      y = (kind_of(c) == 0) ? m[b + j] : k;
      if (is_reduce(c)) begin
        if (!any) acc = red_elem(c, m[a + j], y);
        else      acc = red_fold(c, acc, red_elem(c, m[a + j], y));
        any = 1;
      end else begin
        m[r + j] = map_elem(c, (kind_of(c) == 3) ? '0 : m[a + j], y);
      end
    end
    if (is_reduce(c)) m[r] = any ? acc : '0;
  endfunction

  // software stride mask: bit i set when line position i is a multiple of the stride away
  // from the operand's first position
  function automatic logic [63:0] stride_mask(int stride, int off, int n);
    logic [63:0] m = '0;
    for (int i = 0; i < n; i++)
      if (i >= off && ((i - off) % stride) == 0) m[i] = 1'b1;
      else if (i < off && ((i + n - off) % stride) == 0) m[i] = 1'b1;
    return m;
  endfunction

endpackage
