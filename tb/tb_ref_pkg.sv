// tb_ref_pkg: reference model used by the testbenches.
//
// Works from the definitions of the transition types rather than from the
// RTL's detector equations: for a pair of adjacent lines going from p to c,
//   Type I   one line switches                      -> coupling cost 1
//   Type II  both switch, in opposite directions     -> coupling cost 2
//   Type III both switch, in the same direction      -> 0
//   Type IV  neither switches                        -> 0
// A pair "gains" from an inversion when its cost after the inversion is
// lower. The scheme decisions are expressed as cost differences between the
// candidate encodings, not in the rearranged form the RTL uses. Vectors are
// held in 64 bits with an explicit line count n.
package tb_ref_pkg;

  typedef enum int {MODE_NONE = 0, MODE_ODD = 1, MODE_EVEN = 2, MODE_FULL = 3} mode_e;

  function automatic int pair_cost(logic [1:0] p, logic [1:0] c);
    bit sa = (p[0] != c[0]);
    bit sb = (p[1] != c[1]);
    if (sa && sb) return (p[0] != p[1]) ? 2 : 0;
    if (sa || sb) return 1;
    return 0;
  endfunction

  function automatic logic [63:0] parity_mask(int n, bit odd);
    logic [63:0] m = '0;
    for (int i = 0; i < n; i++) m[i] = ((i % 2) == (odd ? 1 : 0));
    return m;
  endfunction

  function automatic logic [63:0] mode_mask(mode_e m, int n);
    case (m)
      MODE_ODD:  return parity_mask(n, 1);
      MODE_EVEN: return parity_mask(n, 0);
      MODE_FULL: return parity_mask(n, 1) | parity_mask(n, 0);
      default:   return '0;
    endcase
  endfunction

  function automatic int link_cost(logic [63:0] p, logic [63:0] c, int n);
    int s = 0;
    for (int i = 0; i + 1 < n; i++) s += pair_cost(p[i +: 2], c[i +: 2]);
    return s;
  endfunction

  function automatic int self_switches(logic [63:0] p, logic [63:0] c, int n);
    int s = 0;
    for (int i = 0; i < n; i++) s += (p[i] != c[i]) ? 1 : 0;
    return s;
  endfunction

  // number of pairs whose cost falls under the given inversion
  function automatic int gain_count(logic [63:0] p, logic [63:0] c, int n, mode_e m);
    logic [63:0] ci = c ^ mode_mask(m, n);
    int s = 0;
    for (int i = 0; i + 1 < n; i++)
      s += (pair_cost(p[i +: 2], ci[i +: 2]) < pair_cost(p[i +: 2], c[i +: 2])) ? 1 : 0;
    return s;
  endfunction

  function automatic int t2_count(logic [63:0] p, logic [63:0] c, int n);
    int s = 0;
    for (int i = 0; i + 1 < n; i++) s += (pair_cost(p[i +: 2], c[i +: 2]) == 2) ? 1 : 0;
    return s;
  endfunction

  // stable pairs that full inversion would turn into Type II
  function automatic int t4ss_count(logic [63:0] p, logic [63:0] c, int n);
    int s = 0;
    for (int i = 0; i + 1 < n; i++)
      s += (p[i +: 2] == c[i +: 2] && pair_cost(p[i +: 2], ~c[i +: 2]) == 2) ? 1 : 0;
    return s;
  endfunction

  // Decision from the cost deltas of each candidate relative to no inversion.
  // np = number of pairs; ty/te/t2/t4 counts as above.
  function automatic mode_e decide(int scheme, int np, int ty, int te, int t2, int t4);
    int d_odd  = np - 2 * ty;       // cost change of odd inversion
    int d_even = np - 2 * te;       // cost change of even inversion
    int d_full = 2 * (t4 - t2);     // cost change of full inversion
    if (scheme == 1) return (d_odd < 0) ? MODE_ODD : MODE_NONE;
    if (scheme == 2) begin
      if (d_odd < d_full && d_odd < 0) return MODE_ODD;
      if (d_full < d_odd && d_full < 0) return MODE_FULL;
      return MODE_NONE;
    end
    if (d_full < d_odd && d_full < 0 && d_full < d_even) return MODE_FULL;
    if (d_odd < d_full && d_odd < 0 && te < ty) return MODE_ODD;
    if (d_even < d_full && d_even < 0 && te >= ty) return MODE_EVEN;
    return MODE_NONE;
  endfunction

  // Full reference encoder: returns the encoded link word for payload data,
  // given the previous link word, the scheme and the payload width pw.
  function automatic logic [63:0] encode(int scheme, int pw, logic [63:0] prev,
                                         logic [63:0] data, bit head, output mode_e m);
    int n = (scheme == 1) ? pw + 1 : pw + 2;
    logic [63:0] x = data & ((64'd1 << pw) - 1);
    m = decide(scheme, n - 1, gain_count(prev, x, n, MODE_ODD), gain_count(prev, x, n, MODE_EVEN),
               t2_count(prev, x, n), t4ss_count(prev, x, n));
    if (head) m = MODE_NONE;
    return x ^ mode_mask(m, n);
  endfunction

  // Reference decoder: undo the inversion recorded on the tag lines.
  function automatic logic [63:0] decode(int scheme, int pw, logic [63:0] l);
    logic [63:0] d = '0;
    bit odd_tag  = l[pw];
    bit even_tag = (scheme == 1) ? 1'b0 : l[pw + 1];
    for (int i = 0; i < pw; i++) d[i] = l[i] ^ ((i % 2 == 1) ? odd_tag : even_tag);
    return d;
  endfunction

  // Stimulus: payloads chosen to provoke each kind of inversion often.
  function automatic logic [63:0] gen_payload(logic [63:0] last, int pw);
    logic [63:0] r = {$urandom(), $urandom()};
    logic [63:0] pm = (64'd1 << pw) - 1;
    case ($urandom_range(0, 5))
      0: return r & pm;                                       // random
      1: return ~last & pm;                                   // complement
      2: return (last ^ (parity_mask(pw, 1) & ~(r & (r >> 7)))) & pm;  // odd lines switch
      3: return (last ^ (parity_mask(pw, 0) & ~(r & (r >> 7)))) & pm;  // even lines switch
      4: return (last ^ (64'd1 << $urandom_range(0, pw - 1))) & pm;    // one bit
      default: return ((r[0] ? 64'h5555_5555_5555_5555 : 64'hAAAA_AAAA_AAAA_AAAA) ^ (r & (r >> 3) & (r >> 9))) & pm;
    endcase
  endfunction

endpackage
