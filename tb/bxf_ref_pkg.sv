// bxf_ref_pkg -- reference arithmetic for the filter testbenches.
//
// Computes, with ordinary integer arithmetic, what the serial datapath
// should produce: a product of a sign-magnitude data word by a 20-bit
// sign-magnitude coefficient is floor(|s| * |c| / 2**18) kept to 31 bits,
// with sign sign(s) xor sign(c); it is added to a 32-bit two's complement
// accumulator that wraps.  Also the conversions between two's complement and
// sign-magnitude, and one whole filter step over four sections.
package bxf_ref_pkg;

  function automatic logic [31:0] to_sm(input logic [31:0] t);
    logic [31:0] m;
    m = t[31] ? (~t + 32'd1) : t;
    return {t[31] & (m[30:0] != 0), m[30:0]};
  endfunction

  function automatic logic [31:0] from_sm(input logic [31:0] s);
    return s[31] ? (32'd0 - {1'b0, s[30:0]}) : {1'b0, s[30:0]};
  endfunction

  function automatic logic [31:0] mac(input logic [31:0] t, input logic [31:0] s_sm,
                                     input logic [19:0] c_sm);
    logic [63:0] p;
    logic [31:0] pm;
    p  = (64'(s_sm[30:0]) * 64'(c_sm[18:0])) >> 18;
    pm = {1'b0, p[30:0]};
    return (s_sm[31] ^ c_sm[19]) ? (t - pm) : (t + pm);
  endfunction

  function automatic real coef_real(input logic [19:0] c);
    real v;
    v = real'(c[18:0]) / 262144.0;
    return c[19] ? -v : v;
  endfunction

  // State of the reference filter: w[n-1], w[n-2] of each section, as
  // sign-magnitude words.
  typedef struct {
    logic [31:0] w1 [4];
    logic [31:0] w2 [4];
  } fstate_t;

  // One sample through four sections; coef holds the 20 words of the
  // selected setting in ROM order (-a1, -a2, b2, b1, b0 per section).
  function automatic logic [31:0] filter_step(ref fstate_t st, input logic [19:0] coef [20],
                                              input logic [15:0] x);
    logic [31:0] t, w;
    t = {{16{x[15]}}, x};
    for (int s = 0; s < 4; s++) begin
      t = mac(t, st.w1[s], coef[5*s + 0]);
      t = mac(t, st.w2[s], coef[5*s + 1]);
      w = to_sm(t);
      t = 32'd0;
      t = mac(t, st.w2[s], coef[5*s + 2]);
      t = mac(t, st.w1[s], coef[5*s + 3]);
      t = mac(t, w,        coef[5*s + 4]);
      st.w2[s] = st.w1[s];
      st.w1[s] = w;
    end
    return t;
  endfunction

endpackage
