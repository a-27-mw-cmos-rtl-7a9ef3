// tb_mash_ref_pkg: word-level reference model of a second-order MASH (1-1)
// sigma-delta modulator, used by the testbenches to check the pipelined
// implementation. It works on whole words, with no pipelining:
//   s1 = e1 + x              (x: 16-bit word, e1: 10-bit state)
//   out1 = s1[15:10], e1' = s1[9:0]
//   s2 = e2 + e1'            out2 = s2[10], e2' = s2[9:0]
//   y = out1 + out2 - out2_prev   (mod 64)
package tb_mash_ref_pkg;
  typedef struct {
    int unsigned e1;
    int unsigned e2;
    int unsigned out2_prev;
  } mash_state_t;

  function automatic void mash_reset(ref mash_state_t st);
    st.e1 = 0;
    st.e2 = 0;
    st.out2_prev = 0;
  endfunction

  // one step; returns y (0..63), and the two stage outputs through out1/out2
  function automatic int unsigned mash_step(ref mash_state_t st, input int unsigned x,
                                            output int unsigned out1, output int unsigned out2);
    int unsigned s1, s2, y;
    s1   = (st.e1 + (x & 32'hFFFF)) & 32'h1FFFF;
    out1 = (s1 >> 10) & 32'h3F;
    st.e1 = s1 & 32'h3FF;
    s2   = st.e2 + st.e1;
    out2 = (s2 >> 10) & 1;
    st.e2 = s2 & 32'h3FF;
    y    = (out1 + out2 + 64 - st.out2_prev) & 32'h3F;
    st.out2_prev = out2;
    return y;
  endfunction
endpackage
