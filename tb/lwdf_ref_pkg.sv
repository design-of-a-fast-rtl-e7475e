// Reference model of the filter for the testbenches, in plain integer
// arithmetic, sample by sample. Halving is an arithmetic shift right (floor).
//   a2 = b2 two samples earlier
//   e  = (x - a2) >>> 1
//   b1 = a2 + e
//   b2 = x + e
//   y  = (x[n-1] + b1) >>> 1
package lwdf_ref_pkg;

  typedef struct {
    int xprev;
    int b2_1;   // b2 one sample back
    int b2_2;   // b2 two samples back
  } link_state_t;

  function automatic link_state_t link_reset();
    link_state_t st;
    st.xprev = 0; st.b2_1 = 0; st.b2_2 = 0;
    return st;
  endfunction

  function automatic int link_step(ref link_state_t st, input int x);
    int a2, e, b1, b2, y;
    a2 = st.b2_2;
    e  = (x - a2) >>> 1;
    b1 = a2 + e;
    b2 = x + e;
    y  = (st.xprev + b1) >>> 1;
    st.xprev = x;
    st.b2_2  = st.b2_1;
    st.b2_1  = b2;
    return y;
  endfunction

  // sign-extend the low n bits of v
  function automatic int sext(input int v, input int n);
    int s;
    s = 32 - n;
    return (v <<< s) >>> s;
  endfunction

endpackage
