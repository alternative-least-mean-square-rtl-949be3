// dlms_ref_pkg: behavioural reference model of the delayed-LMS filters, used
// by the testbenches to predict every output bit of the RTL.
//
// The model works on plain integers and keeps the history of x and of every
// weight, and computes the filter output directly from the equations of each
// form instead of from registers:
//   direct      dhat(n) = sum_k w_k(n)          x(n-1-k)
//   transposed  dhat(n) = sum_k w_k(n-1-k)      x(n-1-k)
//   hybrid      dhat(n) = sum_k w_k(n-k/S)      x(n-1-k)   (S taps per section)
// scaled by 2^-frac (floor) and wrapped to data_w bits, and the DLMS update
//   e(n) = d(n) - dhat(n),  me(n+1) = e(n) >> (mu_shift - frac),
//   w_k(n+1) = w_k(n) + me(n) x(n-2-k)      (wrapped to coef_w bits).
// Before reset all history is zero. Call outputs() for the current cycle's
// predictions, then step() at the clock edge.
package dlms_ref_pkg;

  typedef enum int {ARCH_DIRECT, ARCH_TRANSPOSED, ARCH_HYBRID} arch_e;

  function automatic longint wrap(longint v, int bits);
    longint m;
    m = longint'(1) << bits;
    v = v % m;
    if (v < 0) v += m;
    if (v >= (m >> 1)) v -= m;
    return v;
  endfunction

  class dlms_ref;
    arch_e  arch;
    int     taps, data_w, coef_w, frac, mu_shift, sec;
    longint xh[$];        // xh[i] = x(n-i), i >= 1 meaningful
    longint wh[$][$];     // wh[t][k] = w_k(n-t)
    longint me;

    function new(arch_e arch, int taps, int data_w, int coef_w, int frac,
                 int mu_shift, int sec = 3);
      this.arch = arch; this.taps = taps; this.data_w = data_w;
      this.coef_w = coef_w; this.frac = frac; this.mu_shift = mu_shift;
      this.sec = sec;
      reset();
    endfunction

    function void reset();
      longint zw[$];
      xh.delete(); wh.delete();
      for (int i = 0; i < taps + 4; i++) xh.push_back(0);
      for (int k = 0; k < taps; k++) zw.push_back(0);
      for (int t = 0; t < taps + 2; t++) wh.push_back(zw);
      me = 0;
    endfunction

    function longint weight(int k);
      return wh[0][k];
    endfunction

    // Filter output for the current cycle (before step()).
    function longint dhat();
      longint acc = 0;
      for (int k = 0; k < taps; k++) begin
        int age;
        case (arch)
          ARCH_DIRECT:     age = 0;
          ARCH_TRANSPOSED: age = 1 + k;
          default:         age = k / sec;
        endcase
        acc += wh[age][k] * xh[1 + k];
      end
      return wrap(acc >>> frac, data_w);
    endfunction

    function longint err(longint d);
      return wrap(d - dhat(), data_w);
    endfunction

    // Clock edge with inputs x, d of the current cycle.
    function void step(longint x, longint d);
      longint e, nw[$];
      e = err(d);
      for (int k = 0; k < taps; k++)
        nw.push_back(wrap(wh[0][k] + wrap(me * xh[2 + k], coef_w), coef_w));
      me = e >>> (mu_shift - frac);
      wh.push_front(nw);
      void'(wh.pop_back());
      xh.push_front(0);
      xh[1] = x;            // after the edge, x(n) becomes x(n'-1)
      void'(xh.pop_back());
    endfunction
  endclass

endpackage
