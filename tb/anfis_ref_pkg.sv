// anfis_ref_pkg -- reference arithmetic for the testbenches, written directly from the
// equations (triangular sets, Sugeno weighted average, velocity-form PID) with 64-bit
// integers, independent of the RTL's sized datapaths.
package anfis_ref_pkg;

  // Triangular membership, 256 = 1.0, shoulders when a == b or b == c.
  function automatic longint trimf(longint x, longint a, longint b, longint c);
    if (a == b && x <= b) return 256;
    if (b == c && x >= b) return 256;
    if (x <= a || x >= c) return 0;
    if (x <= b) return ((x - a) * 256) / (b - a);
    return ((c - x) * 256) / (c - b);
  endfunction

  // Sugeno output of one channel. kb[ch*27 + rule*3 + coef].
  function automatic longint sugeno(longint e, longint de, int ch, longint kb [108],
                                    int ea [3], int eb [3], int ec [3],
                                    int da [3], int db [3], int dc [3]);
    longint num, den, w, f;
    num = 0; den = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        w = trimf(e, ea[i], eb[i], ec[i]) * trimf(de, da[j], db[j], dc[j]);
        f = kb[ch*27 + (i*3 + j)*3 + 0] * e + kb[ch*27 + (i*3 + j)*3 + 1] * de
          + kb[ch*27 + (i*3 + j)*3 + 2];
        num += w * f;
        den += w;
      end
    if (den == 0) return 0;
    return num / den;      // truncates toward zero
  endfunction

  function automatic longint clamp(longint x, longint lo, longint hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  // The preset knowledge base, from its written description.
  function automatic longint kb_default(int addr);
    int ch, rule, coef;
    bit outer;
    ch = addr / 27; rule = (addr / 3) % 9; coef = addr % 3;
    outer = (rule / 3) != 1;
    if (ch == 0) return (coef == 0) ? (outer ? 300 : 150) : (coef == 1) ? 1500 : 0;
    if (coef != 2 || !outer) return 0;
    return (ch == 1) ? 2000 : (ch == 2) ? 20 : 1000;
  endfunction

  localparam longint UMAX = 13421773;   // duty 0.8 with 24 fraction bits

endpackage
