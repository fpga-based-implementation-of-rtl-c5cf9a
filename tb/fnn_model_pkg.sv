// fnn_model_pkg: reference model of the FNN T-H arithmetic for the testbenches.
//
// Written from the number-format rules, not from the RTL: plain integer
// arithmetic on 64-bit values, floor division instead of shifts, the table
// segment found by division instead of a comparator bank, and the table values
// recomputed from tanh at run time:
//   x_k = (-5 + 0.5k) * 2048, y_k = round(2048 * tanh(-5 + 0.5k)), k = 0..20
// Q4.11 data, results saturated to [-32768, 32767].
package fnn_model_pkg;

  function automatic longint fdiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint tab_y(int k);
    real v = $tanh(-5.0 + 0.5 * k) * 2048.0;
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic longint tanh_tab(longint x);
    longint k, d;
    if (x <= -10240) return tab_y(0);
    if (x >= 10240)  return tab_y(20);
    k = fdiv(x + 10240, 1024);
    d = x + 10240 - 1024 * k;
    return tab_y(int'(k)) + fdiv(d * (tab_y(int'(k) + 1) - tab_y(int'(k))), 1024);
  endfunction

  // act: 0 purelin, 1 tansig, 2 logsig, 3 purelin
  function automatic longint act(longint x, int t);
    case (t)
      1:       return tanh_tab(x);
      2:       return fdiv(tanh_tab(fdiv(x, 2)), 2) + 1024;
      default: return x;
    endcase
  endfunction

  function automatic bit clamps(longint x);
    return (x <= -10240) || (x >= 10240);
  endfunction

  // Saturated Q4.11 weighted sum with bias.
  function automatic longint net(longint x[], longint w[], longint b);
    longint acc = b * 2048;
    foreach (x[i]) acc += x[i] * w[i];
    return sat16(fdiv(acc, 2048));
  endfunction

  function automatic longint pi_prod(longint a[]);
    longint p = a[0];
    for (int i = 1; i < a.size(); i++) p = sat16(fdiv(p * a[i], 2048));
    return p;
  endfunction

  function automatic longint add(longint a[]);
    longint s = 0;
    foreach (a[i]) s += a[i];
    return sat16(s);
  endfunction

endpackage
