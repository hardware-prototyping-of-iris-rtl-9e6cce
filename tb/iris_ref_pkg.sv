// iris_ref_pkg: reference arithmetic of the iris recognizer network, written
// with plain 64-bit integers for the testbenches. It restates the number
// formats of the design (Q.15 normalized inputs, Q.10 weights, Q.8 sigmoid
// argument, Q.12 sigmoid, 2^OUT_W output scale) directly from their
// definitions, so that testbenches can compute expected values without
// using the design's modules.
package iris_ref_pkg;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // floor(v / 2^s) for signed v
  function automatic longint fdiv(longint v, int s);
    longint p = longint'(1) << s;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  function automatic longint ref_norm(longint v);
    return clamp((v - 134) * 240, -32768, 32767);
  endfunction

  // piecewise linear sigmoid, argument in Q.8, result in 2^outw units
  function automatic longint ref_sigmoid(longint x, int outw);
    longint a = (x < 0) ? -x : x;
    longint y12;
    if (a >= 5 * 256)        y12 = 4096;
    else if (a >= 608)       y12 = 3456 + a / 2;       // a/32 + 0.84375
    else if (a >= 256)       y12 = 2560 + 2 * a;       // a/8  + 0.625
    else                     y12 = 2048 + 4 * a;       // a/4  + 0.5
    if (x < 0) y12 = 4096 - y12;
    return clamp(fdiv(y12 * (longint'(1) << outw), 12), 0, (longint'(1) << outw) - 1);
  endfunction

  // neuron: n[0..nin-1] Q.15, w[0..nin] Q.10 (w[nin] = threshold on input 32767)
  function automatic longint ref_sum(longint n[4], longint w[4], int nin);
    longint a = 32767 * w[nin];
    for (int i = 0; i < nin; i++) a += n[i] * w[i];
    return a;
  endfunction

  function automatic longint ref_neuron(longint n[4], longint w[4], int nin, int outw);
    longint x = clamp(fdiv(ref_sum(n, w, nin), 17), -2048, 2047);
    return ref_sigmoid(x, outw);
  endfunction

  function automatic longint sat16(longint v);
    return clamp(v, -32768, 32767);
  endfunction

  // One backpropagation step. o, d: 10-bit output and target; h: hidden
  // outputs; nin[j][i]: normalized features seen by hidden neuron j;
  // wh, wo: weights, updated in place.
  task automatic ref_backprop(input longint o, input longint d, input longint h[2],
                              input longint nin[2][3], input int eta_h, input int eta_o,
                              inout longint wh[2][4], inout longint wo[3],
                              output longint e, output longint dlt_o, output longint dlt_h[2]);
    longint nh[3];
    longint wo_old[3];
    longint slope_o, slope_h;
    int sh_h = 15 + eta_h, sh_o = 15 + eta_o;
    e = o - d;
    slope_o = (o * (1024 - o)) / 1024;
    dlt_o   = fdiv(e * slope_o, 10);
    for (int j = 0; j < 2; j++) nh[j] = ref_norm(h[j]);
    nh[2] = 32767;
    wo_old = wo;
    for (int j = 0; j < 3; j++) wo[j] = sat16(wo[j] - fdiv(dlt_o * nh[j], sh_o));
    for (int j = 0; j < 2; j++) begin
      slope_h  = (h[j] * (256 - h[j])) / 64;
      dlt_h[j] = fdiv(fdiv(dlt_o * wo_old[j], 10) * slope_h, 10);
      for (int i = 0; i < 4; i++)
        wh[j][i] = sat16(wh[j][i] - fdiv(dlt_h[j] * ((i < 3) ? nin[j][i] : 32767), sh_h));
    end
  endtask

endpackage
