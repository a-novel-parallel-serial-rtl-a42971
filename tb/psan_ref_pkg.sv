// psan_ref_pkg: behavioural reference model of a PSAN network, used by the
// testbenches to work out expected values independently of the RTL's
// sequencing. A layer output is computed directly as the full dot product
//   acc = sum_i W(layer, o, i) * v[i]     (v[0] = offset constant)
// followed by the saturating activation: keep the 12 MSBs of the ACC_W-bit
// accumulator (arithmetic shift right by ACC_W-12) and clip to [-128, 127].
package psan_ref_pkg;
  import psan_pkg::*;

  typedef int vec_t[$];

  function automatic int ref_af(input int acc, input int acc_w);
    int v;
    v = acc >>> (acc_w - 12);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // Raw dot product of output o of a layer for input vector v (offset included).
  function automatic int ref_dot(input int layer, input int o, input vec_t v);
    int acc;
    acc = 0;
    foreach (v[i]) acc += int'(psan_weight(layer, o, i)) * v[i];
    return acc;
  endfunction

  // Layer outputs (AF applied), without the offset of the next layer.
  function automatic vec_t ref_layer(input int layer, input int no, input int acc_w,
                                     input vec_t v);
    vec_t r;
    for (int o = 0; o < no; o++) r.push_back(ref_af(ref_dot(layer, o, v), acc_w));
    return r;
  endfunction

  // Whole 2-layer network: x holds the variable inputs.
  function automatic vec_t ref_nn(input vec_t x, input int n1, input int n2,
                                  input int acc1_w, input int acc2_w);
    vec_t v, h;
    v = x;
    v.push_front(int'(OFFSET_VAL));
    h = ref_layer(1, n1 - 1, acc1_w, v);
    h.push_front(int'(OFFSET_VAL));
    return ref_layer(2, n2, acc2_w, h);
  endfunction
endpackage
