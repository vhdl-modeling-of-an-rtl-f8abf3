// tb_nn_model_pkg: reference model of the 2-2-1 classifier used by the
// testbenches. Weights are indexed k = 2*neuron + input. Each neuron forms
// the exact integer sum of its two products, divides it by 128 rounding
// towards minus infinity, and clamps it to [-128, 127]; the network result
// is the output neuron's value plus 128.
package tb_nn_model_pkg;

  function automatic int floor_div128(input int s);
    int q;
    q = s / 128;                       // truncates towards zero
    if (s < 0 && q * 128 != s) q = q - 1;
    return q;
  endfunction

  function automatic int clamp8(input int v, output bit sat);
    sat = 0;
    if (v > 127)  begin sat = 1; return 127;  end
    if (v < -128) begin sat = 1; return -128; end
    return v;
  endfunction

  // Returns the 8-bit result (0..255); ovf tells whether any neuron saturated.
  function automatic int model(input int w[6], input int x1, input int x2,
                               output bit ovf);
    int h0, h1, o;
    bit s0, s1, s2;
    h0 = clamp8(floor_div128(w[0] * x1 + w[1] * x2), s0);
    h1 = clamp8(floor_div128(w[2] * x1 + w[3] * x2), s1);
    o  = clamp8(floor_div128(w[4] * h0 + w[5] * h1), s2);
    ovf = s0 | s1 | s2;
    return o + 128;
  endfunction

  function automatic int class_of(input int code);
    // six class codes 0, 51, 102, 153, 204, 255: nearest one
    int best, bestd, d;
    best = 0; bestd = 1000;
    for (int c = 0; c < 6; c++) begin
      d = code - 51 * c;
      if (d < 0) d = -d;
      if (d < bestd) begin bestd = d; best = c; end
    end
    return best;
  endfunction

  function automatic int s8(input logic [7:0] v);
    return int'(signed'(v));
  endfunction

endpackage
