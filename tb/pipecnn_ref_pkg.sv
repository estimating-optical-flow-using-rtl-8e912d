// pipecnn_ref_pkg: reference arithmetic for the testbenches.
//
// adjust_ref computes what one lane must output for a finished window, written
// from the arithmetic definition rather than from the bit-level steps of the
// RTL: the biased sum s = acc + bias * 2**bias_shift, scaled by 1/10 when the
// leaky ReLU applies (integer division, truncating toward zero), is divided by
// 2**out_shift and rounded to the nearest integer with halves rounded up,
// i.e. floor(s / 2**out_shift + 1/2), then clamped to [-32767, 32767].
// The arithmetic follows the original fixed-point scheme, with the
// symmetric saturation limits of its description.
package pipecnn_ref_pkg;

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int adjust_ref(longint acc, int bias, int bias_shift, int out_shift,
                                    bit relu, int relu_div = 10);
    longint s, r;
    s = acc + longint'(bias) * (longint'(1) << bias_shift);
    if (relu && s < 0) s = s / longint'(relu_div);
    if (out_shift == 0) r = s;
    else r = floor_div(2 * s + (longint'(1) << out_shift), longint'(1) << (out_shift + 1));
    if (r > 32767)  r = 32767;
    if (r < -32767) r = -32767;
    return int'(r);
  endfunction

  // Whether adjust_ref clamps for these arguments.
  function automatic bit saturates(longint acc, int bias, int bias_shift, int out_shift,
                                   bit relu, int relu_div = 10);
    longint s, r;
    s = acc + longint'(bias) * (longint'(1) << bias_shift);
    if (relu && s < 0) s = s / longint'(relu_div);
    if (out_shift == 0) r = s;
    else r = floor_div(2 * s + (longint'(1) << out_shift), longint'(1) << (out_shift + 1));
    return (r > 32767) || (r < -32767);
  endfunction

endpackage
