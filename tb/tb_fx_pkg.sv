// tb_fx_pkg: reference arithmetic for the testbenches.
//
// Q8.8 fixed point worked out with plain integer arithmetic on int values,
// independently of the FXU's own bit slicing: the product is divided by 256
// with floor rounding (the same as dropping the low 8 bits), the quotient is
// truncated toward zero, and the square root is found by a linear search.
package tb_fx_pkg;
  function automatic int sx(input logic [15:0] v);
    return (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
  endfunction
  function automatic logic [15:0] q_add(input logic [15:0] a, input logic [15:0] b);
    return 16'(sx(a) + sx(b));
  endfunction
  function automatic logic [15:0] q_sub(input logic [15:0] a, input logic [15:0] b);
    return 16'(sx(a) - sx(b));
  endfunction
  function automatic logic [15:0] q_mul(input logic [15:0] a, input logic [15:0] b);
    longint p;
    longint f;
    p = longint'(sx(a)) * longint'(sx(b));
    f = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    return 16'(f);
  endfunction
  function automatic logic [15:0] q_div(input logic [15:0] a, input logic [15:0] b);
    if (b == 0) return 16'h7FFF;
    return 16'((sx(a) * 256) / sx(b));
  endfunction
  function automatic logic [15:0] q_sqrt(input logic [15:0] a);
    int r;
    if (sx(a) < 0) return 16'h0000;
    r = 0;
    while ((r + 1) * (r + 1) <= sx(a) * 256) r++;
    return 16'(r);
  endfunction
endpackage
