// tb_fx_pkg: reference arithmetic for the testbenches, written on 64-bit integers
// independently of the design's package. Values are Q4.20 (24-bit signed, 20 fraction
// bits) held in longint. Products are floored, sums saturate to the 24-bit range.
package tb_fx_pkg;

  localparam longint ONE = 64'sd1048576;

  function automatic longint sx24(input logic [23:0] v);
    return longint'($signed(v));
  endfunction

  function automatic longint rsat(input longint v);
    if (v > 64'sd8388607)  return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction

  // floor(a*b / 2^20), saturated
  function automatic longint rmul(input longint a, input longint b);
    return rsat((a * b) >>> 20);
  endfunction

  function automatic longint radd(input longint a, input longint b);
    return rsat(a + b);
  endfunction

  function automatic longint rsub(input longint a, input longint b);
    return rsat(a - b);
  endfunction

  // Piecewise-linear symmetric sigmoid: -1, x*3891/4096, +1
  function automatic longint ract(input longint x);
    if (x <= -ONE) return -ONE;
    if (x >= ONE)  return ONE;
    return (x * 3891) >>> 12;
  endfunction

  // Non-negative output sigmoid (f(x)+1)/2
  function automatic longint ractpos(input longint x);
    return (ract(x) + ONE) >>> 1;
  endfunction

  // Random Q4.20 value with magnitude below 2^(bits-20)
  function automatic longint rnd(input int bits);
    longint v;
    v = longint'({$urandom, $urandom}) & ((64'sd1 <<< bits) - 1);
    if ($urandom_range(1, 0) == 1) v = -v;
    return v;
  endfunction

endpackage
