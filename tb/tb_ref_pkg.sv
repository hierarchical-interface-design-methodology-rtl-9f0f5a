// tb_ref_pkg: reference arithmetic for the testbenches. It restates the
// codec's number format (24-bit data, coefficients with 22 fraction bits,
// round half up then saturate) directly from real-valued formulas, without
// using the RTL package, so the models it feeds are independent of the RTL.
package tb_ref_pkg;

  localparam real RPI = 3.14159265358979323846;

  function automatic longint q(real x);            // real -> coefficient
    return longint'(x * 4194304.0);
  endfunction

  function automatic longint rs(longint a);        // round and saturate
    longint r;
    r = (a + 64'sd2097152) >>> 22;
    if (r > 64'sd8388607)  r = 64'sd8388607;
    if (r < -64'sd8388608) r = -64'sd8388608;
    return r;
  endfunction

  function automatic longint sx24(logic [23:0] v);   // sign-extend a bus word
    return longint'(signed'(v));
  endfunction

  function automatic longint rnd24();               // random sample, +-2^20
    return longint'($urandom_range(0, 2097151)) - 64'sd1048576;
  endfunction

endpackage
