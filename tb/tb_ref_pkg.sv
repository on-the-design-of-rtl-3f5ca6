// Reference arithmetic for the modulo 2^n +/- 1 testbenches.
//
// Plain integer models, independent of the circuits: residues are computed
// with 64-bit signed arithmetic and the % operator. Diminished-one helpers
// convert a value 0..2^n to its (field, zero-flag) pair and back.
package tb_ref_pkg;

  // |a + b| or |a - b| modulo 2^n + 1.
  function automatic longint unsigned ref_p1(longint a, longint b, bit sub, int n);
    longint m = (longint'(1) << n) + 1;
    longint r = sub ? (a - b) : (a + b);
    return longint'(((r % m) + m) % m);
  endfunction

  // |a + b| or |a - b| modulo 2^n - 1, zero returned as 0.
  function automatic longint unsigned ref_m1(longint a, longint b, bit sub, int n);
    longint m = (longint'(1) << n) - 1;
    longint r = sub ? (a - b) : (a + b);
    return longint'(((r % m) + m) % m);
  endfunction

  // Diminished-one field of a value 0..2^n (0 for the zero value).
  function automatic longint unsigned dim1_field(longint v);
    return (v == 0) ? 0 : longint'(v - 1);
  endfunction

  // Uniform random value in 0 .. lim-1 (lim below 2^32).
  function automatic longint unsigned rnd(longint unsigned lim);
    longint unsigned r = longint'($urandom);
    return r % lim;
  endfunction

endpackage
