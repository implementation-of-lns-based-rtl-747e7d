// tb_ref_pkg: reference models for the testbenches, written with integer
// arithmetic and independent of the RTL structure.
//   mitchell_ref(a, b, n): Mitchell's product of two n-bit operands. With
//     a = 2**k1 (1 + f1), b = 2**k2 (1 + f2), the mantissas kept to n-1 bits:
//     f1 + f2 < 1  ->  2**(k1+k2)   * (1 + f1 + f2)
//     f1 + f2 >= 1 ->  2**(k1+k2+1) * (f1 + f2)
//     truncated to an integer; 0 when either operand is 0.
//   od_ref(x, y, n): mitchell_ref(x|y, x&y) + mitchell_ref(~x&y, x&~y).
package tb_ref_pkg;
  function automatic int msb_pos(input longint unsigned v);
    int p = -1;
    for (int i = 0; i < 64; i++) if (((v >> i) & 1) != 0) p = i;
    return p;
  endfunction

  function automatic longint unsigned mitchell_ref(input longint unsigned a,
                                                   input longint unsigned b,
                                                   input int n);
    int k1, k2, k;
    longint unsigned f1, f2, fs, mant, one;
    if (a == 0 || b == 0) return 0;
    one = longint'(1) << (n - 1);
    k1 = msb_pos(a);
    k2 = msb_pos(b);
    f1 = ((a << (n - 1 - k1)) & (one - 1));
    f2 = ((b << (n - 1 - k2)) & (one - 1));
    fs = f1 + f2;
    k  = k1 + k2;
    if (fs >= one) begin
      mant = fs;          // value (f1 + f2), scaled by 2**(n-1)
      k    = k + 1;
    end else begin
      mant = one + fs;    // value (1 + f1 + f2), scaled by 2**(n-1)
    end
    return (mant << k) >> (n - 1);
  endfunction

  function automatic longint unsigned od_ref(input longint unsigned x,
                                             input longint unsigned y,
                                             input int n);
    longint unsigned m = (longint'(1) << n) - 1;
    return mitchell_ref((x | y) & m, (x & y) & m, n) +
           mitchell_ref((~x & y) & m, (x & ~y) & m, n);
  endfunction
endpackage
