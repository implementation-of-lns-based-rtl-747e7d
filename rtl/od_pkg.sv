// od_pkg: constants shared by the operand-decomposition logarithmic multiplier.
// OD_N is the operand width. The worked example and the simulation of the
// multiplier both use 8-bit operands, so 8 is the default everywhere. The
// logarithm derives its shift count by inverting the characteristic, which
// only equals N-1-k when N is a power of two; that is this design's
// restriction, checked in the modules that rely on it.
package od_pkg;
  localparam int unsigned OD_N = 8;

  // True when v is a power of two (and not zero).
  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction
endpackage
