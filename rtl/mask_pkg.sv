// mask_pkg - selects the masking scheme of the protected ChaCha20 cores.
// MASK_TI: threshold implementation, three Boolean shares per bit, masking
//          applied to whole functions (xor, full-adder sum and carry).
// MASK_LC: low-cost gate-level masking, two Boolean shares per bit, masked
//          AND gates with a delayed share, other gates built on them.
package mask_pkg;
  typedef enum logic {
    MASK_TI = 1'b0,
    MASK_LC = 1'b1
  } mask_e;

  function automatic int unsigned num_shares(mask_e m);
    return (m == MASK_TI) ? 3 : 2;
  endfunction
endpackage
