// rf_pkg: types and constant functions shared by the register-file modules.
//
// The emulated multi-port register file (ERF) and the heterogeneous register
// file (HRF) are both built from banks of replicated simple dual-port RAMs,
// wrapped in shift-register multi-pumping. This package holds what they
// share: the endianness encoding of a processing-element port, the helpers
// that turn per-bank height arrays into global base addresses, and the bit
// and byte reordering used on big-endian ports.
//
// The three endianness modes follow the document's description: the register
// file stores everything little-endian, a big-endian element is connected
// with its bus bit-reversed, and byte order can be configured per element.
// Bit reversal over the whole bus and byte swapping are the concrete
// reorderings chosen here.
package rf_pkg;

  // Connection scheme of one processing-element port.
  typedef enum logic [1:0] {
    ENDIAN_LITTLE   = 2'd0,  // bus wired straight: bit i <-> bit i
    ENDIAN_BIG_BIT  = 2'd1,  // bus wired reversed: bit i <-> bit W-1-i
    ENDIAN_BIG_BYTE = 2'd2   // bytes wired reversed, bits inside a byte kept
  } endian_e;

  // Upper bound on the number of banks / ports, used to size parameter arrays.
  localparam int unsigned MAX_PORTS = 16;

  // ceil(log2(x)), at least 1, so that a one-entry space still has an address bit.
  function automatic int unsigned clog2_min1(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((1 << r) < x) r++;
    return (r == 0) ? 1 : r;
  endfunction

  // Global base address of bank k: the sum of the heights of banks 0..k-1.
  function automatic int unsigned bank_base(input int unsigned heights[MAX_PORTS],
                                            input int unsigned k);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < k; i++) s += heights[i];
    return s;
  endfunction

  // Largest entry among the first n.
  function automatic int unsigned max_of(input int unsigned vals[MAX_PORTS],
                                         input int unsigned n);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < n; i++) if (vals[i] > m) m = vals[i];
    return m;
  endfunction

endpackage
