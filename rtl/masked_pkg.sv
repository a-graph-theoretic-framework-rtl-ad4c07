// Package masked_pkg: types shared by the first-order masked gadgets.
//
// A masked bit is a two-share encoding share_t: bit 0 is share 0, bit 1 is
// share 1, and the unmasked value is their XOR. A primary input x with mask
// m is encoded as {x ^ m, m}.
package masked_pkg;

  typedef logic [1:0] share_t;

  // Unmasked value of one encoding.
  function automatic logic unmask(share_t s);
    return s[0] ^ s[1];
  endfunction

endpackage
