// tb_ref_pkg: reference model of the extended Hamming (SECDED) code used by
// the testbenches, written independently of the RTL: the Hamming check bits
// are the XOR of the codeword positions of all set data bits (data bits fill
// the positions that are not powers of two, in order), the top check bit is
// the parity of data and Hamming bits together.
package tb_ref_pkg;

  function automatic int ref_hbits(input int k);
    int r;
    r = 0;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Check bits of a k-bit field (k <= 64); bit ref_hbits(k) is the overall parity.
  function automatic logic [7:0] ref_check(input logic [63:0] d, input int k);
    int         r, pos, j;
    logic [7:0] syn, c;
    r   = ref_hbits(k);
    syn = '0;
    j   = 0;
    pos = 1;
    while (j < k) begin
      if ((pos & (pos - 1)) != 0) begin
        if (d[j]) syn ^= 8'(pos);
        j++;
      end
      pos++;
    end
    c    = syn;
    c[r] = (^(d & ((64'd1 << k) - 1))) ^ (^syn);
    return c;
  endfunction

  // Single-bit mask with bit b set.
  function automatic logic [38:0] bit_mask(input int b);
    return 39'd1 << b;
  endfunction

endpackage
