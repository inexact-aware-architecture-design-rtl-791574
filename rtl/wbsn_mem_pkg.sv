// wbsn_mem_pkg: types, constants and code-size helpers shared by the
// significance-driven memory subsystem of the WBSN processing unit.
//
// The data memory stores 32-bit words. Regions that must never lose data use
// an extended Hamming (SECDED) code; secded_bits() gives how many check bits
// a K-bit field needs: the smallest r with 2**r >= K + r + 1 Hamming bits,
// plus one overall parity bit for double-error detection (7 bits for K=32,
// 5 bits for an 11-bit MSB field).
//
// Every read from the data memory returns a status next to the data, so that
// software or a monitor can see what the protection logic did with the word.
package wbsn_mem_pkg;

  localparam int unsigned DATA_W = 32;

  // Number of Hamming check bits (without the overall parity bit).
  function automatic int unsigned hamming_bits(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((2 ** r) < (k + r + 1)) r++;
    return r;
  endfunction

  // Check bits of an extended Hamming (SECDED) code over k data bits.
  function automatic int unsigned secded_bits(input int unsigned k);
    return hamming_bits(k) + 1;
  endfunction

  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  // Codeword position (1-based) of data bit j: positions that are powers of
  // two hold check bits, the others take the data bits in ascending order.
  function automatic int unsigned data_pos(input int unsigned j);
    int unsigned p;
    int unsigned n;
    p = 0;
    n = 0;
    while (1) begin
      p++;
      if (!is_pow2(p)) begin
        if (n == j) return p;
        n++;
      end
    end
  endfunction

  // What the protection logic did with a word that was read.
  typedef enum logic [1:0] {
    RD_CLEAN         = 2'd0, // no error seen (or none that this region checks)
    RD_CORRECTED     = 2'd1, // single-bit error corrected by SECDED
    RD_ZEROED        = 2'd2, // parity error in a non-significant word: expected value 0 returned
    RD_UNCORRECTABLE = 2'd3  // double-bit error detected by SECDED, data not trustworthy
  } rd_status_e;

  // Data-memory regions of the heterogeneous scheme.
  typedef enum logic [1:0] {
    REG_REST = 2'd0, // DM_Rest: control and scalar data, full SECDED
    REG_EXTR = 2'd1, // Extr_buffer: non-sparse, SECDED on the MSBs only
    REG_DWT  = 2'd2, // DWT_buffer: sparse, SECDED on significant words, parity elsewhere
    REG_NONE = 2'd3  // address outside every region
  } dm_region_e;

endpackage
