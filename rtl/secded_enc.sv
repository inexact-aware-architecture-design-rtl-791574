// secded_enc: extended Hamming (SECDED) check-bit generator.
//
// For a K-bit data field it produces secded_bits(K) check bits. Data bit j
// sits at codeword position data_pos(j) (positions that are powers of two
// are reserved for check bits). Check bit i is the XOR of all data bits
// whose position has bit i set; the top check bit is the overall parity of
// data and Hamming bits, which lets the decoder tell single from double
// errors. Purely combinational; the masks are elaboration-time constants.
//
// The protected regions of the data memory are SECDED as the design intends;
// the code construction (classic extended Hamming) is this implementation's
// choice. For 32-bit words it needs 7 check bits: six Hamming bits give
// single error correction and the seventh adds double error detection.
module secded_enc
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned K = 32
) (
  input  logic [K-1:0]              data_i,
  output logic [secded_bits(K)-1:0] check_o
);

  localparam int unsigned R = hamming_bits(K);

  // Data bits covered by Hamming check bit i.
  function automatic logic [K-1:0] cover_mask(input int unsigned i);
    logic [K-1:0] m;
    for (int unsigned j = 0; j < K; j++) m[j] = ((data_pos(j) >> i) & 1) != 0;
    return m;
  endfunction

  logic [R-1:0] ham;

  for (genvar i = 0; i < R; i++) begin : g_ham
    localparam logic [K-1:0] MASK = cover_mask(i);
    assign ham[i] = ^(data_i & MASK);
  end

  assign check_o = {(^data_i) ^ (^ham), ham};

endmodule
