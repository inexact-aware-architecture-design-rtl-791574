// secded_dec: extended Hamming (SECDED) checker and corrector.
//
// Recomputes the Hamming syndrome of a stored K-bit field and its check bits
// (same code as secded_enc) and the overall parity:
//   syndrome 0, parity even  -> no error;
//   parity odd               -> single error: the syndrome is the position of
//                               the flipped bit (0 = the overall parity bit,
//                               a power of two = a Hamming bit, otherwise a
//                               data bit, which is flipped back);
//   syndrome !=0, parity even-> double error, reported as uncorrectable.
// An odd-parity syndrome that points past the codeword is also reported as
// uncorrectable. Combinational, so correction costs no extra cycle.
module secded_dec
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned K = 32
) (
  input  logic [K-1:0]              data_i,
  input  logic [secded_bits(K)-1:0] check_i,
  output logic [K-1:0]              data_o,
  output logic                      corrected_o,
  output logic                      uncorrectable_o
);

  localparam int unsigned R = hamming_bits(K);
  localparam int unsigned N = K + R;  // Hamming codeword length

  function automatic logic [K-1:0] cover_mask(input int unsigned i);
    logic [K-1:0] m;
    for (int unsigned j = 0; j < K; j++) m[j] = ((data_pos(j) >> i) & 1) != 0;
    return m;
  endfunction

  logic [R-1:0] syndrome;
  logic         parity_odd;
  logic         single_err;
  logic [K-1:0] flip;

  for (genvar i = 0; i < R; i++) begin : g_syn
    localparam logic [K-1:0] MASK = cover_mask(i);
    assign syndrome[i] = check_i[i] ^ (^(data_i & MASK));
  end

  assign parity_odd = (^data_i) ^ (^check_i);
  // A syndrome can only point past the codeword when 2**R - 1 > N.
  if ((2 ** R) - 1 > N) begin : g_range
    assign single_err = parity_odd && (32'(syndrome) <= N);
  end else begin : g_full
    assign single_err = parity_odd;
  end

  for (genvar j = 0; j < K; j++) begin : g_fix
    localparam int unsigned POS = data_pos(j);
    assign flip[j] = single_err && (32'(syndrome) == POS);
  end

  assign data_o          = data_i ^ flip;
  assign corrected_o     = single_err;
  assign uncorrectable_o = (!parity_odd && (syndrome != '0)) || (parity_odd && !single_err);

endmodule
