// dwt_buffer: the sparse buffer of the data memory (the wavelet-transform
// output window), protected word by word according to significance.
//
// Most DWT coefficients are close to zero; only the low-frequency outputs
// are large. The buffer is therefore split statically by address:
//   * significant words, addresses 0 .. SIG_WORDS-1 (the low-frequency
//     coefficients): 32 data bits + 7 SECDED bits; a single flip is corrected
//     (RD_CORRECTED), a double flip flagged (RD_UNCORRECTABLE);
//   * non-significant words, addresses SIG_WORDS .. DEPTH-1: 32 data bits +
//     one even-parity bit; when the parity fails the word is replaced by its
//     expected value, zero (RD_ZEROED), instead of a value with a flipped
//     high bit.
// The two parts are separate arrays (39 and 33 bits wide), as the two parts
// would be built with different word widths. SIG_WORDS is derived from
// SIG_PERCENT, the share of protected words, rounded up.
//
// Timing: single port, one access per cycle; read data and status are valid
// with rvalid_o one cycle after the read request.
// Following the design: 512 words, SECDED on significant words, one parity
// bit and substitution by zero elsewhere, 10 % significant words (evaluated
// points 5..100 %). Placing the significant words at the low addresses
// (where a DWT stores its approximation coefficients) is this
// implementation's choice, as are the code construction and the timing.
module dwt_buffer
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned DEPTH       = 512,
  parameter int unsigned SIG_PERCENT = 10,
  localparam int unsigned AW         = $clog2(DEPTH),
  localparam int unsigned FLIP_W     = DATA_W + secded_bits(DATA_W)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              req_i,
  input  logic              we_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              rvalid_o,
  output logic [DATA_W-1:0] rdata_o,
  output rd_status_e        status_o,
  input  logic              flip_en_i,
  input  logic [AW-1:0]     flip_addr_i,
  input  logic [FLIP_W-1:0] flip_mask_i
);

  localparam int unsigned SIG_WORDS = (DEPTH * SIG_PERCENT + 99) / 100;
  localparam int unsigned NS_WORDS  = DEPTH - SIG_WORDS;
  localparam int unsigned CB        = secded_bits(DATA_W);
  localparam int unsigned SIG_AW    = (SIG_WORDS > 1) ? $clog2(SIG_WORDS) : 1;
  localparam int unsigned NS_AW     = (NS_WORDS > 1) ? $clog2(NS_WORDS) : 1;

  logic              is_sig, flip_sig, rd_sig_q;
  logic [CB-1:0]     wcheck;
  logic [FLIP_W-1:0] sig_word;
  logic [DATA_W-1:0] sig_data;
  logic              corr, uncorr;
  logic [DATA_W:0]   ns_word;
  logic              ns_perr;

  assign is_sig   = 32'(addr_i) < SIG_WORDS;
  assign flip_sig = 32'(flip_addr_i) < SIG_WORDS;

  // ---- significant words: SECDED ----
  secded_enc #(.K(DATA_W)) u_enc (.data_i(wdata_i), .check_o(wcheck));

  sram_6t_array #(.WIDTH(FLIP_W), .DEPTH(SIG_WORDS)) u_sig_array (
    .clk_i      (clk_i),
    .req_i      (req_i && is_sig),
    .we_i       (we_i),
    .addr_i     (SIG_AW'(addr_i)),
    .wdata_i    ({wcheck, wdata_i}),
    .rdata_o    (sig_word),
    .flip_en_i  (flip_en_i && flip_sig),
    .flip_addr_i(SIG_AW'(flip_addr_i)),
    .flip_mask_i(flip_mask_i)
  );

  secded_dec #(.K(DATA_W)) u_dec (
    .data_i         (sig_word[DATA_W-1:0]),
    .check_i        (sig_word[FLIP_W-1:DATA_W]),
    .data_o         (sig_data),
    .corrected_o    (corr),
    .uncorrectable_o(uncorr)
  );

  // ---- non-significant words: parity, zero on error ----
  if (NS_WORDS > 0) begin : g_ns
    logic [AW-1:0] ns_addr, ns_flip_addr;
    assign ns_addr      = addr_i - AW'(SIG_WORDS);
    assign ns_flip_addr = flip_addr_i - AW'(SIG_WORDS);

    sram_6t_array #(.WIDTH(DATA_W + 1), .DEPTH(NS_WORDS)) u_ns_array (
      .clk_i      (clk_i),
      .req_i      (req_i && !is_sig),
      .we_i       (we_i),
      .addr_i     (NS_AW'(ns_addr)),
      .wdata_i    ({^wdata_i, wdata_i}),
      .rdata_o    (ns_word),
      .flip_en_i  (flip_en_i && !flip_sig),
      .flip_addr_i(NS_AW'(ns_flip_addr)),
      .flip_mask_i(flip_mask_i[DATA_W:0])
    );
    assign ns_perr = ^ns_word;
  end else begin : g_no_ns
    assign ns_word = '0;
    assign ns_perr = 1'b0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_o <= 1'b0;
      rd_sig_q <= 1'b0;
    end else begin
      rvalid_o <= req_i && !we_i;
      if (req_i && !we_i) rd_sig_q <= is_sig;
    end
  end

  always_comb begin
    if (rd_sig_q) begin
      rdata_o = sig_data;
      if (uncorr)    status_o = RD_UNCORRECTABLE;
      else if (corr) status_o = RD_CORRECTED;
      else           status_o = RD_CLEAN;
    end else if (ns_perr) begin
      rdata_o  = '0;
      status_o = RD_ZEROED;
    end else begin
      rdata_o  = ns_word[DATA_W-1:0];
      status_o = RD_CLEAN;
    end
  end

  initial begin
    assert (SIG_PERCENT >= 1 && SIG_PERCENT <= 100) else $fatal(1, "dwt_buffer: SIG_PERCENT must be 1..100");
  end

endmodule
