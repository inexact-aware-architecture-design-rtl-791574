// extr_buffer: the non-sparse buffer of the data memory (the extrapolated,
// uniformly resampled RR-interval window), protected bit by bit.
//
// Its values are spread over the whole range, so every word matters equally
// and protection is by bit significance: the PROT_MSB most significant bits
// of each 32-bit word are covered by a SECDED code, stored next to the word;
// the remaining least significant bits are stored with no protection at all.
// On a read, a single flip among the protected MSBs or their check bits is
// corrected (status RD_CORRECTED), a double flip there is flagged
// (RD_UNCORRECTABLE), and flips in the LSBs pass through unseen (RD_CLEAN).
//
// Stored word: {check bits of the MSB field, 32 data bits}; with the default
// PROT_MSB = 11 that is 5 + 32 = 37 bits. Only the low STORE_W bits of the
// 39-bit flip mask reach the array.
//
// Timing: single port, one access per cycle; read data and status are valid
// with rvalid_o one cycle after the read request. Writes take one cycle.
// Following the design: 512-word window, 32-bit words, 11 protected MSBs
// (one of the evaluated points 11, 26, 32) with SECDED on the MSB field. The
// code construction, latency and port shape are this implementation's choice.
module extr_buffer
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned PROT_MSB = 11,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned FLIP_W  = DATA_W + secded_bits(DATA_W)
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

  localparam int unsigned CB      = secded_bits(PROT_MSB);
  localparam int unsigned STORE_W = DATA_W + CB;
  localparam int unsigned LSB_W   = DATA_W - PROT_MSB;

  logic [CB-1:0]       wcheck;
  logic [STORE_W-1:0]  rword;
  logic [PROT_MSB-1:0] msb_fixed;
  logic                corr, uncorr;

  secded_enc #(.K(PROT_MSB)) u_enc (
    .data_i (wdata_i[DATA_W-1 -: PROT_MSB]),
    .check_o(wcheck)
  );

  sram_6t_array #(.WIDTH(STORE_W), .DEPTH(DEPTH)) u_array (
    .clk_i      (clk_i),
    .req_i      (req_i),
    .we_i       (we_i),
    .addr_i     (addr_i),
    .wdata_i    ({wcheck, wdata_i}),
    .rdata_o    (rword),
    .flip_en_i  (flip_en_i),
    .flip_addr_i(flip_addr_i),
    .flip_mask_i(flip_mask_i[STORE_W-1:0])
  );

  secded_dec #(.K(PROT_MSB)) u_dec (
    .data_i         (rword[DATA_W-1 -: PROT_MSB]),
    .check_i        (rword[STORE_W-1 -: CB]),
    .data_o         (msb_fixed),
    .corrected_o    (corr),
    .uncorrectable_o(uncorr)
  );

  // MSBs come back corrected; LSBs exactly as the array returns them.
  if (LSB_W > 0) begin : g_lsb
    assign rdata_o = {msb_fixed, rword[LSB_W-1:0]};
  end else begin : g_no_lsb
    assign rdata_o = msb_fixed;
  end

  always_comb begin
    if (uncorr)    status_o = RD_UNCORRECTABLE;
    else if (corr) status_o = RD_CORRECTED;
    else           status_o = RD_CLEAN;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_o <= 1'b0;
    else         rvalid_o <= req_i && !we_i;
  end

  initial begin
    assert (PROT_MSB >= 1 && PROT_MSB <= DATA_W) else $fatal(1, "extr_buffer: PROT_MSB must be 1..32");
  end

endmodule
