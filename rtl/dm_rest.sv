// dm_rest: the non-buffer part of the data memory (control variables,
// scalars, addresses, stack), which must stay exact at any supply voltage.
//
// Every 32-bit word is stored with its 7 SECDED check bits (39 bits in the
// array). A read corrects any single flip (RD_CORRECTED) and flags a double
// flip (RD_UNCORRECTABLE); otherwise the status is RD_CLEAN.
//
// Timing: single port, one access per cycle; read data and status are valid
// with rvalid_o one cycle after the read request.
// Following the design: full SECDED protection of this region. Its size is
// not fixed by the design; 1024 words (4 KiB) is this implementation's choice.
module dm_rest
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned DEPTH   = 1024,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned CB     = secded_bits(DATA_W),
  localparam int unsigned FLIP_W = DATA_W + CB
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

  logic [CB-1:0]     wcheck;
  logic [FLIP_W-1:0] rword;
  logic              corr, uncorr;

  secded_enc #(.K(DATA_W)) u_enc (.data_i(wdata_i), .check_o(wcheck));

  sram_6t_array #(.WIDTH(FLIP_W), .DEPTH(DEPTH)) u_array (
    .clk_i      (clk_i),
    .req_i      (req_i),
    .we_i       (we_i),
    .addr_i     (addr_i),
    .wdata_i    ({wcheck, wdata_i}),
    .rdata_o    (rword),
    .flip_en_i  (flip_en_i),
    .flip_addr_i(flip_addr_i),
    .flip_mask_i(flip_mask_i)
  );

  secded_dec #(.K(DATA_W)) u_dec (
    .data_i         (rword[DATA_W-1:0]),
    .check_i        (rword[FLIP_W-1:DATA_W]),
    .data_o         (rdata_o),
    .corrected_o    (corr),
    .uncorrectable_o(uncorr)
  );

  always_comb begin
    if (uncorr)    status_o = RD_UNCORRECTABLE;
    else if (corr) status_o = RD_CORRECTED;
    else           status_o = RD_CLEAN;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_o <= 1'b0;
    else         rvalid_o <= req_i && !we_i;
  end

endmodule
