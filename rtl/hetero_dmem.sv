// hetero_dmem: the heterogeneous data memory seen by the processor.
//
// One 32-bit word-addressed port covers three regions, each protected as its
// data deserves:
//   0                       .. REST_WORDS-1   DM_Rest      full SECDED
//   REST_WORDS              .. +EXTR_WORDS-1  Extr_buffer  SECDED on PROT_MSB MSBs
//   REST_WORDS+EXTR_WORDS   .. +DWT_WORDS-1   DWT_buffer   SECDED on significant
//                                                          words, parity + zero
//                                                          substitution elsewhere
// The address is decoded combinationally and only the addressed region is
// accessed, so only its encoder/decoder switches. Read data and its status
// (rd_status_e) come back with rvalid_o one cycle after the request; a read
// or write outside every region does nothing and a read of it returns zero
// with addr_err_o set. The flip port uses the same address map and applies an
// error mask to the stored word (data in the low 32 bits, check bits above).
//
// Following the design: the split into these three regions and their
// protection. The address map, region sizes other than the 512-sample
// windows, word-only (no byte) accesses and the one-cycle timing are this
// implementation's choices.
module hetero_dmem
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned REST_WORDS  = 1024,
  parameter int unsigned EXTR_WORDS  = 512,
  parameter int unsigned DWT_WORDS   = 512,
  parameter int unsigned PROT_MSB    = 11,
  parameter int unsigned SIG_PERCENT = 10,
  localparam int unsigned TOTAL      = REST_WORDS + EXTR_WORDS + DWT_WORDS,
  localparam int unsigned AW         = $clog2(TOTAL),
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
  output logic              addr_err_o,
  input  logic              flip_en_i,
  input  logic [AW-1:0]     flip_addr_i,
  input  logic [FLIP_W-1:0] flip_mask_i
);

  localparam int unsigned EXTR_BASE = REST_WORDS;
  localparam int unsigned DWT_BASE  = REST_WORDS + EXTR_WORDS;
  localparam int unsigned REST_AW   = $clog2(REST_WORDS);
  localparam int unsigned EXTR_AW   = $clog2(EXTR_WORDS);
  localparam int unsigned DWT_AW    = $clog2(DWT_WORDS);

  function automatic dm_region_e decode(input logic [AW-1:0] a);
    if (32'(a) < EXTR_BASE)     return REG_REST;
    else if (32'(a) < DWT_BASE) return REG_EXTR;
    else if (32'(a) < TOTAL)    return REG_DWT;
    else                        return REG_NONE;
  endfunction

  dm_region_e        region, flip_region, rd_region_q;
  logic [AW-1:0]     extr_off, dwt_off, extr_flip_off, dwt_flip_off;
  logic              rest_rv, extr_rv, dwt_rv;
  logic [DATA_W-1:0] rest_rd, extr_rd, dwt_rd;
  rd_status_e        rest_st, extr_st, dwt_st;

  assign region        = decode(addr_i);
  assign flip_region   = decode(flip_addr_i);
  assign extr_off      = addr_i - AW'(EXTR_BASE);
  assign dwt_off       = addr_i - AW'(DWT_BASE);
  assign extr_flip_off = flip_addr_i - AW'(EXTR_BASE);
  assign dwt_flip_off  = flip_addr_i - AW'(DWT_BASE);

  dm_rest #(.DEPTH(REST_WORDS)) u_rest (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .req_i      (req_i && region == REG_REST),
    .we_i       (we_i),
    .addr_i     (REST_AW'(addr_i)),
    .wdata_i    (wdata_i),
    .rvalid_o   (rest_rv),
    .rdata_o    (rest_rd),
    .status_o   (rest_st),
    .flip_en_i  (flip_en_i && flip_region == REG_REST),
    .flip_addr_i(REST_AW'(flip_addr_i)),
    .flip_mask_i(flip_mask_i)
  );

  extr_buffer #(.DEPTH(EXTR_WORDS), .PROT_MSB(PROT_MSB)) u_extr (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .req_i      (req_i && region == REG_EXTR),
    .we_i       (we_i),
    .addr_i     (EXTR_AW'(extr_off)),
    .wdata_i    (wdata_i),
    .rvalid_o   (extr_rv),
    .rdata_o    (extr_rd),
    .status_o   (extr_st),
    .flip_en_i  (flip_en_i && flip_region == REG_EXTR),
    .flip_addr_i(EXTR_AW'(extr_flip_off)),
    .flip_mask_i(flip_mask_i)
  );

  dwt_buffer #(.DEPTH(DWT_WORDS), .SIG_PERCENT(SIG_PERCENT)) u_dwt (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .req_i      (req_i && region == REG_DWT),
    .we_i       (we_i),
    .addr_i     (DWT_AW'(dwt_off)),
    .wdata_i    (wdata_i),
    .rvalid_o   (dwt_rv),
    .rdata_o    (dwt_rd),
    .status_o   (dwt_st),
    .flip_en_i  (flip_en_i && flip_region == REG_DWT),
    .flip_addr_i(DWT_AW'(dwt_flip_off)),
    .flip_mask_i(flip_mask_i)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_o    <= 1'b0;
      rd_region_q <= REG_NONE;
    end else begin
      rvalid_o <= req_i && !we_i;
      if (req_i && !we_i) rd_region_q <= region;
    end
  end

  always_comb begin
    rdata_o    = '0;
    status_o   = RD_CLEAN;
    addr_err_o = 1'b0;
    unique case (rd_region_q)
      REG_REST: begin rdata_o = rest_rd; status_o = rest_st; end
      REG_EXTR: begin rdata_o = extr_rd; status_o = extr_st; end
      REG_DWT:  begin rdata_o = dwt_rd;  status_o = dwt_st;  end
      REG_NONE: addr_err_o = rvalid_o;
    endcase
  end

`ifndef SYNTHESIS
  // Each region answers exactly the reads decoded to it.
  a_one_responder: assert property (@(posedge clk_i) disable iff (!rst_ni)
    rvalid_o |-> (32'(rest_rv) + 32'(extr_rv) + 32'(dwt_rv) == ((rd_region_q == REG_NONE) ? 0 : 1)))
    else $error("hetero_dmem: read response from the wrong region");
`endif

endmodule
