// wbsn_dsp_top: memory subsystem of an ultra-low-voltage wireless body sensor
// node processor, with significance-driven memory protection.
//
// The processing unit is a small processor core (not part of this RTL) with
// an instruction memory and a data memory. To run at a near-threshold supply:
//   * the instruction memory is built from 8T cells (instr_mem_8t), loaded
//     from the external NVM at bootstrap by boot_loader;
//   * the data memory uses 6T cells with protection matched to the data
//     (hetero_dmem): full SECDED for control data (DM_Rest), SECDED on the
//     MSBs of the non-sparse Extr_buffer, SECDED on the significant words and
//     parity + zero substitution on the rest of the sparse DWT_buffer.
// The core's ports are brought out: it must be held in reset until
// boot_done_o is high. Its instruction fetch port (if_*) returns a word one
// cycle after if_req_i; fetches before boot_done_o are ignored. Its data port
// (d_*) is a word-addressed single-port bus with one-cycle read latency, read
// status d_status_o and address error d_addr_err_o. The flip_* port applies
// error masks to the data memory (same address map as d_addr_i) to reproduce
// the bit-flips of 6T cells at low voltage; tie flip_en_i low in a real chip.
//
// Following the design: the blocks, their protection and the default
// configuration (11 protected MSBs, 10 % significant DWT words, 512-word
// windows). Memory sizes of IM and DM_Rest, the address map and all timing
// are this implementation's choices.
module wbsn_dsp_top
  import wbsn_mem_pkg::*;
#(
  parameter int unsigned IM_WORDS    = 8192,
  parameter int unsigned REST_WORDS  = 1024,
  parameter int unsigned EXTR_WORDS  = 512,
  parameter int unsigned DWT_WORDS   = 512,
  parameter int unsigned PROT_MSB    = 11,
  parameter int unsigned SIG_PERCENT = 10,
  localparam int unsigned IM_AW      = $clog2(IM_WORDS),
  localparam int unsigned DM_AW      = $clog2(REST_WORDS + EXTR_WORDS + DWT_WORDS),
  localparam int unsigned FLIP_W     = DATA_W + secded_bits(DATA_W)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // external non-volatile memory (application image)
  output logic              nvm_req_o,
  output logic [IM_AW-1:0]  nvm_addr_o,
  input  logic              nvm_rvalid_i,
  input  logic [31:0]       nvm_rdata_i,
  // processor reset release
  output logic              boot_done_o,
  // processor instruction fetch
  input  logic              if_req_i,
  input  logic [IM_AW-1:0]  if_addr_i,
  output logic [31:0]       if_rdata_o,
  // processor data bus
  input  logic              d_req_i,
  input  logic              d_we_i,
  input  logic [DM_AW-1:0]  d_addr_i,
  input  logic [DATA_W-1:0] d_wdata_i,
  output logic              d_rvalid_o,
  output logic [DATA_W-1:0] d_rdata_o,
  output rd_status_e        d_status_o,
  output logic              d_addr_err_o,
  // 6T bit-flip injection into the data memory
  input  logic              flip_en_i,
  input  logic [DM_AW-1:0]  flip_addr_i,
  input  logic [FLIP_W-1:0] flip_mask_i
);

  logic             im_we;
  logic [IM_AW-1:0] im_addr;
  logic [31:0]      im_wdata;

  boot_loader #(.IMAGE_WORDS(IM_WORDS)) u_boot (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .nvm_req_o   (nvm_req_o),
    .nvm_addr_o  (nvm_addr_o),
    .nvm_rvalid_i(nvm_rvalid_i),
    .nvm_rdata_i (nvm_rdata_i),
    .im_we_o     (im_we),
    .im_addr_o   (im_addr),
    .im_wdata_o  (im_wdata),
    .boot_done_o (boot_done_o)
  );

  instr_mem_8t #(.DEPTH(IM_WORDS)) u_im (
    .clk_i        (clk_i),
    .fetch_req_i  (if_req_i && boot_done_o),
    .fetch_addr_i (if_addr_i),
    .fetch_rdata_o(if_rdata_o),
    .load_we_i    (im_we),
    .load_addr_i  (im_addr),
    .load_wdata_i (im_wdata)
  );

  hetero_dmem #(
    .REST_WORDS (REST_WORDS),
    .EXTR_WORDS (EXTR_WORDS),
    .DWT_WORDS  (DWT_WORDS),
    .PROT_MSB   (PROT_MSB),
    .SIG_PERCENT(SIG_PERCENT)
  ) u_dm (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .req_i      (d_req_i),
    .we_i       (d_we_i),
    .addr_i     (d_addr_i),
    .wdata_i    (d_wdata_i),
    .rvalid_o   (d_rvalid_o),
    .rdata_o    (d_rdata_o),
    .status_o   (d_status_o),
    .addr_err_o (d_addr_err_o),
    .flip_en_i  (flip_en_i),
    .flip_addr_i(flip_addr_i),
    .flip_mask_i(flip_mask_i)
  );

endmodule
