// instr_mem_8t: instruction memory built from 8T SRAM cells.
//
// A single instruction bit-flip can derail the program, so the whole memory
// uses cells that stay reliable at the low supply instead of relying on ECC;
// it therefore stores plain 32-bit words and has no flip port. It holds a
// full shadow copy of the application, written once at bootstrap through the
// load port and then read by the processor's fetch port.
//
// One single-port array (1RW): a load write and a fetch must not happen in
// the same cycle (asserted; the load wins). A fetch returns its word on
// fetch_rdata_o one clock after fetch_req_i; one fetch per cycle is allowed.
// Following the design: 8T cells, no ECC, full shadowing of the application.
// Its size (8192 words, 32 KiB) is this implementation's choice.
module instr_mem_8t #(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          fetch_req_i,
  input  logic [AW-1:0] fetch_addr_i,
  output logic [31:0]   fetch_rdata_o,
  input  logic          load_we_i,
  input  logic [AW-1:0] load_addr_i,
  input  logic [31:0]   load_wdata_i
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (load_we_i)        mem[load_addr_i] <= load_wdata_i;
    else if (fetch_req_i) fetch_rdata_o <= mem[fetch_addr_i];
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk_i) begin
    assert (!(load_we_i && fetch_req_i)) else $error("instr_mem_8t: fetch during a load write");
  end
`endif

endmodule
