// sram_6t_array: single-port synchronous storage array standing for a block
// of near-threshold 6T SRAM in the data memory.
//
// One access per cycle: a write stores wdata_i at addr_i; a read returns the
// stored word on rdata_o on the next clock edge (one-cycle latency), and
// rdata_o holds its value until the next read. The array is not reset, like
// an SRAM macro, so a word must be written before it is read.
//
// Near-threshold 6T cells suffer random bit-flips. The flip port reproduces
// them: when flip_en_i is high, flip_mask_i is XORed into the word at
// flip_addr_i (a 1 flips that bit), after any write to the same word in the
// same cycle. The protection logic around this array is what the design is
// about; the cell itself is a process part that this array only stands for.
module sram_6t_array #(
  parameter int unsigned WIDTH = 39,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_i,
  input  logic             req_i,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             flip_en_i,
  input  logic [AW-1:0]    flip_addr_i,
  input  logic [WIDTH-1:0] flip_mask_i
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] flip_base;

  // Word the flip applies to: the new data if it is written in this cycle.
  assign flip_base = (req_i && we_i && (addr_i == flip_addr_i)) ? wdata_i : mem[flip_addr_i];

  always_ff @(posedge clk_i) begin
    if (req_i && we_i) mem[addr_i] <= wdata_i;
    if (flip_en_i) mem[flip_addr_i] <= flip_base ^ flip_mask_i;
    if (req_i && !we_i) rdata_o <= mem[addr_i];
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk_i) begin
    if (req_i) assert (32'(addr_i) < DEPTH) else $error("sram_6t_array: address %0d out of range", addr_i);
    if (flip_en_i) assert (32'(flip_addr_i) < DEPTH) else $error("sram_6t_array: flip address out of range");
  end
`endif

endmodule
