// boot_loader: copies the application image from the external non-volatile
// memory into the instruction memory after reset, then releases the core.
//
// Nothing is requested during reset. One cycle after reset release it
// requests NVM words 0 .. IMAGE_WORDS-1 one at a time: a
// one-cycle nvm_req_o with nvm_addr_o, then it waits (any number of cycles)
// for nvm_rvalid_i with the word on nvm_rdata_i, writes that word into the
// instruction memory at the same address (im_we_o for one cycle) and asks
// for the next. After the last word boot_done_o rises and stays high until
// the next reset; it is meant to release the processor from reset. With an
// NVM that answers L cycles after the request cycle, boot_done_o rises
// 1 + IMAGE_WORDS * (L + 1) cycles after reset release.
// Following the design: the image is held in NVM and shadowed in full into
// SRAM at bootstrap. The handshake and the one-word-at-a-time sequence are
// this implementation's choice.
module boot_loader #(
  parameter int unsigned IMAGE_WORDS = 8192,
  localparam int unsigned AW         = (IMAGE_WORDS > 1) ? $clog2(IMAGE_WORDS) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  output logic          nvm_req_o,
  output logic [AW-1:0] nvm_addr_o,
  input  logic          nvm_rvalid_i,
  input  logic [31:0]   nvm_rdata_i,
  output logic          im_we_o,
  output logic [AW-1:0] im_addr_o,
  output logic [31:0]   im_wdata_o,
  output logic          boot_done_o
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DONE} state_e;

  state_e        state;
  logic [AW-1:0] addr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state <= S_IDLE;
      addr  <= '0;
    end else begin
      unique case (state)
        S_IDLE: state <= S_REQ;
        S_REQ:  state <= S_WAIT;
        S_WAIT: if (nvm_rvalid_i) begin
                  if (32'(addr) == IMAGE_WORDS - 1) state <= S_DONE;
                  else begin
                    addr  <= addr + 1'b1;
                    state <= S_REQ;
                  end
                end
        S_DONE: ;
        default: state <= S_DONE;
      endcase
    end
  end

  assign nvm_req_o   = state == S_REQ;
  assign nvm_addr_o  = addr;
  assign im_we_o     = state == S_WAIT && nvm_rvalid_i;
  assign im_addr_o   = addr;
  assign im_wdata_o  = nvm_rdata_i;
  assign boot_done_o = state == S_DONE;

endmodule
