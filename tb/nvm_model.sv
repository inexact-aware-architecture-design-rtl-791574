// nvm_model: behavioural model of the external non-volatile memory holding
// the application image, for testbenches only. A request (req_i with addr_i)
// made in cycle c is answered in cycle c + LATENCY with rvalid_o high for one
// cycle and the word image(addr) = addr * 0x9E3779B9 ^ SEED on rdata_o. One
// request at a time; serves_o counts answered requests.
module nvm_model #(
  parameter int unsigned AW      = 13,
  parameter int unsigned LATENCY = 1,
  parameter logic [31:0] SEED    = 32'h5EED_0001
) (
  input  logic          clk_i,
  input  logic          req_i,
  input  logic [AW-1:0] addr_i,
  output logic          rvalid_o,
  output logic [31:0]   rdata_o,
  output int            serves_o
);
  int            cnt = 0;
  logic [AW-1:0] a_q;

  initial begin
    rvalid_o = 1'b0;
    rdata_o  = '0;
    serves_o = 0;
  end

  function automatic logic [31:0] image(input logic [AW-1:0] a);
    return (32'(a) * 32'h9E37_79B9) ^ SEED;
  endfunction

  always @(posedge clk_i) begin
    rvalid_o <= 1'b0;
    if (req_i) begin
      a_q <= addr_i;
      if (LATENCY <= 1) begin
        rvalid_o <= 1'b1;
        rdata_o  <= image(addr_i);
        serves_o <= serves_o + 1;
      end else begin
        cnt <= int'(LATENCY) - 1;
      end
    end else if (cnt > 1) begin
      cnt <= cnt - 1;
    end else if (cnt == 1) begin
      rvalid_o <= 1'b1;
      rdata_o  <= image(a_q);
      serves_o <= serves_o + 1;
      cnt      <= 0;
    end
  end
endmodule
