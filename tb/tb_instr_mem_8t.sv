// tb_instr_mem_8t: loads the whole 8192-word instruction memory through the
// load port with a pseudo-random image, then fetches every word back in
// address order and 2000 words at random, one fetch per cycle, checking each
// word arrives exactly one cycle after its fetch request.
module tb_instr_mem_8t;
  localparam int D = 8192;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        freq = 0, lwe = 0;
  logic [12:0] faddr = '0, laddr = '0;
  logic [31:0] frd, lwdata = '0;

  instr_mem_8t dut (
    .clk_i(clk), .fetch_req_i(freq), .fetch_addr_i(faddr), .fetch_rdata_o(frd),
    .load_we_i(lwe), .load_addr_i(laddr), .load_wdata_i(lwdata)
  );

  function automatic logic [31:0] image(input int a);
    return (32'(a) * 32'h9E37_79B9) ^ 32'h0BAD_F00D;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); lwe = 1; laddr = 13'(a); lwdata = image(a);
    end
    @(negedge clk); lwe = 0;
    // back-to-back fetches: word of request n is checked while request n+1 is issued
    prev = -1;
    for (int i = 0; i < D + 2000; i++) begin
      int a;
      a = (i < D) ? i : $urandom_range(D - 1);
      @(negedge clk);
      if (prev >= 0) begin
        checks++;
        if (frd !== image(prev)) begin failures++; $display("FAIL fetch %0d: %h", prev, frd); end
      end
      freq = 1; faddr = 13'(a); prev = a;
    end
    @(negedge clk); freq = 0;
    checks++;
    if (frd !== image(prev)) begin failures++; $display("FAIL last fetch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
