// tb_boot_loader: two loaders copy an image from NVM models into
// testbench-side instruction-memory arrays: a 16-word image from an NVM that
// answers in 3 cycles, and the default 8192-word image from an NVM that
// answers in 1 cycle. Checks every word lands at its own address with the
// NVM's data, that each address is requested once, that boot_done_o rises
// exactly 1 + IMAGE_WORDS * (LATENCY + 1) cycles after reset release and that no
// NVM request follows it.
module tb_boot_loader;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  // ---- small image, slow NVM ----
  logic        a_req, a_rv, a_we, a_done;
  logic [3:0]  a_addr, a_waddr;
  logic [31:0] a_rd, a_wd;
  int          a_serves;
  logic [31:0] a_im [16];

  boot_loader #(.IMAGE_WORDS(16)) dut_a (
    .clk_i(clk), .rst_ni(rst_n), .nvm_req_o(a_req), .nvm_addr_o(a_addr),
    .nvm_rvalid_i(a_rv), .nvm_rdata_i(a_rd), .im_we_o(a_we), .im_addr_o(a_waddr),
    .im_wdata_o(a_wd), .boot_done_o(a_done)
  );
  nvm_model #(.AW(4), .LATENCY(3)) nvm_a (
    .clk_i(clk), .req_i(a_req), .addr_i(a_addr), .rvalid_o(a_rv), .rdata_o(a_rd), .serves_o(a_serves)
  );

  // ---- default image, fast NVM ----
  logic        b_req, b_rv, b_we, b_done;
  logic [12:0] b_addr, b_waddr;
  logic [31:0] b_rd, b_wd;
  int          b_serves;
  logic [31:0] b_im [8192];

  boot_loader dut_b (
    .clk_i(clk), .rst_ni(rst_n), .nvm_req_o(b_req), .nvm_addr_o(b_addr),
    .nvm_rvalid_i(b_rv), .nvm_rdata_i(b_rd), .im_we_o(b_we), .im_addr_o(b_waddr),
    .im_wdata_o(b_wd), .boot_done_o(b_done)
  );
  nvm_model #(.AW(13), .LATENCY(1)) nvm_b (
    .clk_i(clk), .req_i(b_req), .addr_i(b_addr), .rvalid_o(b_rv), .rdata_o(b_rd), .serves_o(b_serves)
  );

  int cyc = 0, a_done_cyc = -1, b_done_cyc = -1, a_reqs = 0, b_reqs = 0;
  int a_next = 0, b_next = 0, late_req = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (a_done && a_done_cyc < 0) a_done_cyc <= cyc;
    if (b_done && b_done_cyc < 0) b_done_cyc <= cyc;
    if (a_req) a_reqs <= a_reqs + 1;
    if (b_req) b_reqs <= b_reqs + 1;
    if ((a_req && a_done) || (b_req && b_done)) late_req <= late_req + 1;
    if (a_we) begin
      a_im[a_waddr] <= a_wd;
      if (int'(a_waddr) != a_next) begin failures++; $display("FAIL small image out of order"); end
      a_next <= a_next + 1;
    end
    if (b_we) begin
      b_im[b_waddr] <= b_wd;
      if (int'(b_waddr) != b_next) begin failures++; $display("FAIL image out of order at %0d", b_waddr); end
      b_next <= b_next + 1;
    end
  end

  function automatic logic [31:0] image(input int a);
    return (32'(a) * 32'h9E37_79B9) ^ 32'h5EED_0001;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (a_done || b_done) begin failures++; $display("FAIL boot_done during reset"); end
    @(negedge clk) rst_n = 1;
    wait (a_done && b_done);
    repeat (20) @(posedge clk);
    #1;
    $display("small image done after %0d cycles, full image after %0d cycles", a_done_cyc, b_done_cyc);
    checks++;
    if (a_done_cyc != 1 + 16 * 4) begin failures++; $display("FAIL small boot took %0d cycles, expected 65", a_done_cyc); end
    checks++;
    if (b_done_cyc != 1 + 8192 * 2) begin failures++; $display("FAIL full boot took %0d cycles, expected 16385", b_done_cyc); end
    checks++;
    if (a_reqs != 16 || b_reqs != 8192 || a_serves != 16 || b_serves != 8192 || late_req != 0) begin
      failures++; $display("FAIL request counts %0d %0d %0d %0d %0d", a_reqs, b_reqs, a_serves, b_serves, late_req);
    end
    for (int a = 0; a < 16; a++) begin
      checks++;
      if (a_im[a] !== image(a)) begin failures++; $display("FAIL small word %0d", a); end
    end
    for (int a = 0; a < 8192; a++) begin
      checks++;
      if (b_im[a] !== image(a)) begin failures++; $display("FAIL word %0d: %h", a, b_im[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
