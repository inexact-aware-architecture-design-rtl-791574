// tb_dm_rest: fills all 1024 words of DM_Rest with random data, flips one bit
// in about a third of the words and two bits in a tenth, and reads everything
// back: every single flip must be corrected (RD_CORRECTED, exact data), every
// double flip flagged (RD_UNCORRECTABLE), clean words returned unchanged.
// Also checks the one-cycle read latency.
module tb_dm_rest;
  import wbsn_mem_pkg::*;
  import tb_ref_pkg::*;

  localparam int D = 1024;

  int checks = 0, failures = 0, n_corr = 0, n_unc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req = 0, we = 0, flip_en = 0;
  logic [9:0]  addr = '0, flip_addr = '0;
  logic [31:0] wdata = '0, rd;
  logic [38:0] flip_mask = '0;
  logic        rv;
  rd_status_e  st;

  logic [31:0] val   [D];
  logic [38:0] fmask [D];

  dm_rest dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv), .rdata_o(rd), .status_o(st),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      val[a]   = $urandom;
      fmask[a] = '0;
      @(negedge clk); req = 1; we = 1; addr = 10'(a); wdata = val[a];
    end
    @(negedge clk); req = 0; we = 0;
    for (int a = 0; a < D; a++) begin
      int r;
      r = $urandom_range(9);
      if (r < 3) fmask[a] = bit_mask($urandom_range(38));
      else if (r == 3) begin
        int b0, b1;
        b0 = $urandom_range(38);
        b1 = (b0 + 1 + $urandom_range(37)) % 39;
        fmask[a] = bit_mask(b0) | bit_mask(b1);
      end
      if (fmask[a] != 0) begin
        @(negedge clk); flip_en = 1; flip_addr = 10'(a); flip_mask = fmask[a];
      end
    end
    @(negedge clk); flip_en = 0;
    for (int a = 0; a < D; a++) begin
      int n;
      @(negedge clk); req = 1; we = 0; addr = 10'(a);
      @(negedge clk); req = 0;
      n = $countones(fmask[a]);
      checks++;
      if (!rv) begin failures++; $display("FAIL no rvalid one cycle after read %0d", a); end
      checks++;
      if (n <= 1 && (rd !== val[a] || st !== (n == 1 ? RD_CORRECTED : RD_CLEAN))) begin
        failures++; $display("FAIL addr %0d: got %h/%s expected %h", a, rd, st.name(), val[a]);
      end
      if (n == 2 && st !== RD_UNCORRECTABLE) begin
        failures++; $display("FAIL addr %0d: double error not flagged", a);
      end
      if (n == 1) n_corr++;
      if (n == 2) n_unc++;
    end
    $display("corrected %0d, uncorrectable %0d", n_corr, n_unc);
    checks++;
    if (n_corr == 0 || n_unc == 0) begin failures++; $display("FAIL a case was never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
