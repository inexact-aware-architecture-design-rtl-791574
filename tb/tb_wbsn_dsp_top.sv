// tb_wbsn_dsp_top: end-to-end run of the memory subsystem at its default
// sizes, as one processing window would use it.
//   1. Bootstrap: the loader copies the 8192-word image from an NVM model
//      (1-cycle answers); boot_done_o must rise after 1 + 8192 * 2 cycles.
//      Fetches attempted meanwhile must be ignored.
//   2. Instruction fetch: every word is fetched back-to-back and compared.
//   3. One window of data: 1024 control words into DM_Rest, a 512-sample
//      non-sparse Extr_buffer window and a sparse 512-word DWT_buffer window.
//   4. Near-threshold upsets: every stored bit flips with probability 0.22 %
//      (the 6T rate at 0.6 V used to evaluate the scheme), plus a few
//      deliberate single and double flips so every protection path is used.
//   5. Read-back of all 2048 words, back-to-back, each checked against a
//      model of what the word's region must return.
// Each mechanism is counted and must occur at least once: boot copy, gated
// fetch, SECDED correction in each of the three regions, uncorrectable
// detection, unprotected-LSB pass-through, parity zero substitution.
module tb_wbsn_dsp_top;
  import wbsn_mem_pkg::*;
  import tb_ref_pkg::*;

  localparam int IMW = 8192, REST = 1024, EXTR = 512, DWT = 512, SIG = 52, PMSB = 11;
  localparam int TOTAL = REST + EXTR + DWT;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  logic        nvm_req, nvm_rv, boot_done;
  logic [12:0] nvm_addr;
  logic [31:0] nvm_rd;
  int          nvm_serves;
  logic        if_req = 0;
  logic [12:0] if_addr = '0;
  logic [31:0] if_rd;
  logic        d_req = 0, d_we = 0, d_rv, d_aerr;
  logic [10:0] d_addr = '0;
  logic [31:0] d_wdata = '0, d_rd;
  rd_status_e  d_st;
  logic        flip_en = 0;
  logic [10:0] flip_addr = '0;
  logic [38:0] flip_mask = '0;

  wbsn_dsp_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .nvm_req_o(nvm_req), .nvm_addr_o(nvm_addr), .nvm_rvalid_i(nvm_rv), .nvm_rdata_i(nvm_rd),
    .boot_done_o(boot_done),
    .if_req_i(if_req), .if_addr_i(if_addr), .if_rdata_o(if_rd),
    .d_req_i(d_req), .d_we_i(d_we), .d_addr_i(d_addr), .d_wdata_i(d_wdata),
    .d_rvalid_o(d_rv), .d_rdata_o(d_rd), .d_status_o(d_st), .d_addr_err_o(d_aerr),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  nvm_model #(.AW(13), .LATENCY(1)) nvm (
    .clk_i(clk), .req_i(nvm_req), .addr_i(nvm_addr), .rvalid_o(nvm_rv), .rdata_o(nvm_rd),
    .serves_o(nvm_serves)
  );

  function automatic logic [31:0] image(input int a);
    return (32'(a) * 32'h9E37_79B9) ^ 32'h5EED_0001;
  endfunction

  // mechanism counters
  int m_boot = 0, m_gated = 0, m_rest_corr = 0, m_extr_corr = 0, m_dwt_corr = 0;
  int m_unc = 0, m_lsb = 0, m_zero = 0, m_escape = 0;

  logic [31:0] val   [TOTAL];
  logic [38:0] fmask [TOTAL];

  function automatic int stored_bits(input int a);
    if (a < REST)        return 39;
    if (a < REST + EXTR) return 32 + ref_hbits(PMSB) + 1;
    if (a < REST + EXTR + SIG) return 39;
    return 33;
  endfunction

  // Check one read response against the region's protection rules.
  task automatic judge(input int a);
    int          n;
    logic [31:0] exp_d;
    rd_status_e  exp_s;
    logic        care_d;
    care_d = 1'b1;
    if (a < REST || (a >= REST + EXTR && a < REST + EXTR + SIG)) begin
      n = $countones(fmask[a]);
      exp_d = val[a];
      exp_s = (n == 0) ? RD_CLEAN : (n == 1) ? RD_CORRECTED : RD_UNCORRECTABLE;
      if (n >= 2) care_d = 1'b0;
      if (n == 1 && a < REST) m_rest_corr++;
      if (n == 1 && a >= REST) m_dwt_corr++;
      if (n == 2) m_unc++;
    end else if (a < REST + EXTR) begin
      logic [31:0] msb_m;
      msb_m = ((32'd1 << PMSB) - 1) << (32 - PMSB);
      n = $countones(fmask[a][31:0] & msb_m) + $countones(fmask[a][38:32]);
      exp_d = val[a] ^ (fmask[a][31:0] & ~msb_m);
      exp_s = (n == 0) ? RD_CLEAN : (n == 1) ? RD_CORRECTED : RD_UNCORRECTABLE;
      if (n >= 2) care_d = 1'b0;
      if (n == 1) m_extr_corr++;
      if (n == 2) m_unc++;
      if (n <= 1 && (fmask[a][31:0] & ~msb_m) != 0) m_lsb++;
    end else begin
      n = $countones(fmask[a][32:0]);
      exp_d = (n % 2 == 1) ? '0 : val[a] ^ fmask[a][31:0];
      exp_s = (n % 2 == 1) ? RD_ZEROED : RD_CLEAN;
      if (n % 2 == 1) m_zero++;
      if (n != 0 && n % 2 == 0) m_escape++;
    end
    checks++;
    if (!d_rv || d_aerr || d_st !== exp_s || (care_d && d_rd !== exp_d)) begin
      failures++;
      $display("FAIL addr %0d mask %h: rv=%b data %h/%s expected %h/%s", a, fmask[a], d_rv, d_rd,
               d_st.name(), exp_d, exp_s.name());
    end
  endtask

  task automatic inject(input int a, input logic [38:0] m);
    @(negedge clk); flip_en = 1; flip_addr = 11'(a); flip_mask = m;
    @(negedge clk); flip_en = 0;
    fmask[a] ^= m;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, prev;
    logic [31:0] held;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 1. bootstrap, with fetches attempted before it ends ----
    cyc = 0;
    @(negedge clk);
    held = if_rd;
    while (!boot_done) begin
      if_req  = (cyc % 7 == 3);
      if_addr = 13'($urandom);
      @(posedge clk); #1;
      cyc++;
      if (if_req) begin
        m_gated++;
        checks++;
        if (if_rd !== held) begin failures++; $display("FAIL fetch served during boot"); end
      end
      @(negedge clk);
    end
    if_req = 0;
    m_boot = nvm_serves;
    $display("boot took %0d cycles", cyc + 1);
    checks++;
    if (cyc + 1 != 1 + IMW * 2) begin failures++; $display("FAIL boot took %0d cycles, expected %0d", cyc + 1, 1 + IMW * 2); end

    // ---- 2. fetch every instruction, one per cycle ----
    prev = -1;
    for (int a = 0; a < IMW; a++) begin
      @(negedge clk);
      if (prev >= 0) begin
        checks++;
        if (if_rd !== image(prev)) begin failures++; $display("FAIL fetch %0d: %h", prev, if_rd); end
      end
      if_req = 1; if_addr = 13'(a); prev = a;
    end
    @(negedge clk); if_req = 0;
    checks++;
    if (if_rd !== image(prev)) begin failures++; $display("FAIL last fetch"); end

    // ---- 3. one data window ----
    for (int a = 0; a < TOTAL; a++) begin
      if (a < REST)                  val[a] = $urandom;                          // control / scalars
      else if (a < REST + EXTR)      val[a] = 32'(700 + $urandom_range(500)) << 16; // RR samples, Q16
      else if (a < REST + EXTR + SIG) val[a] = $urandom;                         // low-frequency DWT
      else                           val[a] = 32'($signed(6'($urandom)));        // near-zero DWT
      fmask[a] = '0;
      @(negedge clk); d_req = 1; d_we = 1; d_addr = 11'(a); d_wdata = val[a];
    end
    @(negedge clk); d_req = 0; d_we = 0;

    // ---- 4. upsets: 0.22 % per stored bit, plus deliberate cases ----
    for (int a = 0; a < TOTAL; a++) begin
      logic [38:0] m;
      m = '0;
      for (int b = 0; b < stored_bits(a); b++) if ($urandom_range(9999) < 22) m[b] = 1'b1;
      if (m != 0) inject(a, m);
    end
    if (fmask[3] == 0)                inject(3, bit_mask(17));                  // DM_Rest single
    if (fmask[7] == 0)                inject(7, bit_mask(2) | bit_mask(30));    // DM_Rest double
    if (fmask[REST + 1] == 0)         inject(REST + 1, bit_mask(29));           // Extr MSB
    if (fmask[REST + 2] == 0)         inject(REST + 2, bit_mask(4));            // Extr LSB
    if (fmask[REST + EXTR] == 0)      inject(REST + EXTR, bit_mask(12));        // DWT significant
    if (fmask[REST + EXTR + 100] == 0) inject(REST + EXTR + 100, bit_mask(31)); // DWT non-significant

    // ---- 5. read everything back, one read per cycle ----
    prev = -1;
    for (int a = 0; a < TOTAL; a++) begin
      @(negedge clk);
      if (prev >= 0) judge(prev);
      d_req = 1; d_we = 0; d_addr = 11'(a); prev = a;
    end
    @(negedge clk); d_req = 0;
    judge(prev);

    $display("mechanisms: boot words %0d, gated fetches %0d, corrected rest/extr/dwt %0d/%0d/%0d,",
             m_boot, m_gated, m_rest_corr, m_extr_corr, m_dwt_corr);
    $display("            uncorrectable %0d, LSB pass-through %0d, zeroed %0d, parity escapes %0d",
             m_unc, m_lsb, m_zero, m_escape);
    checks++;
    if (m_boot != IMW || m_gated == 0 || m_rest_corr == 0 || m_extr_corr == 0 || m_dwt_corr == 0 ||
        m_unc == 0 || m_lsb == 0 || m_zero == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
