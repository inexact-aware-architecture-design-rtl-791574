// tb_extr_buffer: two Extr_buffer instances (11 protected MSBs, the default,
// and 26) receive the same traffic: random words written to all 512 entries,
// then random single and double flips over the whole stored word, then a
// read-back of every word. Expected per word: flips in the LSBs show in the
// data and are not reported; one flip among the protected MSBs or their check
// bits is corrected (RD_CORRECTED); two are reported as RD_UNCORRECTABLE.
// Also checks that read data arrives exactly one cycle after the request.
module tb_extr_buffer;
  import wbsn_mem_pkg::*;
  import tb_ref_pkg::*;

  localparam int D = 512;

  int checks = 0, failures = 0;
  int n_lsb = 0, n_corr = 0, n_unc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req = 0, we = 0, flip_en = 0;
  logic [8:0]  addr = '0, flip_addr = '0;
  logic [31:0] wdata = '0;
  logic [38:0] flip_mask = '0;
  logic        rv_a, rv_b;
  logic [31:0] rd_a, rd_b;
  rd_status_e  st_a, st_b;

  logic [31:0] val   [D];
  logic [38:0] fmask [D];

  extr_buffer dut_a (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv_a), .rdata_o(rd_a), .status_o(st_a),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );
  extr_buffer #(.PROT_MSB(26)) dut_b (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv_b), .rdata_o(rd_b), .status_o(st_b),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  // Compare one response against the model for a buffer protecting p MSBs.
  task automatic judge(input int p, input int a, input logic [31:0] rd, input rd_status_e st);
    int          cb, n_prot;
    logic [31:0] msb_m;
    logic [38:0] prot_m, m;
    cb     = ref_hbits(p) + 1;
    msb_m  = (p == 32) ? '1 : (((32'd1 << p) - 1) << (32 - p));
    prot_m = {7'((8'd1 << cb) - 1), msb_m};
    m      = fmask[a] & {7'((8'd1 << cb) - 1), 32'hFFFF_FFFF};
    n_prot = $countones(m & prot_m);
    checks++;
    if (n_prot <= 1) begin
      logic [31:0] exp_d;
      rd_status_e  exp_s;
      exp_d = val[a] ^ (m[31:0] & ~msb_m);
      exp_s = (n_prot == 1) ? RD_CORRECTED : RD_CLEAN;
      if (rd !== exp_d || st !== exp_s) begin
        failures++;
        $display("FAIL p=%0d addr %0d mask %h: got %h/%s expected %h/%s", p, a, fmask[a], rd, st.name(), exp_d, exp_s.name());
      end
    end else if (st !== RD_UNCORRECTABLE) begin
      failures++;
      $display("FAIL p=%0d addr %0d mask %h: double error not flagged (%s)", p, a, fmask[a], st.name());
    end
    if (p == 11) begin
      if (n_prot == 0 && (m[31:0] & ~msb_m) != 0) n_lsb++;
      if (n_prot == 1) n_corr++;
      if (n_prot == 2) n_unc++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
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
      @(negedge clk); req = 1; we = 1; addr = 9'(a); wdata = val[a];
    end
    @(negedge clk); req = 0; we = 0;
    // Bit-flips: about one word in three gets one flip, some get two.
    for (int a = 0; a < D; a++) begin
      int r;
      r = $urandom_range(9);
      if (r < 3)       fmask[a] = bit_mask($urandom_range(36));
      else if (r == 3) begin
        int b0, b1;
        b0 = $urandom_range(36);
        b1 = (b0 + 1 + $urandom_range(35)) % 37;
        fmask[a] = bit_mask(b0) | bit_mask(b1);
      end
      if (fmask[a] != 0) begin
        @(negedge clk); flip_en = 1; flip_addr = 9'(a); flip_mask = fmask[a];
      end
    end
    @(negedge clk); flip_en = 0;
    // Read back: the response must come exactly one cycle after the request.
    for (int a = 0; a < D; a++) begin
      @(negedge clk); req = 1; we = 0; addr = 9'(a);
      checks++;
      if (rv_a) begin failures++; $display("FAIL rvalid early"); end
      @(negedge clk); req = 0;
      checks++;
      if (!rv_a || !rv_b) begin failures++; $display("FAIL no rvalid one cycle after read %0d", a); end
      judge(11, a, rd_a, st_a);
      judge(26, a, rd_b, st_b);
    end
    $display("LSB errors passed through: %0d, MSB errors corrected: %0d, double errors flagged: %0d", n_lsb, n_corr, n_unc);
    checks++;
    if (n_lsb == 0 || n_corr == 0 || n_unc == 0) begin failures++; $display("FAIL a case was never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
