// tb_dwt_buffer: two DWT_buffer instances (10 % significant words, the
// default, i.e. addresses 0..51; and 100 %) receive the same traffic: a sparse
// window (large values at the significant addresses, near-zero values
// elsewhere), random single and double flips, then a read-back of every word.
// Expected: significant words are corrected (RD_CORRECTED) or flagged
// (RD_UNCORRECTABLE); a single flip in a non-significant word reads back as 0
// with RD_ZEROED; a double flip there escapes the parity check and reads back
// corrupted with RD_CLEAN. Also checks the one-cycle read latency.
module tb_dwt_buffer;
  import wbsn_mem_pkg::*;
  import tb_ref_pkg::*;

  localparam int D = 512;

  int checks = 0, failures = 0;
  int n_corr = 0, n_unc = 0, n_zero = 0, n_escape = 0;
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

  dwt_buffer dut_a (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv_a), .rdata_o(rd_a), .status_o(st_a),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );
  dwt_buffer #(.SIG_PERCENT(100)) dut_b (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv_b), .rdata_o(rd_b), .status_o(st_b),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  task automatic judge(input int sig_words, input bit count, input int a,
                       input logic [31:0] rd, input rd_status_e st);
    int n;
    checks++;
    if (a < sig_words) begin
      n = $countones(fmask[a]);
      if (n <= 1 && (rd !== val[a] || st !== (n == 1 ? RD_CORRECTED : RD_CLEAN))) begin
        failures++; $display("FAIL sig=%0d addr %0d: got %h/%s expected %h", sig_words, a, rd, st.name(), val[a]);
      end
      if (n == 2 && st !== RD_UNCORRECTABLE) begin
        failures++; $display("FAIL sig=%0d addr %0d: double error not flagged", sig_words, a);
      end
      if (count && n == 1) n_corr++;
      if (count && n == 2) n_unc++;
    end else begin
      n = $countones(fmask[a][32:0]);
      if (n == 1 && (rd !== '0 || st !== RD_ZEROED)) begin
        failures++; $display("FAIL addr %0d: parity error not zeroed (%h/%s)", a, rd, st.name());
      end
      if (n != 1 && (rd !== (val[a] ^ fmask[a][31:0]) || st !== RD_CLEAN)) begin
        failures++; $display("FAIL addr %0d: got %h/%s expected %h", a, rd, st.name(), val[a] ^ fmask[a][31:0]);
      end
      if (count && n == 1) n_zero++;
      if (count && n == 2) n_escape++;
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
      // low-frequency coefficients are large, the rest close to zero
      val[a]   = (a < 52) ? $urandom : 32'($signed(8'($urandom)));
      fmask[a] = '0;
      @(negedge clk); req = 1; we = 1; addr = 9'(a); wdata = val[a];
    end
    @(negedge clk); req = 0; we = 0;
    for (int a = 0; a < D; a++) begin
      int r, w;
      r = $urandom_range(9);
      w = (a < 52) ? 39 : 33;  // bits stored per word in the default buffer
      if (r < 3)       fmask[a] = bit_mask($urandom_range(w - 1));
      else if (r == 3) begin
        int b0, b1;
        b0 = $urandom_range(w - 1);
        b1 = (b0 + 1 + $urandom_range(w - 2)) % w;
        fmask[a] = bit_mask(b0) | bit_mask(b1);
      end
      if (fmask[a] != 0) begin
        @(negedge clk); flip_en = 1; flip_addr = 9'(a); flip_mask = fmask[a];
      end
    end
    @(negedge clk); flip_en = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); req = 1; we = 0; addr = 9'(a);
      checks++;
      if (rv_a) begin failures++; $display("FAIL rvalid early"); end
      @(negedge clk); req = 0;
      checks++;
      if (!rv_a || !rv_b) begin failures++; $display("FAIL no rvalid one cycle after read %0d", a); end
      judge(52, 1'b1, a, rd_a, st_a);
      judge(512, 1'b0, a, rd_b, st_b);
    end
    $display("corrected %0d, uncorrectable %0d, zeroed %0d, escaped parity %0d", n_corr, n_unc, n_zero, n_escape);
    checks++;
    if (n_corr == 0 || n_unc == 0 || n_zero == 0 || n_escape == 0) begin
      failures++; $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
