// tb_secded_dec: checks secded_dec for K=32 and K=11. Codewords come from the
// reference model. Every single-bit flip (data, Hamming or parity bit) must be
// corrected and flagged as corrected; random double flips must be flagged as
// uncorrectable; clean words must pass unchanged with no flag.
module tb_secded_dec;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_corr = 0, n_dbl = 0;

  logic [31:0] d32, q32;
  logic [6:0]  c32;
  logic        corr32, unc32;
  logic [10:0] d11, q11;
  logic [4:0]  c11;
  logic        corr11, unc11;

  secded_dec #(.K(32)) dut32 (.data_i(d32), .check_i(c32), .data_o(q32),
                              .corrected_o(corr32), .uncorrectable_o(unc32));
  secded_dec #(.K(11)) dut11 (.data_i(d11), .check_i(c11), .data_o(q11),
                              .corrected_o(corr11), .uncorrectable_o(unc11));

  // Apply a flip mask over {check, data} and compare with the expectation.
  task automatic run32(input logic [31:0] v, input logic [38:0] fm, input int nflips);
    logic [38:0] cw;
    cw = {ref_check(64'(v), 32)[6:0], v} ^ fm;
    d32 = cw[31:0];
    c32 = cw[38:32];
    #1;
    checks++;
    if (nflips == 0 && (q32 !== v || corr32 || unc32)) begin
      failures++; $display("FAIL K=32 clean v=%h q=%h c=%b u=%b", v, q32, corr32, unc32);
    end
    if (nflips == 1 && (q32 !== v || !corr32 || unc32)) begin
      failures++; $display("FAIL K=32 single v=%h mask=%h q=%h c=%b u=%b", v, fm, q32, corr32, unc32);
    end
    if (nflips == 2 && (!unc32 || corr32)) begin
      failures++; $display("FAIL K=32 double v=%h mask=%h c=%b u=%b", v, fm, corr32, unc32);
    end
  endtask

  task automatic run11(input logic [10:0] v, input logic [15:0] fm, input int nflips);
    logic [15:0] cw;
    cw = {ref_check(64'(v), 11)[4:0], v} ^ fm;
    d11 = cw[10:0];
    c11 = cw[15:11];
    #1;
    checks++;
    if (nflips == 0 && (q11 !== v || corr11 || unc11)) begin
      failures++; $display("FAIL K=11 clean v=%h", v);
    end
    if (nflips == 1 && (q11 !== v || !corr11 || unc11)) begin
      failures++; $display("FAIL K=11 single v=%h mask=%h q=%h", v, fm, q11);
    end
    if (nflips == 2 && (!unc11 || corr11)) begin
      failures++; $display("FAIL K=11 double v=%h mask=%h", v, fm);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      logic [31:0] v;
      logic [10:0] w;
      v = $urandom;
      w = 11'($urandom);
      run32(v, '0, 0);
      run11(w, '0, 0);
      for (int b = 0; b < 39; b++) begin run32(v, bit_mask(b), 1); n_corr++; end
      for (int b = 0; b < 16; b++) run11(w, 16'(bit_mask(b)), 1);
      for (int k = 0; k < 20; k++) begin
        int a, b;
        a = $urandom_range(38);
        b = (a + 1 + $urandom_range(37)) % 39;
        run32(v, bit_mask(a) | bit_mask(b), 2);
        a = $urandom_range(15);
        b = (a + 1 + $urandom_range(14)) % 16;
        run11(w, 16'(bit_mask(a) | bit_mask(b)), 2);
        n_dbl++;
      end
    end
    $display("single flips corrected: %0d, double flips detected: %0d", n_corr, n_dbl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
