// tb_protection_sweep: runs the evaluated protection points side by side.
// Nine data memories are built, one per combination of 11 / 26 / 32
// protected Extr_buffer MSBs and 5 / 10 / 15 % significant DWT_buffer words.
// All nine receive the same traffic: 25 analysis windows, each a non-sparse
// 512-sample Extr_buffer window and a sparse 512-word DWT_buffer window (52
// large low-frequency coefficients, the rest within +-32), then the same
// random bit-flips, then a full read-back. Flips follow the per-bit rates of
// 6T cells at 0.65 V (0.07 %) and 0.6 V (0.22 %), with at most one flip per
// word as in the evaluation, and hit only data bits so that every
// configuration sees the same error masks.
// Every read is checked against the rule of its configuration. The summed
// absolute error left in each buffer is printed per configuration and must
// not grow when protection is added: more MSBs for the Extr_buffer, more
// significant words for the DWT_buffer.
module tb_protection_sweep;
  import wbsn_mem_pkg::*;

  localparam int NP = 3, NS = 3, WIN = 25, EXTR_BASE = 1024, DWT_BASE = 1536;
  localparam int PM [NP] = '{11, 26, 32};
  localparam int SP [NS] = '{5, 10, 15};
  localparam int SIGW [NS] = '{26, 52, 77};  // ceil(512 * SP / 100)

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic        req = 0, we = 0;
  logic [10:0] addr = '0;
  logic [31:0] wdata = '0;
  logic        flip_en = 0;
  logic [10:0] flip_addr = '0;
  logic [38:0] flip_mask = '0;

  logic [31:0] rd [NP][NS];
  rd_status_e  st [NP][NS];
  logic        rv [NP][NS];

  for (genvar i = 0; i < NP; i++) begin : g_p
    for (genvar j = 0; j < NS; j++) begin : g_s
      logic aerr;
      hetero_dmem #(.PROT_MSB(PM[i]), .SIG_PERCENT(SP[j])) dm (
        .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
        .rvalid_o(rv[i][j]), .rdata_o(rd[i][j]), .status_o(st[i][j]), .addr_err_o(aerr),
        .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
      );
    end
  end

  logic [31:0] val  [1024];
  int          fbit [1024];   // flipped data bit, -1 for none
  longint      err_extr [2][NP][NS];
  longint      err_dwt  [2][NP][NS];
  int          n_flips [2];

  function automatic longint absdiff(input logic [31:0] a, input logic [31:0] b);
    longint d;
    d = longint'($signed(a)) - longint'($signed(b));
    return (d < 0) ? -d : d;
  endfunction

  task automatic judge(input int rate, input int k);
    for (int i = 0; i < NP; i++) begin
      for (int j = 0; j < NS; j++) begin
        logic [31:0] exp_d;
        rd_status_e  exp_s;
        if (k < 512) begin
          if (fbit[k] < 0)               begin exp_d = val[k]; exp_s = RD_CLEAN; end
          else if (fbit[k] >= 32 - PM[i]) begin exp_d = val[k]; exp_s = RD_CORRECTED; end
          else begin exp_d = val[k] ^ (32'd1 << fbit[k]); exp_s = RD_CLEAN; end
          err_extr[rate][i][j] += absdiff(rd[i][j], val[k]);
        end else begin
          if (fbit[k] < 0)                  begin exp_d = val[k]; exp_s = RD_CLEAN; end
          else if (k - 512 < SIGW[j])       begin exp_d = val[k]; exp_s = RD_CORRECTED; end
          else                              begin exp_d = '0;     exp_s = RD_ZEROED; end
          err_dwt[rate][i][j] += absdiff(rd[i][j], val[k]);
        end
        checks++;
        if (!rv[i][j] || rd[i][j] !== exp_d || st[i][j] !== exp_s) begin
          failures++;
          if (failures < 10)
            $display("FAIL P=%0d S=%0d%% word %0d bit %0d: %h/%s expected %h/%s", PM[i], SP[j], k,
                     fbit[k], rd[i][j], st[i][j].name(), exp_d, exp_s.name());
        end
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ppm [2];
    ppm = '{700, 2200};  // flip probability per data bit, in units of 1e-6
    foreach (err_extr[r, i, j]) begin err_extr[r][i][j] = 0; err_dwt[r][i][j] = 0; end
    n_flips = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int rate = 0; rate < 2; rate++) begin
      for (int w = 0; w < WIN; w++) begin
        // window data
        for (int k = 0; k < 1024; k++) begin
          if (k < 512)      val[k] = 32'(600 + $urandom_range(600)) << 16;             // RR samples, Q16
          else if (k < 564) val[k] = 32'($signed(21'($urandom)));                      // low-frequency DWT
          else              val[k] = 32'($signed(6'($urandom)));                       // near-zero DWT
          fbit[k] = -1;
          @(negedge clk); req = 1; we = 1; addr = 11'(EXTR_BASE + k); wdata = val[k];
        end
        @(negedge clk); req = 0; we = 0;
        // at most one flip per word, P(word hit) = 32 * p
        for (int k = 0; k < 1024; k++) begin
          if ($urandom_range(999_999) < 32 * ppm[rate]) begin
            fbit[k] = $urandom_range(31);
            n_flips[rate]++;
            @(negedge clk); flip_en = 1; flip_addr = 11'(EXTR_BASE + k); flip_mask = 39'd1 << fbit[k];
          end
        end
        @(negedge clk); flip_en = 0;
        // read back, one read per cycle
        for (int k = 0; k <= 1024; k++) begin
          @(negedge clk);
          if (k > 0) judge(rate, k - 1);
          req = (k < 1024); we = 0; addr = 11'(EXTR_BASE + k);
        end
        req = 0;
      end
    end

    for (int rate = 0; rate < 2; rate++) begin
      $display("flip rate %s per bit, %0d words hit in %0d windows; summed |error| Extr / DWT:",
               rate == 0 ? "0.07 %" : "0.22 %", n_flips[rate], WIN);
      for (int i = 0; i < NP; i++)
        $display("  %0d MSBs: 5%% %0d / %0d   10%% %0d / %0d   15%% %0d / %0d", PM[i],
                 err_extr[rate][i][0], err_dwt[rate][i][0], err_extr[rate][i][1], err_dwt[rate][i][1],
                 err_extr[rate][i][2], err_dwt[rate][i][2]);
      for (int i = 0; i < NP; i++) begin
        for (int j = 0; j < NS; j++) begin
          if (i > 0) begin
            checks++;
            if (err_extr[rate][i][j] > err_extr[rate][i-1][j]) begin
              failures++; $display("FAIL Extr error grew with more protected MSBs");
            end
          end
          if (j > 0) begin
            checks++;
            if (err_dwt[rate][i][j] > err_dwt[rate][i][j-1]) begin
              failures++; $display("FAIL DWT error grew with more significant words");
            end
          end
        end
      end
      checks++;
      if (n_flips[rate] == 0 || err_extr[rate][0][0] == 0 || err_dwt[rate][0][0] == 0 ||
          err_extr[rate][2][0] != 0) begin
        failures++; $display("FAIL sweep did not exercise the protection as expected");
      end
    end
    checks++;
    if (n_flips[1] <= n_flips[0]) begin failures++; $display("FAIL higher rate gave no more flips"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
