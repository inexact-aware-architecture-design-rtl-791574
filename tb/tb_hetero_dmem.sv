// tb_hetero_dmem: checks the address map and the per-region protection of the
// heterogeneous data memory. At the default sizes it writes distinct values
// at the first and last word of each region (and both sides of the DWT
// significance boundary, words 1587/1588), applies one chosen bit-flip to
// each, and checks that the read-back shows the protection of the region the
// address belongs to: corrected in DM_Rest, in the Extr_buffer MSBs and in
// significant DWT words; passed through in the Extr_buffer LSBs; zeroed in
// non-significant DWT words. A second, smaller instance (48 + 32 + 32 words
// in a 128-word space) checks that reads past the last region return zero
// with addr_err_o and that writes there change nothing.
module tb_hetero_dmem;
  import wbsn_mem_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req = 0, we = 0, flip_en = 0;
  logic [10:0] addr = '0, flip_addr = '0;
  logic [31:0] wdata = '0, rd;
  logic [38:0] flip_mask = '0;
  logic        rv, aerr;
  rd_status_e  st;

  hetero_dmem dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .rvalid_o(rv), .rdata_o(rd), .status_o(st), .addr_err_o(aerr),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  logic        s_req = 0, s_we = 0;
  logic [6:0]  s_addr = '0;
  logic [31:0] s_wdata = '0, s_rd;
  logic        s_rv, s_aerr;
  rd_status_e  s_st;

  hetero_dmem #(.REST_WORDS(48), .EXTR_WORDS(32), .DWT_WORDS(32)) dut_small (
    .clk_i(clk), .rst_ni(rst_n), .req_i(s_req), .we_i(s_we), .addr_i(s_addr), .wdata_i(s_wdata),
    .rvalid_o(s_rv), .rdata_o(s_rd), .status_o(s_st), .addr_err_o(s_aerr),
    .flip_en_i(1'b0), .flip_addr_i('0), .flip_mask_i('0)
  );

  typedef struct {
    int          a;
    int          flip_bit;   // -1: no flip
    logic [31:0] v;
    logic [31:0] exp_d;
    rd_status_e  exp_s;
  } probe_t;

  probe_t probes[$];

  task automatic add(input int a, input int fb, input logic [31:0] v,
                     input logic [31:0] exp_d, input rd_status_e exp_s);
    probe_t p;
    p.a = a; p.flip_bit = fb; p.v = v; p.exp_d = exp_d; p.exp_s = exp_s;
    probes.push_back(p);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // address, flipped bit, written value, expected read, expected status
    add(0,    31, 32'hA000_0001, 32'hA000_0001, RD_CORRECTED);      // DM_Rest first
    add(1023, 35, 32'hA000_03FF, 32'hA000_03FF, RD_CORRECTED);      // DM_Rest last, check bit
    add(1000, -1, 32'h1234_5678, 32'h1234_5678, RD_CLEAN);          // DM_Rest clean
    add(1024, 31, 32'hB000_0000, 32'hB000_0000, RD_CORRECTED);      // Extr first, MSB corrected
    add(1025, 21, 32'hB000_0001, 32'hB000_0001, RD_CORRECTED);      // Extr lowest protected bit
    add(1026, 20, 32'hB000_0002, 32'hB010_0002, RD_CLEAN);          // Extr highest LSB unprotected
    add(1535, 0,  32'hB000_01FF, 32'hB000_01FE, RD_CLEAN);          // Extr last, LSB unprotected
    add(1536, 30, 32'hC000_0000, 32'hC000_0000, RD_CORRECTED);      // DWT first, significant
    add(1587, 7,  32'hC000_0033, 32'hC000_0033, RD_CORRECTED);      // DWT last significant word
    add(1588, 7,  32'h0000_0034, 32'h0000_0000, RD_ZEROED);         // DWT first non-significant
    add(2047, 32, 32'hFFFF_FFF0, 32'h0000_0000, RD_ZEROED);         // DWT last, parity bit flipped
    add(2000, -1, 32'h0000_0005, 32'h0000_0005, RD_CLEAN);          // DWT non-significant clean

    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (probes[i]) begin
      @(negedge clk); req = 1; we = 1; addr = 11'(probes[i].a); wdata = probes[i].v;
    end
    @(negedge clk); req = 0; we = 0;
    foreach (probes[i]) if (probes[i].flip_bit >= 0) begin
      @(negedge clk); flip_en = 1; flip_addr = 11'(probes[i].a); flip_mask = 39'd1 << probes[i].flip_bit;
    end
    @(negedge clk); flip_en = 0;
    foreach (probes[i]) begin
      @(negedge clk); req = 1; we = 0; addr = 11'(probes[i].a);
      @(negedge clk); req = 0;
      checks++;
      if (!rv || aerr || rd !== probes[i].exp_d || st !== probes[i].exp_s) begin
        failures++;
        $display("FAIL addr %0d: rv=%b err=%b data %h/%s expected %h/%s", probes[i].a, rv, aerr, rd,
                 st.name(), probes[i].exp_d, probes[i].exp_s.name());
      end
    end

    // Small instance: 0..111 mapped, 112..127 unmapped.
    for (int a = 0; a < 112; a++) begin
      @(negedge clk); s_req = 1; s_we = 1; s_addr = 7'(a); s_wdata = 32'h5500_0000 + a;
    end
    for (int a = 112; a < 128; a++) begin
      @(negedge clk); s_req = 1; s_we = 1; s_addr = 7'(a); s_wdata = 32'hDEAD_0000 + a;
    end
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); s_req = 1; s_we = 0; s_addr = 7'(a);
      @(negedge clk); s_req = 0;
      checks++;
      if (a < 112) begin
        if (!s_rv || s_aerr || s_rd !== 32'h5500_0000 + a || s_st !== RD_CLEAN) begin
          failures++; $display("FAIL small addr %0d: %h err=%b", a, s_rd, s_aerr);
        end
      end else if (!s_rv || !s_aerr || s_rd !== '0) begin
        failures++; $display("FAIL small addr %0d: unmapped read gave %h err=%b", a, s_rd, s_aerr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
