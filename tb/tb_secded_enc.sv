// tb_secded_enc: checks secded_enc for 32-bit words and an 11-bit MSB field
// against the position-XOR reference model, on corner values and 2000 random
// words each.
module tb_secded_enc;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] d32;
  logic [6:0]  c32;
  logic [10:0] d11;
  logic [4:0]  c11;

  secded_enc #(.K(32)) dut32 (.data_i(d32), .check_o(c32));
  secded_enc #(.K(11)) dut11 (.data_i(d11), .check_o(c11));

  task automatic check32(input logic [31:0] v);
    logic [7:0] e;
    d32 = v;
    #1;
    e = ref_check(64'(v), 32);
    checks++;
    if (c32 !== e[6:0]) begin
      failures++;
      $display("FAIL K=32 data=%h check=%h expected=%h", v, c32, e[6:0]);
    end
  endtask

  task automatic check11(input logic [10:0] v);
    logic [7:0] e;
    d11 = v;
    #1;
    e = ref_check(64'(v), 11);
    checks++;
    if (c11 !== e[4:0]) begin
      failures++;
      $display("FAIL K=11 data=%h check=%h expected=%h", v, c11, e[4:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Data bit 0 sits at position 3: Hamming bits 0 and 1, overall parity 1.
    d32 = 32'h1;
    #1;
    checks++;
    if (c32 !== 7'b100_0011) begin failures++; $display("FAIL bit0 check=%b", c32); end
    check32('0);
    check32('1);
    for (int b = 0; b < 32; b++) check32(32'd1 << b);
    for (int b = 0; b < 11; b++) check11(11'd1 << b);
    check11('1);
    for (int i = 0; i < 2000; i++) begin
      check32($urandom);
      check11(11'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
