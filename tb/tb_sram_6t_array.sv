// tb_sram_6t_array: writes random words into a 64 x 39 array and reads them
// back, checking the one-cycle read latency, that read data holds between
// reads, and that flip masks (alone, and in the same cycle as a write to the
// same word) XOR into the stored word.
module tb_sram_6t_array;
  localparam int W = 39, D = 64;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          req = 0, we = 0, flip_en = 0;
  logic [5:0]    addr = '0, flip_addr = '0;
  logic [W-1:0]  wdata = '0, flip_mask = '0, rdata;
  logic [W-1:0]  model [D];

  sram_6t_array #(.WIDTH(W), .DEPTH(D)) dut (
    .clk_i(clk), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata),
    .flip_en_i(flip_en), .flip_addr_i(flip_addr), .flip_mask_i(flip_mask)
  );

  task automatic write(input int a, input logic [W-1:0] v);
    @(negedge clk); req = 1; we = 1; addr = 6'(a); wdata = v;
    @(negedge clk); req = 0; we = 0;
    model[a] = v;
  endtask

  task automatic flip(input int a, input logic [W-1:0] m);
    @(negedge clk); flip_en = 1; flip_addr = 6'(a); flip_mask = m;
    @(negedge clk); flip_en = 0;
    model[a] ^= m;
  endtask

  task automatic read_check(input int a);
    @(negedge clk); req = 1; we = 0; addr = 6'(a);
    @(posedge clk); #1;
    req = 0;
    checks++;
    if (rdata !== model[a]) begin
      failures++; $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
    end
    // data holds while no read is issued
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d data did not hold", a); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) write(a, {$urandom, $urandom});
    for (int a = 0; a < D; a++) read_check(a);
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(D - 1);
      flip(a, W'(1) << $urandom_range(W - 1));
      read_check(a);
    end
    // write and flip of the same word in one cycle: flip applies to new data
    @(negedge clk);
    req = 1; we = 1; addr = 6'd5; wdata = 39'h12_3456_789A;
    flip_en = 1; flip_addr = 6'd5; flip_mask = 39'h1;
    @(negedge clk);
    req = 0; we = 0; flip_en = 0;
    model[5] = 39'h12_3456_789B;
    read_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
