// tb_pio_in: self-checking testbench of the FPGA-to-processor PIO register.
//
// Drives random values on in_port and checks that offset 0 returns the
// value present one clock earlier, that the other offsets read zero, and
// that the register resets to zero.
module tb_pio_in;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] address = 0;
  logic [31:0] readdata;
  logic [W-1:0] in_port = 8'hA5;

  pio_in #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(posedge clk); #1;
    check(readdata == 0, "reset value");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] v = W'($urandom);
      @(negedge clk) in_port = v;
      @(negedge clk) in_port = ~v;
      address = 0; #1;
      check(readdata == 32'(v), "offset 0 returns sampled input");
      address = 2'($urandom_range(1, 3)); #1;
      check(readdata == 0, "other offsets read zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
