// tb_pio_out: self-checking testbench of the processor-to-FPGA PIO register.
//
// Checks reset to zero, that a selected write to word offset 0 updates
// out_port on the next edge and reads back, that writes to other offsets or
// without chip select are ignored, that the other offsets read zero, and
// that only the low WIDTH bits of writedata are kept.
module tb_pio_out;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, chipselect = 0, write = 0;
  logic [1:0] address = 0;
  logic [31:0] writedata = 0, readdata;
  logic [W-1:0] out_port;

  pio_out #(.WIDTH(W)) dut (.*);
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

  task automatic wr(input bit cs, input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); chipselect = cs; write = 1; address = a; writedata = d;
    @(negedge clk); chipselect = 0; write = 0;
  endtask

  logic [W-1:0] expect_q;
  initial begin
    #12 rst_n = 1;
    check(out_port == 0, "reset value");
    expect_q = 0;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] d = $urandom;
      logic [1:0]  a = 2'($urandom_range(0, 3));
      bit          cs = ($urandom_range(0, 3) != 0);
      wr(cs, a, d);
      if (cs && a == 0) expect_q = d[W-1:0];
      check(out_port == expect_q, "out_port after write");
      address = 0; #1;
      check(readdata == 32'(expect_q), "read back offset 0");
      address = 2'($urandom_range(1, 3)); #1;
      check(readdata == 0, "other offsets read zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
