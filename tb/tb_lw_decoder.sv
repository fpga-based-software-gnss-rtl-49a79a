// tb_lw_decoder: self-checking testbench of the bridge address decoder.
//
// For each of the four PIO windows and a set of unmapped addresses (just
// outside each window, and random ones) it checks the chip selects, the word
// offset and write data passed on, and that read data of the selected PIO
// (or zero when unmapped) arrives with readdatavalid one cycle after the
// read request.
module tb_lw_decoder;
  import gnss_fft_pkg::*;
  logic clk = 0, rst_n = 0;
  mm_req_t req = '0;
  logic [31:0] readdata;
  logic readdatavalid;
  logic [3:0] cs;
  logic pio_write;
  logic [1:0] pio_address;
  logic [31:0] pio_writedata;
  logic [31:0] rd_ctrl_out = 32'h11, rd_data_in = 32'h2222, rd_data_out = 32'h3333, rd_sts = 32'h44;

  lw_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [20:0] BASES [4] = '{21'h0_0070, 21'h0_00D0, 21'h2_00A0, 21'h2_00C0};

  task automatic probe(input logic [20:0] a);
    int sel = -1;
    logic [31:0] exp_rd;
    for (int i = 0; i < 4; i++) if (a >= BASES[i] && a <= BASES[i] + 15) sel = i;
    case (sel)
      0: exp_rd = rd_ctrl_out;
      1: exp_rd = rd_data_in;
      2: exp_rd = rd_data_out;
      3: exp_rd = rd_sts;
      default: exp_rd = 0;
    endcase
    @(negedge clk);
    req.address = a; req.read = 1; req.write = 0; req.writedata = $urandom;
    #1;
    check(cs == ((sel < 0) ? 4'b0 : 4'(1 << sel)), $sformatf("chip select for %h", a));
    check(pio_address == a[3:2] && pio_writedata == req.writedata, "offset and data passed on");
    @(negedge clk);
    req.read = 0;
    check(readdatavalid && readdata == exp_rd, $sformatf("read data for %h", a));
    @(negedge clk);
    check(!readdatavalid, "readdatavalid lasts one cycle");
  endtask

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      probe(BASES[i]); probe(BASES[i] + 4); probe(BASES[i] + 15);
      probe(BASES[i] - 1); probe(BASES[i] + 16);
    end
    for (int i = 0; i < 300; i++) begin
      rd_data_in = $urandom;
      probe(21'($urandom));
    end
    // a write to input_data2 raises only its chip select with write
    @(negedge clk); req = '{read: 0, write: 1, address: 21'h0_00D0, writedata: 32'hBEEF};
    #1 check(cs == 4'b0010 && pio_write && pio_writedata == 32'hBEEF, "write routed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
