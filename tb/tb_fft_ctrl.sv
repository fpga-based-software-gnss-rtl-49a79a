// tb_fft_ctrl: self-checking testbench of the processor/FFT glue logic.
//
// fft_ctrl is connected to three 16-word FIFOs (N = 16); the FFT core is
// replaced by the testbench, which accepts samples with a random sink_ready
// and offers results on source_valid. Checked: the write code 0x60 held for
// many clocks stores exactly one sample, and 0x40 or 0x20 alone store none;
// START streams exactly N samples in FIFO order, zero-padded when FIFO1
// runs dry, with sop on the first, eop on the last and the INVERSE bit
// latched; results go to FIFO2/FIFO3 and the core is held while they are
// full; READ pops exactly one word per rising edge and output_data and
// fft2hpscontrol show it; CLEAR empties the FIFOs.
module tb_fft_ctrl;
  import gnss_fft_pkg::*;
  localparam int LOG2N = 4, N = 16;

  logic clk = 0, rst_n = 0;
  logic [7:0] ctrl = 0;
  logic [15:0] din = 0, dout;
  logic [7:0] status;
  logic fifo_aclr, f1_wrreq, f1_rdreq, f1_empty, f2_wrreq, f2_rdreq, f2_empty, f2_full, f3_full;
  logic [15:0] f1_data, f1_q, f2_data, f2_q;
  logic [5:0] f3_data, f3_q;
  logic clk_ena, inverse, sink_valid, sink_sop, sink_eop, sink_ready = 0;
  logic [1:0] sink_error;
  cplx8_t sink_data, source_data = '0;
  logic source_ready, source_valid = 0;
  logic [5:0] source_exp = 0;

  fft_ctrl #(.LOG2N(LOG2N)) dut (.*);

  logic [3:0] u1, u2, u3;
  logic x1, x2, x3, x4, x5, x6, x7, x8, f1_full, f3_empty;
  fifo #(.WIDTH(16), .DEPTH(N)) fifo1 (.clock(clk), .aclr(fifo_aclr), .data(f1_data), .wrreq(f1_wrreq),
    .rdreq(f1_rdreq), .q(f1_q), .full(f1_full), .empty(f1_empty), .almost_full(x1), .almost_empty(x2), .usedw(u1));
  fifo #(.WIDTH(16), .DEPTH(N)) fifo2 (.clock(clk), .aclr(fifo_aclr), .data(f2_data), .wrreq(f2_wrreq),
    .rdreq(f2_rdreq), .q(f2_q), .full(f2_full), .empty(f2_empty), .almost_full(x3), .almost_empty(x4), .usedw(u2));
  fifo #(.WIDTH(6), .DEPTH(N)) fifo3 (.clock(clk), .aclr(fifo_aclr), .data(f3_data), .wrreq(f2_wrreq),
    .rdreq(f2_rdreq), .q(f3_q), .full(f3_full), .empty(f3_empty), .almost_full(x5), .almost_empty(x6), .usedw(u3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // A processor register write holds its value for many fabric clocks.
  task automatic set_ctrl(input logic [7:0] v);
    @(negedge clk) ctrl = v;
    repeat (20) @(negedge clk);
  endtask

  int n_words;
  logic [15:0] sent[$];

  // Capture what the core would receive.
  logic [15:0] got[$];
  bit got_sop[$], got_eop[$], got_inv[$];
  always @(posedge clk) begin
    if (sink_valid && sink_ready) begin
      got.push_back(sink_data);
      got_sop.push_back(sink_sop);
      got_eop.push_back(sink_eop);
      got_inv.push_back(inverse);
    end
    sink_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic load_and_stream(input int n, input bit inv);
    sent.delete(); got.delete(); got_sop.delete(); got_eop.delete(); got_inv.delete();
    for (int i = 0; i < n; i++) begin
      din = 16'($urandom);
      sent.push_back(din);
      set_ctrl(8'h60);
      set_ctrl(8'h00);
    end
    check(u1 == 4'(n) || (n == N && u1 == 4'hF), $sformatf("%0d write pulses store %0d words", n, n));
    set_ctrl(inv ? 8'h06 : 8'h04);
    set_ctrl(8'h00);
    repeat (4 * N) @(negedge clk);
    check(got.size() == N, $sformatf("START streams N samples (%0d)", got.size()));
    for (int i = 0; i < got.size(); i++) begin
      check(got[i] == ((i < n) ? sent[i] : 16'h0), $sformatf("sample %0d order / zero pad", i));
      check(got_sop[i] == (i == 0) && got_eop[i] == (i == N - 1), "sop/eop framing");
      check(got_inv[i] == inv, "inverse latched");
    end
    check(f1_empty && !status[STS_BUSY], "FIFO1 drained, not busy");
  endtask

  initial begin
    #12 rst_n = 1;
    set_ctrl(8'h01); set_ctrl(8'h00);   // CLEAR: FIFOs start empty
    // single-bit codes store nothing
    din = 16'h1234;
    set_ctrl(8'h40); set_ctrl(8'h00); set_ctrl(8'h20); set_ctrl(8'h00);
    check(f1_empty, "0x40 and 0x20 alone store nothing");
    load_and_stream(N, 0);
    load_and_stream(5, 1);      // zero padding, IFFT

    // results from the core into FIFO2/FIFO3, held when full
    fork
      for (int i = 0; i < N + 4; i++) begin
        @(negedge clk);
        source_valid = 1; source_data = cplx8_t'(16'(i * 257 + 3)); source_exp = 6'(i % 7);
        @(posedge clk);
        while (!source_ready) @(posedge clk);
        if (i >= N) failures++;      // should never be accepted beyond N
      end
      begin
        repeat (3 * N) @(negedge clk);
        check(f2_full && !source_ready, "core held while FIFO2 is full");
      end
    join_any
    disable fork;
    source_valid = 0;
    @(negedge clk);
    // READ pops one word per rising edge
    for (int i = 0; i < N; i++) begin
      check(status[STS_AVAIL] && dout == 16'(i * 257 + 3) && status[5:0] == 6'(i % 7),
            $sformatf("output word %0d visible", i));
      set_ctrl(8'h08);
      set_ctrl(8'h00);
    end
    check(!status[STS_AVAIL] && f2_empty, "all words read once");
    // with room again the core's next result is taken
    @(negedge clk) source_valid = 1;
    #1 check(source_ready, "core released when FIFO2 drains");
    @(negedge clk) source_valid = 0;
    check(!f2_empty && dout == source_data, "result accepted");
    din = 16'h5555; set_ctrl(8'h60); set_ctrl(8'h00);
    set_ctrl(8'h01); set_ctrl(8'h00);
    check(f1_empty && f2_empty && f3_empty, "CLEAR empties the FIFOs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
