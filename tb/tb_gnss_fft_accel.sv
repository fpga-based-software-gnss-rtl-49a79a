// tb_gnss_fft_accel: end-to-end test of the acquisition accelerator at its
// full size (32768-point transforms, 32768-word FIFOs, no parameter
// overrides). The testbench plays the processor: it talks to the design only
// through the lightweight-bridge port, using the PIO address map.
//
// Scenario: one parallel-code-phase acquisition of a synthetic GPS L1 C/A
// signal. 2 ms of 2-bit samples (32735 samples at 16.3676 MHz, IF 4.1304 MHz,
// Doppler +1500 Hz, PRN 1 delayed by CODE_DELAY samples, Gaussian noise) are
// mixed to baseband in "software", and then:
//   1. FFT of the baseband samples (32735 samples written; the core pads
//      the last 33 with zeros),
//   2. FFT of the sampled PRN 1 replica, started before the results of 1
//      are read, so the core must wait for room in the output FIFO,
//   2b. FFT of the PRN 3 replica, loaded into the core's second bank while
//      transform 2 still waits in the first,
//   3. software product X * conj(C), normalised to 8 bits,
//   4. IFFT of the product; the peak of |z|^2 must sit at the code delay
//      (modulo one code period of 16367.6 samples),
//   5. the same with PRN 3, which is absent: its peak must be far lower.
// Transform 1 is also compared bin by bin with a floating-point FFT computed
// here (tolerance 2 output LSBs plus 1 % of the largest bin).
// Mechanisms counted (each must occur): write-request pulses, zero padding,
// output backpressure, FFT and IFFT mode, nonzero block exponent, and a
// block loaded into the core's second bank while the first is still busy.
module tb_gnss_fft_accel;
  import gnss_fft_pkg::*;

  localparam int    N          = FFT_N;
  localparam int    NSAMP      = 32735;        // 2 ms of data
  localparam real   FS         = 16.3676e6;
  localparam real   FIF        = 4.1304e6;
  localparam real   FD         = 1500.0;
  localparam real   CHIP_RATE  = 1.023e6;
  localparam int    CODE_DELAY = 5000;         // samples
  localparam real   PI         = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  mm_req_t lw_req = '0;
  logic [31:0] lw_readdata;
  logic lw_readdatavalid;
  logic [1:0] fft_error;

  gnss_fft_accel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters (observed inside the design) -------
  int n_wrreq = 0, n_pad = 0, n_stall = 0, n_fwd = 0, n_inv = 0, n_exp = 0, n_buf = 0;
  always @(posedge clk) begin
    if (dut.f1_wrreq) n_wrreq++;
    if (dut.sink_valid && dut.sink_ready && dut.f1_empty) n_pad++;
    if (dut.source_valid && !dut.source_ready) n_stall++;
    if (dut.sink_valid && dut.sink_ready && dut.sink_sop) begin
      if (dut.inverse) n_inv++; else n_fwd++;
    end
    if (dut.f2_wrreq && dut.source_exp != 0) n_exp++;
    // a sample loaded while the core still works on the previous block
    if (dut.sink_valid && dut.sink_ready && dut.fftm2.full[dut.fftm2.pb] &&
        dut.fftm2.lb != dut.fftm2.pb) n_buf++;
  end

  // ---------------- bridge bus model --------------------------------------
  task automatic mm_write(input logic [20:0] a, input logic [31:0] d);
    @(negedge clk);
    lw_req = '{read: 1'b0, write: 1'b1, address: a, writedata: d};
    @(negedge clk);
    lw_req = '0;
  endtask

  task automatic mm_read(input logic [20:0] a, output logic [31:0] d);
    @(negedge clk);
    lw_req = '{read: 1'b1, write: 1'b0, address: a, writedata: 32'd0};
    @(negedge clk);
    lw_req = '0;
    d = lw_readdata;
    if (!lw_readdatavalid) begin failures++; $display("FAIL: no readdatavalid"); end
  endtask

  // ---------------- processor-side helpers --------------------------------
  int in_re[N], in_im[N];            // samples to transform (8-bit ints)
  real res_re[N], res_im[N];         // result, already scaled by 2**exp

  task automatic load_block(input int n);
    for (int i = 0; i < n; i++) begin
      mm_write(ADDR_INPUT_DATA2, 32'({8'(in_im[i]), 8'(in_re[i])}));
      mm_write(ADDR_HPS2FFTCONTROL1, 32'(CTL_WRITE_REQ));
      mm_write(ADDR_HPS2FFTCONTROL1, 32'h00);
    end
  endtask

  task automatic start(input bit inv);
    mm_write(ADDR_HPS2FFTCONTROL1, 32'((1 << CTL_START) | (inv << CTL_INVERSE)));
    mm_write(ADDR_HPS2FFTCONTROL1, 32'h00);
  endtask

  task automatic read_block();
    logic [31:0] d, s;
    int e;
    for (int k = 0; k < N; k++) begin
      do mm_read(ADDR_FFT2HPSCONTROL, s); while (!s[STS_AVAIL]);
      mm_read(ADDR_OUTPUT_DATA, d);
      e = $signed(s[5:0]);
      res_re[k] = $signed(d[7:0])  * (2.0 ** e);
      res_im[k] = $signed(d[15:8]) * (2.0 ** e);
      mm_write(ADDR_HPS2FFTCONTROL1, 32'(1 << CTL_READ));
      mm_write(ADDR_HPS2FFTCONTROL1, 32'h00);
    end
  endtask

  // ---------------- signal generation -------------------------------------
  // C/A code: G1 = 1 + x^3 + x^10, G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10,
  // both all ones at start; PRN 1 uses G2 taps 2 and 6, PRN 3 taps 4 and 8.
  function automatic void ca_code(input int t1, input int t2, output bit c[1023]);
    bit [10:1] g1 = '1, g2 = '1;
    for (int i = 0; i < 1023; i++) begin
      bit f1, f2;
      c[i] = g1[10] ^ g2[t1] ^ g2[t2];
      f1 = g1[3] ^ g1[10];
      f2 = g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10];
      g1 = {g1[9:1], f1};
      g2 = {g2[9:1], f2};
    end
  endfunction

  function automatic real gauss();
    real acc = 0;
    for (int i = 0; i < 12; i++) acc += $urandom_range(0, 65535) / 65536.0;
    return acc - 6.0;
  endfunction

  bit  prn1[1023], prn3[1023];
  int  raw[NSAMP];                 // 2-bit samples -3, -1, 1, 3

  function automatic int chip_at(input int n);
    return int'($floor(n * CHIP_RATE / FS)) % 1023;
  endfunction

  // ---------------- floating-point reference FFT ---------------------------
  real fr[N], fi[N];
  task automatic ref_fft();
    int j = 0;
    for (int i = 0; i < N - 1; i++) begin
      if (i < j) begin real t; t = fr[i]; fr[i] = fr[j]; fr[j] = t; t = fi[i]; fi[i] = fi[j]; fi[j] = t; end
      begin int m = N >> 1; while (m >= 1 && (j & m)) begin j ^= m; m >>= 1; end j |= m; end
    end
    for (int len = 2; len <= N; len <<= 1) begin
      for (int i = 0; i < N; i += len)
        for (int k = 0; k < len / 2; k++) begin
          real wr, wi, tr, ti;
          wr = $cos(2.0 * PI * k / len); wi = -$sin(2.0 * PI * k / len);
          tr = fr[i+k+len/2] * wr - fi[i+k+len/2] * wi;
          ti = fr[i+k+len/2] * wi + fi[i+k+len/2] * wr;
          fr[i+k+len/2] = fr[i+k] - tr; fi[i+k+len/2] = fi[i+k] - ti;
          fr[i+k] += tr; fi[i+k] += ti;
        end
    end
  endtask

  function automatic real fabs(input real x);
    return x < 0 ? -x : x;
  endfunction

  real xr[N], xi[N];               // FFT of the samples
  real cr[N], ci[N];               // FFT of a replica
  real c3r[N], c3i[N];             // FFT of the PRN 3 replica

  // Replica of one PRN into in_re/in_im (imaginary part zero).
  task automatic make_replica(input bit c[1023]);
    foreach (in_re[n]) begin
      in_re[n] = (n < NSAMP) ? (c[chip_at(n)] ? -1 : 1) : 0;
      in_im[n] = 0;
    end
  endtask

  // Product, IFFT on the device, and the correlation peak.
  task automatic correlate(output int peak_at, output real peak, output real mean);
    real m = 0, sc;
    for (int k = 0; k < N; k++) begin
      real pr, pi;
      pr = xr[k] * cr[k] + xi[k] * ci[k];
      pi = xi[k] * cr[k] - xr[k] * ci[k];
      res_re[k] = pr; res_im[k] = pi;
      if (fabs(pr) > m) m = fabs(pr);
      if (fabs(pi) > m) m = fabs(pi);
    end
    sc = 127.0 / m;
    for (int k = 0; k < N; k++) begin
      in_re[k] = $rtoi(res_re[k] * sc);
      in_im[k] = $rtoi(res_im[k] * sc);
    end
    load_block(N);
    start(1);
    read_block();
    peak = 0; mean = 0; peak_at = -1;
    for (int k = 0; k < N; k++) begin
      real p = res_re[k] * res_re[k] + res_im[k] * res_im[k];
      mean += p / N;
      if (p > peak) begin peak = p; peak_at = k; end
    end
  endtask

  function automatic bit at_delay(input int k);
    for (int j = -2; j <= 2; j++) begin  // within half a chip (8 samples)
      real d = CODE_DELAY + j * 16367.6;
      if (d < 0) d += N;
      if (fabs(k - d) <= 8.0 || fabs(k - d + N) <= 8.0 || fabs(k - d - N) <= 8.0) return 1;
    end
    return 0;
  endfunction

  initial begin
    longint t0;
    int   p1_at, p3_at;
    real  p1, m1, p3, m3, maxerr, maxref, tol;
    bit   first10[10];

    ca_code(2, 6, prn1);
    ca_code(4, 8, prn3);
    for (int i = 0; i < 10; i++) first10[i] = prn1[i];
    check(first10 == '{1, 1, 0, 0, 1, 0, 0, 0, 0, 0}, "PRN 1 starts 1440 octal");

    // 2-bit samples of PRN 1 with carrier and noise
    for (int n = 0; n < NSAMP; n++) begin
      real s, c;
      c = prn1[chip_at(n + NSAMP * 0 - CODE_DELAY + 10 * NSAMP) ] ? -1.0 : 1.0;
      s = c * $cos(2.0 * PI * (FIF + FD) * n / FS) + 2.0 * gauss();
      raw[n] = (s >= 0) ? ((s > 2.0) ? 3 : 1) : ((s < -2.0) ? -3 : -1);
    end

    // carrier wipe-off in software: 8-bit I and Q
    foreach (in_re[n]) begin
      if (n < NSAMP) begin
        in_re[n] = $rtoi(raw[n] * 40.0 * $cos(2.0 * PI * (FIF + FD) * n / FS));
        in_im[n] = $rtoi(-raw[n] * 40.0 * $sin(2.0 * PI * (FIF + FD) * n / FS));
      end else begin
        in_re[n] = 0; in_im[n] = 0;
      end
    end
    foreach (fr[n]) begin fr[n] = in_re[n]; fi[n] = in_im[n]; end
    ref_fft();

    repeat (4) @(posedge clk);
    rst_n = 1;
    mm_write(ADDR_HPS2FFTCONTROL1, 32'(1 << CTL_CLEAR));
    mm_write(ADDR_HPS2FFTCONTROL1, 32'h00);

    // 1. FFT of the samples, only NSAMP written: zero padding
    t0 = cycle;
    load_block(NSAMP);
    check(n_wrreq == NSAMP, $sformatf("one FIFO write per write request (%0d)", n_wrreq));
    start(0);
    // 2. load and start the replica while result 1 is still unread
    make_replica(prn1);
    begin
      logic [31:0] s;
      do mm_read(ADDR_FFT2HPSCONTROL, s); while (s[STS_BUSY]);
    end
    load_block(NSAMP);
    start(0);
    // the processor is busy elsewhere until transform 2 has been computed
    repeat (FFT_LOG2N * N / 2 + 1000) @(negedge clk);
    // 2b. transform 2 waits in the core for room in the output FIFO; the
    //     PRN 3 replica goes into the core's other bank meanwhile
    make_replica(prn3);
    begin
      logic [31:0] s;
      do mm_read(ADDR_FFT2HPSCONTROL, s); while (s[STS_BUSY]);
    end
    load_block(NSAMP);
    start(0);
    read_block();
    foreach (xr[k]) begin xr[k] = res_re[k]; xi[k] = res_im[k]; end
    read_block();
    foreach (cr[k]) begin cr[k] = res_re[k]; ci[k] = res_im[k]; end
    read_block();
    foreach (c3r[k]) begin c3r[k] = res_re[k]; c3i[k] = res_im[k]; end
    $display("three forward transforms done after %0d cycles", cycle - t0);

    maxerr = 0; maxref = 0;
    for (int k = 0; k < N; k++) begin
      if (fabs(fr[k]) > maxref) maxref = fabs(fr[k]);
      if (fabs(fi[k]) > maxref) maxref = fabs(fi[k]);
      if (fabs(xr[k] - fr[k]) > maxerr) maxerr = fabs(xr[k] - fr[k]);
      if (fabs(xi[k] - fi[k]) > maxerr) maxerr = fabs(xi[k] - fi[k]);
    end
    tol = 2.0 * maxref / 127.0 + 0.01 * maxref;
    $display("sample FFT: max|ref| %0.1f, max error %0.1f, tolerance %0.1f", maxref, maxerr, tol);
    check(maxerr <= tol, "sample FFT matches floating-point FFT");

    // 3-4. correlate with PRN 1
    correlate(p1_at, p1, m1);
    $display("PRN 1: peak %0.3g at %0d (expected %0d mod 16367.6), peak/mean %0.1f", p1, p1_at, CODE_DELAY, p1 / m1);
    check(at_delay(p1_at), "PRN 1 peak at the code delay");
    check(p1 / m1 > 20.0, "PRN 1 peak stands out");

    // 5. PRN 3 is absent
    foreach (cr[k]) begin cr[k] = c3r[k]; ci[k] = c3i[k]; end
    correlate(p3_at, p3, m3);
    $display("PRN 3: peak/mean %0.1f", p3 / m3);
    check((p1 / m1) > 3.0 * (p3 / m3), "absent PRN 3 far weaker than PRN 1");

    check(fft_error == 2'b00, "no framing error");
    $display("mechanisms: write requests %0d, zero-pad samples %0d, backpressure cycles %0d, FFT %0d, IFFT %0d, words with exponent != 0 %0d, buffered input samples %0d",
             n_wrreq, n_pad, n_stall, n_fwd, n_inv, n_exp, n_buf);
    check(n_pad == 3 * (N - NSAMP), "zero padding happened on each short block");
    check(n_stall > 0, "output backpressure happened");
    check(n_fwd == 3 && n_inv == 2, "FFT and IFFT modes used");
    check(n_exp > 0, "block exponent used");
    check(n_buf > 0, "a block was loaded while the previous one was in the core");
    $display("total cycles %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
