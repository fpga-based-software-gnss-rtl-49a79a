// tb_fftmod: self-checking testbench of the burst FFT/IFFT core.
//
// Runs a 256-point core (the arithmetic is the same at every length) through:
// an impulse and a constant block, whose transforms are exact; random blocks
// of several amplitudes, forward and inverse, compared against a direct DFT
// computed here in floating point (tolerance: two output LSBs, 2 * 2**exp,
// plus 1 % of the block's largest value); the compute latency of
// LOG2N*N/(2P) + 2 cycles; back-to-back blocks through the two banks, with
// their period and the stall of a third block; random output backpressure;
// and the three framing errors (missing sop, missing eop, unexpected eop),
// after each of which a good block must still transform correctly.
module tb_fftmod;
  localparam int LOG2N = 8;
  localparam int N     = 1 << LOG2N;
  localparam int P     = 8;            // butterflies per clock (core default)
  localparam int CALC  = LOG2N * N / (2 * P);   // compute cycles
  localparam int LAT   = CALC + 2;              // last input to first output
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, reset_n = 0, clk_ena = 1;
  logic inverse = 0, sink_valid = 0, sink_sop = 0, sink_eop = 0, source_ready = 1;
  logic signed [7:0] sink_real = 0, sink_imag = 0;
  logic [1:0] sink_error = 0;
  logic sink_ready, source_valid, source_sop, source_eop;
  logic signed [7:0] source_real, source_imag;
  logic signed [5:0] source_exp;
  logic [1:0] source_error;

  fftmod #(.LOG2N(LOG2N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   in_re [N], in_im [N];
  int   out_re[N], out_im[N];
  int   out_exp;
  int   eop_cycle, sop_cycle;
  bit   bp_random = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Feed one block; `drop` chooses a framing fault:
  // 0 good, 1 no sop, 2 eop early, 3 no eop on last sample.
  task automatic send(input bit inv, input int fault);
    for (int n = 0; n < N; n++) begin
      sink_valid <= 1;
      sink_real  <= 8'(in_re[n]);
      sink_imag  <= 8'(in_im[n]);
      sink_sop   <= (n == 0) && fault != 1;
      sink_eop   <= (fault == 2) ? (n == N/2) : (n == N - 1) && fault != 3;
      inverse    <= inv;
      @(posedge clk);
      while (!sink_ready) @(posedge clk);
      if (fault == 2 && n == N/2) break;
    end
    eop_cycle = cycle;
    sink_valid <= 0; sink_sop <= 0; sink_eop <= 0;
  endtask

  task automatic receive();
    int n = 0;
    bit seen = 0;
    while (n < N) begin
      @(posedge clk);
      if (source_valid && !seen) begin
        sop_cycle = cycle;
        seen = 1;
      end
      if (source_valid && source_ready) begin
        if (n == 0) begin
          check(source_sop, "sop on first output");
        end
        check(source_eop == (n == N - 1), "eop only on last output");
        out_re[n] = source_real;
        out_im[n] = source_imag;
        out_exp   = source_exp;
        n++;
      end
    end
  endtask

  always @(posedge clk) source_ready <= bp_random ? ($urandom_range(0, 3) != 0) : 1'b1;

  function automatic real fabs(input real x);
    return x < 0 ? -x : x;
  endfunction

  task automatic compare(input bit inv, input string tag);
    real rr, ri, err, maxerr, maxref, sc, tol;
    maxerr = 0; maxref = 0;
    sc = 2.0 ** out_exp;
    for (int k = 0; k < N; k++) begin
      rr = 0; ri = 0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * PI * k * n / N);
        s = (inv ? 1.0 : -1.0) * $sin(2.0 * PI * k * n / N);
        rr += in_re[n] * c - in_im[n] * s;
        ri += in_re[n] * s + in_im[n] * c;
      end
      if (fabs(rr) > maxref) maxref = fabs(rr);
      if (fabs(ri) > maxref) maxref = fabs(ri);
      err = fabs(out_re[k] * sc - rr);
      if (fabs(out_im[k] * sc - ri) > err) err = fabs(out_im[k] * sc - ri);
      if (err > maxerr) maxerr = err;
    end
    tol = 2.0 * sc + 0.01 * maxref;
    $display("%s: exp=%0d max|ref|=%0.1f max err=%0.2f tol=%0.2f", tag, out_exp, maxref, maxerr, tol);
    check(maxerr <= tol, {tag, " matches reference DFT"});
  endtask

  task automatic run(input bit inv, input string tag);
    fork
      send(inv, 0);
      receive();
    join
    // +1: both ends are sampled at a clock edge after the event
    check(sop_cycle - eop_cycle == LAT + 1,
          $sformatf("%s latency %0d", tag, sop_cycle - eop_cycle));
    compare(inv, tag);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset_n <= 1;
    @(posedge clk);

    // Impulse: every bin equals the impulse, exponent 0.
    foreach (in_re[n]) begin in_re[n] = (n == 0) ? 100 : 0; in_im[n] = (n == 0) ? -20 : 0; end
    run(0, "impulse");
    begin
      bit ok; ok = (out_exp == 0);
      foreach (out_re[k]) ok &= (out_re[k] == 100) && (out_im[k] == -20);
      check(ok, "impulse transform is exact");
    end

    // Constant 1: bin 0 = N = 64 * 2**2, others 0.
    foreach (in_re[n]) begin in_re[n] = 1; in_im[n] = 0; end
    run(0, "constant");
    begin
      bit ok; ok = (out_exp == 2) && (out_re[0] == 64) && (out_im[0] == 0);
      for (int k = 1; k < N; k++) ok &= (out_re[k] == 0) && (out_im[k] == 0);
      check(ok, "constant transform is exact");
      if (!ok) $display("exp=%0d X0=%0d,%0d X1=%0d X2=%0d X128=%0d", out_exp, out_re[0], out_im[0], out_re[1], out_re[2], out_re[128]);
    end

    // 2-bit GNSS-like samples (+-1, +-3), random 8-bit, and a full-scale tone.
    foreach (in_re[n]) begin
      in_re[n] = 2 * $urandom_range(0, 3) - 3; in_im[n] = 2 * $urandom_range(0, 3) - 3;
    end
    run(0, "2-bit samples fwd");
    foreach (in_re[n]) begin
      in_re[n] = $urandom_range(0, 255) - 128; in_im[n] = $urandom_range(0, 255) - 128;
    end
    bp_random = 1;
    run(0, "random fwd backpressure");
    run(1, "random inv backpressure");
    bp_random = 0;
    foreach (in_re[n]) begin
      in_re[n] = $rtoi(127.0 * $cos(2.0 * PI * 5 * n / N));
      in_im[n] = $rtoi(127.0 * $sin(2.0 * PI * 5 * n / N));
    end
    run(0, "tone fwd");
    check(out_re[5] > 100, "tone lands in bin 5");
    run(1, "tone inv");

    // Back to back: the second block loads into the other bank without a
    // stall while the first is computed, and blocks leave N + CALC + 2
    // cycles apart (unload, start, compute, normalise).
    begin
      int e1, e2, t1, t2;
      fork
        begin
          send(0, 0); e1 = eop_cycle;
          send(1, 0); e2 = eop_cycle;
        end
        begin
          receive(); t1 = sop_cycle;
          compare(0, "back-to-back fwd");
          receive(); t2 = sop_cycle;
          compare(1, "back-to-back inv");
        end
      join
      check(e2 - e1 == N, $sformatf("second block loaded without stall (%0d)", e2 - e1));
      check(t2 - t1 == N + CALC + 2, $sformatf("block period %0d", t2 - t1));
      check(e2 < t2 - LAT, "second block loaded before it is computed");
    end
    // Three blocks in a row: the third must wait for a free bank.
    begin
      int e2, e3;
      fork
        begin
          send(0, 0);
          send(0, 0); e2 = eop_cycle;
          send(0, 0); e3 = eop_cycle;
        end
        begin receive(); receive(); receive(); end
      join
      check(e3 - e2 > N, $sformatf("third block stalled until a bank was free (%0d)", e3 - e2));
      compare(0, "third block");
    end

    // Framing errors.
    foreach (in_re[n]) begin in_re[n] = $urandom_range(0, 7) - 4; in_im[n] = $urandom_range(0, 7) - 4; end
    send(0, 1);
    @(posedge clk);
    check(source_error == 2'b01 && sink_ready, "missing sop reported, block dropped");
    send(0, 2);
    @(posedge clk);
    check(source_error == 2'b11 && sink_ready, "unexpected eop reported, block dropped");
    send(0, 3);
    @(posedge clk);
    check(source_error == 2'b10 && sink_ready, "missing eop reported, block dropped");
    run(0, "good block after errors");
    check(source_error == 2'b00, "error cleared by a good block");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
