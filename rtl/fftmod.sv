// fftmod: buffered-burst FFT / IFFT core with block floating point, in the role
// of the buffered-burst FFT core of the acquisition accelerator.
//
// One core serves all three transforms of a parallel-code-phase acquisition
// (FFT of the incoming samples, FFT of the C/A-code replica, IFFT of their
// product): the `inverse` input, sampled with the first sample of a block,
// selects the direction. The transform length (32768), the 8-bit real and
// imaginary ports, the 6-bit exponent and the port list are those of the
// original receiver design; the inner architecture below is this design's own.
//
// How it works: the working memory has two banks, each holding one block as
// N/P rows of P words. While one bank is computed and unloaded, the other
// accepts the next block (input buffering), so loading overlaps the work on
// the previous block. A block is loaded, one sample per clock, in
// bit-reversed order. The core then runs LOG2N radix-2 decimation-in-time
// passes in place, reading two whole rows per clock and running P butterflies
// on their 2P words:
//   passes with span 2**pass <= P: two adjacent rows hold a contiguous run of
//     2P samples and all P butterflies lie inside it;
//   passes with span > P: the rows ra and ra + span/P are paired column by
//     column.
// Twiddle factors come from a ROM computed at elaboration,
// tw[k] = exp(-j*2*pi*k/N), conjugated for the inverse. Samples enter the
// working memory scaled up by 2**(IW-DW-1), so that the IW-bit words carry
// fraction bits below the port's integer LSB. Before each pass the largest
// magnitude written in the previous pass picks a right shift of 0, 1 or 2 for
// that pass so that no butterfly can overflow; the shifts add up into the
// block exponent, which starts at -(IW-DW-1). At the end the block is shifted
// once more to fit DW-bit outputs. Rounding is by truncation throughout. The
// inverse transform is not divided by N.
//
//   true output value = source_real/imag * 2**source_exp  (source_exp signed)
//
// Interface (Avalon-ST style, ready latency 0): a packet of exactly N samples
// framed by sink_sop and sink_eop is accepted while sink_ready is high and
// sink_valid is set; sink_ready is low only while both banks hold blocks.
// Output is a packet of N samples in natural frequency (or time) order with
// source_sop/source_eop, advanced when source_ready is high. sink_ready is not
// among the ports of the original core; it is added so that the feeding logic
// knows when the core can take samples. source_error reports the last framing
// error (01 missing sop, 10 missing eop, 11 unexpected eop); a malformed
// packet is dropped. A non-zero sink_error aborts the packet being loaded.
// clk_ena freezes the core when low.
//
// Timing: load N cycles; compute LOG2N*N/(2P) cycles (30720 for N = 32768,
// P = 8); 1 start and 1 normalisation cycle; the first output is valid
// LOG2N*N/(2P) + 2 cycles after the clock edge that accepts sink_eop when the
// core is idle; output N cycles without backpressure. Back-to-back blocks
// leave N + LOG2N*N/(2P) + 2 cycles apart (65490 at the defaults). The
// original receiver's core computes a block in about 28800 cycles and
// sustains 36864 cycles per block, also overlapping its output with the work
// on the next block, which this core does not do.
module fftmod #(
  parameter int unsigned LOG2N = 15,
  parameter int unsigned P     = 8,    // butterflies per clock (power of two)
  parameter int unsigned DW    = 8,    // port sample width (real or imag)
  parameter int unsigned IW    = 16,   // working memory word width
  parameter int unsigned TWW   = 16,   // twiddle width, 1.0 = 2**(TWW-2)
  parameter int unsigned EXPW  = 6
) (
  input  logic                 clk,
  input  logic                 clk_ena,
  input  logic                 reset_n,
  input  logic                 inverse,
  input  logic                 sink_valid,
  input  logic                 sink_sop,
  input  logic                 sink_eop,
  input  logic signed [DW-1:0] sink_real,
  input  logic signed [DW-1:0] sink_imag,
  input  logic [1:0]           sink_error,
  output logic                 sink_ready,
  input  logic                 source_ready,
  output logic                 source_valid,
  output logic                 source_sop,
  output logic                 source_eop,
  output logic signed [DW-1:0] source_real,
  output logic signed [DW-1:0] source_imag,
  output logic signed [EXPW-1:0] source_exp,
  output logic [1:0]           source_error
);

  import gnss_fft_pkg::*;

  localparam int unsigned N    = 1 << LOG2N;
  localparam int unsigned COLW = $clog2(P);           // column address bits
  localparam int unsigned NR   = N / P;               // rows
  localparam int unsigned RAW  = LOG2N - COLW;        // row address bits
  localparam int unsigned CAW  = (COLW > 0) ? COLW : 1; // column index width
  localparam int unsigned SW   = $clog2(LOG2N + 1);   // pass counter width
  localparam int unsigned TFR  = TWW - 2;             // twiddle fraction bits
  localparam int unsigned PW   = IW + TWW + 1;        // product width
  localparam int unsigned RW   = $clog2(IW - DW + 1) + 1;
  localparam int unsigned FRAC = IW - DW - 1;         // input fraction bits
  localparam int unsigned LAST_BF = N / (2 * P) - 1;  // last cycle of a pass

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_NORM, S_OUT} state_e;
  state_e state;

  // ------------------------------------------------------------------
  // Storage
  // ------------------------------------------------------------------
  // Two banks, one loading while the other computes and unloads; the bank is
  // the top bit of the row address.
  logic signed [IW-1:0]  mem_re [2*NR][P];
  logic signed [IW-1:0]  mem_im [2*NR][P];
  logic signed [TWW-1:0] tw_re  [N/2];
  logic signed [TWW-1:0] tw_im  [N/2];

  // Twiddle ROM contents, fixed at elaboration:
  //   tw_re[k] = round(2**TFR * cos(2*pi*k/N)), tw_im[k] = round(-2**TFR * sin(2*pi*k/N))
  initial begin
    for (int k = 0; k < int'(N/2); k++) begin
      tw_re[k] = TWW'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TFR) + 0.5)));
      tw_im[k] = TWW'($rtoi($floor(-$sin(2.0 * 3.14159265358979323846 * k / N) * (2.0 ** TFR) + 0.5)));
    end
  end

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] a);
    for (int b = 0; b < int'(LOG2N); b++) bitrev[b] = a[LOG2N-1-b];
  endfunction

  // Magnitude for range tracking: v for v >= 0, -v-1 for v < 0.
  function automatic logic [IW-2:0] mag(input logic signed [IW-1:0] v);
    return v[IW-1] ? ~v[IW-2:0] : v[IW-2:0];
  endfunction

  function automatic logic [1:0] pick_shift(input logic [IW-2:0] m);
    if (m < (IW-1)'(1 << (IW-3)))      return 2'd0;
    else if (m < (IW-1)'(1 << (IW-2))) return 2'd1;
    else                               return 2'd2;
  endfunction

  // ------------------------------------------------------------------
  // Control registers
  // ------------------------------------------------------------------
  // load side
  logic             lb;         // bank being loaded
  logic [LOG2N-1:0] ld_cnt;     // index of the next sample
  logic             in_pkt;     // a load packet has started
  logic             ld_inv;     // direction requested with sink_sop
  logic [IW-2:0]    ld_run;     // largest magnitude loaded so far
  logic [1:0]       full;       // bank holds a block not yet unloaded
  logic [1:0]       inv_b;      // direction of each loaded block
  logic [IW-2:0]    max_b [2];  // largest input magnitude of each loaded block
  // process side
  logic             pb;         // bank being computed or unloaded
  logic [LOG2N-1:0] cnt;        // butterfly-group / output index
  logic [SW-1:0]    pass;       // current radix-2 pass
  logic             inv_q;      // direction of the block being processed
  logic [IW-2:0]    max_prev;   // largest magnitude entering this pass
  logic [IW-2:0]    max_run;    // largest magnitude written in this pass
  logic [1:0]       shift_cur;  // right shift of this pass
  logic signed [EXPW-1:0] exp_q; // accumulated exponent
  logic [RW-1:0]    out_sh;     // final shift to DW bits
  logic [1:0]       err_q;

  // ------------------------------------------------------------------
  // Butterfly datapath: P butterflies on the 2P words of rows ra and rb
  // ------------------------------------------------------------------
  logic [RAW-1:0]        ra, rb;
  logic signed [IW-1:0]  v_re [2*P], v_im [2*P];     // words read
  logic signed [IW-1:0]  n_re [2*P], n_im [2*P];     // words written
  logic [IW-2:0]         bf_max;

  always_comb begin
    int unsigned span, hr;
    logic [COLW:0]    u, w;
    logic [LOG2N-1:0] pos;
    logic [LOG2N-2:0] k;
    logic signed [TWW-1:0] wr, wi;
    logic signed [IW+1:0]  pr, pi;
    logic signed [IW+1:0]  s0r, s0i, s1r, s1i;

    span = 1 << pass;
    if (int'(pass) <= int'(COLW)) begin
      hr = 1;
      ra = RAW'(cnt << 1);
    end else begin
      hr = 1 << (32'(pass) - COLW);
      ra = RAW'(((cnt >> (32'(pass) - COLW)) << (32'(pass) - COLW + 1)) | (cnt & LOG2N'(hr - 1)));
    end
    rb = ra + RAW'(hr);

    for (int t = 0; t < int'(P); t++) begin
      v_re[t]     = mem_re[{pb, ra}][t];
      v_im[t]     = mem_im[{pb, ra}][t];
      v_re[P + t] = mem_re[{pb, rb}][t];
      v_im[P + t] = mem_im[{pb, rb}][t];
    end
    n_re   = v_re;
    n_im   = v_im;
    bf_max = max_run;

    for (int b = 0; b < int'(P); b++) begin
      if (int'(pass) <= int'(COLW)) begin
        pos = LOG2N'(b & (span - 1));
        u   = (COLW+1)'(((b >> pass) << (pass + 1)) | (b & (span - 1)));
        w   = (COLW+1)'(32'(u) + span);
      end else begin
        pos = LOG2N'(((32'(ra) & (hr - 1)) << COLW) | b);
        u   = (COLW+1)'(b);
        w   = (COLW+1)'(P + b);
      end
      k  = (LOG2N-1)'(pos << (LOG2N - 1 - 32'(pass)));
      wr = tw_re[k];
      wi = inv_q ? -tw_im[k] : tw_im[k];
      pr = (IW+2)'((PW'(v_re[w]) * PW'(wr) - PW'(v_im[w]) * PW'(wi)) >>> TFR);
      pi = (IW+2)'((PW'(v_re[w]) * PW'(wi) + PW'(v_im[w]) * PW'(wr)) >>> TFR);
      s0r = (IW+2)'(v_re[u]) + pr;
      s0i = (IW+2)'(v_im[u]) + pi;
      s1r = (IW+2)'(v_re[u]) - pr;
      s1i = (IW+2)'(v_im[u]) - pi;
      n_re[u] = IW'(s0r >>> shift_cur);
      n_im[u] = IW'(s0i >>> shift_cur);
      n_re[w] = IW'(s1r >>> shift_cur);
      n_im[w] = IW'(s1i >>> shift_cur);
      if (mag(n_re[u]) > bf_max) bf_max = mag(n_re[u]);
      if (mag(n_im[u]) > bf_max) bf_max = mag(n_im[u]);
      if (mag(n_re[w]) > bf_max) bf_max = mag(n_re[w]);
      if (mag(n_im[w]) > bf_max) bf_max = mag(n_im[w]);
    end
  end

  // ------------------------------------------------------------------
  // Load side
  // ------------------------------------------------------------------
  logic accept;
  logic signed [IW-1:0] ld_re, ld_im;
  logic [IW-2:0] ld_max;
  logic load_we;
  logic [LOG2N-1:0] load_addr;

  assign sink_ready = !full[lb];
  assign accept     = clk_ena && sink_ready && sink_valid;
  assign ld_re      = IW'(sink_real) <<< FRAC;
  assign ld_im      = IW'(sink_imag) <<< FRAC;

  always_comb begin
    ld_max = sink_sop ? '0 : ld_run;
    if (mag(ld_re) > ld_max) ld_max = mag(ld_re);
    if (mag(ld_im) > ld_max) ld_max = mag(ld_im);
  end

  // A sample is stored when it is the first of a packet or continues one.
  assign load_we   = accept && (sink_error == 2'b00) && (sink_sop || in_pkt);
  assign load_addr = bitrev(sink_sop ? '0 : ld_cnt);

  // ------------------------------------------------------------------
  // Output side
  // ------------------------------------------------------------------
  logic signed [IW-1:0] rd_re, rd_im;
  assign rd_re        = mem_re[{pb, RAW'(cnt >> COLW)}][CAW'(cnt & LOG2N'(P - 1))];
  assign rd_im        = mem_im[{pb, RAW'(cnt >> COLW)}][CAW'(cnt & LOG2N'(P - 1))];
  assign source_valid = (state == S_OUT);
  assign source_sop   = source_valid && (cnt == '0);
  assign source_eop   = source_valid && (cnt == LOG2N'(N - 1));
  assign source_real  = DW'(rd_re >>> out_sh);
  assign source_imag  = DW'(rd_im >>> out_sh);
  assign source_exp   = exp_q;
  assign source_error = err_q;

  // ------------------------------------------------------------------
  // Working memory writes (no reset, as block RAM)
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (clk_ena) begin
      if (load_we) begin
        mem_re[{lb, RAW'(load_addr >> COLW)}][CAW'(load_addr & LOG2N'(P - 1))] <= ld_re;
        mem_im[{lb, RAW'(load_addr >> COLW)}][CAW'(load_addr & LOG2N'(P - 1))] <= ld_im;
      end
      if (state == S_CALC) begin
        for (int t = 0; t < int'(P); t++) begin
          mem_re[{pb, ra}][t] <= n_re[t];
          mem_im[{pb, ra}][t] <= n_im[t];
          mem_re[{pb, rb}][t] <= n_re[P + t];
          mem_im[{pb, rb}][t] <= n_im[P + t];
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Sequencer
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      lb        <= 1'b0;
      ld_cnt    <= '0;
      in_pkt    <= 1'b0;
      ld_inv    <= 1'b0;
      ld_run    <= '0;
      full      <= '0;
      inv_b     <= '0;
      max_b     <= '{default: '0};
      err_q     <= ST_ERR_NONE;
      pb        <= 1'b0;
      state     <= S_IDLE;
      cnt       <= '0;
      pass      <= '0;
      inv_q     <= 1'b0;
      max_prev  <= '0;
      max_run   <= '0;
      shift_cur <= '0;
      exp_q     <= '0;
      out_sh    <= '0;
    end else if (clk_ena) begin
      // Load side: frame the packet into bank lb; a complete block marks
      // the bank full and moves loading to the other bank.
      if (accept) begin
        if (sink_error != 2'b00) begin
          in_pkt <= 1'b0;                         // upstream error: drop block
          ld_cnt <= '0;
        end else if (sink_sop) begin
          if (in_pkt) err_q <= ST_ERR_MISS_EOP;   // previous block never ended
          else        err_q <= ST_ERR_NONE;
          ld_inv <= inverse;
          ld_run <= ld_max;
          ld_cnt <= LOG2N'(1);
          in_pkt <= !sink_eop;
          if (sink_eop) err_q <= ST_ERR_UNEX_EOP;
        end else if (!in_pkt) begin
          err_q <= ST_ERR_MISS_SOP;
        end else begin
          ld_run <= ld_max;
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == LOG2N'(N - 1)) begin
            in_pkt <= 1'b0;
            ld_cnt <= '0;
            if (sink_eop) begin
              full[lb]  <= 1'b1;
              inv_b[lb] <= ld_inv;
              max_b[lb] <= ld_max;
              lb        <= !lb;
            end else begin
              err_q <= ST_ERR_MISS_EOP;
            end
          end else if (sink_eop) begin
            err_q  <= ST_ERR_UNEX_EOP;
            in_pkt <= 1'b0;
            ld_cnt <= '0;
          end
        end
      end

      // Process side: compute and unload bank pb, then free it.
      unique case (state)
        S_IDLE: if (full[pb]) begin
          state     <= S_CALC;
          cnt       <= '0;
          pass      <= '0;
          inv_q     <= inv_b[pb];
          max_run   <= '0;
          exp_q     <= -EXPW'(FRAC);
          shift_cur <= pick_shift(max_b[pb]);
        end

        S_CALC: begin
          if (cnt == LOG2N'(LAST_BF)) begin
            cnt       <= '0;
            exp_q     <= exp_q + EXPW'(shift_cur);
            max_prev  <= bf_max;
            max_run   <= '0;
            shift_cur <= pick_shift(bf_max);
            if (pass == SW'(LOG2N - 1)) state <= S_NORM;
            else                        pass  <= pass + 1'b1;
          end else begin
            cnt     <= cnt + 1'b1;
            max_run <= bf_max;
          end
        end

        S_NORM: begin
          // Smallest shift that brings the block into DW-bit range.
          logic [RW-1:0] r;
          r = RW'(IW - DW);
          for (int s = int'(IW - DW); s >= 0; s--)
            if (max_prev < (IW-1)'(1 << (DW - 1 + s))) r = RW'(s);
          out_sh <= r;
          exp_q  <= exp_q + EXPW'(r);
          cnt    <= '0;
          state  <= S_OUT;
        end

        S_OUT: if (source_ready) begin
          if (cnt == LOG2N'(N - 1)) begin
            cnt      <= '0;
            full[pb] <= 1'b0;
            pb       <= !pb;
            state    <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
