// fft_ctrl: glue logic that lets software on the processor drive the FFT core
// through two 8-bit and two 16-bit PIO registers, with FIFOs absorbing the
// difference in speed between the processor's bus writes and the fabric.
//
// A processor register write lasts many fabric clocks, so every command in
// hps2fftcontrol1 is acted on once, at the rising edge of its bit(s):
//   bits 6:5 = 2'b11 (the write-request code 0x60): push input_data2 into
//                 FIFO1 (one complex sample, real in 7:0, imaginary in 15:8)
//   bit 2 START:  stream N words from FIFO1 into the core as one packet with
//                 sink_sop/sink_eop; bit 1 (INVERSE) is sampled here and
//                 selects FFT (0) or IFFT (1). If FIFO1 runs empty before N
//                 words, the rest of the packet is zero (zero padding).
//   bit 3 READ:   pop one word from FIFO2 (data) and FIFO3 (exponent)
//   bit 0 CLEAR:  level; clears all three FIFOs and abandons streaming (reset
//                 clears them too)
// The core's output is written into FIFO2 / FIFO3 as it appears; the core is
// held (source_ready low) while either is full.
// Status to the processor: output_data shows the oldest word of FIFO2, and
// fft2hpscontrol = {busy, available, exponent[5:0]} where available means
// FIFO2 is not empty and busy means a packet is being streamed or the core
// is not ready for a new one.
//
// Following the original receiver design: the FIFO placement, the write-request code, and the
// fact that clk_ena, sink_sop, sink_eop, sink_valid and source_ready are made
// in the fabric while data and inverse come from the processor. The other
// bit assignments, edge-triggered commands and zero padding are this
// design's choices. Timing: a command acts in the cycle after the clock edge
// at which its register bit is seen rising; one sample is streamed per clock
// while the core is ready.
module fft_ctrl
  import gnss_fft_pkg::*;
#(
  parameter int unsigned LOG2N = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  // PIO side
  input  logic [CTRL_W-1:0]   ctrl,        // hps2fftcontrol1
  input  logic [WORD_W-1:0]   din,         // input_data2
  output logic [WORD_W-1:0]   dout,        // output_data
  output logic [CTRL_W-1:0]   status,      // fft2hpscontrol
  // FIFOs
  output logic                fifo_aclr,
  output logic                f1_wrreq,
  output logic [WORD_W-1:0]   f1_data,
  output logic                f1_rdreq,
  input  logic [WORD_W-1:0]   f1_q,
  input  logic                f1_empty,
  output logic                f2_wrreq,    // also FIFO3
  output logic [WORD_W-1:0]   f2_data,
  output logic [EXP_W-1:0]    f3_data,
  output logic                f2_rdreq,    // also FIFO3
  input  logic [WORD_W-1:0]   f2_q,
  input  logic                f2_empty,
  input  logic                f2_full,
  input  logic [EXP_W-1:0]    f3_q,
  input  logic                f3_full,
  // FFT core
  output logic                clk_ena,
  output logic                inverse,
  output logic                sink_valid,
  output logic                sink_sop,
  output logic                sink_eop,
  output cplx8_t              sink_data,
  output logic [1:0]          sink_error,
  input  logic                sink_ready,
  output logic                source_ready,
  input  logic                source_valid,
  input  cplx8_t              source_data,
  input  logic [EXP_W-1:0]    source_exp
);

  localparam int unsigned N = 1 << LOG2N;

  logic [CTRL_W-1:0] ctrl_q;
  logic              wr_cmd, start_cmd, read_cmd;
  logic              feeding, inv_q;
  logic [LOG2N-1:0]  fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl_q <= '0;
    else        ctrl_q <= ctrl;
  end

  assign wr_cmd    = (ctrl[CTL_WR_HI:CTL_WR_LO] == 2'b11) && (ctrl_q[CTL_WR_HI:CTL_WR_LO] != 2'b11);
  assign start_cmd = ctrl[CTL_START] && !ctrl_q[CTL_START];
  assign read_cmd  = ctrl[CTL_READ]  && !ctrl_q[CTL_READ];
  assign fifo_aclr = ctrl[CTL_CLEAR] || !rst_n;

  // Processor -> FIFO1
  assign f1_wrreq = wr_cmd && !fifo_aclr;
  assign f1_data  = din;

  // FIFO1 -> core
  assign clk_ena    = 1'b1;
  assign inverse    = inv_q;
  assign sink_error = 2'b00;
  assign sink_valid = feeding;
  assign sink_sop   = feeding && (fcnt == '0);
  assign sink_eop   = feeding && (fcnt == LOG2N'(N - 1));
  assign sink_data  = f1_empty ? cplx8_t'('0) : cplx8_t'(f1_q);
  assign f1_rdreq   = feeding && sink_ready && !f1_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0;
      fcnt    <= '0;
      inv_q   <= 1'b0;
    end else if (fifo_aclr) begin
      feeding <= 1'b0;
      fcnt    <= '0;
    end else if (!feeding) begin
      if (start_cmd) begin
        feeding <= 1'b1;
        fcnt    <= '0;
        inv_q   <= ctrl[CTL_INVERSE];
      end
    end else if (sink_ready) begin
      fcnt <= fcnt + 1'b1;
      if (sink_eop) feeding <= 1'b0;
    end
  end

  // core -> FIFO2 / FIFO3
  assign source_ready = !f2_full && !f3_full;
  assign f2_wrreq     = source_valid && source_ready && !fifo_aclr;
  assign f2_data      = source_data;
  assign f3_data      = source_exp;

  // FIFO2 / FIFO3 -> processor
  assign f2_rdreq = read_cmd && !f2_empty;
  assign dout     = f2_q;
  always_comb begin
    status                  = '0;
    status[EXP_W-1:0]       = f3_q;
    status[STS_AVAIL]       = !f2_empty;
    status[STS_BUSY]        = feeding || !sink_ready;
  end

endmodule
