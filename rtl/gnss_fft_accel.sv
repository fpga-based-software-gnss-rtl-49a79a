// gnss_fft_accel: FPGA half of a GNSS acquisition engine on an SoC. Software
// on the processor runs parallel-code-phase acquisition and hands the three
// Fourier transforms per search cell (FFT of the carrier-wiped samples, FFT of
// the C/A-code replica, IFFT of their product) to this block.
//
// Structure (FIFO1 -> FFT -> FIFO2 + FIFO3, all single clock):
//   lw_decoder  decodes the lightweight-bridge address into four PIOs
//   pio_out     hps2fftcontrol1 (8 bit)  and input_data2 (16 bit), written by software
//   pio_in      fft2hpscontrol  (8 bit)  and output_data (16 bit), read by software
//   fft_ctrl    edge-triggered commands, packet framing, backpressure, status
//   fifo        FIFO1 input samples, FIFO2 output samples (16 bit), FIFO3
//               output exponents (6 bit); depth 32768 each
//   fftmod      one buffered-burst FFT/IFFT core, 32768 points, 8-bit samples
//
// Software use, per transform: for each of up to N samples write the sample
// to input_data2 and write 0x60 then 0x00 to hps2fftcontrol1; write START
// (with INVERSE as wanted) and clear it; poll fft2hpscontrol until the
// available bit is set; then for each of the N results read output_data and
// fft2hpscontrol (exponent) and pulse READ. A result is
// {imag[15:8], real[7:0]} * 2**exp.
//
// The bridge port is a simple memory-mapped request (byte address relative to
// the bridge base, no wait states) with registered read data one cycle later.
// The PIOs are at most 16 bits wide, so lw_readdata[31:16] is always zero.
// The partition, the four PIOs with their widths and addresses, the FIFO
// depths and widths, and the single shared FFT core follow the original receiver design; the
// rest is described in the sub-module headers.
module gnss_fft_accel
  import gnss_fft_pkg::*;
#(
  parameter int unsigned LOG2N = FFT_LOG2N
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mm_req_t     lw_req,
  output logic [31:0] lw_readdata,
  output logic        lw_readdatavalid,
  output logic [1:0]  fft_error        // framing error reported by the core
);

  localparam int unsigned DEPTH = 1 << LOG2N;

  // Bridge decode and PIOs
  logic [3:0]  cs;
  logic        pio_write;
  logic [1:0]  pio_address;
  logic [31:0] pio_writedata;
  logic [31:0] rd_ctrl_out, rd_data_in, rd_data_out, rd_sts;
  logic [CTRL_W-1:0] hps2fftcontrol1, fft2hpscontrol;
  logic [WORD_W-1:0] input_data2, output_data;

  lw_decoder u_dec (
    .clk, .rst_n,
    .req(lw_req), .readdata(lw_readdata), .readdatavalid(lw_readdatavalid),
    .cs, .pio_write, .pio_address, .pio_writedata,
    .rd_ctrl_out, .rd_data_in, .rd_data_out, .rd_sts
  );

  pio_out #(.WIDTH(CTRL_W)) u_hps2fftcontrol1 (
    .clk, .rst_n, .chipselect(cs[0]), .write(pio_write), .address(pio_address),
    .writedata(pio_writedata), .readdata(rd_ctrl_out), .out_port(hps2fftcontrol1)
  );
  pio_out #(.WIDTH(WORD_W)) u_input_data2 (
    .clk, .rst_n, .chipselect(cs[1]), .write(pio_write), .address(pio_address),
    .writedata(pio_writedata), .readdata(rd_data_in), .out_port(input_data2)
  );
  pio_in #(.WIDTH(WORD_W)) u_output_data (
    .clk, .rst_n, .address(pio_address), .readdata(rd_data_out), .in_port(output_data)
  );
  pio_in #(.WIDTH(CTRL_W)) u_fft2hpscontrol (
    .clk, .rst_n, .address(pio_address), .readdata(rd_sts), .in_port(fft2hpscontrol)
  );

  // Control
  logic              fifo_aclr;
  logic              f1_wrreq, f1_rdreq, f1_empty;
  logic [WORD_W-1:0] f1_data, f1_q;
  logic              f2_wrreq, f2_rdreq, f2_empty, f2_full, f3_full;
  logic [WORD_W-1:0] f2_data, f2_q;
  logic [EXP_W-1:0]  f3_data, f3_q;
  logic              clk_ena, inverse, sink_valid, sink_sop, sink_eop, sink_ready;
  logic [1:0]        sink_error;
  cplx8_t            sink_data, source_data;
  logic              source_ready, source_valid, source_sop, source_eop;
  logic [EXP_W-1:0]  source_exp;

  fft_ctrl #(.LOG2N(LOG2N)) u_ctrl (
    .clk, .rst_n,
    .ctrl(hps2fftcontrol1), .din(input_data2), .dout(output_data), .status(fft2hpscontrol),
    .fifo_aclr, .f1_wrreq, .f1_data, .f1_rdreq, .f1_q, .f1_empty,
    .f2_wrreq, .f2_data, .f3_data, .f2_rdreq, .f2_q, .f2_empty, .f2_full, .f3_q, .f3_full,
    .clk_ena, .inverse, .sink_valid, .sink_sop, .sink_eop, .sink_data, .sink_error, .sink_ready,
    .source_ready, .source_valid, .source_data, .source_exp
  );

  // FIFO1: processor samples waiting for the core.
  logic f1_full, f1_afull, f1_aempty;
  logic [LOG2N-1:0] f1_usedw;
  fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) fifo1 (
    .clock(clk), .aclr(fifo_aclr), .data(f1_data), .wrreq(f1_wrreq), .rdreq(f1_rdreq),
    .q(f1_q), .full(f1_full), .empty(f1_empty), .almost_full(f1_afull),
    .almost_empty(f1_aempty), .usedw(f1_usedw)
  );

  // FIFO2: transformed samples; FIFO3: their block exponent.
  logic f2_afull, f2_aempty, f3_empty, f3_afull, f3_aempty;
  logic [LOG2N-1:0] f2_usedw, f3_usedw;
  fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) fifo2 (
    .clock(clk), .aclr(fifo_aclr), .data(f2_data), .wrreq(f2_wrreq), .rdreq(f2_rdreq),
    .q(f2_q), .full(f2_full), .empty(f2_empty), .almost_full(f2_afull),
    .almost_empty(f2_aempty), .usedw(f2_usedw)
  );
  fifo #(.WIDTH(EXP_W), .DEPTH(DEPTH)) fifo3 (
    .clock(clk), .aclr(fifo_aclr), .data(f3_data), .wrreq(f2_wrreq), .rdreq(f2_rdreq),
    .q(f3_q), .full(f3_full), .empty(f3_empty), .almost_full(f3_afull),
    .almost_empty(f3_aempty), .usedw(f3_usedw)
  );

  // The single FFT/IFFT core.
  fftmod #(.LOG2N(LOG2N), .DW(SAMPLE_W), .EXPW(EXP_W)) fftm2 (
    .clk, .clk_ena, .reset_n(rst_n), .inverse,
    .sink_valid, .sink_sop, .sink_eop,
    .sink_real(sink_data.re), .sink_imag(sink_data.im), .sink_error, .sink_ready,
    .source_ready, .source_valid, .source_sop, .source_eop,
    .source_real(source_data.re), .source_imag(source_data.im),
    .source_exp(source_exp), .source_error(fft_error)
  );

  // FIFO2 and FIFO3 are written and read together and must agree.
  assert property (@(posedge clk) disable iff (!rst_n) f2_empty == f3_empty)
    else $error("gnss_fft_accel: data and exponent FIFOs out of step");

endmodule
