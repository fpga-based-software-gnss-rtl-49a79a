// gnss_fft_pkg: constants and types shared by the GNSS acquisition FFT
// accelerator.
//
// The accelerator sits in the FPGA fabric of an SoC and is reached by the
// processor through a 32-bit lightweight memory-mapped bridge. It holds four
// PIO registers, three FIFOs and one FFT/IFFT core. This package carries the
// sizes the modules agree on (transform length, sample and exponent widths),
// the PIO address map and the bit layout of the control and status bytes.
//
// Taken from the original receiver design: the 32768-point transform, 8-bit real
// and imaginary samples packed real in bits 7:0 and imaginary in bits 15:8,
// the 6-bit block exponent, 8-bit control/status and 16-bit data PIOs, the
// four PIO address windows and the write-request code 0x60. The meaning of
// the other control and status bits is this design's own choice.
package gnss_fft_pkg;

  // Transform length and data widths.
  localparam int unsigned FFT_LOG2N = 15;          // N = 32768
  localparam int unsigned FFT_N     = 1 << FFT_LOG2N;
  localparam int unsigned SAMPLE_W  = 8;           // real or imaginary part
  localparam int unsigned WORD_W    = 2 * SAMPLE_W; // {imag, real}
  localparam int unsigned EXP_W     = 6;           // block exponent
  localparam int unsigned CTRL_W    = 8;           // control / status PIOs

  // Lightweight bridge: byte address offsets of the PIO windows (each window
  // is 16 bytes, four 32-bit registers of which offset 0 is the data).
  localparam int unsigned LW_ADDR_W = 21;          // 2 MB bridge window
  localparam logic [LW_ADDR_W-1:0] ADDR_HPS2FFTCONTROL1 = 21'h0_0070;
  localparam logic [LW_ADDR_W-1:0] ADDR_INPUT_DATA2     = 21'h0_00D0;
  localparam logic [LW_ADDR_W-1:0] ADDR_OUTPUT_DATA     = 21'h2_00A0;
  localparam logic [LW_ADDR_W-1:0] ADDR_FFT2HPSCONTROL  = 21'h2_00C0;

  // hps2fftcontrol1 bits.
  localparam int unsigned CTL_CLEAR   = 0;  // level: clear FIFOs, abort transfer
  localparam int unsigned CTL_INVERSE = 1;  // 1 = IFFT, sampled at START
  localparam int unsigned CTL_START   = 2;  // rising edge: stream FIFO1 into the core
  localparam int unsigned CTL_READ    = 3;  // rising edge: pop one output word
  localparam int unsigned CTL_WR_LO   = 5;  // bits 6:5 = 2'b11 (0x60):
  localparam int unsigned CTL_WR_HI   = 6;  //   rising edge pushes input_data2
  localparam logic [CTRL_W-1:0] CTL_WRITE_REQ = 8'h60;

  // fft2hpscontrol bits: [5:0] exponent of the word shown in output_data.
  localparam int unsigned STS_AVAIL = 6;    // output FIFO holds a word
  localparam int unsigned STS_BUSY  = 7;    // a transform is in progress

  // A complex sample as carried by the 16-bit PIOs and FIFOs (Table 6 order:
  // real in bits 7:0, imaginary in bits 15:8).
  typedef struct packed {
    logic signed [SAMPLE_W-1:0] im;
    logic signed [SAMPLE_W-1:0] re;
  } cplx8_t;

  // Avalon-ST packet error codes reported on source_error.
  typedef enum logic [1:0] {
    ST_ERR_NONE     = 2'b00,
    ST_ERR_MISS_SOP = 2'b01,
    ST_ERR_MISS_EOP = 2'b10,
    ST_ERR_UNEX_EOP = 2'b11
  } st_err_e;

  // Simple memory-mapped request from the bridge (no wait states).
  typedef struct packed {
    logic                 read;
    logic                 write;
    logic [LW_ADDR_W-1:0] address;   // byte address
    logic [31:0]          writedata;
  } mm_req_t;

endpackage
