// lw_decoder: address decoder behind the lightweight processor-to-FPGA
// bridge. It selects one of the four PIO windows of the accelerator and
// returns that window's read data.
//
// The bridge presents byte addresses relative to its base (LW_ADDR_W bits,
// a 2 MB window). Each PIO occupies 16 bytes at the offsets of the original design's
// address map: hps2fftcontrol1 0x0001_0070, input_data2 0x0001_00D0,
// output_data 0x0002_00A0, fft2hpscontrol 0x0002_00C0. Address bits 3:2 go
// to the selected PIO as its word offset.
//
// Timing: no wait states. A write reaches the selected PIO in the request
// cycle. Read data is registered: readdatavalid is high, with readdata, in
// the cycle after the read request. Unmapped addresses read as zero and
// ignore writes. The register stage and zero for unmapped reads are this
// design's choices.
module lw_decoder
  import gnss_fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // bridge side
  input  mm_req_t       req,
  output logic [31:0]   readdata,
  output logic          readdatavalid,
  // PIO side: one chip select per window, shared word offset and data
  output logic [3:0]    cs,          // {fft2hpscontrol, output_data, input_data2, hps2fftcontrol1}
  output logic          pio_write,
  output logic [1:0]    pio_address,
  output logic [31:0]   pio_writedata,
  input  logic [31:0]   rd_ctrl_out, // hps2fftcontrol1 readdata
  input  logic [31:0]   rd_data_in,  // input_data2 readdata
  input  logic [31:0]   rd_data_out, // output_data readdata
  input  logic [31:0]   rd_sts       // fft2hpscontrol readdata
);

  localparam int unsigned WIN = 4;   // 16-byte windows

  function automatic logic hit(input logic [LW_ADDR_W-1:WIN] a, input logic [LW_ADDR_W-1:WIN] base);
    return a == base;
  endfunction

  always_comb begin
    cs[0] = hit(req.address[LW_ADDR_W-1:WIN], ADDR_HPS2FFTCONTROL1[LW_ADDR_W-1:WIN]);
    cs[1] = hit(req.address[LW_ADDR_W-1:WIN], ADDR_INPUT_DATA2[LW_ADDR_W-1:WIN]);
    cs[2] = hit(req.address[LW_ADDR_W-1:WIN], ADDR_OUTPUT_DATA[LW_ADDR_W-1:WIN]);
    cs[3] = hit(req.address[LW_ADDR_W-1:WIN], ADDR_FFT2HPSCONTROL[LW_ADDR_W-1:WIN]);
  end

  assign pio_write     = req.write;
  assign pio_address   = req.address[3:2];
  assign pio_writedata = req.writedata;

  logic [31:0] rd_mux;
  always_comb begin
    unique case (1'b1)
      cs[0]:   rd_mux = rd_ctrl_out;
      cs[1]:   rd_mux = rd_data_in;
      cs[2]:   rd_mux = rd_data_out;
      cs[3]:   rd_mux = rd_sts;
      default: rd_mux = 32'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      readdatavalid <= req.read;
      if (req.read) readdata <= rd_mux;
    end
  end

endmodule
