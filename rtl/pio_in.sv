// pio_in: FPGA-to-processor parallel input port (the fft2hpscontrol and
// output_data registers of the accelerator).
//
// The processor reads the current value of in_port over the lightweight
// bridge. The 16-byte window holds four 32-bit word registers: offset 0 is
// the data register, the others read as zero. in_port is sampled into a
// register every clock so that the value returned is the one present one
// cycle before the read data is taken.
//
// The widths (8 bits for status, 16 bits for data) follow the original receiver design; the
// register map inside the window and the input register are this design's
// choice. Timing: readdata is combinational from the sampling register.
module pio_in #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       address,    // word offset in the window
  output logic [31:0]      readdata,
  input  logic [WIDTH-1:0] in_port
);

  logic [WIDTH-1:0] sampled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sampled <= '0;
    else        sampled <= in_port;
  end

  assign readdata = (address == 2'd0) ? 32'(sampled) : 32'd0;

endmodule
