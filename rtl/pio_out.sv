// pio_out: processor-to-FPGA parallel output port (the hps2fftcontrol1 and
// input_data2 registers of the accelerator).
//
// The processor writes a value over the lightweight bridge; the register
// drives it on out_port until the next write. Its 16-byte address window holds
// four 32-bit word registers: offset 0 is the data register (read back as
// written), offsets 4, 8 and 12 read as zero and ignore writes. Only the
// window's word offset (address bits 3:2) reaches this module; the bridge
// decoder has already selected it.
//
// The widths (8 bits for control, 16 bits for data) follow the original receiver design; the
// register map inside the window and the reset value of zero are this
// design's choice. Timing: out_port changes on the clock edge of the write;
// readdata is combinational from the register.
module pio_out #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chipselect,
  input  logic             write,
  input  logic [1:0]       address,    // word offset in the window
  input  logic [31:0]      writedata,
  output logic [31:0]      readdata,
  output logic [WIDTH-1:0] out_port
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                     out_port <= '0;
    else if (chipselect && write && address == 2'd0) out_port <= writedata[WIDTH-1:0];
  end

  assign readdata = (address == 2'd0) ? 32'(out_port) : 32'd0;

endmodule
