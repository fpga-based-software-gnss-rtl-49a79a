// fifo: single-clock first-in first-out buffer, the FIFO1/FIFO2/FIFO3 of
// the accelerator.
//
// Ports follow the single-clock FIFO interface of the original receiver design: aclr clears the
// contents asynchronously, wrreq stores data on a clock edge, rdreq removes
// the oldest word, and full, empty, almost_full, almost_empty and usedw
// report the fill state. Depth 32768 and widths 16 (sample FIFOs) and 6
// (exponent FIFO) are that design's sizes.
//
// Timing: show-ahead. q always presents the oldest stored word while empty
// is low; rdreq in a cycle pops it and the next word appears after the edge.
// A write to a full FIFO and a read from an empty one are ignored.
// Simultaneous read and write on a non-empty FIFO keep the count constant.
//
// usedw is USEDW_W bits wide (15 for depth 32768, as in the original) and reads
// 0 when empty. The original states that a full FIFO shows 32767; a 15-bit
// count cannot hold 32768, so this FIFO saturates usedw at its all-ones value
// when full. The almost_full / almost_empty thresholds are not given and are
// parameters of this design. DEPTH must be a power of two. The show-ahead
// output is an asynchronous read of the storage array; a block-RAM mapping
// would need a one-word prefetch register in front of q.
module fifo #(
  parameter int unsigned WIDTH        = 16,
  parameter int unsigned DEPTH        = 32768,
  parameter int unsigned ALMOST_FULL  = DEPTH - 16,  // almost_full when count >= this
  parameter int unsigned ALMOST_EMPTY = 16,          // almost_empty when count < this
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned USEDW_W = AW
) (
  input  logic               clock,
  input  logic               aclr,
  input  logic [WIDTH-1:0]   data,
  input  logic               wrreq,
  input  logic               rdreq,
  output logic [WIDTH-1:0]   q,
  output logic               full,
  output logic               empty,
  output logic               almost_full,
  output logic               almost_empty,
  output logic [USEDW_W-1:0] usedw
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign do_rd = rdreq && (count != 0);
  assign do_wr = wrreq && (count != (AW+1)'(DEPTH) || do_rd);

  always_ff @(posedge clock or posedge aclr) begin
    if (aclr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Storage has no reset, as a block RAM.
  always_ff @(posedge clock) begin
    if (do_wr) mem[wr_ptr] <= data;
  end

  assign q            = mem[rd_ptr];
  assign empty        = (count == 0);
  assign full         = (count == (AW+1)'(DEPTH));
  assign almost_full  = (count >= (AW+1)'(ALMOST_FULL));
  assign almost_empty = (count <  (AW+1)'(ALMOST_EMPTY));
  assign usedw        = full ? '1 : count[USEDW_W-1:0];

endmodule
