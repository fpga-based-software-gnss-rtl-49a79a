// tb_fifo: self-checking testbench of the single-clock show-ahead FIFO.
//
// A 64-word FIFO is filled to full (writes beyond are ignored), drained to
// empty (reads beyond are ignored), then exercised with random simultaneous
// reads and writes for many cycles; every output word, and full, empty,
// almost_full, almost_empty and usedw, are compared each cycle with a queue
// model kept here. Finally aclr is checked to empty the FIFO at once.
module tb_fifo;
  localparam int W = 16, D = 64, AF = 60, AE = 4;
  logic clock = 0, aclr = 0;
  logic [W-1:0] data = 0;
  logic wrreq = 0, rdreq = 0;
  logic [W-1:0] q;
  logic full, empty, almost_full, almost_empty;
  logic [5:0] usedw;

  fifo #(.WIDTH(W), .DEPTH(D), .ALMOST_FULL(AF), .ALMOST_EMPTY(AE)) dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  initial begin
    repeat (100_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (model size %0d)", what, model.size()); end
  endtask

  // Compare the flags, and the head word, with the model (before the edge).
  task automatic compare_state();
    int n = model.size();
    check(empty == (n == 0), "empty");
    check(full == (n == D), "full");
    check(almost_full == (n >= AF), "almost_full");
    check(almost_empty == (n < AE), "almost_empty");
    check(usedw == ((n == D) ? 6'h3f : 6'(n)), "usedw");
    if (n != 0) check(q == model[0], "head word");
  endtask

  task automatic step(input bit w, input bit r);
    int n = model.size();
    wrreq <= w; rdreq <= r; data <= W'($urandom);
    #1;
    compare_state();
    @(posedge clock);
    if (r && n != 0) void'(model.pop_front());
    if (w && (n != D || (r && n != 0))) model.push_back(data);
    #1;
  endtask

  initial begin
    aclr = 1; #12; aclr = 0;
    @(posedge clock); #1;
    for (int i = 0; i < D + 5; i++) step(1, 0);   // to full and beyond
    for (int i = 0; i < D + 5; i++) step(0, 1);   // to empty and beyond
    for (int i = 0; i < 20000; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    for (int i = 0; i < 30; i++) step(1, 0);
    wrreq <= 0; rdreq <= 0;
    #2 aclr = 1; #1;
    check(empty && usedw == 0 && !full, "aclr empties at once");
    model.delete();
    #5 aclr = 0;
    @(posedge clock); #1;
    step(1, 0); step(0, 0);
    check(!empty && usedw == 1, "write after aclr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
