// tb_dp_ram: self-checking test of dp_ram (64 x 32 bit).
// Random writes on port A and reads on both ports are compared with an
// array model, including the one-cycle read latency and read-old-data when
// port A reads the address it writes.
module tb_dp_ram;
  localparam int AW = 6;
  logic clk = 1'b0;
  logic a_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_rdata;
  logic [31:0] model [2**AW];
  logic [31:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(32), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise all words through port A
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_we = 1'b1; a_addr = AW'(i); a_wdata = $urandom; b_addr = '0;
      model[i] = a_wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_we    = ($urandom_range(1) == 1);
      a_addr  = AW'($urandom);
      b_addr  = ($urandom_range(3) == 0) ? a_addr : AW'($urandom);
      a_wdata = $urandom;
      exp_a   = model[a_addr];
      exp_b   = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL port A %h vs %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL port B %h vs %h", b_rdata, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
