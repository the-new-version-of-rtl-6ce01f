// tb_ecs_cmd_mem: self-checking test of ecs_cmd_mem (8 slots).
// Writes the four words of every slot in random order, then overwrites
// single words, and reads back whole slots and single bus words, checking that word w lands in
// bits [32w+31:32w] of the descriptor one cycle after the read address.
module tb_ecs_cmd_mem;
  import sol40_sca_pkg::*;
  localparam int SA = 3;
  logic clk = 1'b0;
  logic we;
  logic [SA-1:0] wslot, raddr;
  logic [1:0] wword;
  logic [31:0] wdata, brdata;
  ecs_desc_t rdata;
  logic [3:0][31:0] model [2**SA];
  int checks = 0, failures = 0;

  ecs_cmd_mem #(.SLOT_AW(SA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int s, int w, logic [31:0] d);
    @(negedge clk);
    we = 1'b1; wslot = SA'(s); wword = 2'(w); wdata = d;
    model[s][w] = d;
    @(posedge clk);
    #1 we = 1'b0;
  endtask

  // read one word back through the bus port
  task automatic bus_check(int s, int w);
    @(negedge clk);
    we = 1'b0; wslot = SA'(s); wword = 2'(w);
    @(posedge clk);
    #1;
    checks++;
    if (brdata !== model[s][w]) begin
      failures++;
      $display("FAIL bus read slot %0d word %0d: %h vs %h", s, w, brdata, model[s][w]);
    end
  endtask

  task automatic rd_check(int s);
    @(negedge clk);
    raddr = SA'(s);
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== model[s]) begin
      failures++;
      $display("FAIL slot %0d: %h vs %h", s, rdata, model[s]);
    end
  endtask

  initial begin
    we = 1'b0; raddr = '0;
    for (int w = 3; w >= 0; w--)
      for (int s = 0; s < 2**SA; s++) wr(s, w, $urandom);
    for (int s = 0; s < 2**SA; s++) rd_check(s);
    for (int i = 0; i < 200; i++) begin
      wr($urandom_range(2**SA-1), $urandom_range(3), $urandom);
      rd_check($urandom_range(2**SA-1));
      bus_check($urandom_range(2**SA-1), $urandom_range(3));
    end
    // field placement of a known descriptor
    wr(5, 0, 32'h0A_3_4_1F_07);   // sub=0x0A, op=3, protocol=4, sca=0x1F, link=7
    wr(5, 1, 32'h0123_0456);      // data_ptr=0x123, nbits=0x456
    rd_check(5);
    checks++;
    if (rdata.link != 8'h07 || rdata.sca != 8'h1F || rdata.protocol != PROT_JTAG ||
        rdata.op != 4'h3 || rdata.sub != 5'h0A || rdata.nbits != 16'h0456 ||
        rdata.data_ptr != 16'h0123) begin
      failures++;
      $display("FAIL field layout %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
