// tb_avalon_mm_slave: self-checking test of avalon_mm_slave.
// The buffer layer behind the slave is modelled here (memories with a
// registered read, FIFO flags and heads). Random bus transactions over the
// whole address map are checked against the documented map: which memory or
// FIFO strobe fires with what address and data, what a read returns and
// that it returns exactly one cycle later, that a push to a full command
// FIFO is dropped and counted, and that a pop of an empty reply FIFO does
// nothing.
module tb_avalon_mm_slave;
  import sol40_sca_pkg::*;
  localparam int CMD_AW = 6, DATA_AW = 10, CW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [13:0] avs_address;
  logic avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic avs_readdatavalid;
  logic dm_we; logic [DATA_AW-1:0] dm_addr; logic [31:0] dm_wdata, dm_rdata;
  logic [DATA_AW-1:0] rm_addr; logic [31:0] rm_rdata;
  logic cm_we; logic [CMD_AW-1:0] cm_wslot; logic [1:0] cm_wword; logic [31:0] cm_wdata, cm_rdata;
  logic cf_push, cf_full; cmd_id_t cf_wdata; logic [CW-1:0] cf_count;
  logic rf_pop, rf_empty; rpy_sum_t rf_rdata; logic [CW-1:0] rf_count;
  logic proc_busy;
  logic [31:0] n_ecs, n_sca, n_rpy, n_unexpected, n_lost;

  avalon_mm_slave #(.CMD_AW(CMD_AW), .DATA_AW(DATA_AW), .FIFO_CW(CW)) dut (.*);

  int checks = 0, failures = 0, dropped = 0;
  logic [31:0] exp_rd;
  bit exp_valid = 0;

  always #5 clk = ~clk;

  // memory models: the word read is a function of the address
  always_ff @(posedge clk) begin
    dm_rdata <= {22'h2AA, dm_addr};
    rm_rdata <= {22'h155, rm_addr};
    cm_rdata <= {24'hC3C3C3, cm_wslot, cm_wword};
  end

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

  // read data must arrive exactly one cycle after the read
  always @(negedge clk) begin
    if (rst_n) begin
      check(avs_readdatavalid == exp_valid, "readdatavalid timing");
      if (exp_valid) check(avs_readdata == exp_rd, $sformatf("read %h exp %h", avs_readdata, exp_rd));
    end
  end

  task automatic bus(bit wr, logic [13:0] a, logic [31:0] d);
    logic [31:0] e = 32'd0;
    @(negedge clk);
    #1;
    avs_address = a; avs_write = wr; avs_read = !wr; avs_writedata = d;
    // randomise the state behind the slave for this access
    cf_full = ($urandom_range(3) == 0); rf_empty = ($urandom_range(3) == 0);
    cf_count = CW'($urandom); rf_count = CW'($urandom); proc_busy = $urandom_range(1);
    rf_rdata = {$urandom, $urandom};
    n_ecs = $urandom; n_sca = $urandom; n_rpy = $urandom; n_unexpected = $urandom; n_lost = $urandom;
    #1;
    check(dm_we == (wr && a[13:12] == 2'd0), "dm_we");
    check(cm_we == (wr && a[13:12] == 2'd2), "cm_we");
    check(cf_push == (wr && a[13:12] == 2'd3 && a[3:0] == 4'h0 && !cf_full), "cf_push");
    check(rf_pop  == (wr && a[13:12] == 2'd3 && a[3:0] == 4'h1 && !rf_empty), "rf_pop");
    if (dm_we) check(dm_addr == a[DATA_AW-1:0] && dm_wdata == d, "dm write");
    if (cm_we) check(cm_wslot == a[CMD_AW+1:2] && cm_wword == a[1:0] && cm_wdata == d, "cm write");
    if (cf_push) check(cf_wdata == d[15:0], "cf data");
    if (wr && a[13:12] == 2'd3 && a[3:0] == 4'h0 && cf_full) dropped++;
    if (!wr) begin
      case (a[13:12])
        2'd0: e = {22'h2AA, a[9:0]};
        2'd1: e = {22'h155, a[9:0]};
        2'd2: e = {24'hC3C3C3, a[7:0]};
        default: case (a[3:0])
          4'h2: e = rf_rdata[31:0];
          4'h3: e = rf_rdata[63:32];
          4'h4: e = {13'd0, proc_busy, cf_full, rf_empty, 1'b0, rf_count, 1'b0, cf_count};
          4'h5: e = n_ecs;
          4'h6: e = n_sca;
          4'h7: e = n_rpy;
          4'h8: e = n_unexpected;
          4'h9: e = 32'(dropped);
          4'hA: e = n_lost;
          default: e = 32'd0;
        endcase
      endcase
    end
    @(negedge clk);
    exp_valid = !wr; exp_rd = e;
    avs_read = 0; avs_write = 0;
    @(posedge clk);
    #1 exp_valid = 0;
  endtask

  initial begin
    avs_read = 0; avs_write = 0; avs_address = '0; avs_writedata = '0;
    cf_full = 0; rf_empty = 1; cf_count = '0; rf_count = '0; proc_busy = 0;
    rf_rdata = '0; n_ecs = '0; n_sca = '0; n_rpy = '0; n_unexpected = '0; n_lost = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [13:0] a;
      a = 14'($urandom);
      if (a[13:12] == 2'd3) a[11:4] = '0;       // register page
      if ($urandom_range(3) == 0) a = 14'h3000 | 14'($urandom_range(1));
      bus($urandom_range(1), a, $urandom);
    end
    bus(0, 14'h3009, 0);
    check(dropped > 0, "pushes dropped on a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
