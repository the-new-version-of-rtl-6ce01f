// tb_cmd_proc_unit: self-checking test of cmd_proc_unit, run with the
// protocol_drivers it controls. The command FIFO, command memory, command
// data memory, GBT-SC core and in-flight queue are modelled here.
// Checks every GBT-SCA command sent (link, GBT-SCA address, transaction ID,
// channel, command, data fetched from the right data-memory word) and every
// in-flight entry (store flag, reply address, last, identifier), for hand-
// worked GPIO, SPI and ADC commands; the issue rate of one GBT-SCA command
// per two cycles with no back-pressure; that back-pressure from the GBT-SC
// core and from a full in-flight queue holds the command stable; the
// transaction-ID wrap from 254 to 1; and that a command for a new link or
// GBT-SCA is only sent once no replies are outstanding, while commands for
// the same target do not wait.
module tb_cmd_proc_unit;
  import sol40_sca_pkg::*;
  localparam int CMD_AW = 4, DATA_AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;

  logic cf_empty, cf_pop;
  cmd_id_t cf_rdata;
  logic [CMD_AW-1:0] cm_raddr;
  ecs_desc_t cm_rdata;
  logic [DATA_AW-1:0] dm_raddr;
  logic [31:0] dm_rdata;
  logic drv_start, drv_op_valid, drv_op_ready, drv_busy;
  ecs_desc_t drv_desc;
  drv_op_t drv_op;
  logic tx_valid, tx_ready;
  sca_cmd_t tx;
  logic pend_push, pend_full, pend_empty, order_wait;
  pend_t pend;
  logic busy;
  logic [31:0] n_ecs, n_sca;

  cmd_proc_unit #(.CMD_AW(CMD_AW), .DATA_AW(DATA_AW)) dut (.*);
  protocol_drivers u_drv (.clk, .rst_n, .start(drv_start), .desc(drv_desc), .busy(drv_busy),
                          .op_valid(drv_op_valid), .op(drv_op), .op_ready(drv_op_ready));

  // environment models
  cmd_id_t   fifo_q[$];
  ecs_desc_t cmem [2**CMD_AW];
  logic [31:0] dmem [2**DATA_AW];
  int pend_level = 0, pend_max = 2;
  bit rand_ready = 0, rand_drain = 0;
  sca_cmd_t exp_tx[$];
  pend_t    exp_pend[$];
  int checks = 0, failures = 0;
  int fire_cycles[$];
  int cyc = 0;
  int stalls_tx = 0, stalls_pend = 0, n_wait = 0;
  bit have_prev = 0;
  logic [15:0] prev_tgt;

  assign cf_empty  = (fifo_q.size() == 0);
  assign cf_rdata  = cf_empty ? cmd_id_t'(0) : fifo_q[0];
  assign pend_full = (pend_level >= pend_max);
  assign pend_empty = (pend_level == 0);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cm_rdata <= cmem[cm_raddr];
    dm_rdata <= dmem[dm_raddr];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // The environment changes at the falling edge; once settled, what the DUT
  // will do at the next rising edge is checked, and the FIFO and in-flight
  // models are updated at that rising edge.
  bit pop_q = 0, push_q = 0;
  always @(posedge clk) begin
    #1;
    if (pop_q) void'(fifo_q.pop_front());
    if (push_q) pend_level++;
  end

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (pend_level > 0 && (!rand_drain || $urandom_range(3) == 0)) pend_level--;
      tx_ready = !rand_ready || ($urandom_range(2) == 0);
    end
    #1;
    pop_q  = rst_n && cf_pop;
    push_q = rst_n && pend_push;
    if (rst_n) begin
      if (tx_valid && !tx_ready) stalls_tx++;
      if (pend_full && busy && drv_op_valid && !tx_valid) stalls_pend++;
      if (order_wait) n_wait++;
      if (tx_valid && tx_ready) begin
        sca_cmd_t e; pend_t p;
        fire_cycles.push_back(cyc);
        if (have_prev && {tx.link, tx.sca} != prev_tgt)
          check(pend_level == 0, $sformatf("target change with %0d replies outstanding", pend_level));
        have_prev = 1; prev_tgt = {tx.link, tx.sca};
        check(pend_push, "pend pushed with tx");
        if (exp_tx.size() == 0) check(0, "unexpected tx");
        else begin
          e = exp_tx.pop_front(); p = exp_pend.pop_front();
          check(tx == e, $sformatf("tx %p exp %p", tx, e));
          check(pend == p, $sformatf("pend %p exp %p", pend, p));
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] trid_model = 8'd1;

  function automatic sca_cmd_t etx(ecs_desc_t d, logic [7:0] ch, logic [7:0] c, logic [31:0] data);
    sca_cmd_t t;
    t.link = d.link; t.sca = d.sca; t.trid = trid_model; t.channel = ch; t.cmd = c; t.data = data;
    return t;
  endfunction

  function automatic pend_t epd(ecs_desc_t d, cmd_id_t id, bit store, int raddr, bit last);
    pend_t p;
    p.link = d.link; p.sca = d.sca; p.trid = trid_model; p.store = store;
    p.rpy_addr = 16'(raddr); p.last = last; p.id = id; p.data_ptr = d.data_ptr;
    return p;
  endfunction

  task automatic exp(ecs_desc_t d, cmd_id_t id, logic [7:0] ch, logic [7:0] c, logic [31:0] data,
                     bit store, int raddr, bit last);
    exp_tx.push_back(etx(d, ch, c, data));
    exp_pend.push_back(epd(d, id, store, raddr, last));
    trid_model = (trid_model == 8'd254) ? 8'd1 : trid_model + 8'd1;
  endtask

  task automatic wait_idle();
    int guard = 0;
    do begin @(negedge clk); guard++; end
    while ((exp_tx.size() != 0 || busy || fifo_q.size() != 0) && guard < 20000);
  endtask

  initial begin
    ecs_desc_t g, s, a;
    cmd_id_t ig, is, ia;
    tx_ready = 1'b1;
    for (int i = 0; i < 2**DATA_AW; i++) dmem[i] = $urandom;
    for (int i = 0; i < 2**CMD_AW; i++) cmem[i] = '0;
    // GPIO write DATAOUT, data word at pointer 5
    g = '0; g.link = 8'd12; g.sca = 8'd3; g.protocol = PROT_GPIO; g.op = 4'd0; g.data_ptr = 16'd5;
    // SPI 40-bit write with read-back, data at 100, slave select 0x01
    s = '0; s.link = 8'd47; s.sca = 8'd31; s.protocol = PROT_SPI; s.op = 4'd1;
    s.nbits = 16'd40; s.data_ptr = 16'd100; s.cfg = 32'h0000_0800; s.cfg2 = 32'h1;
    // ADC conversion of input 9, reply at 200
    a = '0; a.link = 8'd0; a.sca = 8'd1; a.protocol = PROT_ADC; a.sub = 5'd9; a.data_ptr = 16'd200;
    cmem[0] = g; cmem[1] = s; cmem[7] = a;
    ig = '{tag: 8'hA1, slot: 8'd0}; is = '{tag: 8'hB2, slot: 8'd1}; ia = '{tag: 8'hC3, slot: 8'd7};

    exp(g, ig, 8'h02, 8'h10, dmem[5], 0, 5, 1);
    exp(s, is, 8'h01, 8'h60, 32'h1, 0, 100, 0);
    exp(s, is, 8'h01, 8'h40, 32'h0000_0828, 0, 100, 0);
    exp(s, is, 8'h01, 8'h00, dmem[100], 0, 100, 0);
    exp(s, is, 8'h01, 8'h10, dmem[101], 0, 100, 0);
    exp(s, is, 8'h01, 8'h72, 32'h0, 0, 100, 0);
    exp(s, is, 8'h01, 8'h01, 32'h0, 1, 100, 0);
    exp(s, is, 8'h01, 8'h11, 32'h0, 1, 101, 1);
    exp(a, ia, 8'h14, 8'h50, 32'd9, 0, 200, 0);
    exp(a, ia, 8'h14, 8'h02, 32'd1, 1, 200, 1);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pend_max = 100;                   // phase 1: no back-pressure, check rate
    fifo_q.push_back(ig); fifo_q.push_back(is); fifo_q.push_back(ia);
    wait_idle();
    check(exp_tx.size() == 0, "all commands sent");
    check(n_ecs == 3 && n_sca == 10, $sformatf("counters %0d %0d", n_ecs, n_sca));
    // within the SPI command: seven commands, one every two cycles
    check(fire_cycles[7] - fire_cycles[1] == 12, $sformatf("SPI issue spacing %0d", fire_cycles[7] - fire_cycles[1]));

    // phase 2: random GBT-SC back-pressure and in-flight limit of 2
    // (phase 1 ended on another target: let its replies drain first)
    while (pend_level > 0) @(negedge clk);
    pend_max = 2; rand_ready = 1; rand_drain = 1;
    for (int r = 0; r < 3; r++) begin
      exp(s, is, 8'h01, 8'h60, 32'h1, 0, 100, 0);
      exp(s, is, 8'h01, 8'h40, 32'h0000_0828, 0, 100, 0);
      exp(s, is, 8'h01, 8'h00, dmem[100], 0, 100, 0);
      exp(s, is, 8'h01, 8'h10, dmem[101], 0, 100, 0);
      exp(s, is, 8'h01, 8'h72, 32'h0, 0, 100, 0);
      exp(s, is, 8'h01, 8'h01, 32'h0, 1, 100, 0);
      exp(s, is, 8'h01, 8'h11, 32'h0, 1, 101, 1);
      fifo_q.push_back(is);
    end
    n_wait = 0;
    wait_idle();
    check(exp_tx.size() == 0, "all commands sent under back-pressure");
    check(stalls_tx > 0 && stalls_pend > 0, $sformatf("stalls seen %0d %0d", stalls_tx, stalls_pend));
    check(n_wait == 0, $sformatf("same target waited %0d cycles", n_wait));

    // phase 3: 260 GPIO writes, transaction ID wraps 254 -> 1
    rand_ready = 0; rand_drain = 0; pend_max = 100;
    for (int r = 0; r < 260; r++) begin
      exp(g, ig, 8'h02, 8'h10, dmem[5], 0, 5, 1);
      fifo_q.push_back(ig);
    end
    wait_idle();
    check(exp_tx.size() == 0, "GPIO burst sent");
    check(n_ecs == 266, $sformatf("n_ecs %0d", n_ecs));

    // phase 4: slow replies, targets alternate: each change waits for them
    rand_drain = 1; n_wait = 0;
    for (int r = 0; r < 10; r++) begin
      exp(g, ig, 8'h02, 8'h10, dmem[5], 0, 5, 1);
      exp(a, ia, 8'h14, 8'h50, 32'd9, 0, 200, 0);
      exp(a, ia, 8'h14, 8'h02, 32'd1, 1, 200, 1);
      fifo_q.push_back(ig); fifo_q.push_back(ia);
    end
    wait_idle();
    check(exp_tx.size() == 0, "alternating targets sent");
    check(n_wait > 0, "waited for replies on target change");
    $display("order wait cycles in phase 4: %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
