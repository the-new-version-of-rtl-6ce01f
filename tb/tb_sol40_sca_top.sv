// tb_sol40_sca_top: end-to-end test of the SOL40-SCA core at its default
// sizes, driven through the Avalon-MM bus the way control software would,
// with gbt_sc_model standing in for the GBT-SC core and the GBT-SCAs.
//
// Part 1 queues twelve ECS commands back to back, one or more per protocol
// driver (controller, GPIO, DAC, ADC, a 300-bit SPI transfer, a 200-bit
// JTAG shift with TMS from memory, a 20-byte I2C write and a 16-byte read),
// then collects the summaries and reply data and compares them with values
// worked out here from the data written. Part 2 pushes 150 commands without
// reading replies, so the reply FIFO fills, replies back up and the command
// FIFO overflows; every accepted command must still be answered, in order.
// Part 3 sends a command to a dead link: after the reply timeout its
// summary must carry the lost flag, and the next command must work.
// The part 1 commands go to several links and GBT-SCAs (the model may
// reorder replies between targets), so the core has to wait for replies
// before switching target.
// Each mechanism is counted and must be seen at least once: commands queued
// behind each other, multi-chunk unrolling, GBT-SC back-pressure, the
// in-flight limit, waiting on a target change, reply FIFO full, command
// FIFO overflow, an error reply, and every GBT-SCA channel type.
module tb_sol40_sca_top;
  import sol40_sca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [13:0] avs_address;
  logic avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic avs_readdatavalid;
  logic sca_tx_valid, sca_tx_ready, sca_rx_valid, sca_rx_ready;
  sca_cmd_t sca_tx;
  sca_rpy_t sca_rx;

  sol40_sca_top dut (.*);

  gbt_sc_model #(.READY_PCT(70), .MIN_LAT(4), .MAX_LAT(40), .DEAD_LINK(40)) u_sc (
    .clk, .rst_n, .tx_valid(sca_tx_valid), .tx_ready(sca_tx_ready), .tx(sca_tx),
    .rx_valid(sca_rx_valid), .rx_ready(sca_rx_ready), .rx(sca_rx)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_queued = 0, n_multichunk = 0, n_tx_bp = 0, n_inflight_full = 0;
  int n_rx_bp = 0, n_dropped = 0, n_err = 0, go_in_cmd = 0, n_order = 0;
  // target {link, GBT-SCA} of each part 1 command slot
  int tgt_link [13] = '{5, 5, 6, 6, 5, 5, 7, 47, 7, 12, 12, 5, 40};
  int tgt_sca  [13] = '{3, 3, 3, 3, 4, 4, 0, 31, 0, 9, 9, 3, 0};
  bit [7:0] chan_seen [8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.cf_count >= 2) n_queued++;
      if (sca_tx_valid && !sca_tx_ready) n_tx_bp++;
      if (dut.pend_full && dut.drv_op_valid && !sca_tx_valid) n_inflight_full++;
      if (sca_rx_valid && !sca_rx_ready) n_rx_bp++;
      if (dut.order_wait) n_order++;
      if (sca_tx_valid && sca_tx_ready) begin
        if (sca_tx.channel == CH_CTRL) chan_seen[0] = 1;
        if (sca_tx.channel == CH_SPI)  chan_seen[1] = 1;
        if (sca_tx.channel == CH_GPIO) chan_seen[2] = 1;
        if (sca_tx.channel >= CH_I2C0 && sca_tx.channel < CH_JTAG) chan_seen[3] = 1;
        if (sca_tx.channel == CH_JTAG) chan_seen[4] = 1;
        if (sca_tx.channel == CH_ADC)  chan_seen[5] = 1;
        if (sca_tx.channel == CH_DAC)  chan_seen[6] = 1;
        if (sca_tx.cmd == 8'h72 || sca_tx.cmd == 8'hA2) begin   // SPI / JTAG GO
          go_in_cmd++;
          if (go_in_cmd == 2) n_multichunk++;
        end
      end
      if (dut.drv_start) go_in_cmd = 0;
    end
  end

  // ---------------- Avalon-MM master tasks ----------------
  task automatic av_wr(logic [13:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic av_rd(logic [13:0] a, output logic [31:0] d, input bit count = 1);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    if (count) checks++;
    if (!avs_readdatavalid) begin failures++; $display("FAIL read latency"); end
    d = avs_readdata;
  endtask

  // ---------------- software layer ----------------
  task automatic put_cmd(int slot, ecs_desc_t d);
    d.link = 8'(tgt_link[slot]); d.sca = 8'(tgt_sca[slot]);
    for (int w = 0; w < 4; w++) av_wr(14'h2000 + 14'(4*slot + w), d[32*w +: 32]);
  endtask

  task automatic put_data(int ptr, logic [31:0] w[$]);
    foreach (w[i]) av_wr(14'(ptr + i), w[i]);
  endtask

  task automatic push(int slot, int tag);
    av_wr(14'h3000, {16'd0, 8'(tag), 8'(slot)});
  endtask

  task automatic get_summary(output rpy_sum_t s);
    logic [31:0] st, w0, w1;
    int guard = 0;
    do begin av_rd(14'h3004, st, 0); guard++; end while (st[16] && guard < 600000);
    av_rd(14'h3002, w0);
    av_rd(14'h3003, w1);
    av_wr(14'h3001, 0);
    s = rpy_sum_t'({w1, w0});
  endtask

  function automatic ecs_desc_t mkd(prot_e p, int op, int sub, int nbits, int ptr,
                                    logic [31:0] cfg = 0, logic [31:0] cfg2 = 0);
    ecs_desc_t d = '0;
    d.link = 8'd5; d.sca = 8'd3; d.protocol = p; d.op = 4'(op); d.sub = 5'(sub);
    d.nbits = 16'(nbits); d.data_ptr = 16'(ptr); d.cfg = cfg; d.cfg2 = cfg2;
    return d;
  endfunction

  // expected results of part 1, indexed by tag
  typedef struct { int slot; int ptr; logic [7:0] err; logic [31:0] words[$]; } exp_t;
  exp_t ex [12];

  initial begin
    logic [31:0] spi[$], jtag[$], i2cw[$], w;
    rpy_sum_t s;
    avs_read = 0; avs_write = 0; avs_address = '0; avs_writedata = '0;
    foreach (chan_seen[i]) chan_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- part 1: every driver ----------------
    for (int i = 0; i < 10; i++) spi.push_back($urandom);
    for (int i = 0; i < 14; i++) jtag.push_back($urandom);
    for (int i = 0; i < 5; i++)  i2cw.push_back($urandom);
    put_data(0, '{32'h0000_00FF});
    put_data(2, '{32'hFFFF_0000});
    put_data(4, '{32'h0000_0080});
    put_data(11, '{32'hBAD0_0BAD});
    put_data(16, spi);
    put_data(64, jtag);
    put_data(128, i2cw);
    put_cmd(0,  mkd(PROT_CTRL, 0, 0, 0, 0));          // write CRB
    put_cmd(1,  mkd(PROT_CTRL, 1, 0, 0, 1));          // read CRB
    put_cmd(2,  mkd(PROT_GPIO, 2, 0, 0, 2));          // write DIRECTION
    put_cmd(3,  mkd(PROT_GPIO, 3, 0, 0, 3));          // read DIRECTION
    put_cmd(4,  mkd(PROT_DAC, 0, 2, 0, 4));           // write DAC C
    put_cmd(5,  mkd(PROT_DAC, 1, 2, 0, 5));           // read DAC C
    put_cmd(6,  mkd(PROT_ADC, 0, 21, 0, 6));          // convert input 21
    put_cmd(7,  mkd(PROT_SPI, 1, 0, 300, 16, 32'h0000_0C00, 32'h1));
    put_cmd(8,  mkd(PROT_JTAG, 3, 0, 200, 64, 32'h0000_0800));
    put_cmd(9,  mkd(PROT_I2C, 0, 2, 160, 128, 32'h0000_0150));   // 20 bytes to 0x50
    put_cmd(10, mkd(PROT_I2C, 1, 2, 128, 160, 32'h0000_0150));   // 16 bytes from 0x50
    put_cmd(11, mkd(PROT_GPIO, 0, 0, 0, 11));         // write DATAOUT, error reply
    for (int t = 0; t < 12; t++) begin
      ex[t].slot = t; ex[t].err = 8'h00;
      ex[t].ptr = (t == 7) ? 16 : (t == 8) ? 64 : (t == 9) ? 128 : (t == 10) ? 160 : t;
    end
    ex[1].words  = '{~32'h0000_00FF};
    ex[3].words  = '{~32'hFFFF_0000};
    ex[5].words  = '{~32'h0000_0080};
    ex[6].words  = '{32'hA5A5_0001};
    foreach (spi[i]) ex[7].words.push_back(~spi[i]);
    ex[8].words  = '{~jtag[0], ~jtag[1], ~jtag[2], ~jtag[3], ~jtag[8], ~jtag[9], ~jtag[10]};
    ex[10].words = '{~i2cw[4], ~i2cw[1], ~i2cw[2], ~i2cw[3]};
    ex[11].err   = 8'h04;
    av_rd(14'h2000 + 14'(4*8 + 1), w);                // settings read back
    check(w == {16'd64, 16'd200}, $sformatf("settings read back %h", w));
    for (int t = 0; t < 12; t++) push(t, t);          // queued without waiting

    for (int t = 0; t < 12; t++) begin
      get_summary(s);
      check(s.id.tag == 8'(t) && s.id.slot == 8'(ex[t].slot), $sformatf("summary id %0d/%0d exp %0d", s.id.tag, s.id.slot, t));
      check(s.data_ptr == 16'(ex[t].ptr), $sformatf("tag %0d ptr %0d", t, s.data_ptr));
      check(s.nwords == 16'(ex[t].words.size()), $sformatf("tag %0d nwords %0d exp %0d", t, s.nwords, ex[t].words.size()));
      check(s.err == ex[t].err && s.flags == 8'h00, $sformatf("tag %0d err %h flags %h", t, s.err, s.flags));
      if (s.err != 0) n_err++;
      foreach (ex[t].words[i]) begin
        av_rd(14'h1000 + 14'(ex[t].ptr + i), w);
        check(w == ex[t].words[i], $sformatf("tag %0d word %0d: %h exp %h", t, i, w, ex[t].words[i]));
      end
    end

    // ---------------- part 2: overload ----------------
    begin
      logic [31:0] dropped, st;
      int accepted, next_tag;
      for (int t = 0; t < 150; t++) push(3, t);
      repeat (4000) @(negedge clk);           // let the reply FIFO fill up
      av_rd(14'h3009, dropped);
      n_dropped = int'(dropped);
      accepted = 150 - int'(dropped);
      check(dropped > 0, "command FIFO overflowed");
      next_tag = -1;
      for (int i = 0; i < accepted; i++) begin
        get_summary(s);
        check(int'(s.id.tag) > next_tag && s.id.slot == 8'd3 && s.nwords == 16'd1 && s.err == 0 && s.flags == 0,
              $sformatf("overload summary %0d: tag %0d", i, s.id.tag));
        next_tag = int'(s.id.tag);
      end
      av_rd(14'h3004, st);
      check(st[16] && st[7:0] == 0 && !st[18], $sformatf("idle and empty at end: %h", st));
      av_rd(14'h1003, w);
      check(w == ~32'hFFFF_0000, "overload reply data");
      av_rd(14'h3005, w);
      check(w == 32'(12 + accepted), $sformatf("ECS counter %0d", w));
      av_rd(14'h3008, w);
      check(w == 0, "no unexpected replies");
      av_rd(14'h300A, w);
      check(w == 0, "no lost replies");
    end

    // ---------------- part 3: dead link ----------------
    begin
      longint t0;
      put_cmd(12, mkd(PROT_GPIO, 1, 0, 0, 300));     // read DATAOUT on link 40
      t0 = u_sc.now;
      push(12, 200);
      push(1, 201);                                  // then a live target
      get_summary(s);
      check(s.id.tag == 8'd200 && s.flags == FLAG_LOST && s.nwords == 16'd1 && s.err == 0,
            $sformatf("dead link summary: tag %0d flags %h nwords %0d", s.id.tag, s.flags, s.nwords));
      check(u_sc.now - t0 >= (1 << 20), $sformatf("gave up after %0d cycles", u_sc.now - t0));
      get_summary(s);
      check(s.id.tag == 8'd201 && s.flags == 0 && s.nwords == 16'd1, "command after the dead link");
      av_rd(14'h1001, w);
      check(w == ~32'h0000_00FF, "reply after the dead link");
      av_rd(14'h300A, w);
      check(w == 1, $sformatf("lost counter %0d", w));
    end

    $display("mechanisms: queued=%0d multichunk=%0d tx_backpressure=%0d inflight_full=%0d order_wait=%0d reply_fifo_full=%0d cmd_fifo_drop=%0d error_reply=%0d",
             n_queued, n_multichunk, n_tx_bp, n_inflight_full, n_order, n_rx_bp, n_dropped, n_err);
    check(n_queued > 0, "commands queued");
    check(n_multichunk >= 2, "multi-chunk unrolling");
    check(n_tx_bp > 0, "GBT-SC back-pressure");
    check(n_inflight_full > 0, "in-flight limit");
    check(n_order > 0, "wait for replies on target change");
    check(n_rx_bp > 0, "reply FIFO full");
    check(n_dropped > 0, "command FIFO overflow");
    check(n_err > 0, "error reply");
    foreach (chan_seen[i]) if (i < 7) check(chan_seen[i] != 0, $sformatf("channel type %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
