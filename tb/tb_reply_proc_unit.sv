// tb_reply_proc_unit: self-checking test of reply_proc_unit.
// The in-flight queue and the reply FIFO are modelled here. Random ECS
// commands of 1..6 GBT-SCA commands are put in flight; replies are fed back
// in order with random gaps while the reply FIFO randomly reports full.
// Some replies carry an error byte, some a wrong link, some are lost, and
// stale replies with an old transaction ID are slipped in.
// Checked: every reply-memory write (address, data), every summary (id,
// pointer, word count, ORed error byte, mismatch and lost flags), the
// rx_ready rule, that a lost reply is detected both from a later reply and
// by the timeout, that stale replies and replies with nothing in flight are
// dropped, and the reply, dropped and lost counters.
module tb_reply_proc_unit;
  import sol40_sca_pkg::*;
  localparam int DATA_AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid, rx_ready;
  sca_rpy_t rx;
  logic pend_empty, pend_pop;
  pend_t pend;
  logic rm_we;
  logic [DATA_AW-1:0] rm_waddr;
  logic [31:0] rm_wdata;
  logic rf_push, rf_full;
  rpy_sum_t rf_wdata;
  logic [31:0] n_rpy, n_unexpected;

  localparam int TIMEOUT = 64;
  logic [31:0] n_lost;

  reply_proc_unit #(.DATA_AW(DATA_AW), .TIMEOUT(TIMEOUT)) dut (.*);

  pend_t pq[$];
  sca_rpy_t rq[$];                        // replies to send
  typedef struct packed { logic [DATA_AW-1:0] a; logic [31:0] d; } wr_t;
  wr_t wq[$];
  rpy_sum_t sq[$];
  int checks = 0, failures = 0;
  int backpressure = 0, mismatches = 0, errors = 0;
  int exp_lost = 0, exp_dropped = 0, seen_skip = 0, seen_timeout = 0, seen_stale = 0;
  bit pop_q = 0;

  assign pend_empty = (pq.size() == 0);
  assign pend = pend_empty ? pend_t'(0) : pq[0];

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

  always @(posedge clk) begin
    #1;
    if (pop_q) void'(pq.pop_front());
  end

  // transaction IDs live in the ring 1..254
  function automatic logic [7:0] ring_add(logic [7:0] t, int k);
    int v = int'(t) + k;
    while (v > 254) v -= 254;
    while (v < 1) v += 254;
    return 8'(v);
  endfunction

  function automatic bit later_id(logic [7:0] r, logic [7:0] h);
    for (int k = 1; k <= 127; k++) if (ring_add(h, k) == r) return 1;
    return 0;
  endfunction

  // Drive at the falling edge, check what the coming rising edge will do.
  always @(negedge clk) begin
    if (rst_n) begin
      rf_full  = ($urandom_range(3) == 0);
      rx_valid = (rq.size() > 0) && ($urandom_range(3) != 0);
      rx       = rx_valid ? rq[0] : sca_rpy_t'(0);
    end
    #1;
    pop_q = rst_n && pend_pop;
    if (rst_n) begin
      if (rx_valid) begin
        bit er;
        if (pend_empty) er = 1;
        else if (rx.trid == pend.trid) er = !(pend.last && rf_full);
        else er = !later_id(rx.trid, pend.trid);
        check(rx_ready == er, "rx_ready rule");
        if (!pend_empty && rx.trid == pend.trid && !rx_ready) backpressure++;
      end
      if (rx_valid && rx_ready) begin
        void'(rq.pop_front());
        check(pend_pop == (!pend_empty && rx.trid == pend.trid), "pop with matching reply only");
        if (!pend_empty && rx.trid != pend.trid) seen_stale++;
      end
      if (pend_pop && rx_valid && rx.trid != pend.trid) seen_skip++;
      if (pend_pop && !rx_valid) seen_timeout++;
      if (rm_we) begin
        wr_t e;
        if (wq.size() == 0) check(0, "unexpected memory write");
        else begin
          e = wq.pop_front();
          check(rm_waddr == e.a && rm_wdata == e.d, $sformatf("write %h:%h exp %h:%h", rm_waddr, rm_wdata, e.a, e.d));
        end
      end
      if (rf_push) begin
        rpy_sum_t e;
        if (sq.size() == 0) check(0, "unexpected summary");
        else begin
          e = sq.pop_front();
          check(rf_wdata == e, $sformatf("summary %h exp %h", rf_wdata, e));
        end
      end
    end
  end

  logic [7:0] trid = 8'd1;

  // One ECS command: its in-flight entries, its replies, and expectations.
  task automatic ecs(int n, logic [7:0] tag, int ptr, bit lose_last = 0);
    logic [7:0] err = '0, flags = '0;
    int words = 0;
    for (int i = 0; i < n; i++) begin
      pend_t p;
      sca_rpy_t r;
      p.link = 8'($urandom_range(47)); p.sca = 8'($urandom_range(31)); p.trid = trid;
      p.store = $urandom_range(1); p.rpy_addr = 16'(ptr + words); p.last = (i == n - 1);
      p.id.tag = tag; p.id.slot = 8'($urandom_range(63)); p.data_ptr = 16'(ptr);
      if (p.last) p.id = '{tag: tag, slot: 8'(tag)};
      r.link = p.link; r.sca = p.sca; r.trid = p.trid; r.channel = 8'h01;
      r.err = ($urandom_range(7) == 0) ? 8'(1 << $urandom_range(7)) : 8'h00;
      r.data = $urandom;
      pq.push_back(p);
      if ($urandom_range(19) == 0) begin   // a stale reply first
        sca_rpy_t o;
        o = r; o.trid = ring_add(trid, -100);
        rq.push_back(o);
        exp_dropped++;
      end
      if ((lose_last && p.last) || $urandom_range(11) == 0) begin
        flags |= FLAG_LOST;
        exp_lost++;
      end else begin
        if ($urandom_range(15) == 0) begin r.link = r.link ^ 8'h01; flags |= FLAG_MISMATCH; mismatches++; end
        if (r.err != 0) errors++;
        err |= r.err;
        if (p.store) wq.push_back('{a: DATA_AW'(p.rpy_addr), d: r.data});
        rq.push_back(r);
      end
      if (p.store) words++;
      trid = (trid == 8'd254) ? 8'd1 : trid + 8'd1;
    end
    sq.push_back('{nwords: 16'(words), data_ptr: 16'(ptr), err: err, flags: flags,
                   id: '{tag: tag, slot: 8'(tag)}});
  endtask

  initial begin
    rx_valid = 0; rx = '0; rf_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a reply with nothing in flight is dropped
    @(negedge clk);
    rq.push_back('{link: 8'd1, sca: 8'd2, trid: 8'd9, channel: 8'd1, err: 8'd0, data: 32'h1234});
    exp_dropped++;
    repeat (20) @(negedge clk);
    check(n_unexpected == 1 && rq.size() == 0, "unexpected reply dropped");
    for (int c = 0; c < 300; c++) begin
      ecs($urandom_range(1, 6), 8'(c), $urandom_range(200), c % 50 == 49);
      while (pq.size() > 8) @(negedge clk);
      if (c % 50 == 49) while (pq.size() > 0) @(negedge clk);  // last reply lost: time out
    end
    while (rq.size() > 0 || pq.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(wq.size() == 0 && sq.size() == 0, "all writes and summaries seen");
    $display("mechanisms: backpressure %0d mismatch %0d error %0d lost-by-later-reply %0d lost-by-timeout %0d stale %0d",
             backpressure, mismatches, errors, seen_skip, seen_timeout, seen_stale);
    check(backpressure > 0 && mismatches > 0 && errors > 0, "back-pressure, mismatch and error seen");
    check(seen_skip > 0 && seen_timeout > 0 && seen_stale > 0, "lost and stale replies seen");
    check(n_unexpected == 32'(exp_dropped), $sformatf("dropped count %0d exp %0d", n_unexpected, exp_dropped));
    check(n_lost == 32'(exp_lost), $sformatf("lost count %0d exp %0d", n_lost, exp_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
