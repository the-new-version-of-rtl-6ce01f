// tb_jtag_config: FPGA configuration over the GBT-SCA JTAG channel, the core
// at its default sizes.
//
// Part A streams NBITS of configuration data as long ECS commands of
// CMD_BITS bits each (TMS held low). Software double-buffers: it writes the
// data for the next command into the other half of the command data memory
// while the current one runs, and reuses a half only after the summary of
// the command that used it has come back. The last command also reads TDI
// back, and those words are checked.
// Part B sends SMALL_CMDS commands of 128 bits each, waiting for every
// summary before the next command, as software must when one ECS command
// maps to one GBT-SCA transfer.
// Checked: every summary; read-back data; that long commands sustain at
// least 500 KB/s at an assumed 40 MHz core clock (0.0125 byte per cycle);
// and that they beat the one-at-a-time mode. The full bitstream of a
// mid-size Kintex-7 is about 91.5 Mbit; NBITS is a slice of it.
module tb_jtag_config;
  import sol40_sca_pkg::*;
  localparam int NBITS      = 262144;
  localparam int CMD_BITS   = 16384;            // 512 words, half the data memory
  localparam int CMD_WORDS  = CMD_BITS / 32;
  localparam int N_CMDS     = NBITS / CMD_BITS;
  localparam int SMALL_CMDS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [13:0] avs_address;
  logic avs_read, avs_write;
  logic [31:0] avs_writedata, avs_readdata;
  logic avs_readdatavalid;
  logic sca_tx_valid, sca_tx_ready, sca_rx_valid, sca_rx_ready;
  sca_cmd_t sca_tx;
  sca_rpy_t sca_rx;

  sol40_sca_top dut (.*);
  gbt_sc_model #(.READY_PCT(90), .MIN_LAT(4), .MAX_LAT(40)) u_sc (
    .clk, .rst_n, .tx_valid(sca_tx_valid), .tx_ready(sca_tx_ready), .tx(sca_tx),
    .rx_valid(sca_rx_valid), .rx_ready(sca_rx_ready), .rx(sca_rx)
  );

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

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

  task automatic av_wr(logic [13:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic av_rd(logic [13:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    d = avs_readdata;
  endtask

  task automatic put_cmd(int slot, int op, int nbits, int ptr);
    av_wr(14'h2000 + 14'(4*slot),     {3'd0, 5'd0, 4'(op), 1'b0, PROT_JTAG, 8'd7, 8'd33});
    av_wr(14'h2000 + 14'(4*slot + 1), {16'(ptr), 16'(nbits)});
    av_wr(14'h2000 + 14'(4*slot + 2), 32'h0000_0800);
    av_wr(14'h2000 + 14'(4*slot + 3), 32'd0);
  endtask

  task automatic get_summary(output rpy_sum_t s);
    logic [31:0] st, w0, w1;
    do av_rd(14'h3004, st); while (st[16]);
    av_rd(14'h3002, w0);
    av_rd(14'h3003, w1);
    av_wr(14'h3001, 0);
    s = rpy_sum_t'({w1, w0});
  endtask

  // configuration word i of the bitstream slice
  function automatic logic [31:0] bits_at(int i);
    return 32'h9E37_79B9 * 32'(i + 1) ^ 32'(i);
  endfunction

  initial begin
    rpy_sum_t s;
    logic [31:0] w;
    longint t0, t1, t2, t3;
    real rate_a, rate_b;
    int done;
    done = 0;
    avs_read = 0; avs_write = 0; avs_address = '0; avs_writedata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- part A: long commands, double-buffered ----------------
    t0 = cyc;
    for (int c = 0; c < N_CMDS; c++) begin
      int half;
      half = c % 2;
      if (c >= 2) begin                      // half still in use by command c-2
        get_summary(s);
        check(s.id.tag == 8'(done) && s.err == 0 && s.flags == 0 && s.nwords == 0,
              $sformatf("summary %0d", done));
        done++;
      end
      for (int i = 0; i < CMD_WORDS; i++) av_wr(14'(half * CMD_WORDS + i), bits_at(c * CMD_WORDS + i));
      put_cmd(half, (c == N_CMDS - 1) ? 1 : 0, CMD_BITS, half * CMD_WORDS);
      av_wr(14'h3000, {16'd0, 8'(c), 8'(half)});
    end
    while (done < N_CMDS) begin
      get_summary(s);
      check(s.id.tag == 8'(done) && s.err == 0 && s.flags == 0 &&
            s.nwords == ((done == N_CMDS - 1) ? 16'(CMD_WORDS) : 16'd0),
            $sformatf("summary %0d nwords %0d", done, s.nwords));
      done++;
    end
    t1 = cyc;
    // TDI read back of the last command
    for (int i = 0; i < CMD_WORDS; i += 37) begin
      av_rd(14'h1000 + 14'(((N_CMDS - 1) % 2) * CMD_WORDS + i), w);
      check(w == ~bits_at((N_CMDS - 1) * CMD_WORDS + i), $sformatf("TDI word %0d: %h exp %h", i, w, ~bits_at((N_CMDS - 1) * CMD_WORDS + i)));
    end

    // ---------------- part B: one 128-bit command at a time ----------------
    put_cmd(2, 0, 128, 0);
    t2 = cyc;
    for (int c = 0; c < SMALL_CMDS; c++) begin
      for (int i = 0; i < 4; i++) av_wr(14'(i), bits_at(c * 4 + i));
      av_wr(14'h3000, {16'd0, 8'(c), 8'd2});
      get_summary(s);
      check(s.id.tag == 8'(c) && s.err == 0, $sformatf("small summary %0d", c));
    end
    t3 = cyc;

    rate_a = real'(NBITS / 8) / real'(t1 - t0);
    rate_b = real'(SMALL_CMDS * 16) / real'(t3 - t2);
    $display("long ECS commands: %0d bits in %0d cycles = %f byte/cycle = %f MB/s at 40 MHz",
             NBITS, t1 - t0, rate_a, rate_a * 40.0);
    $display("128-bit commands one at a time: %0d bits in %0d cycles = %f byte/cycle; speed-up %f",
             SMALL_CMDS * 128, t3 - t2, rate_b, rate_a / rate_b);
    check(rate_a >= 0.0125, "500 KB/s at 40 MHz sustained");
    check(rate_a > rate_b, "long commands faster than one-at-a-time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
