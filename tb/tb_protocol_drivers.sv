// tb_protocol_drivers: self-checking test of protocol_drivers.
// For a list of ECS commands covering every driver (controller, GPIO, DAC,
// ADC, SPI, JTAG, I2C, with lengths of one, several and partial 128-bit
// chunks), a reference written here as plain loops lists the GBT-SCA
// commands expected, and the driver output is compared op by op while
// op_ready is toggled at random. Also checks busy around each command and
// the count of GBT-SCA commands per ECS command.
module tb_protocol_drivers;
  import sol40_sca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, op_valid, op_ready;
  ecs_desc_t desc;
  drv_op_t op;
  int checks = 0, failures = 0;
  drv_op_t exp_q[$];
  int lens[8] = '{1, 32, 33, 128, 129, 300, 512, 0};

  protocol_drivers dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic drv_op_t mk(logic [7:0] ch, logic [7:0] cmd, bit mem, logic [31:0] cdata,
                                 int midx, bit store, int ridx);
    drv_op_t o = '0;
    o.channel = ch; o.cmd = cmd; o.src = mem ? SRC_MEM : SRC_CONST;
    o.const_data = mem ? 32'd0 : cdata; o.mem_idx = 16'(midx);
    o.store = store; o.rpy_idx = 16'(ridx);
    return o;
  endfunction

  // Reference: the GBT-SCA commands an ECS command should produce.
  task automatic expect_cmd(ecs_desc_t d);
    int m = 0, r = 0, left, bits, words;
    logic [7:0] ch;
    case (d.protocol)
      PROT_SPI, PROT_JTAG, PROT_I2C: begin
        left = (d.nbits == 0) ? 1 : int'(d.nbits);
        ch = (d.protocol == PROT_SPI) ? 8'h01 : (d.protocol == PROT_JTAG) ? 8'h13 : 8'h03 + 8'(d.sub[3:0]);
        if (d.protocol == PROT_SPI) exp_q.push_back(mk(ch, 8'h60, 0, d.cfg2, m, 0, r));
        while (left > 0) begin
          bits  = (left > 128) ? 128 : left;
          words = (bits + 31) / 32;
          case (d.protocol)
            PROT_SPI: begin
              exp_q.push_back(mk(ch, 8'h40, 0, {d.cfg[31:7], 7'(bits)}, m, 0, r));
              for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(16*i), 1, 0, m++, 0, r));
              exp_q.push_back(mk(ch, 8'h72, 0, 0, m, 0, r));
              if (d.op[0]) for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(16*i+1), 0, 0, m, 1, r++));
            end
            PROT_JTAG: begin
              exp_q.push_back(mk(ch, 8'h80, 0, {d.cfg[31:7], 7'(bits)}, m, 0, r));
              for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(16*i), 1, 0, m++, 0, r));
              for (int i = 0; i < words; i++)
                if (d.op[1]) exp_q.push_back(mk(ch, 8'(8'h40 + 16*i), 1, 0, m++, 0, r));
                else         exp_q.push_back(mk(ch, 8'(8'h40 + 16*i), 0, 0, m, 0, r));
              exp_q.push_back(mk(ch, 8'hA2, 0, 0, m, 0, r));
              if (d.op[0]) for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(16*i+1), 0, 0, m, 1, r++));
            end
            default: begin  // I2C
              exp_q.push_back(mk(ch, 8'h30, 0, 32'(((bits + 7) / 8) * 4 + int'(d.cfg[9:8])), m, 0, r));
              if (!d.op[0]) for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(8'h40 + 16*i), 1, 0, m++, 0, r));
              exp_q.push_back(mk(ch, d.op[0] ? 8'hDE : 8'hDA, 0, {25'd0, d.cfg[6:0]}, m, 0, r));
              if (d.op[0]) for (int i = 0; i < words; i++) exp_q.push_back(mk(ch, 8'(8'h41 + 16*i), 0, 0, m, 1, r++));
            end
          endcase
          left -= bits;
        end
      end
      PROT_GPIO: begin
        case (d.op)
          0: exp_q.push_back(mk(8'h02, 8'h10, 1, 0, 0, 0, 0));
          2: exp_q.push_back(mk(8'h02, 8'h20, 1, 0, 0, 0, 0));
          3: exp_q.push_back(mk(8'h02, 8'h21, 0, 0, 0, 1, 0));
          4: exp_q.push_back(mk(8'h02, 8'h11, 0, 0, 0, 1, 0));
          default: exp_q.push_back(mk(8'h02, 8'h01, 0, 0, 0, 1, 0));
        endcase
      end
      PROT_ADC: begin
        exp_q.push_back(mk(8'h14, 8'h50, 0, 32'(d.sub), 0, 0, 0));
        exp_q.push_back(mk(8'h14, 8'h02, 0, 1, 0, 1, 0));
      end
      PROT_DAC: begin
        if (d.op[0]) exp_q.push_back(mk(8'h15, 8'(8'h11 + 16*d.sub[1:0]), 0, 0, 0, 1, 0));
        else         exp_q.push_back(mk(8'h15, 8'(8'h10 + 16*d.sub[1:0]), 1, 0, 0, 0, 0));
      end
      default: begin
        if (d.op <= 5 && !d.op[0]) exp_q.push_back(mk(8'h00, 8'(2 + d.op), 1, 0, 0, 0, 0));
        else exp_q.push_back(mk(8'h00, (d.op <= 5) ? 8'(2 + d.op) : 8'h03, 0, 0, 0, 1, 0));
      end
    endcase
    exp_q[exp_q.size()-1].last = 1'b1;
  endtask

  task automatic run(prot_e p, int op_, int sub, int nbits);
    ecs_desc_t d = '0;
    int n_exp, n_got = 0;
    d.protocol = p; d.op = 4'(op_); d.sub = 5'(sub); d.nbits = 16'(nbits);
    d.cfg = $urandom; d.cfg2 = $urandom; d.link = 8'd3; d.sca = 8'd9;
    exp_q.delete();
    expect_cmd(d);
    n_exp = exp_q.size();
    @(negedge clk);
    desc = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    while (busy) begin
      op_ready = ($urandom_range(2) != 0);
      if (op_ready) begin
        drv_op_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL extra op %p", op);
        end else begin
          e = exp_q.pop_front();
          if (op !== e || !op_valid) begin
            failures++;
            $display("FAIL prot %0d op %0d #%0d: got %p exp %p", p, op_, n_got, op, e);
          end
        end
        n_got++;
      end
      @(negedge clk);
      op_ready = 1'b0;
    end
    checks++;
    if (n_got != n_exp) begin failures++; $display("FAIL count %0d vs %0d", n_got, n_exp); end
  endtask

  initial begin
    start = 0; op_ready = 0; desc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int o = 0; o < 8; o++) run(PROT_CTRL, o, 0, 0);
    for (int o = 0; o < 6; o++) run(PROT_GPIO, o, 0, 0);
    for (int s = 0; s < 4; s++) begin run(PROT_DAC, 0, s, 0); run(PROT_DAC, 1, s, 0); end
    run(PROT_ADC, 0, 17, 0);
    foreach (lens[i]) begin
      int n;
      n = lens[i];
      run(PROT_SPI, 0, 0, n);  run(PROT_SPI, 1, 0, n);
      for (int o = 0; o < 4; o++) run(PROT_JTAG, o, 0, n);
      run(PROT_I2C, 0, 6, n);  run(PROT_I2C, 1, 15, n);
    end
    run(PROT_JTAG, 3, 0, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
