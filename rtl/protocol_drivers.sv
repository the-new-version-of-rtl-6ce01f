// protocol_drivers: the GBT-SCA protocol drivers of the protocol layer.
//
// Given the settings of one ECS command, this block produces, one at a time,
// the GBT-SCA commands that carry it out. There is one driver per GBT-SCA
// function: SCA controller, SPI, GPIO, I2C, JTAG, ADC and DAC. Each driver
// is a table (make_plan) that says which command phases its ECS operation
// uses and with which GBT-SCA channel and command codes; one shared state
// machine then walks the phases:
//   PRE  - one set-up command per ECS command (SPI slave select, ADC mux)
//   CTRL - per chunk, write the channel control register with the chunk size
//   WR   - per chunk, write up to four 32-bit data registers from memory
//   WR2  - per chunk, JTAG only: write the TMS registers
//   GO   - per chunk, start the transfer (or do a single register read)
//   RD   - per chunk, read back up to four 32-bit received-data registers
// The serial protocols (SPI, JTAG, I2C) move data in chunks of at most 128
// bits, the size of the GBT-SCA data registers, so an ECS command of any
// length (nbits, up to 65535) unrolls into as many chunks as it needs.
// Single-register operations (controller, GPIO, DAC, ADC) are one chunk.
//
// Interface: pulse start with desc while busy is low. While busy, op is the
// current GBT-SCA command (op_valid = busy); raise op_ready for one cycle to
// consume it, and the next one appears the following cycle. The command with
// op.last set is the final one; busy drops after it is consumed.
// mem_idx counts consumed command-data words from 0 and rpy_idx counts
// reply words to store from 0.
//
// Drivers built as state machines that choose the GBT-SCA commands for an
// ECS command follow the described architecture. The chunking, the phase
// order, the op encodings of each driver and all channel and command codes
// (from the public GBT-SCA manual) are this implementation's choices.
module protocol_drivers
  import sol40_sca_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  ecs_desc_t desc,
  output logic      busy,
  output logic      op_valid,
  output drv_op_t   op,
  input  logic      op_ready
);

  typedef enum logic [2:0] {
    PH_IDLE = 3'd0, PH_PRE = 3'd1, PH_CTRL = 3'd2, PH_WR = 3'd3,
    PH_WR2 = 3'd4, PH_GO = 3'd5, PH_RD = 3'd6
  } phase_e;

  typedef struct packed {
    logic [7:0]  channel;
    logic        chunked;
    logic        pre_en;   logic [7:0] pre_cmd;  logic [31:0] pre_data;
    logic        ctrl_en;  logic [7:0] ctrl_cmd; logic [31:0] ctrl_base;
    logic        ctrl_bytes;  // length field is a byte count in [6:2] (I2C)
    logic        wr_en;    logic [7:0] wr_base;  logic wr_strided;
    logic        wr2_en;   logic [7:0] wr2_base; logic wr2_mem;
    logic        go_en;    logic [7:0] go_cmd;   logic [31:0] go_data; logic go_store;
    logic        rd_en;    logic [7:0] rd_base;
  } plan_t;

  // The per-protocol driver tables.
  function automatic plan_t make_plan(ecs_desc_t d);
    plan_t p = '0;
    unique case (d.protocol)
      PROT_SPI: begin
        // op[0]: read MISO back. cfg: SPI control bits above the length
        // field. cfg2[7:0]: slave-select mask.
        p.channel   = CH_SPI;   p.chunked = 1'b1;
        p.pre_en    = 1'b1;     p.pre_cmd = 8'h60;  p.pre_data = d.cfg2;
        p.ctrl_en   = 1'b1;     p.ctrl_cmd = 8'h40; p.ctrl_base = d.cfg;
        p.wr_en     = 1'b1;     p.wr_base = 8'h00;  p.wr_strided = 1'b1;
        p.go_en     = 1'b1;     p.go_cmd  = 8'h72;  p.go_data = 32'd0;
        p.rd_en     = d.op[0];  p.rd_base = 8'h01;
      end
      PROT_JTAG: begin
        // op[0]: read TDI back. op[1]: TMS words come from the data memory
        // (after the TDO words of each chunk); otherwise TMS is held low.
        p.channel   = CH_JTAG;  p.chunked = 1'b1;
        p.ctrl_en   = 1'b1;     p.ctrl_cmd = 8'h80; p.ctrl_base = d.cfg;
        p.wr_en     = 1'b1;     p.wr_base = 8'h00;  p.wr_strided = 1'b1;
        p.wr2_en    = 1'b1;     p.wr2_base = 8'h40; p.wr2_mem = d.op[1];
        p.go_en     = 1'b1;     p.go_cmd  = 8'hA2;  p.go_data = 32'd0;
        p.rd_en     = d.op[0];  p.rd_base = 8'h01;
      end
      PROT_I2C: begin
        // Multi-byte 7-bit-address transfers of up to 16 bytes per chunk.
        // sub[3:0]: bus. op[0]: read. cfg[6:0]: slave address, cfg[9:8]: speed.
        p.channel   = CH_I2C0 + {4'd0, d.sub[3:0]};  p.chunked = 1'b1;
        p.ctrl_en   = 1'b1;     p.ctrl_cmd = 8'h30; p.ctrl_bytes = 1'b1;
        p.ctrl_base = {30'd0, d.cfg[9:8]};
        p.wr_en     = !d.op[0]; p.wr_base = 8'h40;  p.wr_strided = 1'b1;
        p.go_en     = 1'b1;     p.go_cmd  = d.op[0] ? 8'hDE : 8'hDA;
        p.go_data   = {25'd0, d.cfg[6:0]};
        p.rd_en     = d.op[0];  p.rd_base = 8'h41;
      end
      PROT_GPIO: begin
        // op 0: write DATAOUT, 1: read DATAIN, 2: write DIRECTION,
        // 3: read DIRECTION, 4: read DATAOUT.
        p.channel = CH_GPIO;
        unique case (d.op)
          4'd0:    begin p.wr_en = 1'b1; p.wr_base = 8'h10; end
          4'd2:    begin p.wr_en = 1'b1; p.wr_base = 8'h20; end
          4'd3:    begin p.go_en = 1'b1; p.go_cmd = 8'h21; p.go_store = 1'b1; end
          4'd4:    begin p.go_en = 1'b1; p.go_cmd = 8'h11; p.go_store = 1'b1; end
          default: begin p.go_en = 1'b1; p.go_cmd = 8'h01; p.go_store = 1'b1; end
        endcase
      end
      PROT_ADC: begin
        // Select input sub, start one conversion, store the result.
        p.channel = CH_ADC;
        p.pre_en  = 1'b1; p.pre_cmd = 8'h50; p.pre_data = {27'd0, d.sub};
        p.go_en   = 1'b1; p.go_cmd  = 8'h02; p.go_data  = 32'd1; p.go_store = 1'b1;
      end
      PROT_DAC: begin
        // sub[1:0]: output A..D. op[0]: read back instead of write.
        p.channel = CH_DAC;
        if (d.op[0]) begin
          p.go_en = 1'b1; p.go_cmd = 8'h11 + {2'd0, d.sub[1:0], 4'd0}; p.go_store = 1'b1;
        end else begin
          p.wr_en = 1'b1; p.wr_base = 8'h10 + {2'd0, d.sub[1:0], 4'd0};
        end
      end
      default: begin  // PROT_CTRL and unused codes
        // op 0/2/4: write control register B/C/D, 1/3/5: read it back.
        p.channel = CH_CTRL;
        if (d.op <= 4'd5 && !d.op[0]) begin
          p.wr_en = 1'b1; p.wr_base = 8'h02 + {4'd0, d.op};
        end else begin
          p.go_en = 1'b1; p.go_store = 1'b1;
          p.go_cmd = (d.op <= 4'd5) ? 8'h02 + {4'd0, d.op} : 8'h03;
        end
      end
    endcase
    return p;
  endfunction

  plan_t       plan_q;
  phase_e      phase;
  logic [16:0] remain;      // bits still to transfer, current chunk included
  logic [1:0]  k;           // word within the chunk
  logic [15:0] memw, rpw;

  logic [7:0]  cbits;       // bits in the current chunk, 1..128
  logic [2:0]  wc;          // 32-bit words in the current chunk, 1..4
  logic [4:0]  nbytes;      // bytes in the current chunk, 1..16
  logic [6:1]  en;
  phase_e      nxt, first;
  logic        step_last, chunk_end;

  assign cbits  = (remain >= 17'd128) ? 8'd128 : remain[7:0];
  assign wc     = 3'((cbits + 8'd31) >> 5);
  assign nbytes = 5'((cbits + 8'd7) >> 3);
  assign en     = {plan_q.rd_en, plan_q.go_en, plan_q.wr2_en, plan_q.wr_en,
                   plan_q.ctrl_en, plan_q.pre_en};

  // Next enabled phase after p within a chunk (PH_IDLE: chunk complete).
  function automatic phase_e next_phase(phase_e p, logic [6:1] e);
    phase_e n = PH_IDLE;
    for (int i = 6; i >= 2; i--)
      if (i > int'(p) && e[i]) n = phase_e'(i);
    return n;
  endfunction

  always_comb begin
    nxt       = next_phase(phase, en);
    first     = next_phase(PH_PRE, en);
    step_last = !(phase inside {PH_WR, PH_WR2, PH_RD}) || ({1'b0, k} == wc - 3'd1);
    chunk_end = step_last && (nxt == PH_IDLE);
  end

  always_comb begin
    op            = '0;
    op.channel    = plan_q.channel;
    op.src        = SRC_CONST;
    op.mem_idx    = memw;
    op.rpy_idx    = rpw;
    op.last       = chunk_end && (remain <= 17'd128);
    unique case (phase)
      PH_PRE: begin
        op.cmd = plan_q.pre_cmd; op.const_data = plan_q.pre_data;
      end
      PH_CTRL: begin
        op.cmd = plan_q.ctrl_cmd;
        op.const_data = plan_q.ctrl_bytes
          ? {plan_q.ctrl_base[31:7], nbytes, plan_q.ctrl_base[1:0]}
          : {plan_q.ctrl_base[31:7], cbits[6:0]};
      end
      PH_WR: begin
        op.cmd = plan_q.wr_strided ? plan_q.wr_base + {2'd0, k, 4'd0} : plan_q.wr_base;
        op.src = SRC_MEM;
      end
      PH_WR2: begin
        op.cmd = plan_q.wr2_base + {2'd0, k, 4'd0};
        op.src = plan_q.wr2_mem ? SRC_MEM : SRC_CONST;
      end
      PH_GO: begin
        op.cmd = plan_q.go_cmd; op.const_data = plan_q.go_data;
        op.store = plan_q.go_store;
      end
      PH_RD: begin
        op.cmd = plan_q.rd_base + {2'd0, k, 4'd0}; op.store = 1'b1;
      end
      default: op.last = 1'b0;
    endcase
  end

  assign busy     = (phase != PH_IDLE);
  assign op_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      plan_q <= '0;
      remain <= '0;
      k      <= '0;
      memw   <= '0;
      rpw    <= '0;
    end else if (!busy) begin
      if (start) begin
        plan_t p;
        p = make_plan(desc);
        plan_q <= p;
        remain <= !p.chunked ? 17'd1 : (desc.nbits == 16'd0) ? 17'd1 : {1'b0, desc.nbits};
        k      <= '0;
        memw   <= '0;
        rpw    <= '0;
        phase  <= p.pre_en ? PH_PRE
                : next_phase(PH_PRE, {p.rd_en, p.go_en, p.wr2_en, p.wr_en, p.ctrl_en, p.pre_en});
      end
    end else if (op_ready) begin
      if (op.src == SRC_MEM) memw <= memw + 16'd1;
      if (op.store)          rpw  <= rpw + 16'd1;
      if (!step_last) begin
        k <= k + 2'd1;
      end else begin
        k <= '0;
        if (!chunk_end) begin
          phase <= nxt;
        end else if (op.last) begin
          phase <= PH_IDLE;
        end else begin
          remain <= remain - {9'd0, cbits};
          phase  <= first;
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
