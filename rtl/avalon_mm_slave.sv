// avalon_mm_slave: interface layer of the SOL40-SCA core.
//
// Maps the buffer layer onto an Avalon-MM slave with 32-bit words, so the
// control software on the host can queue ECS commands and collect replies.
// Word address map (avs_address[13:12] selects the region):
//   0x0000 + i          command data memory word i            read/write
//   0x1000 + i          reply data memory word i              read
//   0x2000 + 4*s + w    command memory slot s, word w (0..3)  read/write
//   0x3000              CMD_PUSH: {tag[15:8], slot[7:0]} queued in the
//                       command FIFO (dropped and counted if it is full)
//   0x3001              RPY_POP: any write removes the reply FIFO head
//   0x3002 / 0x3003     RPY_HEAD0 / RPY_HEAD1: words 0 and 1 of the reply
//                       FIFO head (see rpy_sum_t)
//   0x3004              STATUS: cmd FIFO count [7:0], reply FIFO count
//                       [15:8], reply FIFO empty [16], cmd FIFO full [17],
//                       processing busy [18]
//   0x3005 / 0x3006     ECS commands sent / GBT-SCA commands sent
//   0x3007 / 0x3008     GBT-SCA replies received / replies dropped
//   0x3009              CMD_PUSH requests dropped because the FIFO was full
//   0x300A              GBT-SCA replies lost (given up or skipped)
// Reads have a fixed latency of one cycle (avs_readdatavalid); there is no
// wait state. Unmapped and write-only register addresses read as zero.
// A register interface on the Avalon-MM bus follows the described
// architecture; the address map is this implementation's choice.
module avalon_mm_slave
  import sol40_sca_pkg::*;
#(
  parameter int CMD_AW  = 6,
  parameter int DATA_AW = 10,
  parameter int FIFO_CW = 7     // width of the FIFO count inputs
) (
  input  logic               clk,
  input  logic               rst_n,
  // Avalon-MM slave
  input  logic [13:0]        avs_address,
  input  logic               avs_read,
  input  logic               avs_write,
  input  logic [31:0]        avs_writedata,
  output logic [31:0]        avs_readdata,
  output logic               avs_readdatavalid,
  // command data memory, port A
  output logic               dm_we,
  output logic [DATA_AW-1:0] dm_addr,
  output logic [31:0]        dm_wdata,
  input  logic [31:0]        dm_rdata,
  // reply data memory, read port
  output logic [DATA_AW-1:0] rm_addr,
  input  logic [31:0]        rm_rdata,
  // command memory, write port
  output logic               cm_we,
  output logic [CMD_AW-1:0]  cm_wslot,
  output logic [1:0]         cm_wword,
  output logic [31:0]        cm_wdata,
  input  logic [31:0]        cm_rdata,
  // command FIFO, write side
  output logic               cf_push,
  output cmd_id_t            cf_wdata,
  input  logic               cf_full,
  input  logic [FIFO_CW-1:0] cf_count,
  // reply FIFO, read side
  output logic               rf_pop,
  input  rpy_sum_t           rf_rdata,
  input  logic               rf_empty,
  input  logic [FIFO_CW-1:0] rf_count,
  // status from the protocol layer
  input  logic               proc_busy,
  input  logic [31:0]        n_ecs,
  input  logic [31:0]        n_sca,
  input  logic [31:0]        n_rpy,
  input  logic [31:0]        n_unexpected,
  input  logic [31:0]        n_lost
);

  localparam logic [1:0] R_DMEM = 2'd0, R_RMEM = 2'd1, R_CMEM = 2'd2, R_REGS = 2'd3;

  logic [1:0]  region;
  logic [3:0]  reg_a;
  logic        rd_q;
  logic [1:0]  rd_region_q;
  logic [31:0] reg_rdata, reg_rdata_q;
  logic [31:0] n_dropped;

  assign region   = avs_address[13:12];
  assign reg_a    = avs_address[3:0];

  assign dm_we    = avs_write && region == R_DMEM;
  assign dm_addr  = avs_address[DATA_AW-1:0];
  assign dm_wdata = avs_writedata;
  assign rm_addr  = avs_address[DATA_AW-1:0];

  assign cm_we    = avs_write && region == R_CMEM;
  assign cm_wslot = avs_address[CMD_AW+1:2];
  assign cm_wword = avs_address[1:0];
  assign cm_wdata = avs_writedata;

  assign cf_push  = avs_write && region == R_REGS && reg_a == 4'h0 && !cf_full;
  assign cf_wdata = cmd_id_t'(avs_writedata[15:0]);
  assign rf_pop   = avs_write && region == R_REGS && reg_a == 4'h1 && !rf_empty;

  always_comb begin
    unique case (reg_a)
      4'h2:    reg_rdata = rf_rdata[31:0];
      4'h3:    reg_rdata = rf_rdata[63:32];
      4'h4:    reg_rdata = {13'd0, proc_busy, cf_full, rf_empty,
                            8'(rf_count), 8'(cf_count)};
      4'h5:    reg_rdata = n_ecs;
      4'h6:    reg_rdata = n_sca;
      4'h7:    reg_rdata = n_rpy;
      4'h8:    reg_rdata = n_unexpected;
      4'h9:    reg_rdata = n_dropped;
      4'hA:    reg_rdata = n_lost;
      default: reg_rdata = 32'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      rd_region_q <= '0;
      reg_rdata_q <= '0;
      n_dropped   <= '0;
    end else begin
      rd_q        <= avs_read;
      rd_region_q <= region;
      reg_rdata_q <= reg_rdata;
      if (avs_write && region == R_REGS && reg_a == 4'h0 && cf_full)
        n_dropped <= n_dropped + 32'd1;
    end
  end

  assign avs_readdatavalid = rd_q;
  always_comb begin
    unique case (rd_region_q)
      R_DMEM:  avs_readdata = dm_rdata;
      R_RMEM:  avs_readdata = rm_rdata;
      R_CMEM:  avs_readdata = cm_rdata;
      R_REGS:  avs_readdata = reg_rdata_q;
      default: avs_readdata = 32'd0;
    endcase
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write));
endmodule
