// sol40_sca_top: upgraded SOL40-SCA core.
//
// Lets control software drive many GBT-SCA slow-control ASICs over GBT links
// with few bus transactions: software writes an ECS command (settings plus
// any amount of data) into memories over Avalon-MM and queues its
// identifier; the core unrolls it into GBT-SCA commands, sends them to the
// GBT-SC core (HDLC framing and serialization, outside this module) and
// collects the replies into a reply data memory and a reply FIFO. Software
// may queue further commands without waiting for replies.
//
// Layers:
//   interface layer  avalon_mm_slave
//   buffer layer     command information FIFO, command memory, command data
//                    memory, reply data memory, reply FIFO
//   protocol layer   cmd_proc_unit, protocol_drivers, reply_proc_unit, and
//                    the in-flight queue between the two units
// GBT-SC side: sca_tx_* carries one GBT-SCA command (with link and GBT-SCA
// address) per valid/ready transfer, sca_rx_* one reply. One instance serves
// all links; the link field tells the GBT-SC bank where to send a command.
// Replies must come back in order for each link and GBT-SCA; across targets
// they may be reordered, which cmd_proc_unit allows for by letting the
// replies of one target drain before it starts commands for another.
// A reply that never comes back is given up after RPY_TIMEOUT cycles (or as
// soon as a later reply shows it was lost) and reported in the summary.
// The layering and the memories follow the described architecture; memory
// and FIFO depths, the in-flight limit and all encodings are this
// implementation's choices.
module sol40_sca_top
  import sol40_sca_pkg::*;
#(
  parameter int CMD_AW      = 6,    // 64 command memory slots
  parameter int DATA_AW     = 10,   // 1024 x 32-bit command / reply data words
  parameter int CMD_FIFO_D  = 64,   // command information FIFO depth
  parameter int RPY_FIFO_D  = 64,   // reply FIFO depth
  parameter int INFLIGHT_D  = 4,    // GBT-SCA commands awaiting a reply
  parameter int RPY_TIMEOUT = 1 << 20 // cycles without a reply before one is given up
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave (from the PCIe bridge)
  input  logic [13:0] avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid,
  // to the GBT-SC core
  output logic        sca_tx_valid,
  input  logic        sca_tx_ready,
  output sca_cmd_t    sca_tx,
  // from the GBT-SC core
  input  logic        sca_rx_valid,
  output logic        sca_rx_ready,
  input  sca_rpy_t    sca_rx
);
  localparam int CW  = $clog2(CMD_FIFO_D > RPY_FIFO_D ? CMD_FIFO_D : RPY_FIFO_D) + 1;

  // interface layer <-> buffer layer
  logic               dm_we;
  logic [DATA_AW-1:0] dm_addr, rm_addr;
  logic [31:0]        dm_wdata, dm_rdata_a, rm_rdata_b;
  logic               cm_we;
  logic [CMD_AW-1:0]  cm_wslot;
  logic [1:0]         cm_wword;
  logic [31:0]        cm_wdata, cm_bus_rdata;
  logic               cf_push, cf_full, cf_pop, cf_empty;
  cmd_id_t            cf_wdata, cf_rdata;
  logic [$clog2(CMD_FIFO_D):0] cf_count;
  logic               rf_push, rf_full, rf_pop, rf_empty;
  rpy_sum_t           rf_wdata, rf_rdata;
  logic [$clog2(RPY_FIFO_D):0] rf_count;
  // buffer layer <-> protocol layer
  logic [CMD_AW-1:0]  cm_raddr;
  ecs_desc_t          cm_rdata;
  logic [DATA_AW-1:0] dm_raddr_b;
  logic [31:0]        dm_rdata_b;
  logic               rm_we;
  logic [DATA_AW-1:0] rm_waddr;
  logic [31:0]        rm_wdata, rm_rdata_a_unused;
  // protocol layer internals
  logic               drv_start, drv_busy, drv_op_valid, drv_op_ready;
  ecs_desc_t          drv_desc;
  drv_op_t            drv_op;
  logic               pend_push, pend_full, pend_pop, pend_empty;
  pend_t              pend_w, pend_r;
  logic               proc_busy, order_wait;
  logic [31:0]        n_ecs, n_sca, n_rpy, n_unexpected, n_lost;

  // ---------------- interface layer ----------------
  avalon_mm_slave #(.CMD_AW(CMD_AW), .DATA_AW(DATA_AW), .FIFO_CW(CW)) u_if (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata, .avs_readdatavalid,
    .dm_we, .dm_addr, .dm_wdata, .dm_rdata(dm_rdata_a),
    .rm_addr, .rm_rdata(rm_rdata_b),
    .cm_we, .cm_wslot, .cm_wword, .cm_wdata, .cm_rdata(cm_bus_rdata),
    .cf_push, .cf_wdata, .cf_full, .cf_count(CW'(cf_count)),
    .rf_pop, .rf_rdata, .rf_empty, .rf_count(CW'(rf_count)),
    .proc_busy, .n_ecs, .n_sca, .n_rpy, .n_unexpected, .n_lost
  );

  // ---------------- buffer layer ----------------
  sync_fifo #(.WIDTH($bits(cmd_id_t)), .DEPTH(CMD_FIFO_D)) u_cmd_fifo (
    .clk, .rst_n, .push(cf_push), .wdata(cf_wdata), .full(cf_full),
    .pop(cf_pop), .rdata(cf_rdata), .empty(cf_empty), .count(cf_count)
  );

  ecs_cmd_mem #(.SLOT_AW(CMD_AW)) u_cmd_mem (
    .clk, .we(cm_we), .wslot(cm_wslot), .wword(cm_wword), .wdata(cm_wdata),
    .brdata(cm_bus_rdata), .raddr(cm_raddr), .rdata(cm_rdata)
  );

  dp_ram #(.WIDTH(32), .AW(DATA_AW)) u_cmd_data_mem (
    .clk, .a_we(dm_we), .a_addr(dm_addr), .a_wdata(dm_wdata), .a_rdata(dm_rdata_a),
    .b_addr(dm_raddr_b), .b_rdata(dm_rdata_b)
  );

  dp_ram #(.WIDTH(32), .AW(DATA_AW)) u_rpy_data_mem (
    .clk, .a_we(rm_we), .a_addr(rm_waddr), .a_wdata(rm_wdata), .a_rdata(rm_rdata_a_unused),
    .b_addr(rm_addr), .b_rdata(rm_rdata_b)
  );

  sync_fifo #(.WIDTH($bits(rpy_sum_t)), .DEPTH(RPY_FIFO_D)) u_rpy_fifo (
    .clk, .rst_n, .push(rf_push), .wdata(rf_wdata), .full(rf_full),
    .pop(rf_pop), .rdata(rf_rdata), .empty(rf_empty), .count(rf_count)
  );

  // ---------------- protocol layer ----------------
  cmd_proc_unit #(.CMD_AW(CMD_AW), .DATA_AW(DATA_AW)) u_cpu (
    .clk, .rst_n,
    .cf_empty, .cf_rdata, .cf_pop,
    .cm_raddr, .cm_rdata,
    .dm_raddr(dm_raddr_b), .dm_rdata(dm_rdata_b),
    .drv_start, .drv_desc, .drv_op_valid, .drv_op, .drv_op_ready,
    .tx_valid(sca_tx_valid), .tx_ready(sca_tx_ready), .tx(sca_tx),
    .pend_push, .pend(pend_w), .pend_full, .pend_empty,
    .busy(proc_busy), .order_wait, .n_ecs, .n_sca
  );

  protocol_drivers u_drv (
    .clk, .rst_n, .start(drv_start), .desc(drv_desc), .busy(drv_busy),
    .op_valid(drv_op_valid), .op(drv_op), .op_ready(drv_op_ready)
  );

  sync_fifo #(.WIDTH($bits(pend_t)), .DEPTH(INFLIGHT_D)) u_inflight (
    .clk, .rst_n, .push(pend_push), .wdata(pend_w), .full(pend_full),
    .pop(pend_pop), .rdata(pend_r), .empty(pend_empty), .count()
  );

  reply_proc_unit #(.DATA_AW(DATA_AW), .TIMEOUT(RPY_TIMEOUT)) u_rpu (
    .clk, .rst_n,
    .rx_valid(sca_rx_valid), .rx_ready(sca_rx_ready), .rx(sca_rx),
    .pend_empty, .pend(pend_r), .pend_pop,
    .rm_we, .rm_waddr, .rm_wdata,
    .rf_push, .rf_wdata, .rf_full,
    .n_rpy, .n_unexpected, .n_lost
  );

  a_drv_busy: assert property (@(posedge clk) disable iff (!rst_n) drv_start |-> !drv_busy);
endmodule
