// cmd_proc_unit: command processing unit of the protocol layer.
//
// Takes the identifier of the next ECS command from the command FIFO, reads
// the command settings from the command memory, starts the protocol drivers
// and then sends each GBT-SCA command the drivers produce to the GBT-SC core.
// Data words for write commands are fetched from the command data memory at
// data_ptr + mem_idx. Each GBT-SCA command gets a transaction ID (1..254,
// as 0 and 255 are reserved by the GBT-SCA) and, as it is sent, an entry
// describing it is pushed into the in-flight queue read by the reply
// processing unit. A full in-flight queue holds back the next command, which
// bounds the number of GBT-SCA commands awaiting a reply.
// Replies are only guaranteed to return in order per link and GBT-SCA, so
// before the first command of an ECS command for a different link or
// GBT-SCA than the previous one, the unit waits until the in-flight queue is
// empty (order_wait). The reply processing unit can then match replies
// strictly in order.
//
// Timing: four cycles from popping the FIFO to the first GBT-SCA command
// (plus any wait for the in-flight queue to drain on a target change), then
// each GBT-SCA command takes one cycle of data fetch plus one transfer cycle
// (tx_valid/tx_ready handshake), so an uncongested link gets one command
// every two clock cycles.
// The FIFO-to-memories-to-GBT-SC flow follows the described architecture;
// the transaction-ID scheme, the in-flight queue and the cycle timing are
// this implementation's choices.
module cmd_proc_unit
  import sol40_sca_pkg::*;
#(
  parameter int CMD_AW  = 6,
  parameter int DATA_AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  // command FIFO (first-word-fall-through)
  input  logic               cf_empty,
  input  cmd_id_t            cf_rdata,
  output logic               cf_pop,
  // command memory read port
  output logic [CMD_AW-1:0]  cm_raddr,
  input  ecs_desc_t          cm_rdata,
  // command data memory read port
  output logic [DATA_AW-1:0] dm_raddr,
  input  logic [31:0]        dm_rdata,
  // protocol drivers
  output logic               drv_start,
  output ecs_desc_t          drv_desc,
  input  logic               drv_op_valid,
  input  drv_op_t            drv_op,
  output logic               drv_op_ready,
  // to the GBT-SC core
  output logic               tx_valid,
  input  logic               tx_ready,
  output sca_cmd_t           tx,
  // in-flight queue towards the reply processing unit
  output logic               pend_push,
  output pend_t              pend,
  input  logic               pend_full,
  input  logic               pend_empty,
  // status
  output logic               busy,
  output logic               order_wait, // waiting for replies before a target change
  output logic [31:0]        n_ecs,     // ECS commands fully sent
  output logic [31:0]        n_sca      // GBT-SCA commands sent
);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_ORDER, S_FETCH, S_SEND} state_e;

  state_e    state;
  cmd_id_t   cur_id;
  ecs_desc_t desc_q;
  logic [7:0] trid;
  logic       fire;
  logic [7:0] prev_link, prev_sca;
  logic       prev_valid, new_target;

  assign cm_raddr     = cur_id.slot[CMD_AW-1:0];
  assign dm_raddr     = DATA_AW'(desc_q.data_ptr + drv_op.mem_idx);
  assign drv_desc     = cm_rdata;
  assign drv_start    = (state == S_RD2);
  assign cf_pop       = (state == S_IDLE) && !cf_empty;
  assign busy         = (state != S_IDLE);
  assign order_wait   = (state == S_ORDER);
  assign new_target   = prev_valid && (cm_rdata.link != prev_link || cm_rdata.sca != prev_sca);

  assign tx_valid     = (state == S_SEND) && !pend_full;
  assign fire         = tx_valid && tx_ready;
  assign drv_op_ready = fire;
  assign pend_push    = fire;

  always_comb begin
    tx.link    = desc_q.link;
    tx.sca     = desc_q.sca;
    tx.trid    = trid;
    tx.channel = drv_op.channel;
    tx.cmd     = drv_op.cmd;
    tx.data    = (drv_op.src == SRC_MEM) ? dm_rdata : drv_op.const_data;

    pend.link     = desc_q.link;
    pend.sca      = desc_q.sca;
    pend.trid     = trid;
    pend.store    = drv_op.store;
    pend.rpy_addr = 16'(DATA_AW'(desc_q.data_ptr + drv_op.rpy_idx));
    pend.last     = drv_op.last;
    pend.id       = cur_id;
    pend.data_ptr = desc_q.data_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cur_id <= '0;
      desc_q <= '0;
      trid   <= 8'd1;
      prev_link  <= '0;
      prev_sca   <= '0;
      prev_valid <= 1'b0;
      n_ecs  <= '0;
      n_sca  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!cf_empty) begin
          cur_id <= cf_rdata;
          state  <= S_RD1;
        end
        S_RD1: state <= S_RD2;              // command memory read in flight
        S_RD2: begin                        // settings valid: start drivers
          desc_q <= cm_rdata;
          state  <= (new_target && !pend_empty) ? S_ORDER : S_FETCH;
        end
        S_ORDER: if (pend_empty) state <= S_FETCH;
        S_FETCH: if (drv_op_valid) state <= S_SEND;  // data memory read
        S_SEND: if (fire) begin
          trid  <= (trid == 8'd254) ? 8'd1 : trid + 8'd1;
          prev_link  <= desc_q.link;
          prev_sca   <= desc_q.sca;
          prev_valid <= 1'b1;
          n_sca <= n_sca + 32'd1;
          if (drv_op.last) begin
            n_ecs <= n_ecs + 32'd1;
            state <= S_IDLE;
          end else begin
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid && $stable(tx));
endmodule
