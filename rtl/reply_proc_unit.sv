// reply_proc_unit: reply processing unit of the protocol layer.
//
// Accepts GBT-SCA replies from the GBT-SC core. Each reply is matched with
// the oldest entry of the in-flight queue written by the command processing
// unit (replies of one GBT-SCA come back in command order, and only one
// target is in flight at a time). When that entry asks for it, the reply
// data word is written to the reply data memory at the entry's address.
// Error bytes of all replies of an ECS command are ORed together, and a
// reply with the right transaction ID but a different link or GBT-SCA
// address sets FLAG_MISMATCH. On the last GBT-SCA command of an ECS command
// a summary (identifier, data pointer, number of reply words, error and
// flags) is pushed into the reply FIFO.
//
// Lost replies. Transaction IDs are issued in sequence from 1 to 254, so
// the ID of a reply tells whether it is the one expected, a later one or an
// earlier one:
//  - a later ID means the expected reply was lost: the oldest entry is
//    retired with FLAG_LOST and the reply is then matched with the next;
//  - an earlier ID (a reply that arrives after its entry was given up, or
//    an ID that was never issued) is dropped and counted as unexpected;
//  - with no reply at all for TIMEOUT cycles, the oldest entry is retired
//    with FLAG_LOST.
// The reply word of a lost reply is not written; nwords still counts it, so
// nwords always gives the size of the command's reply area.
//
// Timing: one reply or one retired entry per cycle. rx_ready is low while a
// lost entry is being retired, and while the reply that would finish an ECS
// command cannot be summarised because the reply FIFO is full. A reply with
// no command in flight is dropped and counted.
// Writing reply data and per-command summaries follows the described
// architecture; the matching rules and the summary contents are this
// implementation's choices.
module reply_proc_unit
  import sol40_sca_pkg::*;
#(
  parameter int DATA_AW = 10,
  parameter int TIMEOUT = 1 << 20   // cycles without a reply before giving up
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the GBT-SC core
  input  logic               rx_valid,
  output logic               rx_ready,
  input  sca_rpy_t           rx,
  // in-flight queue (first-word-fall-through)
  input  logic               pend_empty,
  input  pend_t              pend,
  output logic               pend_pop,
  // reply data memory write port
  output logic               rm_we,
  output logic [DATA_AW-1:0] rm_waddr,
  output logic [31:0]        rm_wdata,
  // reply FIFO
  output logic               rf_push,
  output rpy_sum_t           rf_wdata,
  input  logic               rf_full,
  // status
  output logic [31:0]        n_rpy,       // replies matched to a command
  output logic [31:0]        n_unexpected,// replies dropped
  output logic [31:0]        n_lost       // entries retired without a reply
);
  localparam int TW = $clog2(TIMEOUT + 1);

  logic [7:0]  acc_err, acc_flags;
  logic [15:0] acc_words;
  logic [8:0]  id_gap;
  logic [TW-1:0] age;
  logic        hold, same, ahead, stale, take, lost, drop;

  // Distance from the expected ID to the reply's, counted in the 1..254 ring.
  assign id_gap  = (rx.trid >= pend.trid) ? 9'(rx.trid) - 9'(pend.trid)
                                        : 9'(rx.trid) + 9'd254 - 9'(pend.trid);
  assign same  = (rx.trid == pend.trid);
  assign ahead = !same && rx.trid != 8'd0 && rx.trid != 8'd255 && id_gap <= 9'd127;
  assign stale = !same && !ahead;
  assign hold  = pend.last && rf_full;     // cannot summarise now

  assign take  = rx_valid && !pend_empty && same && !hold;
  assign lost  = !pend_empty && !hold &&
                 ((rx_valid && ahead) || (!rx_valid && age == TW'(TIMEOUT)));
  assign drop  = rx_valid && (pend_empty || stale);

  assign rx_ready = pend_empty || stale || (same && !hold);
  assign pend_pop = take || lost;

  assign rm_we    = take && pend.store;
  assign rm_waddr = pend.rpy_addr[DATA_AW-1:0];
  assign rm_wdata = rx.data;

  assign rf_push  = pend_pop && pend.last;
  always_comb begin
    rf_wdata          = '0;
    rf_wdata.id       = pend.id;
    rf_wdata.data_ptr = pend.data_ptr;
    rf_wdata.err      = acc_err | (take ? rx.err : 8'h00);
    rf_wdata.flags    = acc_flags
                      | ((take && (rx.link != pend.link || rx.sca != pend.sca)) ? FLAG_MISMATCH : 8'h00)
                      | (lost ? FLAG_LOST : 8'h00);
    rf_wdata.nwords   = acc_words + {15'd0, pend.store};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_err      <= '0;
      acc_flags    <= '0;
      acc_words    <= '0;
      age          <= '0;
      n_rpy        <= '0;
      n_unexpected <= '0;
      n_lost       <= '0;
    end else begin
      if (pend_empty || pend_pop) age <= '0;
      else if (age != TW'(TIMEOUT)) age <= age + TW'(1);
      if (take) n_rpy <= n_rpy + 32'd1;
      if (lost) n_lost <= n_lost + 32'd1;
      if (drop) n_unexpected <= n_unexpected + 32'd1;
      if (pend_pop) begin
        if (pend.last) begin
          acc_err   <= '0;
          acc_flags <= '0;
          acc_words <= '0;
        end else begin
          acc_err   <= rf_wdata.err;
          acc_flags <= rf_wdata.flags;
          acc_words <= rf_wdata.nwords;
        end
      end
    end
  end

  a_no_rf_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(rf_push && rf_full));
endmodule
