// gbt_sc_model: behavioural model, for simulation only, of the GBT-SC core,
// the GBT links and the GBT-SCA ASICs behind them.
//
// Accepts GBT-SCA commands (tx_valid/tx_ready, with random back-pressure)
// and returns one reply per command after a random latency of
// MIN_LAT..MAX_LAT cycles (rx_valid and rx held until rx_ready). As with
// independent links, replies are in order for each link and GBT-SCA but
// may overtake replies from other targets. Each GBT-SCA is
// modelled as a register file indexed by {link, GBT-SCA, channel,
// command[7:1]}: a command with bit 0 clear (a write or a start) stores its
// data and replies with data ^ 32'hA5A5_0000; a command with bit 0 set (a
// read) returns the bitwise inverse of what was last written at the same
// index, so a read-back shows which word reached which register. A write of
// ERR_WORD is answered with error byte 8'h04. The transaction ID, link,
// GBT-SCA address and channel of the command are echoed in the reply.
// Commands to link DEAD_LINK are accepted but never answered.
module gbt_sc_model
  import sol40_sca_pkg::*;
#(
  parameter int          READY_PCT = 70,
  parameter int          MIN_LAT   = 4,
  parameter int          MAX_LAT   = 40,
  parameter logic [31:0] ERR_WORD  = 32'hBAD0_0BAD,
  parameter int          DEAD_LINK = 255
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tx_valid,
  output logic     tx_ready,
  input  sca_cmd_t tx,
  output logic     rx_valid,
  input  logic     rx_ready,
  output sca_rpy_t rx
);
  logic [31:0] regs [logic [30:0]];
  sca_rpy_t    rq[$];
  longint      due[$];
  longint      now = 0;
  longint      last_due [logic [15:0]];   // per {link, GBT-SCA}
  int          sel = -1;                  // reply on offer, -1 if none
  int          n_overtake = 0;            // replies that overtook another

  assign rx_valid = rst_n && sel >= 0;
  assign rx       = (sel >= 0) ? rq[sel] : sca_rpy_t'(0);

  // First due reply that has no older reply from the same target ahead of it.
  function automatic int pick();
    for (int i = 0; i < rq.size(); i++) begin
      bit blocked;
      blocked = 1'b0;
      for (int j = 0; j < i; j++)
        if (rq[j].link == rq[i].link && rq[j].sca == rq[i].sca) blocked = 1'b1;
      if (!blocked && due[i] <= now) return i;
    end
    return -1;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      tx_ready <= 1'b0;
    end else begin
      // Sample both handshakes at the edge, update the queues just after
      // it so that the design sees this edge's values.
      bit rx_fire, tx_fire;
      sca_cmd_t c;
      rx_fire = rx_valid && rx_ready;
      tx_fire = tx_valid && tx_ready;
      c = tx;
      tx_ready <= ($urandom_range(99) < READY_PCT);
      #1;
      if (rx_fire) begin
        if (sel > 0) n_overtake++;
        rq.delete(sel);
        due.delete(sel);
        sel = -1;
      end
      if (tx_fire) begin
        sca_rpy_t r;
        logic [30:0] key;
        longint d;
        logic [15:0] tgt;
        tgt = {c.link, c.sca};
        key = {c.link, c.sca, c.channel, c.cmd[7:1]};
        r.link = c.link; r.sca = c.sca; r.trid = c.trid; r.channel = c.channel;
        r.err = 8'h00;
        if (c.cmd[0]) begin
          r.data = regs.exists(key) ? ~regs[key] : 32'hFFFF_FFFF;
        end else begin
          regs[key] = c.data;
          r.data = c.data ^ 32'hA5A5_0000;
          if (c.data == ERR_WORD) r.err = 8'h04;
        end
        d = now + longint'($urandom_range(MAX_LAT, MIN_LAT));
        if (last_due.exists(tgt) && d < last_due[tgt]) d = last_due[tgt];
        last_due[tgt] = d;
        if (int'(c.link) != DEAD_LINK) begin
          rq.push_back(r);
          due.push_back(d);
        end
      end
      now++;
      if (sel < 0) sel = pick();
    end
  end
endmodule
