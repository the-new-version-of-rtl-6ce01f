// ecs_cmd_mem: ECS command (settings) memory.
//
// Holds one ecs_desc_t per slot: which link and GBT-SCA the ECS command is
// for, the protocol and operation, how many bits to transfer and the pointer
// into the command and reply data memories. Software writes the four 32-bit
// words of a slot one at a time (wslot, wword) and can read one word back
// from the same slot and word address (brdata, registered); the command
// processing unit reads a whole slot through a second registered read port
// (rdata valid the cycle after raddr). A settings memory separate from the data memory follows the
// described architecture; 64 slots is this implementation's choice.
module ecs_cmd_mem
  import sol40_sca_pkg::*;
#(
  parameter int SLOT_AW = 6
) (
  input  logic               clk,
  input  logic               we,
  input  logic [SLOT_AW-1:0] wslot,
  input  logic [1:0]         wword,
  input  logic [31:0]        wdata,
  output logic [31:0]        brdata,
  input  logic [SLOT_AW-1:0] raddr,
  output ecs_desc_t          rdata
);
  logic [3:0][31:0] mem [2**SLOT_AW];

  always_ff @(posedge clk) begin
    if (we) mem[wslot][wword] <= wdata;
    rdata  <= ecs_desc_t'(mem[raddr]);
    brdata <= mem[wslot][wword];
  end
endmodule
