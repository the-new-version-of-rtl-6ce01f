// dp_ram: simple dual-port RAM with registered reads.
//
// Used for the ECS command data memory (port A: software writes and reads
// back over Avalon-MM, port B: the command processing unit reads the data to
// send) and for the ECS reply data memory (port A: the reply processing unit
// writes, port B: software reads). Both ports share one clock. A read returns
// the word at the address of the previous cycle; a read of the address being
// written on port A returns the old word. The separate command and reply data
// memories follow the described architecture; their depth (1024 x 32 bit)
// is this implementation's choice.
module dp_ram #(
  parameter int WIDTH = 32,
  parameter int AW    = 10
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
