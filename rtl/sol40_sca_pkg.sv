// sol40_sca_pkg: types and constants shared by the SOL40-SCA core.
//
// The core turns ECS commands, written by control software into on-chip
// memories over an Avalon-MM bus, into sequences of GBT-SCA commands, and
// collects the GBT-SCA replies into a reply memory and a reply FIFO.
// This package defines the formats that cross block boundaries:
//   * ecs_desc_t   - one entry of the ECS command (settings) memory, four
//                    32-bit words written by software;
//   * cmd_id_t     - the identifier queued in the command FIFO;
//   * drv_op_t     - one GBT-SCA command as produced by the protocol drivers;
//   * sca_cmd_t / sca_rpy_t - the command and reply words exchanged with the
//                    GBT-SC (HDLC/serializer) core;
//   * pend_t       - what the command processing unit tells the reply
//                    processing unit about each command in flight;
//   * rpy_sum_t    - the per-ECS-command summary placed in the reply FIFO.
// The split into settings memory, data memories and two identifier FIFOs
// follows the described architecture. Field layouts, the GBT-SCA channel
// numbers and command codes (taken from the public GBT-SCA manual) are this
// implementation's choices.
package sol40_sca_pkg;

  // Links per SOL40 board and GBT-SCAs per GBT link.
  localparam int N_LINKS = 48;
  localparam int N_SCA   = 32;

  // ECS protocol selector (one protocol driver each).
  typedef enum logic [2:0] {
    PROT_CTRL = 3'd0,
    PROT_SPI  = 3'd1,
    PROT_GPIO = 3'd2,
    PROT_I2C  = 3'd3,
    PROT_JTAG = 3'd4,
    PROT_ADC  = 3'd5,
    PROT_DAC  = 3'd6
  } prot_e;

  // GBT-SCA channel numbers.
  localparam logic [7:0] CH_CTRL = 8'h00;
  localparam logic [7:0] CH_SPI  = 8'h01;
  localparam logic [7:0] CH_GPIO = 8'h02;
  localparam logic [7:0] CH_I2C0 = 8'h03;   // I2C bus n is CH_I2C0 + n, n = 0..15
  localparam logic [7:0] CH_JTAG = 8'h13;
  localparam logic [7:0] CH_ADC  = 8'h14;
  localparam logic [7:0] CH_DAC  = 8'h15;

  // ECS command settings, as four 32-bit words (word 0 in the LSBs).
  //   word0: link[7:0], sca[15:8], protocol[18:16], op[23:20], sub[28:24]
  //   word1: nbits[15:0], data_ptr[31:16]
  //   word2: cfg   (protocol configuration, e.g. SPI/JTAG control bits,
  //                 I2C slave address and speed)
  //   word3: cfg2  (SPI slave-select mask)
  typedef struct packed {
    logic [31:0] cfg2;
    logic [31:0] cfg;
    logic [15:0] data_ptr;
    logic [15:0] nbits;
    logic [2:0]  rsv0;
    logic [4:0]  sub;
    logic [3:0]  op;
    logic        rsv1;
    prot_e       protocol;
    logic [7:0]  sca;
    logic [7:0]  link;
  } ecs_desc_t;

  // Identifier of one ECS command: the command-memory slot holding its
  // settings and a software tag.
  typedef struct packed {
    logic [7:0] tag;
    logic [7:0] slot;
  } cmd_id_t;

  // Where the data word of a GBT-SCA command comes from.
  typedef enum logic {
    SRC_CONST = 1'b0,   // drv_op_t.const_data
    SRC_MEM   = 1'b1    // command data memory, word data_ptr + mem_idx
  } src_e;

  // One GBT-SCA command produced by a protocol driver.
  typedef struct packed {
    logic [7:0]  channel;
    logic [7:0]  cmd;
    src_e        src;
    logic [31:0] const_data;
    logic [15:0] mem_idx;     // word offset into the command data
    logic        store;       // reply data goes to the reply data memory
    logic [15:0] rpy_idx;     // word offset into the reply data
    logic        last;        // final GBT-SCA command of the ECS command
  } drv_op_t;

  // Command towards the GBT-SC core.
  typedef struct packed {
    logic [7:0]  link;
    logic [7:0]  sca;
    logic [7:0]  trid;
    logic [7:0]  channel;
    logic [7:0]  cmd;
    logic [31:0] data;
  } sca_cmd_t;

  // Reply from the GBT-SC core.
  typedef struct packed {
    logic [7:0]  link;
    logic [7:0]  sca;
    logic [7:0]  trid;
    logic [7:0]  channel;
    logic [7:0]  err;
    logic [31:0] data;
  } sca_rpy_t;

  // Command in flight, from command to reply processing unit.
  typedef struct packed {
    logic [7:0]  link;
    logic [7:0]  sca;
    logic [7:0]  trid;
    logic        store;
    logic [15:0] rpy_addr;
    logic        last;
    cmd_id_t     id;
    logic [15:0] data_ptr;
  } pend_t;

  // Summary of one executed ECS command (two 32-bit words for software).
  //   word0: tag[7:0], slot[15:8], flags[23:16], err[31:24]
  //   word1: data_ptr[15:0], nwords[31:16]
  typedef struct packed {
    logic [15:0] nwords;     // reply data words of the command
    logic [15:0] data_ptr;
    logic [7:0]  err;        // OR of the GBT-SCA error bytes
    logic [7:0]  flags;      // FLAG_MISMATCH | FLAG_LOST
    cmd_id_t     id;
  } rpy_sum_t;

  localparam logic [7:0] FLAG_MISMATCH = 8'h01;  // reply link/GBT-SCA differ
  localparam logic [7:0] FLAG_LOST     = 8'h02;  // a reply never came back

endpackage
