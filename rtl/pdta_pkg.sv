// pdta_pkg: sizes, packet type, control-word layout and mode encoding shared by the
// packet-data-transfer processor.
//
// A packet on the micronetwork is bit-parallel: a source address and a data word
// (plus a valid bit, this design's addition, so that a PE can stay silent in a step).
// Sizes follow the 32-PE configuration: 32-bit words, 5-bit addresses (log2 of 32),
// 256-word local and control memories. The control-word layout and the opcode
// encoding are this design's own choice.
package pdta_pkg;

  localparam int unsigned N_PE_DEF   = 32;   // PEs on one micronetwork
  localparam int unsigned ADDR_W     = 5;    // log2(N_PE_DEF) source-address bits
  localparam int unsigned DATA_W     = 32;   // word length
  localparam int unsigned MEM_DEPTH  = 256;  // local memory words
  localparam int unsigned MEM_AW     = 8;
  localparam int unsigned CTRL_DEPTH = 256;  // control-memory words (VLIW program length)
  localparam int unsigned PC_W       = 8;
  localparam int unsigned CTRL_W     = 32;   // control-memory word per PE/router module
  localparam int unsigned STEP_LEN_W = 8;    // "number of clock cycles in a single step"
  localparam int unsigned N_RX       = 2;    // receive registers (selection addresses) per router

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;

  // Packet: valid flag, source address, data.
  typedef struct packed {
    logic  valid;
    addr_t src;
    word_t data;
  } packet_t;

  // Micronetwork mode, driven by the sequencer's mode control.
  //   MODE_IDLE : no transfer; line registers are emptied
  //   MODE_PE   : PE-router transfer, every router loads its own PE's packet
  //   MODE_RR   : router-router transfer, packets shift one router per cycle
  typedef enum logic [1:0] {
    MODE_IDLE = 2'd0,
    MODE_PE   = 2'd1,
    MODE_RR   = 2'd2
  } mode_e;

  // PE operation performed at the end of a step.
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_MUL   = 3'd1,  // result <= rx[0] * rx[1]
    OP_ADD   = 3'd2,  // result <= rx[0] + rx[1]
    OP_LOAD  = 3'd3,  // result <= local_memory[maddr]
    OP_STORE = 3'd4   // local_memory[maddr] <= rx[0]
  } pe_op_e;

  // One PE/router module's slice of a VLIW word (CTRL_W bits).
  typedef struct packed {
    logic [CTRL_W-25:0] reserved;
    logic [MEM_AW-1:0]  maddr;    // local-memory address for LOAD / STORE
    logic               sel1_en;  // receive register 1 enabled this step
    addr_t              sel1;     // selection address of receive register 1
    logic               sel0_en;  // receive register 0 enabled this step
    addr_t              sel0;     // selection address of receive register 0
    logic               send;     // inject the PE result as a packet at the PE-router cycle
    pe_op_e             op;
  } ctrl_word_t;

  // Target of a host load/read access.
  typedef enum logic [1:0] {
    HOST_LOCAL = 2'd0,  // a PE's local memory
    HOST_CTRL  = 2'd1,  // a PE's control memory
    HOST_STEP  = 2'd2   // the sequencer's step-length memory
  } host_target_e;

endpackage
