// motion_pkg -- types and constants shared by the PCI motion controller.
//
// Holds the PCI bus command codes (from the PCI local bus specification),
// the state encoding of the PCI target state machine, the layout of a motion
// instruction word carried through the data FIFO, and the map of the
// function registers in PCI I/O space. The state names follow the state
// diagram of the protocol decoding block; the instruction word layout and
// the register map are this design's own choice.
package motion_pkg;

  // PCI bus commands (C/BE#[3:0] during the address phase).
  typedef enum logic [3:0] {
    CMD_INT_ACK   = 4'h0,
    CMD_SPECIAL   = 4'h1,
    CMD_IO_RD     = 4'h2,
    CMD_IO_WR     = 4'h3,
    CMD_MEM_RD    = 4'h6,
    CMD_MEM_WR    = 4'h7,
    CMD_CFG_RD    = 4'hA,
    CMD_CFG_WR    = 4'hB,
    CMD_MEM_RDMUL = 4'hC,
    CMD_DUAL_ADDR = 4'hD,
    CMD_MEM_RDLN  = 4'hE,
    CMD_MEM_WRINV = 4'hF
  } pci_cmd_e;

  // States of the PCI target (names as in the state diagram).
  typedef enum logic [3:0] {
    ST_IDLE       = 4'd0,  // waiting for an access
    ST_CON_WAIT   = 4'd1,  // configuration access claimed, waiting to respond
    ST_IO_WAIT    = 4'd2,  // I/O access claimed, waiting to respond
    ST_MEM_WAIT   = 4'd3,  // memory access claimed, waiting to respond
    ST_READ_WAIT  = 4'd4,  // AD turnaround cycle of a read
    ST_READ_WAIT2 = 4'd5,  // read data fetched from the back end
    ST_RW         = 4'd6,  // I/O or memory data phase(s)
    ST_BACKOFF    = 4'd7,  // ending: control lines driven high for one cycle
    ST_CON        = 4'd8   // configuration data phase
  } pci_state_e;

  // Which address space a claimed access targets.
  typedef enum logic [1:0] {
    SP_CFG = 2'd0,
    SP_IO  = 2'd1,
    SP_MEM = 2'd2
  } pci_space_e;

  // One motion instruction, as written into the data FIFO through PCI
  // memory space. It asks for `count` step pulses on one axis, one pulse
  // every `period`+1 clocks, in direction `dir_pos` (1 = positive).
  typedef struct packed {
    logic        axis_y;   // 0: X axis, 1: Y axis
    logic        dir_pos;  // direction of travel
    logic [13:0] period;   // pulse period minus one, in clocks
    logic [15:0] count;    // number of pulses (0: no operation)
  } instr_t;

  // Function register word indices (PCI I/O space offset / 4).
  localparam logic [2:0] REG_CTRL   = 3'd0;  // mode bits, lambda, n
  localparam logic [2:0] REG_CMD    = 3'd1;  // self-clearing commands
  localparam logic [2:0] REG_START  = 3'd2;  // arc start point {ys, xs}
  localparam logic [2:0] REG_END    = 3'd3;  // arc end point {ye, xe}
  localparam logic [2:0] REG_DIV    = 3'd4;  // integral clock period - 1
  localparam logic [2:0] REG_PULSE  = 3'd5;  // step pulse width in clocks
  localparam logic [2:0] REG_STATUS = 3'd6;  // read-only status
  localparam logic [2:0] REG_POS    = 3'd7;  // read-only pulse positions

endpackage
