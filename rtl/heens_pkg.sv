// heens_pkg: types and constants shared by the spiking-neural-network
// multiprocessor array, its processing elements and the sequencer.
//
// The 6-bit opcode values are the instruction set of the array (48 codes,
// NOP = 0 ... READMP = 47). GOTO, used by programs but absent from that
// table, is given the free code 48 here. The bundles below are this
// design's own encoding of the buses the array receives: the broadcast
// instruction bus, the setup (memory write) bus and the spike event bus.
package heens_pkg;

  localparam int unsigned DW      = 16;  // register / ALU data width
  localparam int unsigned RC_W    = 5;   // row/column index width (1..31)
  localparam int unsigned VIRT_W  = 3;   // virtual layer index (8 layers)
  localparam int unsigned OPND_W  = 10;  // instruction operand width
  localparam int unsigned CHIP_W  = 7;   // ring node identifier width
  localparam int unsigned LIN_W   = 11;  // linear neuron address width
  localparam int unsigned BRAM_DW = 32;  // synapse/neuron memory word

  typedef enum logic [5:0] {
    OP_NOP      = 6'd0,  OP_LDALL   = 6'd1,  OP_LLFSR    = 6'd2,  OP_LOADSP  = 6'd3,
    OP_STOREB   = 6'd4,  OP_STORESP = 6'd5,  OP_STOREPS  = 6'd6,  OP_RST     = 6'd7,
    OP_SET      = 6'd8,  OP_SHLN    = 6'd9,  OP_SHRN     = 6'd10, OP_RTL     = 6'd11,
    OP_RTR      = 6'd12, OP_INC     = 6'd13, OP_DEC      = 6'd14, OP_LOADSN  = 6'd15,
    OP_ADD      = 6'd16, OP_SUB     = 6'd17, OP_MUL      = 6'd18, OP_MULS    = 6'd19,
    OP_AND      = 6'd20, OP_OR      = 6'd21, OP_INV      = 6'd22, OP_XOR     = 6'd23,
    OP_MOVA     = 6'd24, OP_MOVR    = 6'd25, OP_SWAPS    = 6'd26, OP_MOVRS   = 6'd27,
    OP_LOOP     = 6'd28, OP_LOOPV   = 6'd29, OP_ENDL     = 6'd30, OP_GOSUB   = 6'd31,
    OP_RET      = 6'd32, OP_FREEZEC = 6'd33, OP_FREEZENC = 6'd34, OP_FREEZEZ = 6'd35,
    OP_FREEZENZ = 6'd36, OP_UNFREEZE= 6'd37, OP_HALT     = 6'd38, OP_SETZ    = 6'd39,
    OP_SETC     = 6'd40, OP_CLRZ    = 6'd41, OP_CLRC     = 6'd42, OP_RANDON  = 6'd43,
    OP_SEED     = 6'd44, OP_RANDOFF = 6'd45, OP_SPKDIS   = 6'd46, OP_READMP  = 6'd47,
    OP_GOTO     = 6'd48
  } opcode_e;

  // Instruction word held in the sequencer's instruction memory.
  typedef struct packed {
    opcode_e             op;
    logic [OPND_W-1:0]   operand;  // register in [2:0], shift count in [3:0],
                                   // DMEM index in [9:3], jump target, loop count
  } iword_t;

  // Broadcast instruction as seen by every processing element.
  typedef struct packed {
    opcode_e             op;
    logic [OPND_W-1:0]   operand;
    logic [DW-1:0]       data;     // DMEM word for LDALL
    logic                sel_all;  // all PEs execute
    logic [RC_W-1:0]     sel_row;  // otherwise only this PE executes
    logic [RC_W-1:0]     sel_col;
    logic [VIRT_W-1:0]   virt;     // virtual layer being computed
  } pe_instr_t;

  // Setup bus: writes one word into one memory of one PE.
  typedef enum logic [2:0] {
    CFG_SNBRAM   = 3'd0,  // synapse/neuron parameter memory
    CFG_LOCAL    = 3'd1,  // local associative memory
    CFG_GENC_ID  = 3'd2,  // global encoding memory, chip-id side
    CFG_GCONV_ID = 3'd3,  // global conversion memory, chip-id side
    CFG_GENC_RC  = 3'd4,  // global encoding memory, neuron-address side
    CFG_GCONV_RC = 3'd5   // global conversion memory, neuron-address side
  } cfg_mem_e;

  typedef struct packed {
    logic                we;
    cfg_mem_e            mem;
    logic [LIN_W-1:0]    addr;
    logic [BRAM_DW-1:0]  data;
    logic [RC_W-1:0]     row;
    logic [RC_W-1:0]     col;
  } cfg_t;

  // Spike event distributed to the associative memories of every PE.
  typedef struct packed {
    logic                valid;
    logic [CHIP_W-1:0]   chip;   // source ring node
    logic [LIN_W-1:0]    lin;    // source neuron: virt*ROWS*COLS + row*COLS + col
  } spike_t;

  function automatic logic [LIN_W-1:0] spike_lin(input logic [VIRT_W-1:0] v,
                                                 input logic [RC_W-1:0] r,
                                                 input logic [RC_W-1:0] c,
                                                 input int unsigned rows,
                                                 input int unsigned cols);
    return LIN_W'((int'(v) * rows + int'(r)) * cols + int'(c));
  endfunction

endpackage
