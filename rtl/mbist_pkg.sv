// mbist_pkg: formats and encodings shared by the programmable DRAM BIST.
//
// A test algorithm is held in two small tables. An instruction word (14 bits)
// carries one DDR3 command plus one address operation and one data operation.
// A sequence word (26 bits) carries a link bit, a next-sequence pointer and
// four instruction-buffer pointers that are executed one per internal clock.
// The field order and widths follow the published bit-field layout; the
// leftmost field of each word is placed at the MSB, which is this design's
// choice. Command encodings are the standard DDR3 truth table on
// {CKE, /RAS, /CAS, /WE}.
`timescale 1ns / 1ps
package mbist_pkg;

  // Table sizes.
  localparam int unsigned NSEQ   = 32;  // sequence buffers #0..#31
  localparam int unsigned NINSTR = 31;  // instruction buffers #0..#30
  localparam int unsigned PTR_W  = 5;   // width of every pointer field
  localparam int unsigned NSLOT  = 4;   // instruction pointers per sequence buffer

  // Pointer value that marks the end of a sequence buffer's pointer list.
  localparam logic [PTR_W-1:0] PTR_END = 5'd31;

  // DDR3 commands as {CKE, /RAS, /CAS, /WE}.
  typedef enum logic [3:0] {
    CMD_MRS  = 4'b1000,
    CMD_REF  = 4'b1001,
    CMD_PRE  = 4'b1010,
    CMD_ACT  = 4'b1011,
    CMD_WR   = 4'b1100,
    CMD_RD   = 4'b1101,
    CMD_ZQC  = 4'b1110,
    CMD_NOP  = 4'b1111
  } cmd_e;

  // Address functions (Side selects x or y).
  typedef enum logic [2:0] {
    AF_INC   = 3'd0,  // addr + 1
    AF_DEC   = 3'd1,  // addr - 1
    AF_INCR  = 3'd2,  // addr + reg
    AF_DECR  = 3'd3,  // addr - reg
    AF_SETZ  = 3'd4,  // addr = 0
    AF_SETM  = 3'd5,  // addr = all ones
    AF_SETREG= 3'd6,  // reg = external data
    AF_HOLD  = 3'd7
  } addr_fn_e;

  // Data functions. LL..HH drive dataE/dataO from dreg.
  typedef enum logic [2:0] {
    DF_LL    = 3'd0,  // E = dreg,  O = dreg
    DF_LH    = 3'd1,  // E = dreg,  O = ~dreg
    DF_HL    = 3'd2,  // E = ~dreg, O = dreg
    DF_HH    = 3'd3,  // E = ~dreg, O = ~dreg
    DF_INC   = 3'd4,  // dreg + 1
    DF_DEC   = 3'd5,  // dreg - 1
    DF_SETREG= 3'd6,  // dreg = external data
    DF_HOLD  = 3'd7
  } data_fn_e;

  // Instruction buffer word, MSB first: CKE,/RAS,/CAS,/WE | bank | side | addr_fn | data_fn
  typedef struct packed {
    cmd_e       cmd;      // [13:10]
    logic [2:0] bank;     // [9:7]
    logic       side;     // [6]   0: x address, 1: y address
    addr_fn_e   addr_fn;  // [5:3]
    data_fn_e   data_fn;  // [2:0]
  } instr_t;

  // Sequence buffer word, MSB first: link | sequence pointer | four instruction pointers
  typedef struct packed {
    logic                         link;    // [25]
    logic [PTR_W-1:0]             seq_ptr; // [24:20]
    logic [NSLOT-1:0][PTR_W-1:0]  ibp;     // ibp[3] at [19:15] is executed first
  } seq_t;

  localparam int unsigned INSTR_W = $bits(instr_t);  // 14
  localparam int unsigned SEQ_W   = $bits(seq_t);    // 26

  // Instruction slot k (0 = first executed) of a sequence word.
  function automatic logic [PTR_W-1:0] slot_ptr(seq_t s, logic [1:0] k);
    return s.ibp[2'd3 - k];
  endfunction

  // The instruction issued in a cycle with nothing to execute.
  localparam instr_t INSTR_IDLE = '{cmd: CMD_NOP, bank: 3'd0, side: 1'b0,
                                    addr_fn: AF_HOLD, data_fn: DF_HOLD};

endpackage
