// raster_pkg: types and constants shared by the Raster Processor chip and the
// Scan Line Processor.
//
// The Raster Processor bus carries four-word commands on 16 data lines D0-D15
// plus three mode lines C0 C1 C2.  The first three words each hold a 3-bit field
// in D15-D13 and a 13-bit coordinate in D12-D0; the fourth word is the 16-bit
// halftone pattern.  Opcodes, ALU operations and the C1 C2 encodings follow the
// command table and mode-line table of the design; the bit placement of the
// fields inside a word is this implementation's choice.
package raster_pkg;

  localparam int RP_COORD_W = 13;  // screen coordinates: 13 bits (up to 8192)
  localparam int RP_HT_W    = 16;  // halftone pattern width / data lines

  // Raster Processor command opcodes (word 1, D15-D13)
  typedef enum logic [2:0] {
    OPC_FILL    = 3'd0,   // Raster Fill
    OPC_UNUSED  = 3'd1,   // not defined, ignored
    OPC_SETADDR = 3'd2,   // Set Address and Interleave (needs chip select)
    OPC_REFRESH = 3'd3    // Refresh / filler
  } rp_opcode_e;

  // Scan line ALU operations (word 2, D14-D13)
  typedef enum logic [1:0] {
    ALU_NOP     = 2'd0,
    ALU_REPLACE = 2'd1,
    ALU_OR      = 2'd2,
    ALU_AND     = 2'd3
  } alu_op_e;

  // Halftone ALU modes, {C1,C2} while C0 = 0
  typedef enum logic [1:0] {
    HT_ASIS   = 2'b00,
    HT_INVERT = 2'b01,
    HT_ZEROS  = 2'b10,
    HT_ONES   = 2'b11
  } ht_mode_e;

  // Imaging-mode commands, {C1,C2} while C0 = 1
  typedef enum logic [1:0] {
    DISP_CLEAR_Y = 2'b00,  // clear Y display counter, fetch line, select group 0
    DISP_INCR_Y  = 2'b01,  // increment Y display counter, fetch line, select group 0
    DISP_NEXT    = 2'b10,  // output the next 16 pixels during the next clock
    DISP_NOP     = 2'b11   // no operation, output as chip select says
  } disp_cmd_e;

  // One Raster Fill command as produced by the Scan Line Processor
  typedef struct packed {
    logic [RP_COORD_W-1:0] y;
    logic [RP_COORD_W-1:0] xs;       // inclusive
    logic [RP_COORD_W-1:0] xe;       // exclusive
    logic [RP_HT_W-1:0]    pattern;
  } rp_fill_t;

  // One polygon edge, y0 >= y1 (scan lines descend)
  typedef struct packed {
    logic [RP_COORD_W-1:0] x0;
    logic [RP_COORD_W-1:0] y0;
    logic [RP_COORD_W-1:0] x1;
    logic [RP_COORD_W-1:0] y1;
  } edge_t;

  // Scan Line Processor host command opcodes (header word, bits 15-12)
  typedef enum logic [3:0] {
    SLP_RAW        = 4'd0,  // + 4 words sent verbatim to the Raster Processors
    SLP_SET_MODE   = 4'd1,  // bits 1-0 ALU op, bits 3-2 C1C2
    SLP_HT_LOAD    = 4'd2,  // bits 3-0 row, + 1 pattern word
    SLP_POLY_START = 4'd3,  // + X + Y of the start vertex
    SLP_VERTEX     = 4'd4,  // bit 0 right side, bit 1 end vertex, + X + Y
    SLP_FONT_DEF   = 4'd5,  // + size word (width 15-8, height 7-0) + chunks
    SLP_CHAR       = 4'd6   // + X + Y: place the stored character
  } slp_opcode_e;

  // Word 1..3 of a Raster Processor command: 3-bit field and 13-bit value
  function automatic logic [15:0] rp_word(input logic [2:0] f, input logic [RP_COORD_W-1:0] v);
    return {f, v};
  endfunction

endpackage
