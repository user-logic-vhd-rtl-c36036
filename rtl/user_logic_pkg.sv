// Shared constants and types of the DFT peripheral's bus slave.
//
// The slave exposes three software registers to the host processor:
//   register 0  command  (host writes "go"; the DFT core posts get/put/done)
//   register 1  index    (element index the DFT core is asking about)
//   register 2  value    (data word exchanged between host and core)
// The bus uses one chip-enable line per register; in this RTL bit k of a
// chip-enable vector selects register k.
//
// The command flags sit at fixed positions counted from the most
// significant bit (big-endian bit numbering of the processor bus): go at
// position 31, get at 30, put at 29, done at 28. For the 32-bit bus these
// are the four least significant bits, bit 0 = go ... bit 3 = done. The
// bit positions follow the original peripheral; the struct and helper
// function are this design's own packaging of them.
package user_logic_pkg;

  // Number of registers the slave logic decodes (chip-enable bits 0..2).
  localparam int unsigned NUM_SLV_REGS = 3;

  // One-hot chip-enable patterns (bit k = register k).
  localparam logic [NUM_SLV_REGS-1:0] SEL_CMD   = 3'b001;
  localparam logic [NUM_SLV_REGS-1:0] SEL_INDEX = 3'b010;
  localparam logic [NUM_SLV_REGS-1:0] SEL_VALUE = 3'b100;

  // Flag positions in big-endian (MSB = 0) numbering.
  localparam int unsigned GO_POS   = 31;
  localparam int unsigned GET_POS  = 30;
  localparam int unsigned PUT_POS  = 29;
  localparam int unsigned DONE_POS = 28;

  // The four command flags, most significant first as they appear in the
  // low nibble of a 32-bit command word.
  typedef struct packed {
    logic done;  // DFT finished
    logic put;   // core offers a value for the host to read
    logic get;   // core asks the host for a value
    logic go;    // host starts the DFT
  } cmd_flags_t;

  // LSB-first bit number of big-endian position POS in a DW-bit word.
  function automatic int unsigned le_bit(int unsigned dw, int unsigned pos);
    return dw - 1 - pos;
  endfunction

endpackage
