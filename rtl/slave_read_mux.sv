// Read multiplexer of the DFT peripheral's bus slave.
//
// Returns the register selected by the one-hot read chip enable: bit 0
// selects the command register, bit 1 the index register, bit 2 the value
// register. Any other pattern (none or several bits set) returns zero.
// Purely combinational. The behaviour follows the original peripheral.
module slave_read_mux
  import user_logic_pkg::*;
#(
  parameter int unsigned DW = 32  // slave data width
) (
  input  logic [NUM_SLV_REGS-1:0] read_sel,
  input  logic [DW-1:0]           reg_cmd,
  input  logic [DW-1:0]           reg_index,
  input  logic [DW-1:0]           reg_value,
  output logic [DW-1:0]           rd_data
);

  always_comb begin
    unique case (read_sel)
      SEL_CMD:   rd_data = reg_cmd;
      SEL_INDEX: rd_data = reg_index;
      SEL_VALUE: rd_data = reg_value;
      default:   rd_data = '0;
    endcase
  end

endmodule
