// Software-register bank of the DFT peripheral's bus slave.
//
// Holds the command, index and value registers and the command-direction
// flag that decides who may write the command register:
//   * While the direction flag is 0 the host owns the command register and
//     a bus write to register 0 loads it. The flag is the go bit of the
//     command register delayed by one clock, so once the host has written
//     go = 1 the register belongs to the DFT core from the next cycle on.
//   * Otherwise, whenever the core raises get, put or done in its command
//     word, the whole word is copied into the command register, where the
//     host can poll it. A host write to register 0 in the cycle the flag is
//     still 0 wins over the core.
//   * On get or put the core's index word is latched into the index
//     register; otherwise the index register holds. The bus cannot write it.
//   * A bus write to register 2 loads the value register (the host's answer
//     to a get); failing that, a put loads the core's value word (data for
//     the host to read). The host write wins.
// Writes to register 1 are acknowledged by the surrounding logic but have
// no effect here.
//
// Interface: write_sel is the one-hot write chip enable (bit k = register
// k); only the exact patterns 001 and 100 write. bus_data is the write
// data. dft_* are the DFT core's command/index/value outputs. All
// registers update on the rising clock edge and clear on a synchronous,
// active-high reset. The behaviour follows the original peripheral; the
// LSB-first bit numbering is this design's (see user_logic_pkg).
module slave_reg_bank
  import user_logic_pkg::*;
#(
  parameter int unsigned DW = 32  // slave data width, at least 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NUM_SLV_REGS-1:0] write_sel,
  input  logic [DW-1:0]           bus_data,
  input  logic [DW-1:0]           dft_command,
  input  logic [DW-1:0]           dft_index,
  input  logic [DW-1:0]           dft_value,
  output logic [DW-1:0]           reg_cmd,
  output logic [DW-1:0]           reg_index,
  output logic [DW-1:0]           reg_value,
  output logic                    command_dir
);

  localparam int unsigned GO_BIT   = le_bit(DW, GO_POS);
  localparam int unsigned GET_BIT  = le_bit(DW, GET_POS);
  localparam int unsigned PUT_BIT  = le_bit(DW, PUT_POS);
  localparam int unsigned DONE_BIT = le_bit(DW, DONE_POS);

  cmd_flags_t core_flags;
  logic       go;
  logic       core_posts;  // core has get, put or done raised
  logic       core_xfer;   // core has get or put raised

  always_comb begin
    core_flags = '{done: dft_command[DONE_BIT], put: dft_command[PUT_BIT],
                   get:  dft_command[GET_BIT],  go:  dft_command[GO_BIT]};
    go         = reg_cmd[GO_BIT];
    core_posts = core_flags.get | core_flags.put | core_flags.done;
    core_xfer  = core_flags.get | core_flags.put;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_cmd     <= '0;
      reg_index   <= '0;
      reg_value   <= '0;
      command_dir <= 1'b0;
    end else begin
      command_dir <= go;

      if (!command_dir && write_sel == SEL_CMD)
        reg_cmd <= bus_data;
      else if (core_posts)
        reg_cmd <= dft_command;

      if (core_xfer)
        reg_index <= dft_index;

      if (write_sel == SEL_VALUE)
        reg_value <= bus_data;
      else if (core_flags.put)
        reg_value <= dft_value;
    end
  end

  initial begin
    assert (DW >= 32) else $error("slave_reg_bank: DW must be at least 32");
  end

endmodule
