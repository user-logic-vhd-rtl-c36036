// Bus slave of a memory-mapped DFT (discrete Fourier transform) peripheral.
//
// The peripheral lets a host processor and a DFT core talk through three
// 32-bit software registers at base + 0x0 (command), base + 0x4 (index)
// and base + 0x8 (value). The conversation runs as follows:
//   1. The host writes the command register with go = 1.
//   2. One clock later the command register passes to the DFT core. Each
//      time the core needs something it posts a command word:
//        get  - the index register shows which input element it wants;
//               the host writes that element into the value register,
//               which the core sees on its value_reg input.
//        put  - the index register shows which result element is offered
//               and the value register holds it; the host reads it.
//        done - the transform is finished.
//      The host polls the command register to see which it is, and the
//      core watches the per-register write/read strobes to learn when the
//      host has written or read a register.
//   3. When the core posts a command word with go = 0 the command register
//      returns to the host one clock later.
//
// Bus side (processor-bus interface slave, chip-enable style): a transfer
// is a single cycle with one Bus2IP_WrCE or Bus2IP_RdCE bit set; bit k
// addresses register k. Write and read are acknowledged combinationally
// in that same cycle, read data is driven only while a read is
// acknowledged, and the error response is never raised. Byte enables are
// accepted but not used: every write stores the full word, as in the
// original peripheral. Chip-enable bits above 2 are ignored and not
// acknowledged. Reset is synchronous and active high.
//
// DFT core side: the core itself is not part of this RTL. Its inputs are
// brought out as the Dft_* outputs (write/read strobes, go bit, value
// register) and its outputs come in as the Dft_* inputs (command, index
// and value words). The core is clocked and reset by Bus2IP_Clk and
// Bus2IP_Reset.
//
// The register behaviour, bit positions and handshake follow the original
// peripheral. Bringing the core's ports out, the LSB-first bit numbering
// (numerical values unchanged) and the bus-rule assertions are this
// design's own.
module user_logic
  import user_logic_pkg::*;
#(
  parameter int unsigned C_SLV_DWIDTH = 32,  // slave data bus width
  parameter int unsigned C_NUM_REG    = 3    // software-accessible registers
) (
  // Processor-bus interface (slave side)
  input  logic                      Bus2IP_Clk,
  input  logic                      Bus2IP_Reset,
  input  logic [C_SLV_DWIDTH-1:0]   Bus2IP_Data,
  input  logic [C_SLV_DWIDTH/8-1:0] Bus2IP_BE,
  input  logic [C_NUM_REG-1:0]      Bus2IP_RdCE,
  input  logic [C_NUM_REG-1:0]      Bus2IP_WrCE,
  output logic [C_SLV_DWIDTH-1:0]   IP2Bus_Data,
  output logic                      IP2Bus_RdAck,
  output logic                      IP2Bus_WrAck,
  output logic                      IP2Bus_Error,
  // Towards the DFT core
  output logic [NUM_SLV_REGS-1:0]   Dft_DataWritten,
  output logic [NUM_SLV_REGS-1:0]   Dft_DataRead,
  output logic                      Dft_CommandBit,
  output logic [C_SLV_DWIDTH-1:0]   Dft_ValueReg,
  // From the DFT core
  input  logic [C_SLV_DWIDTH-1:0]   Dft_Command,
  input  logic [C_SLV_DWIDTH-1:0]   Dft_Index,
  input  logic [C_SLV_DWIDTH-1:0]   Dft_Value
);

  localparam int unsigned GO_BIT = le_bit(C_SLV_DWIDTH, GO_POS);

  logic [NUM_SLV_REGS-1:0] slv_reg_write_sel;
  logic [NUM_SLV_REGS-1:0] slv_reg_read_sel;
  logic                    slv_write_ack;
  logic                    slv_read_ack;
  logic [C_SLV_DWIDTH-1:0] slv_reg0, slv_reg1, slv_reg2;
  logic [C_SLV_DWIDTH-1:0] slv_ip2bus_data;
  logic                    command_dir;

  always_comb begin
    slv_reg_write_sel = Bus2IP_WrCE[NUM_SLV_REGS-1:0];
    slv_reg_read_sel  = Bus2IP_RdCE[NUM_SLV_REGS-1:0];
    slv_write_ack     = |slv_reg_write_sel;
    slv_read_ack      = |slv_reg_read_sel;
  end

  slave_reg_bank #(.DW(C_SLV_DWIDTH)) u_regs (
    .clk         (Bus2IP_Clk),
    .rst         (Bus2IP_Reset),
    .write_sel   (slv_reg_write_sel),
    .bus_data    (Bus2IP_Data),
    .dft_command (Dft_Command),
    .dft_index   (Dft_Index),
    .dft_value   (Dft_Value),
    .reg_cmd     (slv_reg0),
    .reg_index   (slv_reg1),
    .reg_value   (slv_reg2),
    .command_dir (command_dir)
  );

  slave_read_mux #(.DW(C_SLV_DWIDTH)) u_rdmux (
    .read_sel  (slv_reg_read_sel),
    .reg_cmd   (slv_reg0),
    .reg_index (slv_reg1),
    .reg_value (slv_reg2),
    .rd_data   (slv_ip2bus_data)
  );

  always_comb begin
    IP2Bus_Data     = slv_read_ack ? slv_ip2bus_data : '0;
    IP2Bus_WrAck    = slv_write_ack;
    IP2Bus_RdAck    = slv_read_ack;
    IP2Bus_Error    = 1'b0;
    Dft_DataWritten = slv_reg_write_sel;
    Dft_DataRead    = slv_reg_read_sel;
    Dft_CommandBit  = slv_reg0[GO_BIT];
    Dft_ValueReg    = slv_reg2;
  end

  // Bus rules: at most one chip enable at a time, never read and write
  // together.
  a_ce_onehot : assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
    $onehot0({Bus2IP_RdCE, Bus2IP_WrCE}))
    else $error("user_logic: more than one chip enable active");

  initial begin
    assert (C_NUM_REG >= NUM_SLV_REGS)
      else $error("user_logic: C_NUM_REG must be at least 3");
    assert (C_SLV_DWIDTH >= 32 && C_SLV_DWIDTH % 8 == 0)
      else $error("user_logic: C_SLV_DWIDTH must be a multiple of 8, at least 32");
  end

endmodule
