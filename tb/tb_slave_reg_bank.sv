// Self-checking testbench for slave_reg_bank.
//
// Part 1 runs directed scenarios: host write of the command register,
// the one-clock hand-over of the command register to the DFT core, a host
// write refused while the core owns it, core get/put/done postings,
// index latching, host-over-core priority on the value register, and the
// return of the command register to the host.
// Part 2 drives random bus writes and core command words (flags biased to
// appear often) and compares every register and the direction flag, cycle
// by cycle, with a reference model written here from the register rules.
// Inputs change at the falling edge; checks happen just after the rising
// edge. A watchdog ends a stuck run.
module tb_slave_reg_bank;
  localparam int unsigned DW = 32;
  // Command flags of a 32-bit word, LSB first.
  localparam logic [31:0] GO = 32'h1, GET = 32'h2, PUT = 32'h4, DONE = 32'h8;

  logic          clk = 1'b0;
  logic          rst;
  logic [2:0]    write_sel;
  logic [DW-1:0] bus_data, dft_command, dft_index, dft_value;
  logic [DW-1:0] reg_cmd, reg_index, reg_value;
  logic          command_dir;

  // Reference state
  logic [DW-1:0] m_cmd, m_index, m_value;
  logic          m_dir;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slave_reg_bank dut (
    .clk, .rst, .write_sel, .bus_data, .dft_command, .dft_index, .dft_value,
    .reg_cmd, .reg_index, .reg_value, .command_dir
  );

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("ERROR %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Apply one cycle of inputs, then wait for the rising edge.
  task automatic cycle(logic [2:0] ws, logic [DW-1:0] bd, logic [DW-1:0] cmd,
                       logic [DW-1:0] idx, logic [DW-1:0] val);
    @(negedge clk);
    write_sel = ws; bus_data = bd; dft_command = cmd; dft_index = idx; dft_value = val;
    @(posedge clk); #1;
  endtask

  task automatic idle();
    cycle(3'b000, 32'h0, 32'h0, 32'h0, 32'h0);
  endtask

  // Reference register rules, evaluated on the values present before the edge.
  task automatic model_step();
    logic [DW-1:0] n_cmd, n_index, n_value;
    logic          posts, xfer, put;
    posts = (dft_command & (GET | PUT | DONE)) != 0;
    xfer  = (dft_command & (GET | PUT)) != 0;
    put   = (dft_command & PUT) != 0;
    n_cmd = m_cmd; n_index = m_index; n_value = m_value;
    if (!m_dir && write_sel == 3'b001) n_cmd = bus_data;
    else if (posts)                    n_cmd = dft_command;
    if (xfer) n_index = dft_index;
    if (write_sel == 3'b100) n_value = bus_data;
    else if (put)            n_value = dft_value;
    m_dir   = m_cmd[0];
    m_cmd   = n_cmd;
    m_index = n_index;
    m_value = n_value;
  endtask

  initial begin
    rst = 1'b1;
    write_sel = '0; bus_data = '0; dft_command = '0; dft_index = '0; dft_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    #1;
    check("reset cmd", reg_cmd, 0);
    check("reset index", reg_index, 0);
    check("reset value", reg_value, 0);
    check("reset dir", 32'(command_dir), 0);

    // ---- directed -------------------------------------------------------
    // Host writes a command without go: host keeps ownership.
    cycle(3'b001, 32'hABCD_0000, 0, 0, 0);
    check("host cmd write", reg_cmd, 32'hABCD_0000);
    idle();
    check("dir stays host", 32'(command_dir), 0);
    // Host writes go. Ownership passes one clock later.
    cycle(3'b001, GO | 32'h1230_0000, 0, 0, 0);
    check("go written", reg_cmd, GO | 32'h1230_0000);
    check("dir not yet core", 32'(command_dir), 0);
    // Still host-owned in this cycle: a second write is accepted.
    cycle(3'b001, GO | 32'h5550_0000, 0, 0, 0);
    check("write in hand-over cycle accepted", reg_cmd, GO | 32'h5550_0000);
    check("dir now core", 32'(command_dir), 1);
    // Now refused.
    cycle(3'b001, 32'hFFFF_0000, 0, 0, 0);
    check("host write refused", reg_cmd, GO | 32'h5550_0000);
    // Core word without a flag is not posted.
    cycle(3'b000, 0, GO | 32'h7700_0000, 32'd9, 32'd99);
    check("no flag, no post", reg_cmd, GO | 32'h5550_0000);
    check("no flag, index holds", reg_index, 0);
    // Core posts get for index 5.
    cycle(3'b000, 0, GO | GET, 32'd5, 32'hDEAD);
    check("get posted", reg_cmd, GO | GET);
    check("get index", reg_index, 32'd5);
    check("get leaves value", reg_value, 0);
    idle();
    check("cmd holds after pulse", reg_cmd, GO | GET);
    check("index holds after pulse", reg_index, 32'd5);
    // Host answers through the value register.
    cycle(3'b100, 32'h1111_2222, 0, 0, 0);
    check("host value write", reg_value, 32'h1111_2222);
    // Core puts result 3.
    cycle(3'b000, 0, GO | PUT, 32'd3, 32'h3333_4444);
    check("put posted", reg_cmd, GO | PUT);
    check("put index", reg_index, 32'd3);
    check("put value", reg_value, 32'h3333_4444);
    // Host write and put in the same cycle: host wins the value register.
    cycle(3'b100, 32'h5555_6666, GO | PUT, 32'd4, 32'h7777_8888);
    check("host beats put", reg_value, 32'h5555_6666);
    check("put index with host write", reg_index, 32'd4);
    // Done without go: command register returns to host one clock later.
    cycle(3'b000, 0, DONE, 32'd77, 32'd0);
    check("done posted", reg_cmd, DONE);
    check("done keeps index", reg_index, 32'd4);
    check("dir still core", 32'(command_dir), 1);
    idle();
    check("dir back to host", 32'(command_dir), 0);
    cycle(3'b001, 32'h0, 0, 0, 0);
    check("host owns again", reg_cmd, 0);
    // Host write to reg 1 does nothing here.
    cycle(3'b010, 32'hFFFF_FFFF, 0, 0, 0);
    check("index not bus-writable", reg_index, 32'd4);
    // Multi-hot write select writes nothing.
    cycle(3'b101, 32'hFFFF_FFFF, 0, 0, 0);
    check("multi-hot cmd", reg_cmd, 0);
    check("multi-hot value", reg_value, 32'h5555_6666);

    // ---- random against reference model ---------------------------------
    @(negedge clk); rst = 1'b1; @(posedge clk); #1;
    @(negedge clk); rst = 1'b0;
    m_cmd = '0; m_index = '0; m_value = '0; m_dir = 1'b0;
    repeat (5000) begin
      @(negedge clk);
      case ($urandom_range(0, 7))
        0, 1: write_sel = 3'b001;
        2:    write_sel = 3'b010;
        3:    write_sel = 3'b100;
        4:    write_sel = 3'($urandom);
        default: write_sel = 3'b000;
      endcase
      bus_data    = $urandom;
      dft_command = {$urandom} & 32'hFFFF_FFF0;
      dft_command[3:0] = 4'($urandom & $urandom);  // sparse flags
      dft_index   = $urandom;
      dft_value   = $urandom;
      model_step();
      @(posedge clk); #1;
      check("rand cmd", reg_cmd, m_cmd);
      check("rand index", reg_index, m_index);
      check("rand value", reg_value, m_value);
      check("rand dir", 32'(command_dir), 32'(m_dir));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
