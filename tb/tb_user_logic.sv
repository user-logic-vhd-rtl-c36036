// End-to-end testbench of the DFT peripheral's bus slave (user_logic) at
// its default parameters.
//
// A host model drives the chip-enable bus with single-cycle transfers and
// a behavioural DFT core (dft_core_model, 4-point integer DFT) sits on the
// core side. Phase 1 runs three complete transforms: the host writes go,
// then polls the command register and serves each get (read index, write
// value) and put (read index, read value) until done, and checks the
// results against a DFT computed here. Phase 2 takes the core side over
// directly to hit the corner cases: a refused command write while the core
// owns the register, the one-clock hand-over, host-over-put priority on
// the value register, the read-only index register and an idle chip
// enable. Every bus transfer also checks the acknowledges and the
// error line. Each mechanism is counted and a mechanism that never
// occurred counts as a failure. A watchdog ends a stuck run.
module tb_user_logic;
  localparam int unsigned DW = 32;
  localparam int          N  = 4;
  localparam logic [31:0] GO = 32'h1, GET = 32'h2, PUT = 32'h4, DONE = 32'h8;

  logic          clk = 1'b0;
  logic          rst;
  logic [DW-1:0] bus_data;
  logic [3:0]    bus_be;
  logic [2:0]    rdce, wrce;
  logic [DW-1:0] ip_data;
  logic          rdack, wrack, err;
  logic [2:0]    dft_written, dft_read;
  logic          dft_cmdbit;
  logic [DW-1:0] dft_valreg;
  logic [DW-1:0] core_cmd, core_idx, core_val;     // into the slave
  logic [DW-1:0] model_cmd, model_idx, model_val;  // from the core model
  logic [DW-1:0] drv_cmd, drv_idx, drv_val;        // driven directly
  logic          use_model;

  int checks = 0, failures = 0;
  // Mechanism counters
  int n_go = 0, n_handover = 0, n_get = 0, n_put = 0, n_done = 0, n_return = 0;
  int n_refused = 0, n_priority = 0, n_idx_ro = 0, n_noack = 0;

  always #5 clk = ~clk;

  user_logic dut (
    .Bus2IP_Clk (clk), .Bus2IP_Reset (rst), .Bus2IP_Data (bus_data),
    .Bus2IP_BE (bus_be), .Bus2IP_RdCE (rdce), .Bus2IP_WrCE (wrce),
    .IP2Bus_Data (ip_data), .IP2Bus_RdAck (rdack), .IP2Bus_WrAck (wrack),
    .IP2Bus_Error (err),
    .Dft_DataWritten (dft_written), .Dft_DataRead (dft_read),
    .Dft_CommandBit (dft_cmdbit), .Dft_ValueReg (dft_valreg),
    .Dft_Command (core_cmd), .Dft_Index (core_idx), .Dft_Value (core_val)
  );

  dft_core_model #(.SLV_DWIDTH(DW)) core (
    .Clk (clk), .Reset (rst), .data_written (dft_written), .data_read (dft_read),
    .command_bit (dft_cmdbit), .value_reg (dft_valreg),
    .dft_command (model_cmd), .dft_index (model_idx), .dft_value (model_val)
  );

  assign core_cmd = use_model ? model_cmd : drv_cmd;
  assign core_idx = use_model ? model_idx : drv_idx;
  assign core_val = use_model ? model_val : drv_val;

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("ERROR %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Single-cycle bus write to register r (r > 2 gives a raw pattern via ce).
  task automatic bus_write_ce(logic [2:0] ce, logic [DW-1:0] d);
    @(negedge clk);
    wrce = ce; bus_data = d; bus_be = 4'hF;
    #1;
    check("WrAck", 32'(wrack), 32'(ce != 0));
    check("RdAck during write", 32'(rdack), 0);
    check("Error", 32'(err), 0);
    check("read data idle during write", ip_data, 0);
    check("core sees write strobe", 32'(dft_written), 32'(ce));
    @(posedge clk); #1;
    wrce = '0; bus_data = '0;
  endtask

  task automatic bus_write(int r, logic [DW-1:0] d);
    bus_write_ce(3'(1 << r), d);
  endtask

  task automatic bus_read_ce(logic [2:0] ce, output logic [DW-1:0] d);
    @(negedge clk);
    rdce = ce;
    #1;
    check("RdAck", 32'(rdack), 32'(ce != 0));
    check("WrAck during read", 32'(wrack), 0);
    check("Error", 32'(err), 0);
    check("core sees read strobe", 32'(dft_read), 32'(ce));
    d = ip_data;
    @(posedge clk); #1;
    rdce = '0;
  endtask

  task automatic bus_read(int r, output logic [DW-1:0] d);
    bus_read_ce(3'(1 << r), d);
  endtask

  // Reference 4-point DFT.
  function automatic void ref_dft(input int xin[N], output int yout[2*N]);
    real pi = 3.14159265358979;
    for (int k = 0; k < N; k++) begin
      real re = 0.0, im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += xin[n] * $cos(2.0 * pi * n * k / N);
        im -= xin[n] * $sin(2.0 * pi * n * k / N);
      end
      yout[2*k]   = int'($rtoi(re + (re >= 0 ? 0.5 : -0.5)));
      yout[2*k+1] = int'($rtoi(im + (im >= 0 ? 0.5 : -0.5)));
    end
  endfunction

  task automatic run_transform(int run);
    int            xin[N];
    int            yexp[2*N];
    logic [DW-1:0] ygot[2*N];
    bit            got_mask[2*N];
    logic [DW-1:0] cmd, idx, val, last_cmd, last_idx;
    int            polls = 0;
    bit            finished = 0;
    bit            saw_core = 0;
    for (int n = 0; n < N; n++) xin[n] = int'($urandom_range(0, 2000)) - 1000;
    for (int k = 0; k < 2*N; k++) got_mask[k] = 0;
    ref_dft(xin, yexp);

    bus_write(0, GO);
    n_go++;
    bus_read(0, cmd);
    check("go readable", cmd & GO, GO);
    last_cmd = '1; last_idx = '1;
    while (!finished && polls < 500) begin
      polls++;
      bus_read(0, cmd);
      if ((cmd & DONE) != 0) begin
        finished = 1;
        n_done++;
      end else if ((cmd & (GET | PUT)) != 0) begin
        bus_read(1, idx);
        if (cmd != last_cmd || idx != last_idx) begin
          last_cmd = cmd; last_idx = idx;
          if ((cmd & GET) != 0) begin
            n_get++;
            if (idx == 0) begin
              // The core owns the command register now: a host write is
              // acknowledged but changes nothing.
              bus_write(0, 32'h0);
              bus_read(0, val);
              check("command write refused during run", val, cmd);
              if (val == cmd) saw_core = 1;
            end
            if (idx < N) bus_write(2, DW'(xin[idx]));
            else begin failures++; $display("ERROR get index %0d out of range", idx); end
          end else begin
            n_put++;
            bus_read(2, val);
            if (idx < 2*N) begin ygot[idx] = val; got_mask[idx] = 1; end
            else begin failures++; $display("ERROR put index %0d out of range", idx); end
          end
        end
      end
    end
    check("transform finished", 32'(finished), 1);
    check("core owned the command register", 32'(saw_core), 1);
    if (saw_core) n_handover++;
    for (int k = 0; k < 2*N; k++) begin
      check("result present", 32'(got_mask[k]), 1);
      check($sformatf("run %0d result word %0d", run, k), ygot[k], DW'(yexp[k]));
    end
    // After done (posted with go = 0) the register returns to the host.
    bus_write(0, 32'h0);
    bus_read(0, cmd);
    check("host owns command after done", cmd, 0);
    n_return++;
  endtask

  initial begin
    logic [DW-1:0] d;
    rst = 1'b1; use_model = 1'b1;
    bus_data = '0; bus_be = '0; rdce = '0; wrce = '0;
    drv_cmd = '0; drv_idx = '0; drv_val = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;

    // Reset values
    for (int r = 0; r < 3; r++) begin
      bus_read(r, d);
      check("reset value", d, 0);
    end

    // ---- phase 1: complete transforms through the core model -----------
    for (int run = 0; run < 3; run++) run_transform(run);
    check("gets per run", 32'(n_get), 32'(3 * N));
    check("puts per run", 32'(n_put), 32'(3 * 2 * N));

    // ---- phase 2: core side driven directly -----------------------------
    use_model = 1'b0;
    // Hand-over timing: go written, the next transfer still owned by host,
    // the one after refused.
    bus_write(0, GO | 32'hA000_0000);
    bus_read(0, d);                        // one clock: host still owner
    check("go readback", d, GO | 32'hA000_0000);
    bus_write(0, 32'hBEEF_0000);           // refused: core owns now
    bus_read(0, d);
    check("refused write", d, GO | 32'hA000_0000);
    if (d == (GO | 32'hA000_0000)) n_refused++;
    n_handover++;
    bus_write(0, 32'h0);
    bus_read(0, d);
    check("still refused", d, GO | 32'hA000_0000);
    // Put and simultaneous host write of the value register: host wins.
    @(negedge clk);
    drv_cmd = GO | PUT; drv_idx = 32'd6; drv_val = 32'h1234_5678;
    wrce = 3'b100; bus_data = 32'hCAFE_F00D;
    @(posedge clk); #1;
    wrce = '0; drv_cmd = '0;
    bus_read(2, d);
    check("host beats put", d, 32'hCAFE_F00D);
    if (d == 32'hCAFE_F00D) n_priority++;
    bus_read(1, d);
    check("index latched on put", d, 32'd6);
    // Plain put with value.
    @(negedge clk);
    drv_cmd = GO | PUT; drv_idx = 32'd7; drv_val = 32'h0BAD_CAFE;
    @(posedge clk); #1;
    drv_cmd = '0;
    bus_read(2, d);
    check("put value", d, 32'h0BAD_CAFE);
    // Index register is read-only for the bus (write still acknowledged).
    bus_write(1, 32'hFFFF_FFFF);
    bus_read(1, d);
    check("index read-only", d, 32'd7);
    if (d == 32'd7) n_idx_ro++;
    // No chip enable: no acknowledge, zero read data.
    bus_read_ce(3'b000, d);
    check("no CE reads zero", d, 0);
    n_noack++;
    // Done with go kept at 1 leaves the core owning the register.
    @(negedge clk);
    drv_cmd = GO | DONE;
    @(posedge clk); #1;
    drv_cmd = '0;
    bus_write(0, 32'h0);
    bus_read(0, d);
    check("done with go keeps core ownership", d, GO | DONE);
    // Done with go cleared returns it.
    @(negedge clk);
    drv_cmd = DONE;
    @(posedge clk); #1;
    drv_cmd = '0;
    bus_read(0, d);                        // dir drops at this edge
    check("done posted", d, DONE);
    bus_write(0, 32'h0000_1230);
    bus_read(0, d);
    check("host owns after done", d, 32'h0000_1230);
    n_return++;
    // Byte enables are ignored: a one-byte-enable write stores the word.
    @(negedge clk);
    wrce = 3'b100; bus_data = 32'h1357_9BDF; bus_be = 4'b0001;
    @(posedge clk); #1;
    wrce = '0;
    bus_read(2, d);
    check("full word written", d, 32'h1357_9BDF);
    // ---- mechanisms ------------------------------------------------------
    begin
      int counts[10];
      string names[10];
      counts = '{n_go, n_handover, n_get, n_put, n_done, n_return,
                  n_refused, n_priority, n_idx_ro, n_noack};
      names = '{"go", "hand-over", "get", "put", "done", "return",
                 "refused write", "host priority", "index read-only",
                 "no chip enable"};
      for (int m = 0; m < 10; m++) begin
        $display("mechanism %-16s %0d", names[m], counts[m]);
        checks++;
        if (counts[m] == 0) begin
          failures++;
          $display("ERROR mechanism %s never happened", names[m]);
        end
      end
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
