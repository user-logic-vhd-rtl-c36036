// Self-checking testbench for slave_read_mux.
//
// Drives random register contents and every 3-bit read-select pattern and
// compares the output with the expected choice: the selected register for
// the three one-hot patterns, zero for all others. Purely combinational;
// a simple clock paces the checks and a watchdog ends a stuck run.
module tb_slave_read_mux;
  localparam int unsigned DW = 32;

  logic          clk = 1'b0;
  logic [2:0]    read_sel;
  logic [DW-1:0] r0, r1, r2, rd_data, expected;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slave_read_mux dut (
    .read_sel (read_sel), .reg_cmd (r0), .reg_index (r1), .reg_value (r2),
    .rd_data  (rd_data)
  );

  initial begin
    read_sel = '0; r0 = '0; r1 = '0; r2 = '0;
    repeat (200) begin
      @(negedge clk);
      r0 = $urandom; r1 = $urandom; r2 = $urandom;
      for (int s = 0; s < 8; s++) begin
        read_sel = 3'(s);
        #1;
        case (s)
          1:       expected = r0;
          2:       expected = r1;
          4:       expected = r2;
          default: expected = 32'h0;
        endcase
        checks++;
        if (rd_data !== expected) begin
          failures++;
          if (failures < 10)
            $display("ERROR sel=%b got %h expected %h", read_sel, rd_data, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
