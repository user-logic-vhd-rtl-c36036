// Behavioural model of a DFT core, for simulation only.
//
// Stands in for the transform engine that sits behind the peripheral's
// register interface, so the bus slave can be exercised end to end. It
// speaks the register handshake of the peripheral:
//   * waits in idle until the go bit of the command register is 1;
//   * for each input element i = 0..N-1 it pulses a get posting for one
//     clock (command word go|get, index i), waits until the host writes the
//     value register, and takes the element from value_reg one clock later;
//   * computes an N-point DFT of the integer inputs (N = 4, so every
//     twiddle factor is 1, -j, -1 or j and the result is exact);
//   * for each output word k = 0..2N-1 (real and imaginary part of bin k/2,
//     real first) it pulses a put posting (go|put, index k, value) and waits
//     until the host reads the value register;
//   * finally pulses a done posting with go = 0, which hands the command
//     register back to the host.
// Signals follow the core's port list; strobe vectors use bit k for
// register k. The transform size and the exact order of postings are this
// model's own choice.
module dft_core_model #(
  parameter int unsigned SLV_DWIDTH = 32
) (
  input  logic                  Clk,
  input  logic                  Reset,
  input  logic [2:0]            data_written,
  input  logic [2:0]            data_read,
  input  logic                  command_bit,
  input  logic [SLV_DWIDTH-1:0] value_reg,
  output logic [SLV_DWIDTH-1:0] dft_command,
  output logic [SLV_DWIDTH-1:0] dft_index,
  output logic [SLV_DWIDTH-1:0] dft_value
);
  localparam int N = 4;
  localparam logic [31:0] GO = 32'h1, GET = 32'h2, PUT = 32'h4, DONE = 32'h8;

  typedef enum logic [2:0] {IDLE, GET_POST, GET_WAIT, GET_CAP, PUT_POST, PUT_WAIT, DONE_POST}
    state_t;
  state_t state;
  int     i;
  int     x   [N];
  int     y   [2*N];

  // Exact 4-point DFT: (-j)^m for m = n*k mod 4.
  function automatic void transform();
    for (int k = 0; k < N; k++) begin
      int re = 0, im = 0;
      for (int n = 0; n < N; n++) begin
        case ((n * k) % 4)
          0: re += x[n];
          1: im -= x[n];
          2: re -= x[n];
          default: im += x[n];
        endcase
      end
      y[2*k]   = re;
      y[2*k+1] = im;
    end
  endfunction

  always @(posedge Clk) begin
    if (Reset) begin
      state <= IDLE;
      i     <= 0;
    end else begin
      case (state)
        IDLE:      if (command_bit) begin i <= 0; state <= GET_POST; end
        GET_POST:  state <= GET_WAIT;
        GET_WAIT:  if (data_written == 3'b100) state <= GET_CAP;
        GET_CAP: begin
          x[i] = int'(signed'(value_reg));
          if (i == N - 1) begin
            transform();
            i     <= 0;
            state <= PUT_POST;
          end else begin
            i     <= i + 1;
            state <= GET_POST;
          end
        end
        PUT_POST:  state <= PUT_WAIT;
        PUT_WAIT:
          if (data_read == 3'b100) begin
            if (i == 2 * N - 1) state <= DONE_POST;
            else begin i <= i + 1; state <= PUT_POST; end
          end
        DONE_POST: state <= IDLE;
        default:   state <= IDLE;
      endcase
    end
  end

  always_comb begin
    dft_command = '0;
    dft_index   = SLV_DWIDTH'(i);
    dft_value   = '0;
    case (state)
      GET_POST:  dft_command = SLV_DWIDTH'(GO | GET);
      PUT_POST: begin
        dft_command = SLV_DWIDTH'(GO | PUT);
        dft_value   = SLV_DWIDTH'(y[i]);
      end
      DONE_POST: dft_command = SLV_DWIDTH'(DONE);
      default: ;
    endcase
  end
endmodule
