// command_decoder: decodes the external command port into the sensor's
// configuration registers and start/stop strobes.
//
// One command is taken per cycle in which cmd_valid is high. SET_MODE
// writes the engine enables, SET_PREC the log2 of the bit-stream length
// (the dynamic precision control of the stochastic engine), LOAD_W one
// kernel coefficient, START and STOP pulse the matching strobe. A
// precision outside NMIN..NMAX or a tap number beyond the kernel is refused:
// the register keeps its value and cmd_error pulses. The decoder is only
// named by the design; the command set, encoding and reset values (both
// engines on, 64-bit streams, all coefficients zero) are this
// implementation's choices.
//
// Timing: registers and strobes change at the clock edge that takes the
// command, so start/stop are one-cycle pulses in the following cycle.
module command_decoder
  import adc_fist_pkg::*;
#(
  parameter int unsigned TAPS = KSIZE * KSIZE,
  parameter int unsigned NMAX = NMAX_LOG2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  logic [2:0]                cmd_op,
  input  logic [CMD_ADDR_W-1:0]     cmd_addr,
  input  logic [CMD_DATA_W-1:0]     cmd_data,
  output mode_t                     mode,
  output logic [$clog2(NMAX+1)-1:0] n_log2,
  output weight_t                   weights [TAPS],
  output logic                      start,
  output logic                      stop,
  output logic                      cmd_error
);

  localparam int unsigned NW = $clog2(NMAX + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= '{continuous: 1'b0, ote: 1'b1, ede: 1'b1};
      n_log2    <= NW'(NDEF_LOG2);
      for (int t = 0; t < int'(TAPS); t++) weights[t] <= '0;
      start     <= 1'b0;
      stop      <= 1'b0;
      cmd_error <= 1'b0;
    end else begin
      start     <= 1'b0;
      stop      <= 1'b0;
      cmd_error <= 1'b0;
      if (cmd_valid) begin
        unique case (cmd_op)
          OP_NOP: ;
          OP_SET_MODE: mode <= mode_t'(cmd_data[2:0]);
          OP_SET_PREC:
            if (int'(cmd_data[3:0]) >= int'(NMIN_LOG2) && int'(cmd_data[3:0]) <= int'(NMAX))
              n_log2 <= NW'(cmd_data[3:0]);
            else
              cmd_error <= 1'b1;
          OP_LOAD_W:
            if (int'(cmd_addr) < int'(TAPS))
              weights[cmd_addr] <= weight_t'(cmd_data[NMAX:0]);
            else
              cmd_error <= 1'b1;
          OP_START: start <= 1'b1;
          OP_STOP:  stop  <= 1'b1;
          default:  cmd_error <= 1'b1;
        endcase
      end
    end
  end

endmodule
