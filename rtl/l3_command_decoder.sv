// l3_command_decoder: commands arriving from Level 3 over the fibre link.
//
// A command word carries a 4-bit opcode in bits 15:12 and even parity over the
// whole word (bit 0 makes the XOR of all 16 bits zero). SYNC produces the
// once-per-second marker that clears the timestamp counters of the L1.5
// boards; RESET a one-tick system reset; CLEAR_ERR clears the error counter.
// A word with bad parity or an unknown opcode is ignored and counted as an
// error. Outputs pulse for one tick, one tick after the word. The command set
// follows the trigger this models (sync marker, system reset, error
// detection); the encoding and the parity check are this design's choices.
module l3_command_decoder
  import trig_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [15:0] rx_word,
  output logic        pps,
  output logic        sys_reset,
  output logic [15:0] err_count
);
  logic parity_ok;
  assign parity_ok = (^rx_word) == 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      pps       <= 1'b0;
      sys_reset <= 1'b0;
      err_count <= '0;
    end else begin
      pps       <= 1'b0;
      sys_reset <= 1'b0;
      if (rx_valid) begin
        if (!parity_ok) begin
          err_count <= err_count + 1'b1;
        end else begin
          case (rx_word[15:12])
            CMD_SYNC:      pps       <= 1'b1;
            CMD_RESET:     sys_reset <= 1'b1;
            CMD_CLEAR_ERR: err_count <= '0;
            default:       err_count <= err_count + 1'b1;
          endcase
        end
      end
    end
  end
endmodule
