// symbol_decider: hard decisions on recovered symbols and parallel-to-serial conversion.
//
// On each `sym_strobe` the zero threshold decides each axis (above zero -> '1', otherwise '0',
// the level mapping of the modulator), giving `bits` = {I bit, Q bit} with `bits_valid` one clock
// later; in BPSK only the I bit is meaningful. The serial port then delivers the bits one per
// clock: the I bit, and in QPSK the Q bit on the next clock, each marked by `ser_valid`. The
// decision rule follows the document; the serial timing is this design's choice.
module symbol_decider
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  psk_mode_e  mode,
  input  logic       sym_strobe,
  input  iq_t        symbol,
  output logic [1:0] bits,
  output logic       bits_valid,
  output logic       ser_bit,
  output logic       ser_valid
);
  logic q_pending;
  logic q_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      bits       <= '0;
      bits_valid <= 1'b0;
      ser_bit    <= 1'b0;
      ser_valid  <= 1'b0;
      q_pending  <= 1'b0;
      q_bit      <= 1'b0;
    end else begin
      bits_valid <= sym_strobe;
      ser_valid  <= 1'b0;
      q_pending  <= 1'b0;
      if (sym_strobe) begin
        bits      <= {symbol.i > 0, symbol.q > 0};
        ser_bit   <= symbol.i > 0;
        ser_valid <= 1'b1;
        q_bit     <= symbol.q > 0;
        q_pending <= (mode == MODE_QPSK);
      end else if (q_pending) begin
        ser_bit   <= q_bit;
        ser_valid <= 1'b1;
      end
    end
  end
endmodule
