// conv_viterbi_system: the complete link of the design, convolutional
// encoder on the transmit side and Viterbi decoder on the receive side.
//
// Input data bits enter the FSM-based convolutional encoder (conv_encoder),
// whose 2-bit code symbols leave on enc_valid / enc_code towards the channel.
// The channel itself (the medium and its error disturbance) is not part of
// the hardware: what comes back from it enters on rx_valid / rx_code and is
// decoded by the folded Viterbi decoder (viterbi_decoder), which delivers the
// reconstructed bits frame by frame on dec_valid / dec_bit / dec_last. The
// encoder-channel-decoder chain follows the source design; the separate
// transmit and receive ports and the framing are this design's choices.
//
// Framing: the decoder expects frames of FRAME_LEN symbols that start in
// encoder state 000. The sender terminates each frame by ending it with K-1 = 3
// zero data bits (or pulses enc_clear between frames).
module conv_viterbi_system
  import viterbi_pkg::*;
#(
  parameter int unsigned ACS_UNITS = 1,
  parameter int unsigned FRAME_LEN = 64,
  parameter int unsigned INIT_PM   = 8,
  localparam int unsigned PM_W     = $clog2(INIT_PM + 2 * FRAME_LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // transmit side
  input  logic            enc_clear,
  input  logic            tx_valid,
  input  logic            tx_bit,
  output logic            enc_valid,
  output code_t           enc_code,
  // receive side
  input  logic            rx_valid,
  output logic            rx_ready,
  input  code_t           rx_code,
  output logic            dec_valid,
  output logic            dec_bit,
  output logic            dec_last,
  output logic            dec_pm_valid,
  output logic [PM_W-1:0] dec_pm
);

  conv_encoder u_enc (
    .clk, .rst_n, .clear(enc_clear), .in_valid(tx_valid), .in_bit(tx_bit),
    .out_valid(enc_valid), .out_code(enc_code)
  );

  viterbi_decoder #(.ACS_UNITS(ACS_UNITS), .FRAME_LEN(FRAME_LEN), .INIT_PM(INIT_PM)) u_dec (
    .clk, .rst_n, .sym_valid(rx_valid), .sym_ready(rx_ready), .sym(rx_code),
    .out_valid(dec_valid), .out_bit(dec_bit), .out_last(dec_last),
    .best_pm_valid(dec_pm_valid), .best_pm_o(dec_pm)
  );

endmodule
