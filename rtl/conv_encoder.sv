// conv_encoder: rate-1/2, constraint-length-4 convolutional encoder written
// as an explicit 8-state finite state machine (FSM based trellis encoding).
//
// Instead of a shift register with XOR trees, the encoder keeps one of eight
// enumerated states and looks up, for the current state and input bit, the
// next state and the 2-bit code symbol. The table is the state diagram of the
// source design: every one of its 16 arcs (state, input, code symbol, next
// state) is written out in the case statement below, and it equals the code
// of G1 = 1+Z+Z^2+Z^3, G2 = 1+Z^2+Z^3.
//
// Interface: one input bit per cycle with in_valid; the code symbol appears
// on out_code with out_valid one clock later (registered Mealy output),
// upper bit from G1, lower bit from G2. A cycle without in_valid leaves the
// state unchanged. clear returns the FSM to state 000 (start of a new frame)
// and takes priority over in_valid. Reset (active low, synchronous) puts the
// FSM in 000; the source design does not describe reset, this is a choice.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  out_valid,
  output code_t out_code
);

  typedef enum logic [2:0] {
    S000 = 3'b000, S001 = 3'b001, S010 = 3'b010, S011 = 3'b011,
    S100 = 3'b100, S101 = 3'b101, S110 = 3'b110, S111 = 3'b111
  } enc_state_e;

  enc_state_e state_q, state_d;
  code_t      code_d;

  // Transition table: solid arcs are input 0, dashed arcs input 1.
  always_comb begin
    state_d = state_q;
    code_d  = 2'b00;
    unique case (state_q)
      S000: if (in_bit) begin state_d = S100; code_d = 2'b11; end
            else        begin state_d = S000; code_d = 2'b00; end
      S001: if (in_bit) begin state_d = S100; code_d = 2'b00; end
            else        begin state_d = S000; code_d = 2'b11; end
      S010: if (in_bit) begin state_d = S101; code_d = 2'b00; end
            else        begin state_d = S001; code_d = 2'b11; end
      S011: if (in_bit) begin state_d = S101; code_d = 2'b11; end
            else        begin state_d = S001; code_d = 2'b00; end
      S100: if (in_bit) begin state_d = S110; code_d = 2'b01; end
            else        begin state_d = S010; code_d = 2'b10; end
      S101: if (in_bit) begin state_d = S110; code_d = 2'b10; end
            else        begin state_d = S010; code_d = 2'b01; end
      S110: if (in_bit) begin state_d = S111; code_d = 2'b10; end
            else        begin state_d = S011; code_d = 2'b01; end
      S111: if (in_bit) begin state_d = S111; code_d = 2'b01; end
            else        begin state_d = S011; code_d = 2'b10; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S000;
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        state_q <= S000;
      end else if (in_valid) begin
        state_q  <= state_d;
        out_code <= code_d;
      end
    end
  end

endmodule
