// conv_encoder: rate-1/2 non-recursive convolutional encoder with frame
// termination.
//
// A K-1 bit shift register holds the previous input bits. For every accepted
// input bit x the two modulo-2 adders (generators G0 and G1) form the code
// symbol y = {c0, c1} from the current bit and the register, and the bit is
// shifted in. Encoding starts from the all-zero state, as the design
// description prescribes. The decoder traces back from state 0, so after every
// DATA_LEN = FRAME_LEN-(K-1) data bits this encoder appends K-1 zero tail bits
// on its own, which returns the register to state 0; x_ready is low while it
// does so. The tail insertion and the frame length are own choices.
//
// Interface: x is taken when x_valid && x_ready. One symbol per cycle leaves on
// y with y_valid, registered, one cycle after its input bit (or tail slot).
// y_last marks the final (tail) symbol of each frame.
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned G0        = DEF_G0,
  parameter int unsigned G1        = DEF_G1,
  parameter int unsigned FRAME_LEN = DEF_FRAME_LEN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  logic    x,
  output logic    x_ready,
  output logic    y_valid,
  output symbol_t y,
  output logic    y_last
);
  localparam int unsigned DATA_LEN = FRAME_LEN - (K - 1);
  localparam int unsigned CW       = $clog2(FRAME_LEN);

  logic [K-2:0]  state;   // newest bit in the MSB
  logic [CW-1:0] stage;   // position within the frame
  logic          in_tail;
  logic          step;
  logic          bit_in;
  logic [K-1:0]  u;

  assign in_tail = (stage >= CW'(DATA_LEN));
  assign x_ready = !in_tail;
  assign step    = in_tail || x_valid;
  assign bit_in  = in_tail ? 1'b0 : x;
  assign u       = {bit_in, state};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      stage   <= '0;
      y_valid <= 1'b0;
      y       <= '0;
      y_last  <= 1'b0;
    end else begin
      y_valid <= step;
      y_last  <= 1'b0;
      if (step) begin
        y     <= code_symbol(int'(u), G0, G1);
        state <= u[K-1:1];
        if (stage == CW'(FRAME_LEN - 1)) begin
          stage  <= '0;
          y_last <= 1'b1;
        end else begin
          stage <= stage + 1'b1;
        end
      end
    end
  end

  // Tail bits must leave the register in the all-zero state.
  property p_frame_ends_in_zero;
    @(posedge clk) disable iff (!rst_n)
      (step && stage == CW'(FRAME_LEN - 1)) |-> (u[K-1:1] == '0);
  endproperty
  assert property (p_frame_ends_in_zero);

endmodule
