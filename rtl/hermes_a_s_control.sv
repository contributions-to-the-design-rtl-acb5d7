// hermes_a_s_control: S-Control of the Hermes-A input port.
//
// The last flit of a packet (EOP=1) is steered to this controller. It sends
// the flit on output A (towards the allocated output port), then sends a kill
// token (the otherwise unused code BOP=EOP=1) on output B, which releases the
// output port and empties the routing-decision loop of the input port. The
// controller runs the 4-phase handshakes in this fixed order:
//   Req in+, Ack out+, Req in-, Req A+, Ack A+, Req A-, Ack A-,
//   Req B+, Ack B+, Req B-, Ack B-, Ack out-
// so the input's handshake is only completed (Ack out-) after both outputs
// have acknowledged.
//
// The original is a speed-independent circuit; this model is a clocked state
// machine that waits for each input transition and produces the next output
// transition on the following clock edge. Output data are dual-rail tokens:
// valid while the matching request is high, spacer otherwise. The incoming
// token is captured on Req in+.
module hermes_a_s_control
  import hermes_a_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_in,
  output logic    ack_out,
  input  dr_tok_t din,
  output logic    req_a,
  input  logic    ack_a,
  output dr_tok_t dout_a,
  output logic    req_b,
  input  logic    ack_b,
  output dr_tok_t dout_b
);
  typedef enum logic [2:0] {
    S_IDLE,      // wait Req in+
    S_IN_REL,    // Ack out high, wait Req in-
    S_A_UP,      // Req A high, wait Ack A+
    S_A_DN,      // Req A low, wait Ack A-
    S_B_UP,      // Req B high, wait Ack B+
    S_B_DN,      // Req B low, wait Ack B-
    S_DONE       // drop Ack out
  } state_e;

  state_e  state;
  dr_tok_t flit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ack_out <= 1'b0;
      req_a   <= 1'b0;
      req_b   <= 1'b0;
      flit_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (req_in)  begin flit_q <= din; ack_out <= 1'b1; state <= S_IN_REL; end
        S_IN_REL: if (!req_in) begin req_a <= 1'b1; state <= S_A_UP; end
        S_A_UP:   if (ack_a)   begin req_a <= 1'b0; state <= S_A_DN; end
        S_A_DN:   if (!ack_a)  begin req_b <= 1'b1; state <= S_B_UP; end
        S_B_UP:   if (ack_b)   begin req_b <= 1'b0; state <= S_B_DN; end
        S_B_DN:   if (!ack_b)  begin ack_out <= 1'b0; state <= S_DONE; end
        S_DONE:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign dout_a = req_a ? flit_q : '0;
  assign dout_b = req_b ? kill_token() : '0;

endmodule
