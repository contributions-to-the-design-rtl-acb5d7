// hermes_a_input_port: input port of the Hermes-A / Hermes-AA router.
//
// Tokens arrive as 4-phase dual-rail flits (8 data bits, BOP, EOP) and take
// one of three paths:
//  (1) the first flit (BOP=1) goes to the path calculation
//      (hermes_a_path_calc), whose 4-bit dual-rail one-hot decision is kept
//      for the rest of the packet in the routing-decision loop; the flit is
//      then sent to the chosen output;
//  (2) intermediate flits follow the stored decision;
//  (3) the last flit (EOP=1) goes to the S-Control (hermes_a_s_control),
//      which sends it to the chosen output (its output A) and then a kill
//      token (its output B); the kill token frees the output port and
//      empties the decision loop.
// The stored decision is also presented on route_t/route_f, one dual-rail
// bit per reachable output, which the output ports turn into arbiter
// requests.
//
// Output channel k (0..3) leads to port k if k is below this port's own
// number and to port k+1 otherwise. Every channel is 4-phase: data then
// acknowledge up, spacer then acknowledge down; the upstream acknowledge
// (ack_in) rises after the downstream one and falls after it.
//
// This is a clocked model of the clockless port. In the original the loop
// that holds the decision is a ring of three dual-rail registers, the
// minimum for a 4-phase ring to circulate one token; here it is one register
// holding the same value. Two-flit minimum packet length is assumed (a
// one-flit packet would carry the kill code BOP=EOP=1).
module hermes_a_input_port
  import noc_pkg::*;
  import hermes_a_pkg::*;
#(
  parameter port_e IN_PORT = LOCAL,
  parameter bit    ROUTING = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        router_x,
  input  logic [3:0]        router_y,
  input  logic [NPORTS-1:0] out_busy,
  input  dr_tok_t           din,
  output logic              ack_in,
  output dr_tok_t [3:0]     dout,
  input  logic    [3:0]     ack_out,
  output logic    [3:0]     route_t,
  output logic    [3:0]     route_f
);
  typedef enum logic [1:0] {S_WAIT, S_FWD, S_REL, S_EOP} state_e;

  state_e        state;
  dr_tok_t       flit_q;
  logic          dec_valid;
  logic [3:0]    dec_q;
  logic [1:0]    k_q;
  dr4_t          pc_dest;
  logic          pc_valid;
  logic          din_ok, is_bop, is_eop;
  // S-Control hookup
  logic          s_req, s_ack, s_req_a, s_req_b, s_seen;
  dr_tok_t       s_dout_a, s_dout_b;

  assign din_ok = complete(din);
  assign is_bop = din.t[BOP_B];
  assign is_eop = din.t[EOP_B];

  hermes_a_path_calc #(.IN_PORT(IN_PORT), .ROUTING(ROUTING)) u_path (
    .flit(din), .router_x, .router_y, .out_busy,
    .flit_fwd(), .dest(pc_dest), .dest_valid(pc_valid), .port()
  );

  function automatic logic [1:0] onehot_idx(logic [3:0] v);
    logic [1:0] r;
    r = 2'd0;
    for (int unsigned i = 0; i < 4; i++) if (v[i]) r = 2'(i);
    return r;
  endfunction

  assign s_req = (state == S_EOP) && din_ok;

  hermes_a_s_control u_sctl (
    .clk, .rst_n,
    .req_in(s_req), .ack_out(s_ack), .din,
    .req_a(s_req_a), .ack_a(ack_out[k_q]), .dout_a(s_dout_a),
    .req_b(s_req_b), .ack_b(ack_out[k_q]), .dout_b(s_dout_b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_WAIT;
      flit_q    <= '0;
      dec_valid <= 1'b0;
      dec_q     <= '0;
      k_q       <= '0;
      s_seen    <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT: if (din_ok) begin
          flit_q <= din;
          if (is_bop && pc_valid) begin
            dec_valid <= 1'b1;
            dec_q     <= pc_dest.t;
            k_q       <= onehot_idx(pc_dest.t);
          end
          state  <= (is_eop && !is_bop) ? S_EOP : S_FWD;
          s_seen <= 1'b0;
        end
        S_FWD: if (ack_out[k_q]) state <= S_REL;
        S_REL: if (!ack_out[k_q] && is_spacer(din)) state <= S_WAIT;
        S_EOP: begin
          if (s_ack) s_seen <= 1'b1;
          if (s_seen && !s_ack) begin
            dec_valid <= 1'b0;    // kill token sent: empty the loop
            state     <= S_WAIT;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  always_comb begin
    dout = '0;
    unique case (state)
      S_FWD:   dout[k_q] = flit_q;
      S_EOP:   dout[k_q] = s_dout_a | s_dout_b;
      default: ;
    endcase
  end

  assign ack_in  = (state == S_REL) || ((state == S_EOP) && s_ack);
  assign route_t = dec_valid ? dec_q  : 4'b0000;
  assign route_f = dec_valid ? ~dec_q : 4'b0000;

endmodule
