// hermes_a_pkg: dual-rail types of the Hermes-A asynchronous router.
//
// Hermes-A moves 8-bit flits with BOP (begin of packet) and EOP (end of
// packet) flags, all in 4-phase dual-rail code: bit k is carried by a true
// rail t[k] and a false rail f[k]. (t,f) = (1,0) is a one, (0,1) a zero, and
// all rails at zero is the spacer that separates two data tokens. A token is
// complete when every bit has exactly one rail high. The code BOP=EOP=1 never
// occurs in a real flit and is used inside the router as the kill token that
// ends a packet and releases the output it held.
package hermes_a_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned TOK_W  = DATA_W + 2;   // data, EOP, BOP
  localparam int unsigned EOP_B  = DATA_W;       // bit position of EOP
  localparam int unsigned BOP_B  = DATA_W + 1;   // bit position of BOP

  typedef struct packed {
    logic [TOK_W-1:0] t;
    logic [TOK_W-1:0] f;
  } dr_tok_t;

  typedef struct packed {
    logic [3:0] t;
    logic [3:0] f;
  } dr4_t;

  localparam dr_tok_t SPACER = '{t: '0, f: '0};

  // Every bit has exactly one rail high.
  function automatic logic complete(dr_tok_t x);
    return &(x.t ^ x.f);
  endfunction

  // All rails low.
  function automatic logic is_spacer(dr_tok_t x);
    return (x.t == '0) && (x.f == '0);
  endfunction

  function automatic dr_tok_t encode(logic bop, logic eop, logic [DATA_W-1:0] d);
    dr_tok_t r;
    r.t = {bop, eop, d};
    r.f = ~{bop, eop, d};
    return r;
  endfunction

  function automatic dr_tok_t kill_token();
    return encode(1'b1, 1'b1, '0);
  endfunction

endpackage
