// baba_in_ctrl: BaBaRouter input control (IN CTRL).
//
// Parses packets in the Hermes format: flit 0 carries the destination address
// in its lower half, flit 1 the payload size in flits, and then the payload.
// On a new packet the block first hands the address (FLIT_W/2 bits) to the
// switch control, then passes the header flit to the crossbar with EOP=0.
// The size flit is stored in an internal register, the flit counter is
// cleared, and the size flit goes to the crossbar with EOP=0. Each payload
// flit increments the counter and goes out with EOP=0, except the one whose
// count reaches the stored size, which is marked EOP=1.
//
// Interface: in_* from the input FIFO; addr_* to the switch control;
// d_* (flit plus EOP, FLIT_W+1 bits in the original) to the crossbar. All
// channels are valid/ready. busy is high from the moment the address has been
// sent until the EOP flit has been accepted.
//
// Timing: no added latency; the header needs two handshakes (address, then
// data), every other flit one. The address and flit outputs are wires from
// in_data: the block's logic is in the handshakes and the EOP bit.
//
// Own choices: a size of zero marks the size flit itself as the last flit; the
// counter is FLIT_W bits wide so any size a flit can carry is accepted.
module baba_in_ctrl #(
  parameter int unsigned FLIT_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the input FIFO
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [FLIT_W-1:0]   in_data,
  // address channel to the switch control
  output logic                addr_valid,
  input  logic                addr_ready,
  output logic [FLIT_W/2-1:0] addr,
  // data + EOP channel to the crossbar
  output logic                d_valid,
  input  logic                d_ready,
  output logic [FLIT_W-1:0]   d_data,
  output logic                d_eop,
  output logic                busy
);
  typedef enum logic [1:0] {S_ADDR, S_HEAD, S_SIZE, S_BODY} state_e;

  state_e            state;
  logic [FLIT_W-1:0] size_q, count_q;
  logic              d_fire;

  assign addr       = in_data[FLIT_W/2-1:0];
  assign addr_valid = (state == S_ADDR) && in_valid;
  assign d_valid    = (state != S_ADDR) && in_valid;
  assign d_data     = in_data;
  assign in_ready   = (state != S_ADDR) && d_ready;
  assign d_fire     = d_valid && d_ready;
  assign busy       = (state != S_ADDR);

  always_comb begin
    unique case (state)
      S_SIZE:  d_eop = (in_data == '0);
      S_BODY:  d_eop = ((count_q + 1'b1) == size_q);
      default: d_eop = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_ADDR;
      size_q  <= '0;
      count_q <= '0;
    end else begin
      unique case (state)
        S_ADDR: if (addr_valid && addr_ready) state <= S_HEAD;
        S_HEAD: if (d_fire) state <= S_SIZE;
        S_SIZE: if (d_fire) begin
          size_q  <= in_data;
          count_q <= '0;
          state   <= (in_data == '0) ? S_ADDR : S_BODY;
        end
        S_BODY: if (d_fire) begin
          count_q <= count_q + 1'b1;
          if (d_eop) state <= S_ADDR;
        end
      endcase
    end
  end

endmodule
