// baba_crossbar: BaBaRouter crossbar.
//
// Each input port has a DEMUX with one channel per output port, and each
// output port a MERGE of the channels aimed at it. The crossbar control steers
// the DEMUXes from the switch control's CTRL channels: while output o is owned
// by input i (ctrl_valid[o], ctrl_in[o] == i), flits of input i flow to output
// o. When the flit carrying EOP=1 has been delivered, ctrl_release[o] pops the
// ownership so that the next waiting input can be bound. Different
// input/output pairs transfer concurrently; with five disjoint pairs all five
// paths are active at once.
//
// Interface: d_* from the IN CTRL blocks (flit plus EOP), out_* towards the
// neighbour routers (flit only), all valid/ready. Purely combinational apart
// from the assertions; zero latency through the crossbar.
module baba_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              d_valid,
  output logic [NPORTS-1:0]              d_ready,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  d_data,
  input  logic [NPORTS-1:0]              d_eop,
  input  logic [NPORTS-1:0]              ctrl_valid,
  input  logic [NPORTS-1:0][PORT_W-1:0]  ctrl_in,
  output logic [NPORTS-1:0]              ctrl_release,
  output logic [NPORTS-1:0]              out_valid,
  input  logic [NPORTS-1:0]              out_ready,
  output logic [NPORTS-1:0][FLIT_W-1:0]  out_data
);
  always_comb begin
    d_ready      = '0;
    out_valid    = '0;
    out_data     = '0;
    ctrl_release = '0;
    for (int unsigned o = 0; o < NPORTS; o++) begin
      if (ctrl_valid[o]) begin
        out_valid[o] = d_valid[ctrl_in[o]];
        out_data[o]  = d_data[ctrl_in[o]];
        if (out_ready[o]) d_ready[ctrl_in[o]] = 1'b1;
        ctrl_release[o] = d_valid[ctrl_in[o]] && out_ready[o] && d_eop[ctrl_in[o]];
      end
    end
  end

  // An input is never bound to two outputs at the same time.
  for (genvar a = 0; a < NPORTS; a++) begin : g_excl
    for (genvar b = a + 1; b < NPORTS; b++) begin : g_pair
      assert property (@(posedge clk) disable iff (!rst_n)
        !(ctrl_valid[a] && ctrl_valid[b] && ctrl_in[a] == ctrl_in[b]));
    end
  end

endmodule
