// sync2: two-flop synchronizer for a bus whose value changes at most one bit
// at a time (a Gray-coded pointer) or a single level signal. The first flop
// may go metastable; the second gives it a full clock period to resolve.
// Asynchronous active-low reset clears both stages to RST_VAL.
module sync2 #(
  parameter int unsigned       W       = 1,
  parameter logic [W-1:0]      RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
