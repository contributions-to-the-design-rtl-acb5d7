// ascend_celem: logic model of the ASCEnD C-element cells.
//
// A Muller C-element copies its inputs to its output when they all agree and
// keeps its previous output while they differ; it is the basic state-holding
// element of quasi-delay-insensitive circuits. CELL selects one of the four
// cells of the basic set, with Q+ the next output and Q the present one:
//   C2    Q+ = A.B + A.Q + B.Q                 (2-input, symmetric)
//   C3    Q+ = A.B.C + A.Q + B.Q + C.Q         (3-input, symmetric as listed)
//   C2R1  Q+ = RST.(A.B + A.Q + B.Q)           (2-input, RST low forces 0)
//   C1U1  Q+ = B.(A.B + Q.B)                   (asymmetric: A only helps set)
// Unused inputs of a variant are ignored.
//
// Each function is written as a level-sensitive latch: the output is loaded
// whenever the function does not reduce to Q, so synthesis gives a latch
// plus its enable logic; a custom cell implements the same function with a
// state keeper. The C3 expression above sets Q when all three inputs are 1
// and clears it only when all three are 0.
module ascend_celem
  import ascend_pkg::*;
#(
  parameter cell_e CELL = CELL_C2
) (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic rst_n,
  output logic q
);
  logic load, d;

  always_comb begin
    unique case (CELL)
      CELL_C3: begin
        load = (a == b) && (b == c);
        d    = a;
      end
      CELL_C2R1: begin
        load = !rst_n || (a == b);
        d    = rst_n && a;
      end
      CELL_C1U1: begin
        load = !b || a;
        d    = b;
      end
      default: begin  // C2
        load = (a == b);
        d    = a;
      end
    endcase
  end

  always_latch begin
    if (load) q = d;
  end

endmodule
