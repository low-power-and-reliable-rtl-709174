// sub_cell: one 1-bit subtractor position of a multi-bit datapath.
//
// Instantiates the exact full subtractor or one of the two approximate cells,
// chosen at elaboration time by the KIND parameter, so that a ripple
// subtractor or divider row can mix exact and approximate positions.
// Ports are those of the cells: x - y - bin = d - 2*bout. Combinational.
module sub_cell
  import sub_pkg::*;
#(
  parameter cell_kind_e KIND = CELL_EXACT
) (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic d,
  output logic bout
);
  generate
    case (KIND)
      CELL_PROPOSED1: begin : g_p1
        approx_sub_p1 u_cell (.x(x), .y(y), .bin(bin), .d(d), .bout(bout));
      end
      CELL_PROPOSED2: begin : g_p2
        approx_sub_p2 u_cell (.x(x), .y(y), .bin(bin), .d(d), .bout(bout));
      end
      default: begin : g_exact
        exact_sub_cell u_cell (.x(x), .y(y), .bin(bin), .d(d), .bout(bout));
      end
    endcase
  endgenerate
endmodule
