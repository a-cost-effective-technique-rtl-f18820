`timescale 1ps/1ps
// wallace_stage: the Wallace-tree levels that make up one pipeline stage.
//
// LEVELS instances of csa_level in a chain take N_IN rows down to
// rows_after(N_IN, LEVELS) rows; with LEVELS = 0 the rows pass through.
// Purely combinational. How the eight levels of a 32-row tree are split over
// the pipeline stages is a choice of this design.
module wallace_stage
  import ts_mult_pkg::*;
#(
  parameter int N_IN   = 32,
  parameter int LEVELS = 2,
  parameter int RW     = 64
) (
  input  logic [N_IN-1:0][RW-1:0]                      rows_in,
  output logic [rows_after(N_IN, LEVELS)-1:0][RW-1:0]  rows_out
);
  if (LEVELS == 0) begin : g_none
    assign rows_out = rows_in;
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int NI = rows_after(N_IN, l);
      localparam int NO = csa_rows_out(NI);
      logic [NO-1:0][RW-1:0] r;
      if (l == 0) begin : g_first
        csa_level #(.N_IN(NI), .RW(RW)) u_lvl (.rows_in(rows_in), .rows_out(r));
      end else begin : g_next
        csa_level #(.N_IN(NI), .RW(RW)) u_lvl (.rows_in(g_lvl[l-1].r), .rows_out(r));
      end
    end
    assign rows_out = g_lvl[LEVELS-1].r;
  end
endmodule
