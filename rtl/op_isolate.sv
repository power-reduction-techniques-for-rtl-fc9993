// op_isolate: operand isolation for a bank of functional units.
//
// A functional unit that is not selected still toggles whenever its inputs
// change.  This block sits in front of a bank of NU units: a one-hot decoder
// turns the operation code into one select line per unit, and each unit gets
// its own copy of the operands ANDed with that line.  The unselected units
// therefore see constant zero operands and their outputs stop toggling.  With
// en low no unit is selected, which freezes the whole bank (an unused PE).
//
// The decoder-plus-AND-gate structure is the published one.  ISOLATE=0 gives
// the reference structure without isolation: every unit sees the raw
// operands, and sel still reports the decoded unit.
//
// Interface: en, op, a, b in; sel (one-hot), ga[u], gb[u] out.  Purely
// combinational.
module op_isolate #(
  parameter int unsigned NU      = 16,
  parameter int unsigned W       = 34,
  parameter bit          ISOLATE = 1'b1
) (
  input  logic                  en,
  input  logic [$clog2(NU)-1:0] op,
  input  logic [W-1:0]          a,
  input  logic [W-1:0]          b,
  output logic [NU-1:0]         sel,
  output logic [W-1:0]          ga [NU],
  output logic [W-1:0]          gb [NU]
);
  always_comb begin
    for (int unsigned u = 0; u < NU; u++) begin
      sel[u] = en && (op == u[$clog2(NU)-1:0]);
      if (ISOLATE) begin
        ga[u] = a & {W{sel[u]}};
        gb[u] = b & {W{sel[u]}};
      end else begin
        ga[u] = a;
        gb[u] = b;
      end
    end
  end
endmodule
