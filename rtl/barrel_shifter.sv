// barrel_shifter: one stage of the interconnection network (pi or pi^-1).
//
// With a quasi-cyclic parity-check matrix every Z x Z block is a cyclically
// shifted identity, so routing the Z messages of one block between the
// variable lanes and the check lanes is a cyclic rotation:
//   out[i] = in[(i + shift) mod Z].
// pi uses shift = s and pi^-1 uses shift = (Z - s) mod Z. The rotation is
// built as log2(Z) stages of 2:1 multiplexers (one per shift bit), so it is
// combinational with no latency. The source method suggests a barrel shifter
// for this network; the lane/shift convention is this design's choice.
module barrel_shifter #(
  parameter int Z  = 12,
  parameter int WD = 8,
  localparam int SW = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic [WD-1:0] in_data  [Z],
  input  logic [SW-1:0] shift,
  output logic [WD-1:0] out_data [Z]
);
  logic [WD-1:0] stage [SW+1][Z];

  always_comb begin
    for (int i = 0; i < Z; i++) stage[0][i] = in_data[i];
    for (int b = 0; b < SW; b++) begin
      for (int i = 0; i < Z; i++) begin
        if (shift[b]) stage[b+1][i] = stage[b][(i + (1 << b)) % Z];
        else          stage[b+1][i] = stage[b][i];
      end
    end
    for (int i = 0; i < Z; i++) out_data[i] = stage[SW][i];
  end

  // The shift of a Z x Z circulant is always below Z.
  always_comb assert (int'(shift) < Z) else $error("shift %0d out of range", shift);
endmodule
